// rna_fifo: synchronous first-in first-out buffer.
//
// Used for every FIFO of the RNA's host interface (the configuration FIFO,
// the data FIFO and the sixteen weight FIFOs). The source names these FIFOs
// but gives no depth or handshake; this is a plain circular buffer of DEPTH
// words with show-ahead output: rd_data_o is the oldest word whenever empty_o
// is low, and pop_i removes it at the clock edge. A push and a pop may happen
// in the same cycle. Pushing when full or popping when empty is a protocol
// error (checked by assertions) and is ignored by the logic.
module rna_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push_i,
  input  logic [WIDTH-1:0] wr_data_i,
  output logic             full_o,
  input  logic             pop_i,
  output logic [WIDTH-1:0] rd_data_o,
  output logic             empty_o,
  output logic [$clog2(DEPTH+1)-1:0] count_o
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic [$clog2(DEPTH+1)-1:0] cnt;
  logic             do_push, do_pop;

  assign full_o    = (cnt == ($clog2(DEPTH+1))'(DEPTH));
  assign empty_o   = (cnt == 0);
  assign count_o   = cnt;
  assign rd_data_o = mem[rp];
  assign do_push   = push_i && !full_o;
  assign do_pop    = pop_i && !empty_o;

  function automatic logic [AW-1:0] incr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
    end else begin
      if (do_push) wp <= incr(wp);
      if (do_pop)  rp <= incr(rp);
      if (do_push && !do_pop)      cnt <= cnt + 1'b1;
      else if (!do_push && do_pop) cnt <= cnt - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= wr_data_i;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push_i |-> !full_o);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop_i |-> !empty_o);

endmodule
