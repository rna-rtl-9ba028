// rna_pe: one processing element of the RNA.
//
// A multiplier and an adder joined by two multiplexers, followed by an
// optional sigmoid (the PE of the source design). C1C0 chooses the function:
//   0x  multiplier    out <= f(IN1 * IN2)
//   10  adder         out <= f(IN1 + IN2)
//   11  accumulation  out <= f(P + PS),  P <= IN1 * IN2
// and C2 chooses f: 0 direct, 1 sigmoid. In accumulation mode the product is
// registered (P) and added one cycle later to a partial sum PS, so one PE runs
// the two-step multiply/add pipeline of the FP and NE schedules on its own:
// while product i is being added, product i+1 is being formed. PS is zero, the
// PE's own output (a local running sum) or a value from the data memory.
//
// Interface: en_i advances the PE by one step (1 cycle latency for every
// function); when it is low, nothing changes. Arithmetic is signed fixed point
// with FRAC fractional bits; products are truncated toward minus infinity and
// every result saturates to the word range.
// The function codes and the output-type bit follow the source; the product
// register, the partial-sum select, the number format and saturation are this
// design's choices.
module rna_pe
  import rna_pkg::*;
#(
  parameter int unsigned W    = DATA_W,
  parameter int unsigned FRAC = FRAC_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en_i,
  input  pe_fn_e              fn_i,      // C1C0
  input  logic                sig_i,     // C2
  input  logic signed [W-1:0] in1_i,
  input  logic signed [W-1:0] in2_i,
  input  logic signed [W-1:0] ps_i,      // partial sum for accumulation
  output logic signed [W-1:0] out_o
);
  localparam logic signed [W:0] MAXV = (W+1)'((1 << (W-1)) - 1);
  localparam logic signed [W:0] MINV = -(W+1)'(1 << (W-1));

  logic signed [2*W-1:0] prod_full;
  logic signed [2*W-1:0] prod_shift;
  logic signed [W-1:0]   prod;       // saturated product
  logic signed [W-1:0]   prod_q;     // product register (accumulation mode)
  logic signed [W-1:0]   add_a;      // adder input through the C0 multiplexer
  logic signed [W-1:0]   add_b;
  logic signed [W:0]     sum_full;
  logic signed [W-1:0]   sum;
  logic signed [W-1:0]   pre;        // output of the C1 multiplexer
  logic signed [W-1:0]   sig_y;

  function automatic logic signed [W-1:0] sat(input logic signed [2*W-1:0] v);
    if (v > (2*W)'(MAXV))      return W'(MAXV);
    else if (v < (2*W)'(MINV)) return W'(MINV);
    else                       return W'(v);
  endfunction

  always_comb begin
    prod_full  = in1_i * in2_i;
    prod_shift = prod_full >>> FRAC;
    prod       = sat(prod_shift);
    // C0 multiplexer: IN1 for the adder, the registered product for accumulation
    add_a      = (fn_i == FN_ACC) ? prod_q : in1_i;
    add_b      = (fn_i == FN_ACC) ? ps_i   : in2_i;
    sum_full   = (W+1)'(add_a) + (W+1)'(add_b);
    sum        = sat((2*W)'(sum_full));
    // C1 multiplexer: multiplier or adder
    pre        = fn_i[1] ? sum : prod;
  end

  rna_sigmoid #(.W(W), .FRAC(FRAC)) u_sig (.x_i(pre), .y_o(sig_y));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod_q <= '0;
      out_o  <= '0;
    end else if (en_i) begin
      out_o <= sig_i ? sig_y : pre;
      if (fn_i == FN_ACC) prod_q <= prod;
    end
  end

endmodule
