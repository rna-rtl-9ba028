// rna_fifo_interface: the RNA's interface to the host.
//
// One configuration FIFO (CFIFO), one data FIFO (DFIFO) carrying the
// network's inputs, and one weight FIFO (WFIFO) per PE, as in the source
// design. The host side pushes; the RNA side sees the oldest word of each FIFO
// and pops it. Depths are parameters (this design's choice: 16 each); all
// FIFOs are rna_fifo instances.
module rna_fifo_interface
  import rna_pkg::*;
#(
  parameter int unsigned CFIFO_DEPTH = 16,
  parameter int unsigned DFIFO_DEPTH = 16,
  parameter int unsigned WFIFO_DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // host side
  input  logic                     cfg_push_i,
  input  cfg_t                     cfg_data_i,
  output logic                     cfg_full_o,
  input  logic                     d_push_i,
  input  data_t                    d_data_i,
  output logic                     d_full_o,
  input  logic [NUM_PE-1:0]        w_push_i,
  input  data_t [NUM_PE-1:0]       w_data_i,
  output logic [NUM_PE-1:0]        w_full_o,
  // RNA side
  input  logic                     cfg_pop_i,
  output cfg_t                     cfg_head_o,
  output logic                     cfg_empty_o,
  input  logic                     d_pop_i,
  output data_t                    d_head_o,
  output logic                     d_empty_o,
  input  logic [NUM_PE-1:0]        w_pop_i,
  output data_t [NUM_PE-1:0]       w_head_o,
  output logic [NUM_PE-1:0]        w_empty_o
);
  logic [$clog2(CFIFO_DEPTH+1)-1:0] cfg_cnt;
  logic [$clog2(DFIFO_DEPTH+1)-1:0] d_cnt;

  rna_fifo #(.WIDTH(CFG_W), .DEPTH(CFIFO_DEPTH)) u_cfifo (
    .clk, .rst_n,
    .push_i(cfg_push_i), .wr_data_i(cfg_data_i), .full_o(cfg_full_o),
    .pop_i(cfg_pop_i), .rd_data_o(cfg_head_o), .empty_o(cfg_empty_o),
    .count_o(cfg_cnt)
  );

  rna_fifo #(.WIDTH(DATA_W), .DEPTH(DFIFO_DEPTH)) u_dfifo (
    .clk, .rst_n,
    .push_i(d_push_i), .wr_data_i(d_data_i), .full_o(d_full_o),
    .pop_i(d_pop_i), .rd_data_o(d_head_o), .empty_o(d_empty_o),
    .count_o(d_cnt)
  );

  for (genvar p = 0; p < NUM_PE; p++) begin : g_wfifo
    logic [$clog2(WFIFO_DEPTH+1)-1:0] w_cnt;
    rna_fifo #(.WIDTH(DATA_W), .DEPTH(WFIFO_DEPTH)) u_wfifo (
      .clk, .rst_n,
      .push_i(w_push_i[p]), .wr_data_i(w_data_i[p]), .full_o(w_full_o[p]),
      .pop_i(w_pop_i[p]), .rd_data_o(w_head_o[p]), .empty_o(w_empty_o[p]),
      .count_o(w_cnt)
    );
  end

endmodule
