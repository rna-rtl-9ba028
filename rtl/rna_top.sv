// rna_top: the reconfigurable neural architecture (RNA).
//
// A multi-layer perceptron accelerator built from a FIFO interface, a 4x4
// processing-element array (PEA), a 16-bank data memory and a controller, as
// in the source design. The host pushes the network's inputs into the DFIFO,
// each PE's weights into that PE's WFIFO, and one configuration word per
// cycle of work into the CFIFO. The words are produced offline by a schedule
// that picks, per layer, full parallelism (FP: one neuron per PE), neuron
// extension (NE: more neurons than PEs, partial sums kept in memory) or
// computation extension (CE: eight PEs multiply, seven add in a tree, one
// accumulates). Layer outputs stay in the data memory, where the next layer
// reads them; the host reads results through the memory's host port.
//
// Timing: a task of C configuration words ends (done_o) C + 3 cycles after the
// first word leaves the CFIFO, unless the pipeline stalls on an empty data or
// weight FIFO (stall_o). Parameters set the FIFO depths (this design's
// choice, 16).
module rna_top
  import rna_pkg::*;
#(
  parameter int unsigned CFIFO_DEPTH = 16,
  parameter int unsigned DFIFO_DEPTH = 16,
  parameter int unsigned WFIFO_DEPTH = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  // configuration FIFO
  input  logic                cfg_push_i,
  input  cfg_t                cfg_data_i,
  output logic                cfg_full_o,
  // data FIFO
  input  logic                d_push_i,
  input  data_t               d_data_i,
  output logic                d_full_o,
  // weight FIFOs
  input  logic [NUM_PE-1:0]   w_push_i,
  input  data_t [NUM_PE-1:0]  w_data_i,
  output logic [NUM_PE-1:0]   w_full_o,
  // host read port of the data memory
  input  bank_t               host_bank_i,
  input  addr_t               host_addr_i,
  output data_t               host_data_o,
  // status
  output logic                stall_o,
  output logic                done_o
);
  cfg_t                cfg_head, ld_cfg, cp_cfg;
  logic                cfg_empty, cfg_pop;
  data_t               d_head;
  logic                d_empty, d_pop;
  data_t [NUM_PE-1:0]  w_head;
  logic  [NUM_PE-1:0]  w_empty, w_pop;
  logic                ld_en, cp_en, fwd_bc;
  logic  [NUM_PE-1:0]  fwd_pe, wr_en;
  addr_t [NUM_PE-1:0]  wr_addr;
  data_t [NUM_PE-1:0]  pe_out;

  localparam int unsigned NRD = NUM_PE + 2;
  bank_t [NRD-1:0]     rd_bank;
  addr_t [NRD-1:0]     rd_addr;
  data_t [NRD-1:0]     rd_data;
  logic  [NRD-1:0]     rd_bypass;

  rna_fifo_interface #(
    .CFIFO_DEPTH(CFIFO_DEPTH), .DFIFO_DEPTH(DFIFO_DEPTH), .WFIFO_DEPTH(WFIFO_DEPTH)
  ) u_fifos (
    .clk, .rst_n,
    .cfg_push_i, .cfg_data_i, .cfg_full_o,
    .d_push_i, .d_data_i, .d_full_o,
    .w_push_i, .w_data_i, .w_full_o,
    .cfg_pop_i(cfg_pop), .cfg_head_o(cfg_head), .cfg_empty_o(cfg_empty),
    .d_pop_i(d_pop), .d_head_o(d_head), .d_empty_o(d_empty),
    .w_pop_i(w_pop), .w_head_o(w_head), .w_empty_o(w_empty)
  );

  rna_controller u_ctrl (
    .clk, .rst_n,
    .cfg_head_i(cfg_head), .cfg_empty_i(cfg_empty), .cfg_pop_o(cfg_pop),
    .d_empty_i(d_empty), .d_pop_o(d_pop),
    .w_empty_i(w_empty), .w_pop_o(w_pop),
    .ld_cfg_o(ld_cfg), .ld_en_o(ld_en), .fwd_pe_o(fwd_pe), .fwd_bc_o(fwd_bc),
    .cp_cfg_o(cp_cfg), .cp_en_o(cp_en),
    .wr_en_o(wr_en), .wr_addr_o(wr_addr),
    .stall_o, .done_o
  );

  always_comb begin
    for (int p = 0; p < NUM_PE; p++) begin
      rd_bank[p] = ld_cfg.pe[p].rd_bank;
      rd_addr[p] = ld_cfg.pe[p].rd_addr;
    end
    rd_bank[NUM_PE]   = ld_cfg.bc_bank;
    rd_addr[NUM_PE]   = ld_cfg.bc_addr;
    rd_bank[NUM_PE+1] = host_bank_i;
    rd_addr[NUM_PE+1] = host_addr_i;
  end
  assign host_data_o = rd_data[NUM_PE+1];

  rna_data_mem #(.NRD(NRD)) u_mem (
    .clk,
    .wr_en_i(wr_en), .wr_addr_i(wr_addr), .wr_data_i(pe_out),
    .rd_bank_i(rd_bank), .rd_addr_i(rd_addr), .rd_data_o(rd_data),
    .bypass_o(rd_bypass)
  );

  rna_pea u_pea (
    .clk, .rst_n,
    .ld_en_i(ld_en), .ld_cfg_i(ld_cfg),
    .d_head_i(d_head), .w_head_i(w_head),
    .mem_pe_i(rd_data[NUM_PE-1:0]), .mem_bc_i(rd_data[NUM_PE]),
    .fwd_pe_i(fwd_pe), .fwd_bc_i(fwd_bc),
    .cp_en_i(cp_en), .cp_cfg_i(cp_cfg),
    .pe_out_o(pe_out)
  );

endmodule
