// rna_controller: the RNA's four-stage configuration pipeline.
//
// The host writes one configuration word per clock cycle of work into the
// CFIFO. The controller moves each word through four stages, one cycle each,
// as in the source design: Load Configuration (LC: pop the word), Load Data
// (LD: pop the data and weight FIFOs, read the data memory), Compute (CP: the
// PEs execute) and Store Data (ST: PE outputs are written into their banks).
// Because a new word enters every cycle, configuration and memory traffic
// overlap the computation, and a task of C words finishes C + 3 cycles after
// its first word is popped (C + STG - 1 with STG = 4 stages).
//
// This design's own choices:
// * An empty CFIFO inserts a bubble (valid = 0) that leaves the PEs untouched.
// * Stall: if the word in LD needs a FIFO that is empty (the DFIFO for a
//   broadcast load, a WFIFO for a weight operand), the whole pipeline freezes
//   until the data arrives; no PE, FIFO or memory changes meanwhile.
// * Forwarding: if a memory read in LD targets the word that the CP-stage
//   configuration is about to store, the value does not exist yet; the read is
//   flagged (fwd_*_o) and the PE array takes the value from the writing PE's
//   output register one cycle later instead. A read of the word stored in the
//   same cycle is served by the memory's write-through bypass.
// * done_o pulses when a word marked last leaves ST.
module rna_controller
  import rna_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // FIFO interface
  input  cfg_t                cfg_head_i,
  input  logic                cfg_empty_i,
  output logic                cfg_pop_o,
  input  logic                d_empty_i,
  output logic                d_pop_o,
  input  logic [NUM_PE-1:0]   w_empty_i,
  output logic [NUM_PE-1:0]   w_pop_o,
  // load-data stage
  output cfg_t                ld_cfg_o,
  output logic                ld_en_o,
  output logic [NUM_PE-1:0]   fwd_pe_o,
  output logic                fwd_bc_o,
  // compute stage
  output cfg_t                cp_cfg_o,
  output logic                cp_en_o,
  // store-data stage
  output logic [NUM_PE-1:0]   wr_en_o,
  output addr_t [NUM_PE-1:0]  wr_addr_o,
  // status
  output logic                stall_o,
  output logic                done_o
);
  cfg_t ld_q, cp_q, st_q;
  logic need_w_missing;

  // A write planned by the CP-stage word to (bank, addr)?
  function automatic logic cp_writes(input cfg_t cp, input bank_t b, input addr_t a);
    return cp.valid && cp.pe[b].wr_en && (cp.pe[b].wr_addr == a);
  endfunction

  always_comb begin
    need_w_missing = 1'b0;
    for (int p = 0; p < NUM_PE; p++)
      if (ld_q.pe[p].in2 == IN2_WFIFO && w_empty_i[p]) need_w_missing = 1'b1;
    stall_o = ld_q.valid && ((ld_q.bc == BC_DFIFO && d_empty_i) || need_w_missing);

    cfg_pop_o = !stall_o && !cfg_empty_i;
    ld_en_o   = ld_q.valid && !stall_o;
    d_pop_o   = ld_en_o && (ld_q.bc == BC_DFIFO);
    for (int p = 0; p < NUM_PE; p++) begin
      w_pop_o[p]  = ld_en_o && (ld_q.pe[p].in2 == IN2_WFIFO);
      fwd_pe_o[p] = cp_writes(cp_q, ld_q.pe[p].rd_bank, ld_q.pe[p].rd_addr);
      wr_en_o[p]  = st_q.valid && st_q.pe[p].wr_en && !stall_o;
      wr_addr_o[p] = st_q.pe[p].wr_addr;
    end
    fwd_bc_o = (ld_q.bc == BC_MEM) && cp_writes(cp_q, ld_q.bc_bank, ld_q.bc_addr);

    ld_cfg_o = ld_q;
    cp_cfg_o = cp_q;
    cp_en_o  = cp_q.valid && !stall_o;
    done_o   = st_q.valid && st_q.last && !stall_o;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ld_q <= '0;
      cp_q <= '0;
      st_q <= '0;
    end else if (!stall_o) begin
      ld_q <= cfg_empty_i ? '0 : cfg_head_i;
      cp_q <= ld_q;
      st_q <= cp_q;
    end
  end

endmodule
