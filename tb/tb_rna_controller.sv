// tb_rna_controller: the four-stage configuration pipeline.
// Configuration words carrying a sequence number are offered from a queue
// that models the CFIFO; the data and weight FIFOs report random emptiness.
// Checks: without stalls, a word popped in cycle t is in LD at t+1, in CP at
// t+2 and stores at t+3; every word passes LD, CP and ST exactly once and in
// order; stall is raised exactly when the LD word needs an empty FIFO, and
// while stalled nothing is popped, computed or stored; the forwarding flags
// match the LD reads against the CP writes; done follows the last word.
module tb_rna_controller;
  import rna_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  cfg_t                cfg_head, ld_cfg, cp_cfg;
  logic                cfg_empty, cfg_pop, d_empty, d_pop, ld_en, fwd_bc, cp_en, stall, done;
  logic  [NUM_PE-1:0]  w_empty, w_pop, fwd_pe, wr_en;
  addr_t [NUM_PE-1:0]  wr_addr;

  rna_controller dut (.clk, .rst_n,
    .cfg_head_i(cfg_head), .cfg_empty_i(cfg_empty), .cfg_pop_o(cfg_pop),
    .d_empty_i(d_empty), .d_pop_o(d_pop), .w_empty_i(w_empty), .w_pop_o(w_pop),
    .ld_cfg_o(ld_cfg), .ld_en_o(ld_en), .fwd_pe_o(fwd_pe), .fwd_bc_o(fwd_bc),
    .cp_cfg_o(cp_cfg), .cp_en_o(cp_en), .wr_en_o(wr_en), .wr_addr_o(wr_addr),
    .stall_o(stall), .done_o(done));

  cfg_t q[$];
  int checks = 0, failures = 0;
  int next_ld = 0, next_cp = 0, next_st = 0, n_stall = 0, n_fwd = 0, n_done = 0;
  int pop_cycle[int];
  int cyc = 0;
  bit random_empty = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (cycle %0d)", what, cyc); end
  endtask

  // the sequence number lives in PE15's write address; PE15 always stores
  function automatic cfg_t make(int seq, bit last);
    cfg_t c;
    for (int b = 0; b < CFG_W; b += 32) c = (c << 32) | cfg_t'($urandom);
    c.valid = 1'b1;
    c.last  = last;
    c.bc    = bc_sel_e'($urandom_range(0, 2));
    c.bc_bank = bank_t'($urandom_range(0, 1));
    c.bc_addr = addr_t'($urandom_range(0, 1));
    for (int p = 0; p < NUM_PE; p++) begin
      c.pe[p].in2     = in2_sel_e'($urandom_range(0, 3));
      c.pe[p].rd_bank = bank_t'($urandom_range(0, 1));
      c.pe[p].rd_addr = addr_t'($urandom_range(0, 1));
      c.pe[p].wr_addr = addr_t'($urandom_range(0, 1));
    end
    c.pe[15].wr_en   = 1'b1;
    c.pe[15].wr_addr = addr_t'(seq);
    return c;
  endfunction

  always_comb begin
    cfg_empty = (q.size() == 0);
    cfg_head  = cfg_empty ? cfg_t'(0) : q[0];
  end

  always @(negedge clk) if (rst_n) begin
    bit need;
    d_empty = random_empty && $urandom_range(0, 3) == 0;
    w_empty = '0;
    if (random_empty) for (int p = 0; p < NUM_PE; p++) w_empty[p] = $urandom_range(0, 15) == 0;
    #1;
    need = ld_cfg.valid && ((ld_cfg.bc == BC_DFIFO && d_empty) ||
                            |(w_empty & {NUM_PE{1'b1}} & in2_wfifo(ld_cfg)));
    check(stall == need, "stall condition");
    if (stall) begin
      n_stall++;
      check(!cfg_pop && !d_pop && w_pop == '0 && !cp_en && wr_en == '0 && !ld_en, "frozen while stalled");
    end
    check(cfg_pop == (!stall && !cfg_empty), "configuration pop");
    check(d_pop == (ld_en && ld_cfg.bc == BC_DFIFO), "data pop");
    for (int p = 0; p < NUM_PE; p++) begin
      bit f;
      f = cp_cfg.valid && cp_cfg.pe[ld_cfg.pe[p].rd_bank].wr_en &&
          cp_cfg.pe[ld_cfg.pe[p].rd_bank].wr_addr == ld_cfg.pe[p].rd_addr;
      check(fwd_pe[p] == f, $sformatf("forward flag of PE %0d", p));
      if (f) n_fwd++;
    end
    check(fwd_bc == (ld_cfg.bc == BC_MEM && cp_cfg.valid && cp_cfg.pe[ld_cfg.bc_bank].wr_en &&
                     cp_cfg.pe[ld_cfg.bc_bank].wr_addr == ld_cfg.bc_addr), "broadcast forward flag");
    if (ld_en) begin
      check(int'(ld_cfg.pe[15].wr_addr) == next_ld % 64, "LD order");
      if (!random_empty) check(cyc == pop_cycle[next_ld] + 1, "LD one cycle after pop");
      next_ld++;
    end
    if (cp_en) begin
      check(int'(cp_cfg.pe[15].wr_addr) == next_cp % 64, "CP order");
      if (!random_empty) check(cyc == pop_cycle[next_cp] + 2, "CP two cycles after pop");
      next_cp++;
    end
    if (wr_en[15]) begin
      check(int'(wr_addr[15]) == next_st % 64, "ST order");
      if (!random_empty) check(cyc == pop_cycle[next_st] + 3, "ST three cycles after pop");
      next_st++;
    end
    if (done) n_done++;
  end

  function automatic logic [NUM_PE-1:0] in2_wfifo(cfg_t c);
    for (int p = 0; p < NUM_PE; p++) in2_wfifo[p] = (c.pe[p].in2 == IN2_WFIFO);
  endfunction

  int seq = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cfg_pop) begin
      pop_cycle[seq] = cyc;
      seq++;
      void'(q.pop_front());
    end
  end

  initial begin
    d_empty = 0; w_empty = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 40; k++) q.push_back(make(k, k == 39));
    wait (q.size() == 0);
    repeat (5) @(posedge clk);
    check(n_done == 1 && next_st == 40, "first run complete");
    random_empty = 1;
    for (int k = 40; k < 400; k++) begin
      q.push_back(make(k, k == 399));
      if ($urandom_range(0, 4) == 0) @(posedge clk);   // bubbles
    end
    wait (q.size() == 0);
    repeat (20) @(posedge clk);
    check(n_done == 2 && next_st == 400 && next_cp == 400, "second run complete");
    check(n_stall > 0 && n_fwd > 0, "stalls and forwards seen");
    $display("stalls %0d forwards %0d", n_stall, n_fwd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
