// tb_rna_random: random network shapes on the RNA at default parameters.
//
// Forty networks of two to four layers with random widths (1..40 inputs,
// 1..40 neurons per layer; at most 32 neurons in a CE layer), each run with
// the fewest-cycles schedule, with FP/NE only, and with CE on every layer
// after the first. This reaches cases the six benchmarks do not: CE layers
// with several groups of eight inputs (partial sums chained through PE6,
// including one-neuron layers where the chain needs forwarding), NE with a
// neuron count that is not a multiple of 16, and CE feeding CE. Every output
// of the last two layers is checked against the reference model and the
// execution time against the cycle-count formulas; the producers are
// throttled in every fourth run.
module tb_rna_random;
  import rna_pkg::*;
  import rna_tb_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               cfg_push, cfg_full, d_push, d_full;
  cfg_t               cfg_data;
  data_t              d_data;
  logic  [NUM_PE-1:0] w_push, w_full;
  data_t [NUM_PE-1:0] w_data;
  bank_t              host_bank;
  addr_t              host_addr;
  data_t              host_data;
  logic               stall, done;

  rna_top dut (
    .clk, .rst_n,
    .cfg_push_i(cfg_push), .cfg_data_i(cfg_data), .cfg_full_o(cfg_full),
    .d_push_i(d_push), .d_data_i(d_data), .d_full_o(d_full),
    .w_push_i(w_push), .w_data_i(w_data), .w_full_o(w_full),
    .host_bank_i(host_bank), .host_addr_i(host_addr), .host_data_o(host_data),
    .stall_o(stall), .done_o(done)
  );

  int checks = 0, failures = 0;
  int n_fp = 0, n_ne = 0, n_ce = 0;
  int n_stall = 0, n_bubble = 0, n_bypass = 0, n_fwd = 0;
  longint cyc = 0;
  bit active = 0;
  bit throttle = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  always @(posedge clk) if (rst_n && active) begin
    cfg_t l;
    l = dut.u_ctrl.ld_cfg_o;
    if (stall) n_stall++;
    if (!l.valid && dut.u_ctrl.cp_q.valid) n_bubble++;
    if (dut.u_ctrl.ld_en_o) begin
      if (l.bc == BC_MEM && dut.u_ctrl.fwd_bc_o) n_fwd++;
      else if (l.bc == BC_MEM && dut.u_mem.bypass_o[NUM_PE]) n_bypass++;
      for (int p = 0; p < NUM_PE; p++) begin
        bit used;
        used = l.pe[p].in1 == IN1_MEM || l.pe[p].in2 == IN2_MEM || l.pe[p].ps == PS_MEM;
        if (used && dut.u_ctrl.fwd_pe_o[p]) n_fwd++;
        else if (used && dut.u_mem.bypass_o[p]) n_bypass++;
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run(input string name, input int sizes[], input int mode,
                     input int exp_tet, input bit thr);
    rna_sched s;
    longint t0, t1;
    bit got_t0;
    s = new(sizes, mode);
    s.build();
    for (int l = 1; l < s.nl; l++)
      case (s.meth[l]) M_FP: n_fp++; M_NE: n_ne++; default: n_ce++; endcase
    throttle = thr;
    rst_n = 1'b0;
    cfg_push = 0; d_push = 0; w_push = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    active = 1;
    got_t0 = 0;
    fork
      // producers: decide at the falling edge, so a push is only offered
      // when the FIFO has room and is always taken at the next rising edge
      begin : feed_d
        int k;
        k = 0;
        while (k < s.dq.size()) begin
          @(negedge clk);
          d_push = 1'b0;
          if (!d_full && !(thr && $urandom_range(0, 2) == 0)) begin
            d_data = data_t'(s.dq[k]);
            d_push = 1'b1;
            k++;
          end
        end
        @(negedge clk) d_push = 1'b0;
      end
      begin : feed_w
        int idx[NUM_PE];
        bit busy;
        idx = '{default: 0};
        busy = 1;
        while (busy) begin
          @(negedge clk);
          busy = 0;
          for (int p = 0; p < NUM_PE; p++) begin
            w_push[p] = 1'b0;
            if (idx[p] < s.wq[p].size()) begin
              busy = 1;
              if (!w_full[p] && !(thr && $urandom_range(0, 2) == 0)) begin
                w_data[p] = data_t'(s.wq[p][idx[p]]);
                w_push[p] = 1'b1;
                idx[p]++;
              end
            end
          end
        end
      end
      begin : feed_cfg
        int k;
        k = 0;
        if (!thr) repeat (20) @(posedge clk);
        while (k < s.cfgs.size()) begin
          @(negedge clk);
          cfg_push = 1'b0;
          if (!cfg_full && !(thr && $urandom_range(0, 3) == 0)) begin
            cfg_data = s.cfgs[k];
            cfg_push = 1'b1;
            k++;
          end
        end
        @(negedge clk) cfg_push = 1'b0;
      end
      begin : timing
        forever begin
          @(posedge clk);
          if (!got_t0 && dut.u_ctrl.cfg_pop_o) begin t0 = cyc; got_t0 = 1; end
          if (done) begin t1 = cyc; break; end
        end
      end
    join
    active = 0;
    // results of the last two layers through the host port
    for (int l = s.nl - 2; l < s.nl; l++) begin
      if (l < 1) continue;
      for (int j = 0; j < s.sz[l]; j++) begin
        host_bank = bank_t'(s.loc_bank[l][j]);
        host_addr = addr_t'(s.loc_addr[l][j]);
        #1;
        check(host_data == data_t'(s.val[l][j]),
              $sformatf("%s layer %0d neuron %0d: got %0d expected %0d",
                        name, l, j, int'(host_data), s.val[l][j]));
      end
    end
    if (!thr) begin
      check(int'(t1 - t0 + 1) == s.tet,
            $sformatf("%s: TET %0d, model %0d", name, t1 - t0 + 1, s.tet));
      check(int'(t1 - t0 + 1) == exp_tet,
            $sformatf("%s: TET %0d, expected %0d", name, t1 - t0 + 1, exp_tet));
    end
    $display("%s mode %0d: %0d configuration words, TET %0d", name, mode, s.n_cfg, int'(t1 - t0 + 1));
  endtask

  initial begin
    cfg_push = 0; d_push = 0; w_push = '0; cfg_data = '0; d_data = '0; w_data = '0;
    host_bank = '0; host_addr = '0;
    for (int r = 0; r < 40; r++) begin
      int nl;
      int sizes[];
      nl = $urandom_range(3, 5);
      sizes = new[nl];
      foreach (sizes[k]) sizes[k] = $urandom_range(1, 40);
      for (int k = 2; k < nl; k++) if (sizes[k] > 32) sizes[k] = 32;
      for (int mode = 0; mode < 3; mode++) begin
        rna_sched s;
        s = new(sizes, mode);
        s.build();
        run($sformatf("net%0d", r), sizes, mode, s.tet, (r % 4) == 3);
      end
    end
    $display("mechanisms: FP %0d NE %0d CE %0d stall %0d bubble %0d bypass %0d forward %0d",
             n_fp, n_ne, n_ce, n_stall, n_bubble, n_bypass, n_fwd);
    check(n_fp > 0 && n_ne > 0 && n_ce > 0, "all three schedules used");
    check(n_stall > 0 && n_bubble > 0, "stalls and bubbles seen");
    check(n_bypass > 0 && n_fwd > 0, "bypass and forwarding seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);

    failures++;
    $display("FAIL: watchdog (stall=%0d)", stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
