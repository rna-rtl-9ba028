// tb_rna_pea: the PE array with its load-data registers and fixed links.
// The testbench plays the controller: a word given to LD in one cycle is given
// to CP in the next. Tests:
//  * links: every PE first computes a distinct value; then each adder-position
//    PE passes neighbour A, then neighbour B, which must be the PEs listed in
//    the array's link table (written out here from the array drawing);
//  * a CE kernel: eight products summed through the tree and added to a
//    partial sum in PE6 four cycles after the multiply, direct and sigmoid;
//  * an FP dot product in one PE with data from the broadcast register;
//  * forwarding: a memory read flagged as forwarded takes the producing PE's
//    output instead of the stale memory word.
module tb_rna_pea;
  import rna_pkg::*;
  import rna_tb_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               ld_en, cp_en, fwd_bc;
  cfg_t               ld_cfg, cp_cfg;
  data_t              d_head, mem_bc;
  data_t [NUM_PE-1:0] w_head, mem_pe, pe_out;
  logic  [NUM_PE-1:0] fwd_pe;

  rna_pea dut (.clk, .rst_n, .ld_en_i(ld_en), .ld_cfg_i(ld_cfg), .d_head_i(d_head),
    .w_head_i(w_head), .mem_pe_i(mem_pe), .mem_bc_i(mem_bc), .fwd_pe_i(fwd_pe),
    .fwd_bc_i(fwd_bc), .cp_en_i(cp_en), .cp_cfg_i(cp_cfg), .pe_out_o(pe_out));

  int checks = 0, failures = 0;

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL: %s got %0d expected %0d", what, got, exp); end
  endtask

  // one pipeline step: c enters LD, the previous LD word enters CP
  task automatic step(input cfg_t c);
    @(negedge clk);
    cp_cfg = ld_cfg;
    cp_en  = ld_cfg.valid;
    ld_cfg = c;
    ld_en  = c.valid;
    @(posedge clk);
    #1;
  endtask

  // link table of the array drawing: {adder, neighbour A, neighbour B}
  int links[8][3] = '{'{1, 0, 4}, '{2, 3, 7}, '{13, 12, 8}, '{14, 15, 11},
                      '{5, 1, 2}, '{9, 13, 14}, '{10, 5, 9}, '{6, 10, -1}};

  initial begin
    cfg_t c;
    int v[NUM_PE];
    ld_en = 0; cp_en = 0; fwd_bc = 0; fwd_pe = '0; d_head = 0; mem_bc = 0; w_head = '0; mem_pe = '0;
    ld_cfg = '0; cp_cfg = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // ---- links ----
    for (int side = 0; side < 2; side++) begin
      c = idle_cfg();
      for (int p = 0; p < NUM_PE; p++) begin
        v[p] = (p + 1) * 37 - 300;
        mem_pe[p] = data_t'(v[p]);
        w_head[p] = data_t'(256);                // 1.0
        c.pe[p].in1 = IN1_MEM;
        c.pe[p].in2 = IN2_WFIFO;
      end
      step(c);                                   // LD: values captured
      c = idle_cfg();
      for (int k = 0; k < 8; k++) begin
        int a;
        a = links[k][0];
        c.pe[a].fn  = FN_ADD;
        c.pe[a].in1 = (side == 0) ? IN1_NEIGH : IN1_ZERO;
        c.pe[a].in2 = (side == 0) ? IN2_ZERO : IN2_NEIGH;
      end
      step(c);                                   // CP of the multiplies
      for (int p = 0; p < NUM_PE; p++) check(int'(pe_out[p]), v[p], "multiply by one");
      step('0);                                  // CP of the pass-through
      for (int k = 0; k < 8; k++) begin
        int n;
        n = links[k][side + 1];
        check(int'(pe_out[links[k][0]]), (n < 0) ? 0 : v[n],
              $sformatf("PE%0d neighbour %s", links[k][0], side ? "B" : "A"));
      end
    end

    // ---- CE kernel ----
    for (int r = 0; r < 10; r++) begin
      int d[8], w[8], pr[8], s0, e;
      bit sg;
      cfg_t cc[5];
      sg = r % 2;
      s0 = int'($urandom_range(0, 511)) - 256;
      for (int k = 0; k < 8; k++) begin
        d[k] = int'($urandom_range(0, 1023)) - 512;
        w[k] = int'($urandom_range(0, 1023)) - 512;
        pr[k] = ref_mul(d[k], w[k]);
      end
      e = ref_add(ref_add(ref_add(ref_add(pr[0], pr[1]), ref_add(pr[2], pr[3])),
                          ref_add(ref_add(pr[4], pr[5]), ref_add(pr[6], pr[7]))), s0);
      if (sg) e = ref_sig(e);
      foreach (cc[i]) cc[i] = idle_cfg();
      for (int k = 0; k < 8; k++) begin
        int p;
        p = ce_mul(k);
        cc[0].pe[p].in1 = IN1_MEM;
        cc[0].pe[p].in2 = IN2_WFIFO;
        mem_pe[p] = data_t'(d[k]);
        w_head[p] = data_t'(w[k]);
      end
      for (int q = 0; q < NUM_PE; q++) begin
        int lvl;
        lvl = (q == 1 || q == 2 || q == 13 || q == 14) ? 1 : (q == 5 || q == 9) ? 2 : (q == 10) ? 3 : 0;
        if (lvl != 0) begin
          cc[lvl].pe[q].fn = FN_ADD; cc[lvl].pe[q].in1 = IN1_NEIGH; cc[lvl].pe[q].in2 = IN2_NEIGH;
        end
      end
      cc[4].pe[6].fn  = FN_ADD;
      cc[4].pe[6].in1 = IN1_NEIGH;
      cc[4].pe[6].in2 = IN2_MEM;
      cc[4].pe[6].sig = sg;
      step(cc[0]);
      for (int i = 1; i < 5; i++) begin
        if (i == 4) mem_pe[6] = data_t'(s0);
        step(cc[i]);
      end
      step('0);
      check(int'(pe_out[6]), e, $sformatf("CE kernel run %0d", r));
    end

    // ---- FP dot product in PE3 from the broadcast register ----
    begin
      int m, s;
      int d[], w[];
      m = 6; s = 0;
      d = new[m]; w = new[m];
      for (int i = 0; i < m; i++) begin
        d[i] = int'($urandom_range(0, 511)) - 256;
        w[i] = int'($urandom_range(0, 511)) - 256;
        s = ref_add(ref_mul(d[i], w[i]), s);
      end
      for (int i = 0; i <= m; i++) begin
        c = idle_cfg();
        c.pe[3].fn  = FN_ACC;
        c.pe[3].in1 = IN1_BCAST;
        c.pe[3].ps  = (i >= 2) ? PS_FB : PS_ZERO;
        c.pe[3].sig = (i == m);
        if (i < m) begin
          c.bc = BC_DFIFO;
          d_head = data_t'(d[i]);
          c.pe[3].in2 = IN2_WFIFO;
          w_head[3] = data_t'(w[i]);
        end
        step(c);
      end
      step('0);
      check(int'(pe_out[3]), ref_sig(s), "FP dot product");
    end

    // ---- forwarding: every PE reads a word its producer is still computing ----
    for (int r = 0; r < NUM_PE; r++) begin
      int src, val;
      src = (r + 5) % NUM_PE;
      val = int'($urandom_range(0, 2047)) - 1024;
      c = idle_cfg();
      c.pe[src].fn = FN_ADD; c.pe[src].in1 = IN1_MEM; c.pe[src].in2 = IN2_ZERO;
      mem_pe = '0;
      mem_pe[src] = data_t'(val);
      step(c);                                   // producer in LD
      c = idle_cfg();
      c.bc = BC_MEM; c.bc_bank = bank_t'(src);
      mem_bc = data_t'(-5);                      // stale memory word
      fwd_bc = 1'b1;
      c.pe[r].in1 = IN1_MEM; c.pe[r].in2 = IN2_WFIFO; w_head[r] = data_t'(256);
      c.pe[r].rd_bank = bank_t'(src);
      mem_pe[r] = data_t'(-7);                   // stale memory word
      fwd_pe = '0; fwd_pe[r] = 1'b1;
      c.pe[(r + 1) % NUM_PE].in1 = IN1_BCAST;
      c.pe[(r + 1) % NUM_PE].in2 = IN2_WFIFO;
      w_head[(r + 1) % NUM_PE] = data_t'(512);
      step(c);                                   // producer in CP, readers in LD
      fwd_bc = 0; fwd_pe = '0;
      c = idle_cfg();
      c.pe[(r + 2) % NUM_PE].in1 = IN1_BCAST; c.pe[(r + 2) % NUM_PE].in2 = IN2_WFIFO;
      w_head[(r + 2) % NUM_PE] = data_t'(256);
      step(c);                                   // readers in CP; broadcast held next
      check(int'(pe_out[r]), val, $sformatf("PE%0d read port forwarded from PE%0d", r, src));
      check(int'(pe_out[(r + 1) % NUM_PE]), ref_mul(val, 512), "broadcast forwarded");
      step('0);
      check(int'(pe_out[(r + 2) % NUM_PE]), val, "forwarded broadcast value held");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
