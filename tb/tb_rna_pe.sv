// tb_rna_pe: tests the processing element in each of its functions.
// Random operands in multiplier, adder and accumulation mode, with direct and
// sigmoid output; a dot product run as the FP pipeline (product registered,
// added one cycle later, running sum fed back); enable low must freeze the PE.
// Expected values come from the reference arithmetic of rna_tb_pkg.
module tb_rna_pe;
  import rna_pkg::*;
  import rna_tb_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   en, sig;
  pe_fn_e fn;
  data_t  in1, in2, ps, out;
  int checks = 0, failures = 0;

  rna_pe dut (.clk, .rst_n, .en_i(en), .fn_i(fn), .sig_i(sig),
              .in1_i(in1), .in2_i(in2), .ps_i(ps), .out_o(out));

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL: %s got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int rnd();
    return ($urandom_range(0, 3) == 0) ? int'($urandom_range(0, 65535)) - 32768
                                       : int'($urandom_range(0, 2047)) - 1024;
  endfunction

  task automatic step(input pe_fn_e f, input bit s, input int a, input int b, input int p);
    @(negedge clk);
    en = 1; fn = f; sig = s; in1 = data_t'(a); in2 = data_t'(b); ps = data_t'(p);
    @(posedge clk);
    #1;
  endtask

  initial begin
    en = 0; fn = FN_MUL; sig = 0; in1 = 0; in2 = 0; ps = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // multiplier and adder, direct and sigmoid
    for (int t = 0; t < 300; t++) begin
      int a, b, e;
      bit s;
      a = rnd(); b = rnd(); s = $urandom_range(0, 1);
      if (t % 2 == 0) begin
        step(($urandom_range(0, 1) != 0) ? FN_MUL : FN_MUL1, s, a, b, 0);
        e = ref_mul(a, b);
      end else begin
        step(FN_ADD, s, a, b, rnd());
        e = ref_add(a, b);
      end
      check(int'(out), s ? ref_sig(e) : e, $sformatf("fn t=%0d", t));
    end
    // accumulation: a dot product through the FP pipeline
    for (int r = 0; r < 20; r++) begin
      int m, d[], w[], s;
      m = $urandom_range(1, 12);
      d = new[m]; w = new[m];
      foreach (d[i]) begin d[i] = rnd() / 4; w[i] = rnd() / 4; end
      s = 0;
      for (int c = 0; c <= m; c++) begin
        @(negedge clk);
        en = 1; fn = FN_ACC; sig = (c == m);
        in1 = data_t'((c < m) ? d[c] : 0);
        in2 = data_t'((c < m) ? w[c] : 0);
        ps  = (c <= 1) ? data_t'(0) : out;     // partial sum from the PE itself
        @(posedge clk);
        #1;
        if (c >= 1) s = ref_add(ref_mul(d[c-1], w[c-1]), s);
        if (c >= 1 && c < m) check(int'(out), s, $sformatf("acc run %0d step %0d", r, c));
      end
      check(int'(out), ref_sig(s), $sformatf("acc run %0d final", r));
      // enable low: nothing moves
      @(negedge clk);
      en = 0; fn = FN_ADD; in1 = 100; in2 = 100;
      repeat (3) @(posedge clk);
      #1;
      check(int'(out), ref_sig(s), "hold with enable low");
    end
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
