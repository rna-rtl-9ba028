// tb_rna_fifo: random push/pop traffic against a queue model.
// Checks the head word, full, empty and the fill count every cycle, and that
// a simultaneous push and pop keeps the count.
module tb_rna_fifo;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int W = 16, D = 16;
  logic         push, pop, full, empty;
  logic [W-1:0] wdata, rdata;
  logic [$clog2(D+1)-1:0] count;
  logic [W-1:0] model[$];
  int checks = 0, failures = 0, n_both = 0, n_full = 0;

  rna_fifo dut (.clk, .rst_n, .push_i(push), .wr_data_i(wdata),
    .full_o(full), .pop_i(pop), .rd_data_o(rdata), .empty_o(empty), .count_o(count));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    push = 0; pop = 0; wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int bias;
      @(negedge clk);
      check(count == model.size(), $sformatf("count %0d model %0d", count, model.size()));
      check(full == (model.size() == D), "full flag");
      check(empty == (model.size() == 0), "empty flag");
      if (model.size() > 0) check(rdata == model[0], "head word");
      bias = (t / 500) % 2;   // alternate filling and draining phases
      push = !full && ($urandom_range(0, 3) < (bias ? 3 : 1));
      pop  = !empty && ($urandom_range(0, 3) < (bias ? 1 : 3));
      wdata = W'($urandom);
      if (push && pop) n_both++;
      if (full) n_full++;
      @(posedge clk);
      if (pop) void'(model.pop_front());
      if (push) model.push_back(wdata);
    end
    check(n_both > 0 && n_full > 0, "push+pop and full both seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
