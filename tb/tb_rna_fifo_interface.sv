// tb_rna_fifo_interface: the CFIFO, DFIFO and sixteen WFIFOs are independent.
// Each FIFO gets its own random stream; random pops on each must return that
// FIFO's words in order, and full/empty must follow each FIFO's own fill.
module tb_rna_fifo_interface;
  import rna_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               cfg_push, cfg_full, cfg_pop, cfg_empty;
  cfg_t               cfg_data, cfg_head;
  logic               d_push, d_full, d_pop, d_empty;
  data_t              d_data, d_head;
  logic  [NUM_PE-1:0] w_push, w_full, w_pop, w_empty;
  data_t [NUM_PE-1:0] w_data, w_head;

  rna_fifo_interface dut (.clk, .rst_n,
    .cfg_push_i(cfg_push), .cfg_data_i(cfg_data), .cfg_full_o(cfg_full),
    .d_push_i(d_push), .d_data_i(d_data), .d_full_o(d_full),
    .w_push_i(w_push), .w_data_i(w_data), .w_full_o(w_full),
    .cfg_pop_i(cfg_pop), .cfg_head_o(cfg_head), .cfg_empty_o(cfg_empty),
    .d_pop_i(d_pop), .d_head_o(d_head), .d_empty_o(d_empty),
    .w_pop_i(w_pop), .w_head_o(w_head), .w_empty_o(w_empty));

  cfg_t  mc[$];
  data_t md[$];
  data_t mw[NUM_PE][$];
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic cfg_t rnd_cfg();
    cfg_t c;
    for (int b = 0; b < CFG_W; b += 32) c = (c << 32) | cfg_t'($urandom);
    return c;
  endfunction

  initial begin
    cfg_push = 0; cfg_pop = 0; d_push = 0; d_pop = 0; w_push = '0; w_pop = '0;
    cfg_data = '0; d_data = '0; w_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      check(cfg_empty == (mc.size() == 0) && cfg_full == (mc.size() == 16), "cfifo flags");
      if (mc.size() > 0) check(cfg_head == mc[0], "cfifo head");
      check(d_empty == (md.size() == 0) && d_full == (md.size() == 16), "dfifo flags");
      if (md.size() > 0) check(d_head == md[0], "dfifo head");
      for (int p = 0; p < NUM_PE; p++) begin
        check(w_empty[p] == (mw[p].size() == 0) && w_full[p] == (mw[p].size() == 16),
              $sformatf("wfifo %0d flags", p));
        if (mw[p].size() > 0) check(w_head[p] == mw[p][0], $sformatf("wfifo %0d head", p));
      end
      cfg_push = !cfg_full && $urandom_range(0, 1);  cfg_data = rnd_cfg();
      cfg_pop  = !cfg_empty && $urandom_range(0, 1);
      d_push   = !d_full && $urandom_range(0, 1);    d_data = data_t'($urandom);
      d_pop    = !d_empty && $urandom_range(0, 1);
      for (int p = 0; p < NUM_PE; p++) begin
        w_push[p] = !w_full[p] && ($urandom_range(0, 3) < (p % 4));
        w_data[p] = data_t'($urandom);
        w_pop[p]  = !w_empty[p] && ($urandom_range(0, 3) < 3 - (p % 4));
      end
      @(posedge clk);
      if (cfg_pop) void'(mc.pop_front());
      if (cfg_push) mc.push_back(cfg_data);
      if (d_pop) void'(md.pop_front());
      if (d_push) md.push_back(d_data);
      for (int p = 0; p < NUM_PE; p++) begin
        if (w_pop[p]) void'(mw[p].pop_front());
        if (w_push[p]) mw[p].push_back(w_data[p]);
      end
    end
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
