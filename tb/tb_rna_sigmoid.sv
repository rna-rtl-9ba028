// tb_rna_sigmoid: exhaustive test of the sigmoid unit.
// Every 16-bit input is applied; the output must equal the piecewise-linear
// reference (computed in real arithmetic) and lie within 0.025 of the true
// logistic function.
module tb_rna_sigmoid;
  import rna_pkg::*;
  import rna_tb_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  data_t x, y;
  int checks = 0, failures = 0;

  rna_sigmoid dut (.x_i(x), .y_o(y));

  initial begin
    real err, worst;
    worst = 0.0;
    for (int v = -32768; v < 32768; v++) begin
      x = data_t'(v);
      #1;
      checks++;
      if (int'(y) != ref_sig(v)) begin
        failures++;
        if (failures < 10) $display("FAIL: x=%0d y=%0d expected %0d", v, y, ref_sig(v));
      end
      err = real'(y) / 256.0 - 1.0 / (1.0 + $exp(-real'(v) / 256.0));
      if (err < 0) err = -err;
      if (err > worst) worst = err;
    end
    checks++;
    if (worst > 0.025) begin
      failures++;
      $display("FAIL: worst error %f", worst);
    end
    $display("worst error against the logistic function: %f", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
