// tb_rna_data_mem: random writes into all banks and random reads on all read
// ports, against an array model. A read of a word written in the same cycle
// must return the new value and raise its bypass flag.
module tb_rna_data_mem;
  import rna_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NRD = NUM_PE + 2;
  logic  [NUM_PE-1:0]         wr_en;
  addr_t [NUM_PE-1:0]         wr_addr;
  data_t [NUM_PE-1:0]         wr_data;
  bank_t [NRD-1:0]            rd_bank;
  addr_t [NRD-1:0]            rd_addr;
  data_t [NRD-1:0]            rd_data;
  logic  [NRD-1:0]            bypass;

  rna_data_mem dut (.clk, .wr_en_i(wr_en), .wr_addr_i(wr_addr), .wr_data_i(wr_data),
    .rd_bank_i(rd_bank), .rd_addr_i(rd_addr), .rd_data_o(rd_data), .bypass_o(bypass));

  data_t model [NUM_PE][2**BANK_AW];
  int checks = 0, failures = 0, n_byp = 0;

  initial begin
    wr_en = '0; wr_addr = '0; wr_data = '0; rd_bank = '0; rd_addr = '0;
    // fill every word once so that every read has a known value
    for (int a = 0; a < 2**BANK_AW; a++) begin
      @(negedge clk);
      for (int b = 0; b < NUM_PE; b++) begin
        wr_en[b] = 1; wr_addr[b] = addr_t'(a); wr_data[b] = data_t'($urandom);
        model[b][a] = wr_data[b];
      end
    end
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      for (int b = 0; b < NUM_PE; b++) begin
        wr_en[b]   = $urandom_range(0, 1);
        wr_addr[b] = addr_t'($urandom_range(0, 7));   // small range: frequent collisions
        wr_data[b] = data_t'($urandom);
      end
      for (int r = 0; r < NRD; r++) begin
        rd_bank[r] = bank_t'($urandom);
        rd_addr[r] = addr_t'($urandom_range(0, 7));
      end
      #1;
      for (int r = 0; r < NRD; r++) begin
        bit hit;
        data_t e;
        hit = wr_en[rd_bank[r]] && wr_addr[rd_bank[r]] == rd_addr[r];
        e = hit ? wr_data[rd_bank[r]] : model[rd_bank[r]][rd_addr[r]];
        if (hit) n_byp++;
        checks++;
        if (rd_data[r] !== e || bypass[r] !== hit) begin
          failures++;
          $display("FAIL: port %0d bank %0d addr %0d got %h expected %h", r, rd_bank[r], rd_addr[r], rd_data[r], e);
        end
      end
      @(posedge clk);
      for (int b = 0; b < NUM_PE; b++) if (wr_en[b]) model[b][wr_addr[b]] = wr_data[b];
    end
    checks++;
    if (n_byp == 0) failures++;
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
