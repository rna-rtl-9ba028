// rna_data_mem: the RNA's data memory for intermediate results.
//
// NUM_PE banks of 2**BANK_AW words. Bank p is written only by PE p (one write
// port per bank, at the store-data stage); every read port can read any word
// of any bank, which is how a layer's outputs, spread over the banks, reach
// all the PEs of the next layer. There are NUM_PE + 2 read ports: one per PE,
// one for the broadcast data register and one for the host, which collects
// results through it.
//
// Reads are combinational. A read of the word that is being written in the
// same cycle returns the new value (write-through bypass), so a value stored
// by the store-data stage can be loaded by the load-data stage of the same
// cycle. The bypass_o flags report when that happened.
// The bank count and the full read access follow the source; the depth, the
// number of ports, the asynchronous read and the bypass are this design's
// choices.
module rna_data_mem
  import rna_pkg::*;
#(
  parameter int unsigned NB  = NUM_PE,
  parameter int unsigned AW  = BANK_AW,
  parameter int unsigned W   = DATA_W,
  parameter int unsigned NRD = NUM_PE + 2
) (
  input  logic                   clk,
  input  logic [NB-1:0]          wr_en_i,
  input  logic [NB-1:0][AW-1:0]  wr_addr_i,
  input  logic [NB-1:0][W-1:0]   wr_data_i,
  input  logic [NRD-1:0][$clog2(NB)-1:0] rd_bank_i,
  input  logic [NRD-1:0][AW-1:0] rd_addr_i,
  output logic [NRD-1:0][W-1:0]  rd_data_o,
  output logic [NRD-1:0]         bypass_o
);
  localparam int unsigned BW = $clog2(NB);

  logic [W-1:0] mem [NB][2**AW];

  always_ff @(posedge clk) begin
    for (int b = 0; b < NB; b++)
      if (wr_en_i[b]) mem[b][wr_addr_i[b]] <= wr_data_i[b];
  end

  always_comb begin
    for (int r = 0; r < NRD; r++) begin
      logic [BW-1:0] b;
      b = rd_bank_i[r];
      bypass_o[r] = wr_en_i[b] && (wr_addr_i[b] == rd_addr_i[r]);
      rd_data_o[r] = bypass_o[r] ? wr_data_i[b] : mem[b][rd_addr_i[r]];
    end
  end

endmodule
