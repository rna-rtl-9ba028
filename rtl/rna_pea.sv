// rna_pea: the 4x4 processing-element array (PEA) of the RNA.
//
// Sixteen rna_pe instances, numbered row by row (PE0..PE3 on the top row).
// Besides its own operands, an adder-position PE can take its two inputs from
// two fixed neighbours. The links are those of the source's PEA, which fold
// the adder tree of one computation-extension (CE) kernel with m = 8
// multipliers onto the array:
//   multipliers  PE0 PE3 PE4 PE7 PE8 PE11 PE12 PE15
//   level 1      PE1 <- PE0,PE4    PE2 <- PE3,PE7
//                PE13 <- PE12,PE8  PE14 <- PE15,PE11
//   level 2      PE5 <- PE1,PE2    PE9 <- PE13,PE14
//   level 3      PE10 <- PE5,PE9
//   final sum    PE6 <- PE10 (plus a partial sum from the data memory)
// Diagonal neighbours are wired directly, so every tree level costs one cycle.
// In the FP and NE schedules each PE runs alone in accumulation mode.
//
// The array also holds the load-data (LD) stage registers: when ld_en_i is
// high it captures, per PE, the word from its memory read port and, if the
// word selects the weight FIFO, a weight; and for all PEs one broadcast data
// word (from the DFIFO, from the data memory, or held). In the compute (CP)
// stage, one cycle later, cp_cfg_i selects each PE's IN1, IN2 and partial-sum
// operands from these registers, from the neighbours or from the PE's own
// output, and cp_en_i fires the PEs. A memory read flagged as forwarded is
// replaced in CP by the output register of the PE that owns the bank.
// The array size and links follow the source; the operand selects and stage
// registers are this design's choices.
module rna_pea
  import rna_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // load-data stage
  input  logic                 ld_en_i,
  input  cfg_t                 ld_cfg_i,
  input  data_t                d_head_i,       // DFIFO output
  input  data_t [NUM_PE-1:0]   w_head_i,       // WFIFO outputs
  input  data_t [NUM_PE-1:0]   mem_pe_i,       // per-PE memory read ports
  input  data_t                mem_bc_i,       // broadcast memory read port
  input  logic  [NUM_PE-1:0]   fwd_pe_i,
  input  logic                 fwd_bc_i,
  // compute stage
  input  logic                 cp_en_i,
  input  cfg_t                 cp_cfg_i,
  output data_t [NUM_PE-1:0]   pe_out_o
);
  data_t               bc_q;       // broadcast data register
  logic                bc_fwd_q;
  data_t               bc_eff;
  data_t [NUM_PE-1:0]  mem_q;
  logic  [NUM_PE-1:0]  fwd_q;
  data_t [NUM_PE-1:0]  w_q;
  data_t [NUM_PE-1:0]  memv;
  data_t [NUM_PE-1:0]  in1, in2, ps;

  // broadcast value seen in CP: forwarded from the producing PE if needed
  assign bc_eff = bc_fwd_q ? pe_out_o[cp_cfg_i.bc_bank] : bc_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bc_q     <= '0;
      bc_fwd_q <= 1'b0;
      mem_q    <= '0;
      fwd_q    <= '0;
      w_q      <= '0;
    end else if (ld_en_i) begin
      unique case (ld_cfg_i.bc)
        BC_DFIFO: begin bc_q <= d_head_i; bc_fwd_q <= 1'b0;     end
        BC_MEM:   begin bc_q <= mem_bc_i; bc_fwd_q <= fwd_bc_i; end
        default:  begin bc_q <= bc_eff;   bc_fwd_q <= 1'b0;     end
      endcase
      for (int p = 0; p < NUM_PE; p++) begin
        mem_q[p] <= mem_pe_i[p];
        fwd_q[p] <= fwd_pe_i[p];
        if (ld_cfg_i.pe[p].in2 == IN2_WFIFO) w_q[p] <= w_head_i[p];
      end
    end
  end

  for (genvar p = 0; p < NUM_PE; p++) begin : g_pe
    localparam int NA = neigh_a(p);
    localparam int NB = neigh_b(p);
    data_t na, nb;
    pe_cfg_t c;

    assign c  = cp_cfg_i.pe[p];
    assign na = (NA >= 0) ? pe_out_o[(NA >= 0) ? NA : 0] : '0;
    assign nb = (NB >= 0) ? pe_out_o[(NB >= 0) ? NB : 0] : '0;
    assign memv[p] = fwd_q[p] ? pe_out_o[c.rd_bank] : mem_q[p];

    always_comb begin
      unique case (c.in1)
        IN1_BCAST: in1[p] = bc_eff;
        IN1_MEM:   in1[p] = memv[p];
        IN1_NEIGH: in1[p] = na;
        default:   in1[p] = '0;
      endcase
      unique case (c.in2)
        IN2_WFIFO: in2[p] = w_q[p];
        IN2_MEM:   in2[p] = memv[p];
        IN2_NEIGH: in2[p] = nb;
        default:   in2[p] = '0;
      endcase
      unique case (c.ps)
        PS_FB:   ps[p] = pe_out_o[p];
        PS_MEM:  ps[p] = memv[p];
        default: ps[p] = '0;
      endcase
    end

    rna_pe u_pe (
      .clk, .rst_n,
      .en_i  (cp_en_i),
      .fn_i  (c.fn),
      .sig_i (c.sig),
      .in1_i (in1[p]),
      .in2_i (in2[p]),
      .ps_i  (ps[p]),
      .out_o (pe_out_o[p])
    );
  end

endmodule
