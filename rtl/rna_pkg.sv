// rna_pkg: types and constants shared by the RNA (reconfigurable neural
// architecture) blocks.
//
// The RNA runs multi-layer perceptrons on a 4x4 array of processing elements
// (PEs). Each PE is a multiplier, an adder or a multiply-accumulate unit with an
// optional sigmoid on its output. A host streams one configuration word per
// clock cycle into the configuration FIFO; the word says, for that cycle, what
// every PE does, where its operands come from and where its result is stored.
//
// From the source design: 16 PEs, 16 data-memory banks, 16 weight FIFOs, the
// PE function codes C1C0 (0x multiplier, 10 adder, 11 accumulation) and the
// output-type bit C2 (0 direct, 1 sigmoid), and the fact that a configuration
// carries a valid bit, memory addresses and data-path controls.
// Own choices: 16-bit signed fixed point with 8 fractional bits, 64 words per
// memory bank, 16-entry FIFOs, and the exact field layout of the configuration
// word below (operand selects, per-PE read port, per-PE write port, forwarding).
package rna_pkg;

  localparam int unsigned NUM_PE  = 16;   // 4x4 PE array
  localparam int unsigned DATA_W  = 16;   // fixed-point word
  localparam int unsigned FRAC_W  = 8;    // fractional bits
  localparam int unsigned BANK_AW = 6;    // 64 words per memory bank
  localparam int unsigned BANK_W  = $clog2(NUM_PE);

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic [BANK_AW-1:0]       addr_t;
  typedef logic [BANK_W-1:0]        bank_t;

  // C1C0 of the PE (Fig. 3 of the source): 0x multiplier, 10 adder, 11 accumulation.
  typedef enum logic [1:0] {
    FN_MUL  = 2'b00,
    FN_MUL1 = 2'b01,
    FN_ADD  = 2'b10,
    FN_ACC  = 2'b11
  } pe_fn_e;

  // Source of operand IN1.
  typedef enum logic [1:0] {
    IN1_BCAST = 2'd0,   // broadcast data register (DFIFO or memory)
    IN1_MEM   = 2'd1,   // this PE's memory read port
    IN1_NEIGH = 2'd2,   // neighbour A of the fixed interconnect
    IN1_ZERO  = 2'd3
  } in1_sel_e;

  // Source of operand IN2.
  typedef enum logic [1:0] {
    IN2_WFIFO = 2'd0,   // this PE's weight FIFO (popped)
    IN2_MEM   = 2'd1,   // this PE's memory read port
    IN2_NEIGH = 2'd2,   // neighbour B of the fixed interconnect
    IN2_ZERO  = 2'd3
  } in2_sel_e;

  // Partial-sum operand added to the registered product in accumulation mode.
  typedef enum logic [1:0] {
    PS_ZERO = 2'd0,     // start of a sum
    PS_FB   = 2'd1,     // the PE's own output (FP)
    PS_MEM  = 2'd2,     // this PE's memory read port (NE)
    PS_RSV  = 2'd3
  } ps_sel_e;

  // Source of the broadcast data register.
  typedef enum logic [1:0] {
    BC_HOLD  = 2'd0,
    BC_DFIFO = 2'd1,    // pop one input from the data FIFO
    BC_MEM   = 2'd2,    // read one word of the data memory
    BC_RSV   = 2'd3
  } bc_sel_e;

  typedef struct packed {
    pe_fn_e   fn;       // C1C0
    logic     sig;      // C2
    in1_sel_e in1;
    in2_sel_e in2;
    ps_sel_e  ps;
    bank_t    rd_bank;  // read port: any bank ...
    addr_t    rd_addr;  // ... any address
    logic     wr_en;    // write the PE output into its own bank
    addr_t    wr_addr;
  } pe_cfg_t;

  typedef struct packed {
    logic    valid;     // a bubble when 0: nothing moves in the PEs
    logic    last;      // last configuration of a task
    bc_sel_e bc;
    bank_t   bc_bank;
    addr_t   bc_addr;
    pe_cfg_t [NUM_PE-1:0] pe;
  } cfg_t;

  localparam int unsigned CFG_W = $bits(cfg_t);

  // Fixed interconnect of the PE array (Fig. 4(c) / Fig. 6 of the source):
  // neighbour A and B feeding IN1 and IN2 of each adder PE in the CE tree.
  // -1 means no neighbour on that input.
  function automatic int neigh_a(input int p);
    case (p)
      1: return 0;   2: return 3;   13: return 12;  14: return 15;
      5: return 1;   9: return 13;  10: return 5;   6: return 10;
      default: return -1;
    endcase
  endfunction

  function automatic int neigh_b(input int p);
    case (p)
      1: return 4;   2: return 7;   13: return 8;   14: return 11;
      5: return 2;   9: return 14;  10: return 9;
      default: return -1;
    endcase
  endfunction

endpackage
