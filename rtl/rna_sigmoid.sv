// rna_sigmoid: sigmoid output unit of a PE.
//
// Combinational. Computes y = 1 / (1 + exp(-x)) on signed fixed-point words
// with a piecewise-linear approximation whose slopes are powers of two, so
// only shifts and adds are needed (x = |in|):
//   x >= 5        : y = 1
//   2.375 <= x < 5: y = x/32 + 0.84375
//   1 <= x < 2.375: y = x/8  + 0.625
//   0 <= x < 1    : y = x/4  + 0.5
// and y(-x) = 1 - y(x). The source only names a sigmoid stage after the PE's
// output multiplexer; this approximation and its breakpoints are this
// design's choice.
//
// Interface: x_i in, y_o out, both DATA_W bits with FRAC_W fractional bits.
module rna_sigmoid
  import rna_pkg::*;
#(
  parameter int unsigned W    = DATA_W,
  parameter int unsigned FRAC = FRAC_W
) (
  input  logic signed [W-1:0] x_i,
  output logic signed [W-1:0] y_o
);
  localparam logic [W:0] ONE    = (W+1)'(1) << FRAC;
  localparam logic [W:0] BP_5   = (W+1)'(5) << FRAC;
  localparam logic [W:0] BP_238 = (W+1)'(19) << (FRAC - 3);   // 2.375
  localparam logic [W:0] C_084  = (W+1)'(27) << (FRAC - 5);   // 0.84375
  localparam logic [W:0] C_063  = (W+1)'(5) << (FRAC - 3);    // 0.625
  localparam logic [W:0] C_050  = (W+1)'(1) << (FRAC - 1);    // 0.5

  logic [W:0] mag;   // |x|, one extra bit so the most negative value fits
  logic [W:0] pos;   // y for |x|

  always_comb begin
    mag = x_i[W-1] ? (W+1)'(-{x_i[W-1], x_i}) : (W+1)'({1'b0, x_i});
    if (mag >= BP_5)        pos = ONE;
    else if (mag >= BP_238) pos = (mag >> 5) + C_084;
    else if (mag >= ONE)    pos = (mag >> 3) + C_063;
    else                    pos = (mag >> 2) + C_050;
    y_o = x_i[W-1] ? W'(ONE - pos) : W'(pos);
  end

endmodule
