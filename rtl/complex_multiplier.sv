// Complex multiplier B*w for the radix-2 butterfly.
//
// With B = c + dj and w = x + yj it forms
//   re = c*x - d*y      im = c*y + d*x
// from four signed Booth products of 48 bits each, sign-extended to 49 bits
// and combined by two 49-bit carry look-ahead adders (one subtracting, one
// adding). The 49-bit results keep full precision: with Q12 operands they are
// Q24 values, and the butterfly rescales them. Purely combinational.
//
// The equation and the 49-bit width follow the design description; using the
// same carry look-ahead adder for the combination is a choice made here.
module complex_multiplier
  import fft_pkg::*;
#(
  parameter int unsigned W = fft_pkg::DW
) (
  input  logic signed [W-1:0] b_re,
  input  logic signed [W-1:0] b_im,
  input  logic signed [W-1:0] w_re,
  input  logic signed [W-1:0] w_im,
  output logic signed [2*W:0] re,
  output logic signed [2*W:0] im
);
  localparam int unsigned RW = 2 * W + 1;  // 49 bits for W = 24

  logic signed [2*W-1:0] cx, dy, cy, dx;
  logic                  co_re, co_im;

  booth_multiplier #(.W(W)) u_cx (.a(b_re), .b(w_re), .p(cx));
  booth_multiplier #(.W(W)) u_dy (.a(b_im), .b(w_im), .p(dy));
  booth_multiplier #(.W(W)) u_cy (.a(b_re), .b(w_im), .p(cy));
  booth_multiplier #(.W(W)) u_dx (.a(b_im), .b(w_re), .p(dx));

  cla_adder #(.W(RW)) u_re (.a(RW'(cx)), .b(RW'(dy)), .sub(1'b1), .sum(re), .cout(co_re));
  cla_adder #(.W(RW)) u_im (.a(RW'(cy)), .b(RW'(dx)), .sub(1'b0), .sum(im), .cout(co_im));
endmodule
