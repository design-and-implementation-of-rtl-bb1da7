// Carry look-ahead adder/subtractor.
//
// Computes sum = a + b (sub = 0) or sum = a - b (sub = 1) on W-bit words; the
// result wraps modulo 2^W and cout is the carry out of the top bit. Subtraction
// inverts b and feeds a carry-in of 1. The carries are formed by two levels of
// look-ahead: bit generate/propagate signals give each 4-bit group its own
// generate and propagate, the group carries are computed from those, and the
// carries inside a group are then expanded from the group's carry-in.
// Purely combinational.
//
// The butterfly uses one of these for A + Bw and one for A - Bw. That the
// adders are carry look-ahead adders is the design's; the 4-bit grouping is a
// choice made here.
module cla_adder #(
  parameter int unsigned W = 24
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned G  = 4;                // bits per group
  localparam int unsigned NG = (W + G - 1) / G;  // number of groups

  logic [NG*G-1:0] aa, bb, gen, prp;
  logic [NG*G:0]   c;        // carry into each bit
  logic [NG-1:0]   gg, gp;   // group generate / propagate
  logic [NG:0]     gc;       // carry into each group

  // look-ahead across groups
  assign gc[0] = sub;
  for (genvar g = 0; g < int'(NG); g++) begin : g_look
    assign gc[g+1] = gg[g] | (gp[g] & gc[g]);
  end

  always_comb begin
    aa = '0;
    bb = '0;
    aa[W-1:0] = a;
    bb[W-1:0] = b ^ {W{sub}};
    gen = aa & bb;
    prp = aa ^ bb;
    // group generate and propagate
    for (int g = 0; g < int'(NG); g++) begin
      gg[g] = 1'b0;
      gp[g] = 1'b1;
      for (int i = 0; i < int'(G); i++) begin
        gg[g] = gen[g*G+i] | (prp[g*G+i] & gg[g]);
        gp[g] = gp[g] & prp[g*G+i];
      end
    end
  end

  always_comb begin
    // carries inside each group from the group carry-in
    c = '0;
    for (int g = 0; g < int'(NG); g++) begin
      c[g*G] = gc[g];
      for (int i = 0; i < int'(G); i++)
        c[g*G+i+1] = gen[g*G+i] | (prp[g*G+i] & c[g*G+i]);
    end
    sum  = prp[W-1:0] ^ c[W-1:0];
    cout = c[W];
  end
endmodule
