// 8-point radix-2 decimation-in-time FFT, fully pipelined.
//
// Three radix stages of four butterflies each; the four butterflies of a
// stage work in parallel. The inputs enter in bit-reversed order
// x[0], x[4], x[2], x[6], x[1], x[5], x[3], x[7] and the outputs X[0..7]
// leave in natural order. Stage s (s = 1, 2, 3) pairs lines j and j + 2^(s-1)
// inside groups of 2^s lines, with twiddle W8^(j * 8 / 2^s): W8^0 in stage 1,
// W8^0 and W8^2 in stage 2, W8^0 to W8^3 in stage 3.
//
// Interface: present a vector x with in_valid for one clock; its transform y
// appears with out_valid 9 clocks later (3 stages x 3 butterfly ranks).
// A new vector may be presented every clock.
//
// The stage structure, twiddles and input order follow the design's signal
// flow graph; the 9-cycle pipelining follows from its registered butterflies.
module fft8_1d
  import fft_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  cplx_t [7:0]  x,
  output logic         out_valid,
  output cplx_t [7:0]  y
);
  localparam int unsigned STAGES = 3;

  cplx_t [7:0]       line [STAGES+1];  // line[s] = inputs of stage s+1
  logic [STAGES:0]   v;

  // bit-reversed input order
  always_comb begin
    for (int i = 0; i < 8; i++)
      line[0][i] = x[{i[0], i[1], i[2]}];
  end
  assign v[0] = in_valid;

  for (genvar s = 0; s < int'(STAGES); s++) begin : g_stage
    localparam int unsigned HALF = 1 << s;
    localparam int unsigned SPAN = 2 << s;
    logic [3:0] bv;
    for (genvar k = 0; k < 4; k++) begin : g_bfly
      localparam int unsigned GRP = k / HALF;
      localparam int unsigned J   = k % HALF;
      localparam int unsigned TOP = GRP * SPAN + J;
      localparam int unsigned BOT = TOP + HALF;
      localparam cplx_t       TW  = twiddle8(J * (8 / SPAN));
      radix2_butterfly #(.W(DW)) u_bf (
        .clk(clk), .rst(rst), .in_valid(v[s]),
        .a_re(line[s][TOP].re), .a_im(line[s][TOP].im),
        .b_re(line[s][BOT].re), .b_im(line[s][BOT].im),
        .w_re(TW.re), .w_im(TW.im),
        .out_valid(bv[k]),
        .out1_re(line[s+1][TOP].re), .out1_im(line[s+1][TOP].im),
        .out2_re(line[s+1][BOT].re), .out2_im(line[s+1][BOT].im)
      );
    end
    assign v[s+1] = bv[0];
  end

  assign y         = line[STAGES];
  assign out_valid = v[STAGES];
endmodule
