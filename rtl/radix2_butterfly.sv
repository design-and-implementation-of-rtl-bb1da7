// Pipelined radix-2 decimation-in-time butterfly.
//
//   out1 = A + B*w      out2 = A - B*w
//
// on complex Q12 samples of W bits per part. Three flip-flop ranks, all on
// the processor clock: the operands are registered, the complex multiplier
// forms B*w (49-bit Q24), which is shifted right arithmetically by FB (12) bits,
// truncated to W bits and registered with a copy of A; two carry look-ahead
// adders per part then form A + Bw and A - Bw, which are registered at the
// output. Latency is 3 cycles and a new butterfly may start every cycle;
// in_valid travels alongside the data as out_valid. Sums wrap modulo 2^W
// (no scaling or saturation).
//
// The three ranks, the complex multiplier and the two adders follow the
// design's butterfly architecture. Passing A through the middle rank (so that
// A and Bw of the same butterfly meet at the adders when one is issued every
// cycle), truncation of Bw and wrap-around are choices made here.
module radix2_butterfly
  import fft_pkg::*;
#(
  parameter int unsigned W    = fft_pkg::DW,
  parameter int unsigned FB   = fft_pkg::FRAC
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic signed [W-1:0] a_re,
  input  logic signed [W-1:0] a_im,
  input  logic signed [W-1:0] b_re,
  input  logic signed [W-1:0] b_im,
  input  logic signed [W-1:0] w_re,
  input  logic signed [W-1:0] w_im,
  output logic                out_valid,
  output logic signed [W-1:0] out1_re,
  output logic signed [W-1:0] out1_im,
  output logic signed [W-1:0] out2_re,
  output logic signed [W-1:0] out2_im
);
  // rank 1: operands
  logic signed [W-1:0] a1_re, a1_im, b1_re, b1_im, w1_re, w1_im;
  logic                v1;
  // complex product
  logic signed [2*W:0] bw_re, bw_im;
  // rank 2: A and scaled Bw
  logic signed [W-1:0] a2_re, a2_im, bw2_re, bw2_im;
  logic                v2;
  // adders
  logic [W-1:0]        s1_re, s1_im, s2_re, s2_im;
  logic                c1_re, c1_im, c2_re, c2_im;

  always_ff @(posedge clk) begin
    if (rst) begin
      v1 <= 1'b0;
      v2 <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1 <= in_valid;
      v2 <= v1;
      out_valid <= v2;
    end
  end

  always_ff @(posedge clk) begin
    a1_re <= a_re;  a1_im <= a_im;
    b1_re <= b_re;  b1_im <= b_im;
    w1_re <= w_re;  w1_im <= w_im;
  end

  complex_multiplier #(.W(W)) u_cmul (
    .b_re(b1_re), .b_im(b1_im), .w_re(w1_re), .w_im(w1_im),
    .re(bw_re), .im(bw_im)
  );

  always_ff @(posedge clk) begin
    a2_re  <= a1_re;
    a2_im  <= a1_im;
    bw2_re <= bw_re[FB +: W];
    bw2_im <= bw_im[FB +: W];
  end

  cla_adder #(.W(W)) u_add_re (.a(a2_re), .b(bw2_re), .sub(1'b0), .sum(s1_re), .cout(c1_re));
  cla_adder #(.W(W)) u_add_im (.a(a2_im), .b(bw2_im), .sub(1'b0), .sum(s1_im), .cout(c1_im));
  cla_adder #(.W(W)) u_sub_re (.a(a2_re), .b(bw2_re), .sub(1'b1), .sum(s2_re), .cout(c2_re));
  cla_adder #(.W(W)) u_sub_im (.a(a2_im), .b(bw2_im), .sub(1'b1), .sum(s2_im), .cout(c2_im));

  always_ff @(posedge clk) begin
    out1_re <= s1_re;  out1_im <= s1_im;
    out2_re <= s2_re;  out2_im <= s2_im;
  end
endmodule
