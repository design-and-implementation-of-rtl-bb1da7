// Self-checking test of the complex multiplier: (c + dj)(x + yj) for random
// operands and for the Q12 twiddle factors, compared with cx - dy and
// cy + dx formed in 64-bit integers.
module tb_complex_multiplier;
  localparam int unsigned W = 24;
  logic signed [W-1:0] br, bi, wr, wi;
  logic signed [2*W:0] re, im;
  int checks = 0, failures = 0;

  complex_multiplier #(.W(W)) dut (.b_re(br), .b_im(bi), .w_re(wr), .w_im(wi), .re(re), .im(im));

  task automatic check_one(input logic signed [W-1:0] c, input logic signed [W-1:0] d,
                           input logic signed [W-1:0] x, input logic signed [W-1:0] y);
    longint er, ei;
    br = c; bi = d; wr = x; wi = y;
    #1;
    er = longint'(c) * x - longint'(d) * y;
    ei = longint'(c) * y + longint'(d) * x;
    checks++;
    if (longint'(re) !== er || longint'(im) !== ei) begin
      failures++;
      $display("FAIL (%0d,%0d)*(%0d,%0d) = (%0d,%0d) expected (%0d,%0d)", c, d, x, y, re, im, er, ei);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one(24'sh800000, 24'sh800000, 24'sh800000, 24'sh7fffff);
    for (int k = 0; k < 4; k++)
      for (int i = 0; i < 50; i++) begin
        fft_pkg::cplx_t t;
        t = fft_pkg::twiddle8(k);
        check_one(W'($urandom), W'($urandom), t.re, t.im);
      end
    for (int i = 0; i < 1000; i++)
      check_one(W'($urandom), W'($urandom), W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
