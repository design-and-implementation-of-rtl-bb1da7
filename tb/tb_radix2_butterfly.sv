// Self-checking test of the pipelined radix-2 butterfly. Random operands are
// issued with a random valid pattern (often back to back); every result is
// compared with A +- ((B*w) >>> 12) worked out in 64-bit integers and wrapped
// to 24 bits, and must appear exactly 3 clocks after its operands.
module tb_radix2_butterfly;
  localparam int unsigned W = 24;
  localparam int          LAT = 3;

  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  logic signed [W-1:0] a_re, a_im, b_re, b_im, w_re, w_im;
  logic signed [W-1:0] o1r, o1i, o2r, o2i;
  int checks = 0, failures = 0, cycle = 0, issued = 0;

  typedef struct { int t; logic [W-1:0] r1, i1, r2, i2; } exp_t;
  exp_t q[$];

  radix2_butterfly dut (
    .clk(clk), .rst(rst), .in_valid(in_valid),
    .a_re(a_re), .a_im(a_im), .b_re(b_re), .b_im(b_im), .w_re(w_re), .w_im(w_im),
    .out_valid(out_valid), .out1_re(o1r), .out1_im(o1i), .out2_re(o2r), .out2_im(o2i)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scoreboard
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst) begin
      if (in_valid) begin
        exp_t e;
        longint bwr, bwi;
        bwr = (longint'(b_re) * w_re - longint'(b_im) * w_im) >>> 12;
        bwi = (longint'(b_re) * w_im + longint'(b_im) * w_re) >>> 12;
        e.t  = cycle + LAT;
        e.r1 = W'(longint'(a_re) + bwr);
        e.i1 = W'(longint'(a_im) + bwi);
        e.r2 = W'(longint'(a_re) - bwr);
        e.i2 = W'(longint'(a_im) - bwi);
        q.push_back(e);
      end
      if (out_valid) begin
        checks++;
        if (q.size() == 0) begin
          failures++;
          $display("FAIL unexpected output at cycle %0d", cycle);
        end else begin
          exp_t e;
          e = q.pop_front();
          if (e.t != cycle || o1r !== e.r1 || o1i !== e.i1 || o2r !== e.r2 || o2i !== e.i2) begin
            failures++;
            $display("FAIL cycle %0d (expected %0d): got %h %h %h %h exp %h %h %h %h",
                     cycle, e.t, o1r, o1i, o2r, o2i, e.r1, e.i1, e.r2, e.i2);
          end
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 1000; i++) begin
      @(posedge clk);
      in_valid <= ($urandom_range(3) != 0);
      a_re <= W'($urandom); a_im <= W'($urandom);
      b_re <= W'($urandom); b_im <= W'($urandom);
      if (i % 2 == 0) begin
        fft_pkg::cplx_t t;
        t = fft_pkg::twiddle8($urandom_range(3));
        w_re <= t.re; w_im <= t.im;
      end else begin
        w_re <= W'($urandom); w_im <= W'($urandom);
      end
    end
    @(posedge clk);
    in_valid <= 0;
    repeat (10) @(posedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
