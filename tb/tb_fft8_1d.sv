// Self-checking test of the 8-point FFT. Random vectors (parts within +-64.0
// in Q12) are streamed in, partly back to back; each output vector is
// compared with a direct 8-point DFT computed in floating point, within a
// tolerance that covers twiddle rounding and truncation, and must appear
// exactly 9 clocks after its input. A single impulse and a constant vector
// are also checked.
module tb_fft8_1d;
  import fft_pkg::*;
  localparam int LAT = 9;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  cplx_t [7:0] x, y;
  int checks = 0, failures = 0, cycle = 0;

  typedef struct { int t; real xr[8]; real xi[8]; } vec_t;
  vec_t q[$];

  fft8_1d dut (.clk(clk), .rst(rst), .in_valid(in_valid), .x(x), .out_valid(out_valid), .y(y));

  always #5 clk = ~clk;

  function automatic real q12(input logic [DW-1:0] v);
    return real'(int'(signed'(v))) / 4096.0;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst) begin
      if (in_valid) begin
        vec_t v;
        v.t = cycle + LAT;
        for (int i = 0; i < 8; i++) begin
          v.xr[i] = q12(x[i].re);
          v.xi[i] = q12(x[i].im);
        end
        q.push_back(v);
      end
      if (out_valid) begin
        checks++;
        if (q.size() == 0) begin
          failures++;
          $display("FAIL unexpected output");
        end else begin
          vec_t v;
          real tol, sabs;
          bit bad;
          v = q.pop_front();
          bad = (v.t != cycle);
          sabs = 0.0;
          for (int n = 0; n < 8; n++) sabs += (v.xr[n] < 0 ? -v.xr[n] : v.xr[n]) + (v.xi[n] < 0 ? -v.xi[n] : v.xi[n]);
          tol = 0.005 + 3.0e-4 * sabs;
          for (int k = 0; k < 8; k++) begin
            real er, ei, dr, di;
            er = 0.0; ei = 0.0;
            for (int n = 0; n < 8; n++) begin
              er += v.xr[n] * $cos(2.0*PI*k*n/8.0) + v.xi[n] * $sin(2.0*PI*k*n/8.0);
              ei += v.xi[n] * $cos(2.0*PI*k*n/8.0) - v.xr[n] * $sin(2.0*PI*k*n/8.0);
            end
            dr = q12(y[k].re) - er;
            di = q12(y[k].im) - ei;
            if (dr > tol || dr < -tol || di > tol || di < -tol) begin
              bad = 1;
              $display("FAIL X[%0d] = (%f, %f) expected (%f, %f)", k, q12(y[k].re), q12(y[k].im), er, ei);
            end
          end
          if (bad) begin
            failures++;
            $display("FAIL vector due at %0d seen at %0d", v.t, cycle);
          end
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    // impulse at x[1], then a constant vector
    @(posedge clk);
    in_valid <= 1;
    for (int i = 0; i < 8; i++) begin
      x[i].re <= (i == 1) ? DW'(4096) : '0;
      x[i].im <= '0;
    end
    @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      x[i].re <= DW'(3 * 4096);
      x[i].im <= DW'(-4096);
    end
    for (int t = 0; t < 300; t++) begin
      @(posedge clk);
      in_valid <= ($urandom_range(2) != 0);
      for (int i = 0; i < 8; i++) begin
        x[i].re <= DW'($urandom_range(2 * 262144) - 262144);
        x[i].im <= DW'($urandom_range(2 * 262144) - 262144);
      end
    end
    @(posedge clk);
    in_valid <= 0;
    repeat (15) @(posedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d vectors missing", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
