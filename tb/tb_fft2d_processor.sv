// Self-checking test of the 2-D FFT processor on its own (clk2 domain). The
// testbench plays both capture latches: it offers each row with a transition
// on in_req and waits for in_ack to follow; it takes each result when out_req
// changes and acknowledges it on out_ack after a wait that is sometimes long,
// so that a finished image must wait for its acknowledge. Four images
// (an impulse, a constant and two random ones, parts within +-16.0) are checked
// element by element against a floating-point 2-D DFT, and the transform
// (busy) must take exactly 34 clocks.
module tb_fft2d_processor;
  import fft_pkg::*;
  localparam int NIMG = 4;
  // ---- reference arithmetic: Q12 conversion and a direct (not fast) 8x8
  // 2-D DFT in double precision,
  //   X[u][v] = sum_r sum_c x[r][c] * exp(-j*2*pi*(u*r + v*c)/8) ----
  localparam real PI = 3.14159265358979323846;

  typedef real img_t [8][8];

  function automatic real q12(input logic [23:0] v);
    return real'(int'(signed'(v))) / 4096.0;
  endfunction

  function automatic logic [23:0] to_q12(input real r);
    return 24'($rtoi(r * 4096.0));
  endfunction

  task automatic dft2d(input img_t xr, input img_t xi, output img_t yr, output img_t yi);
    for (int u = 0; u < 8; u++)
      for (int v = 0; v < 8; v++) begin
        real sr, si;
        sr = 0.0; si = 0.0;
        for (int r = 0; r < 8; r++)
          for (int c = 0; c < 8; c++) begin
            real ang;
            ang = 2.0 * PI * real'((u * r + v * c) % 8) / 8.0;
            sr += xr[r][c] * $cos(ang) + xi[r][c] * $sin(ang);
            si += xi[r][c] * $cos(ang) - xr[r][c] * $sin(ang);
          end
        yr[u][v] = sr;
        yi[u][v] = si;
      end
  endtask

  // Twiddles are rounded to 12 fractional bits (relative error < 1.1e-4)
  // and every butterfly truncates one LSB: allow that for two passes.
  function automatic real tolerance(input img_t xr, input img_t xi);
    real s;
    s = 0.0;
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++)
        s += (xr[r][c] < 0 ? -xr[r][c] : xr[r][c]) + (xi[r][c] < 0 ? -xi[r][c] : xi[r][c]);
    return 0.02 + 4.0e-4 * s;
  endfunction
  // ---- end of reference ----


  logic clk2 = 0, rst = 1, in_req = 0, in_ack, out_req, out_ack = 0, busy;
  logic [15:0][23:0]  in_data;
  logic [127:0][23:0] out_data;
  int checks = 0, failures = 0, busy_len = 0, waits = 0, done = 0;
  img_t xr [NIMG], xi [NIMG];

  fft2d_processor dut (
    .clk2(clk2), .rst(rst), .in_req(in_req), .in_data(in_data), .in_ack(in_ack),
    .out_req(out_req), .out_data(out_data), .out_ack(out_ack), .busy(busy)
  );

  always #5 clk2 = ~clk2;

  initial begin
    repeat (50000) @(posedge clk2);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // busy length per image
  always @(posedge clk2) begin
    if (rst) busy_len <= 0;
    else if (busy) busy_len <= busy_len + 1;
    else if (busy_len != 0) begin
      checks++;
      if (busy_len != 34) begin
        failures++;
        $display("FAIL transform took %0d clocks, expected 34", busy_len);
      end
      busy_len <= 0;
    end
    if (dut.state == 2'd3 && out_req != out_ack) waits++;
  end

  // producer: rows of each image
  initial begin
    for (int n = 0; n < NIMG; n++)
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) begin
          case (n)
            0: begin xr[n][r][c] = (r == 1 && c == 2) ? 1.0 : 0.0; xi[n][r][c] = 0.0; end
            1: begin xr[n][r][c] = 2.0; xi[n][r][c] = -1.0; end
            default: begin
              xr[n][r][c] = real'($urandom_range(32767)) / 1024.0 - 16.0;
              xi[n][r][c] = real'($urandom_range(32767)) / 1024.0 - 16.0;
            end
          endcase
          // keep exactly representable values
          xr[n][r][c] = q12(to_q12(xr[n][r][c]));
          xi[n][r][c] = q12(to_q12(xi[n][r][c]));
        end
    repeat (4) @(posedge clk2);
    rst <= 0;
    for (int n = 0; n < NIMG; n++)
      for (int r = 0; r < 8; r++) begin
        @(posedge clk2);
        for (int c = 0; c < 8; c++) begin
          in_data[2*c]   <= to_q12(xr[n][r][c]);
          in_data[2*c+1] <= to_q12(xi[n][r][c]);
        end
        @(posedge clk2);
        in_req <= ~in_req;
        @(posedge clk2);
        while (in_ack != in_req) @(posedge clk2);
      end
  end

  // consumer: results
  initial begin
    @(negedge rst);
    for (int n = 0; n < NIMG; n++) begin
      img_t yr, yi;
      real tol;
      bit bad;
      while (out_req == out_ack) @(posedge clk2);
      dft2d(xr[n], xi[n], yr, yi);
      tol = tolerance(xr[n], xi[n]);
      bad = 0;
      for (int u = 0; u < 8; u++)
        for (int v = 0; v < 8; v++) begin
          real dr, di;
          dr = q12(out_data[2*(8*u+v)])   - yr[u][v];
          di = q12(out_data[2*(8*u+v)+1]) - yi[u][v];
          checks++;
          if (dr > tol || dr < -tol || di > tol || di < -tol) begin
            failures++;
            if (!bad) $display("FAIL image %0d X[%0d][%0d] = (%f,%f) expected (%f,%f)", n, u, v,
                               q12(out_data[2*(8*u+v)]), q12(out_data[2*(8*u+v)+1]), yr[u][v], yi[u][v]);
            bad = 1;
          end
        end
      repeat ((n % 2 == 0) ? 200 : 3) @(posedge clk2);
      out_ack <= out_req;
      @(posedge clk2);
      done++;
    end
    repeat (10) @(posedge clk2);
    checks++;
    if (waits == 0) begin
      failures++;
      $display("FAIL a finished image never had to wait for its acknowledge");
    end
    $display("images %0d, clocks spent waiting for acknowledge %0d", done, waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
