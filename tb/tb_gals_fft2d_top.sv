// End-to-end test of the GALS 2-D FFT core with its default parameters.
//
// clk1 (buffers, period 10) and clk2 (processor, period 7) are unrelated.
// Four 8x8 images (parts within +-16.0 in Q12; the first an impulse) are
// written as 8 rows of 16 serial words; every output word is compared with a
// floating-point 2-D DFT. Reading is slow for the first image, so later
// images pile up behind it. The mechanisms of the design are counted and each
// must occur: capture events of both latches, a writer held off by buff_full,
// a latch kept opaque while the input buffer refills, a finished image waiting
// for its acknowledge, and a block waiting in latch 2 for the output buffer.
module tb_gals_fft2d_top;
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
  logic clk1 = 0, clk2 = 0, rst = 1, en = 0, rd_en = 0;
  logic [23:0] data_in, data_out;
  logic buff_full, out_valid, ack1, req2;
  int checks = 0, failures = 0;
  int n_cap1 = 0, n_cap2 = 0, n_full_stall = 0, n_latch1_hold = 0, n_proc_wait = 0, n_out_wait = 0;
  img_t xr [NIMG], xi [NIMG];
  logic prev_ack1 = 0, prev_req2 = 0;

  gals_fft2d_top dut (
    .clk1(clk1), .clk2(clk2), .rst(rst), .en(en), .data_in(data_in), .buff_full(buff_full),
    .rd_en(rd_en), .data_out(data_out), .out_valid(out_valid), .ack1(ack1), .req2(req2)
  );

  always #5   clk1 = ~clk1;
  always #3.5 clk2 = ~clk2;

  initial begin
    repeat (40000) @(posedge clk1);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // event counters
  always @(posedge clk1) if (!rst) begin
    if (ack1 != prev_ack1) n_cap1++;
    if (req2 != prev_req2) n_cap2++;
    prev_ack1 <= ack1;
    prev_req2 <= req2;
    if (en && buff_full) n_full_stall++;
    if (dut.c1 != dut.p1 && !buff_full && dut.u_in_buf.sel != 0) n_latch1_hold++;
    if (dut.u_out_buf.full && (req2 != dut.p2)) n_out_wait++;
  end
  always @(posedge clk2) if (!rst) begin
    if (dut.u_fft2d.state == 2'd3 && (dut.u_fft2d.out_req != dut.cd2)) n_proc_wait++;
  end

  // writer
  initial begin
    for (int n = 0; n < NIMG; n++)
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) begin
          if (n == 0) begin
            xr[n][r][c] = (r == 0 && c == 0) ? 4.0 : 0.0;
            xi[n][r][c] = 0.0;
          end else begin
            xr[n][r][c] = q12(to_q12(real'($urandom_range(32767)) / 1024.0 - 16.0));
            xi[n][r][c] = q12(to_q12(real'($urandom_range(32767)) / 1024.0 - 16.0));
          end
        end
    repeat (5) @(posedge clk1);
    rst <= 0;
    repeat (3) @(posedge clk1);
    for (int n = 0; n < NIMG; n++)
      for (int r = 0; r < 8; r++)
        for (int w = 0; w < 16; w++) begin
          @(posedge clk1);
          // hold the word while the buffer is full
          en <= 1;
          data_in <= (w % 2 == 0) ? to_q12(xr[n][r][w/2]) : to_q12(xi[n][r][w/2]);
          #1;
          while (buff_full) begin
            @(posedge clk1);
            #1;
          end
        end
    @(posedge clk1);
    en <= 0;
  end

  // reader
  initial begin
    @(negedge rst);
    for (int n = 0; n < NIMG; n++) begin
      img_t yr, yi;
      real tol;
      int got;
      bit bad;
      logic [23:0] words [128];
      dft2d(xr[n], xi[n], yr, yi);
      tol = tolerance(xr[n], xi[n]);
      if (n == 0) begin
        // keep the first image unread until the others have piled up
        while (dut.u_fft2d.row_cnt != 3'd0 || n_cap1 < 8 * NIMG) @(posedge clk1);
        repeat (300) @(posedge clk1);
      end
      got = 0;
      while (got < 128) begin
        @(posedge clk1);
        rd_en <= ($urandom_range(4) != 0);
        #1;
        if (out_valid) begin
          words[got] = data_out;
          got++;
        end
      end
      @(posedge clk1);
      rd_en <= 0;
      bad = 0;
      for (int u = 0; u < 8; u++)
        for (int v = 0; v < 8; v++) begin
          real dr, di;
          dr = q12(words[2*(8*u+v)])   - yr[u][v];
          di = q12(words[2*(8*u+v)+1]) - yi[u][v];
          checks++;
          if (dr > tol || dr < -tol || di > tol || di < -tol) begin
            failures++;
            if (!bad) $display("FAIL image %0d X[%0d][%0d] = (%f,%f) expected (%f,%f)", n, u, v,
                               q12(words[2*(8*u+v)]), q12(words[2*(8*u+v)+1]), yr[u][v], yi[u][v]);
            bad = 1;
          end
        end
    end
    repeat (20) @(posedge clk1);
    $display("latch 1 captures %0d, latch 2 captures %0d, writer stalls %0d, latch 1 held %0d, processor waits %0d, output waits %0d",
             n_cap1, n_cap2, n_full_stall, n_latch1_hold, n_proc_wait, n_out_wait);
    checks++; if (n_cap1 != 8 * NIMG) begin failures++; $display("FAIL latch 1 captures"); end
    checks++; if (n_cap2 != NIMG)     begin failures++; $display("FAIL latch 2 captures"); end
    checks++; if (n_full_stall == 0)  begin failures++; $display("FAIL writer never stalled on buff_full"); end
    checks++; if (n_latch1_hold == 0) begin failures++; $display("FAIL latch 1 never held while the buffer refilled"); end
    checks++; if (n_proc_wait == 0)   begin failures++; $display("FAIL processor never waited for latch 2"); end
    checks++; if (n_out_wait == 0)    begin failures++; $display("FAIL latch 2 never waited for the output buffer"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
