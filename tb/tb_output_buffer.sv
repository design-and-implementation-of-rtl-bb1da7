// Self-checking test of the parallel-to-serial output buffer. A block of 128
// random words is announced with a req transition; checks that it is copied
// (pass makes the same transition), that with rd_en high the words come out
// one per clock in order with out_valid, that gaps in rd_en pause the stream,
// and that a second block announced while words remain unread is not taken
// (pass stays) until the last word has been read.
module tb_output_buffer;
  localparam int unsigned DW = 24, WORDS = 128;
  logic clk1 = 0, rst = 1, req = 0, pass, rd_en = 0, out_valid, full;
  logic [WORDS-1:0][DW-1:0] data_in, blk;
  logic [DW-1:0] data_out;
  int checks = 0, failures = 0, got = 0, stalls = 0;
  bit waited;

  output_buffer #(.DW(DW), .WORDS(WORDS)) dut (
    .clk1(clk1), .rst(rst), .req(req), .pass(pass), .data_in(data_in),
    .rd_en(rd_en), .data_out(data_out), .out_valid(out_valid), .full(full)
  );

  always #5 clk1 = ~clk1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk1);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk1);
    rst <= 0;
    for (int f = 0; f < 4; f++) begin
      for (int w = 0; w < int'(WORDS); w++) blk[w] = DW'($urandom);
      data_in <= blk;
      @(posedge clk1);
      req <= ~req;
      #1;
      // wait for pass to follow req
      for (int t = 0; t < 20 && pass != req; t++) @(posedge clk1);
      check(pass == req, "pass follows req");
      data_in <= '0;                 // the latch may reopen: buffer must hold
      got = 0;
      while (got < int'(WORDS)) begin
        @(posedge clk1);
        rd_en <= ($urandom_range(3) != 0);
        #1;
        if (out_valid) begin
          check(data_out == blk[got], $sformatf("word order %0d got %h exp %h", got, data_out, blk[got]));
          got++;
        end
        if (got == 64 && f % 2 == 1 && req == pass) begin
          // next block announced early: must wait for the reader
          data_in <= blk;            // same content as pending source
          req <= ~req;
        end
        if (req != pass) stalls++;
        if (got == int'(WORDS) - 1) waited = (req != pass);
      end
      @(posedge clk1);
      rd_en <= 0;
      #1;
      if (f % 2 == 0) check(!out_valid && !full, "empty after 128 words");
      if (f % 2 == 1) begin
        check(waited, "second block waited until the last word");
        // let it be taken, then drain it
        for (int t = 0; t < 20 && pass != req; t++) @(posedge clk1);
        check(pass == req, "second block taken after drain");
        got = 0;
        rd_en <= 1;
        while (got < int'(WORDS)) begin
          @(posedge clk1);
          #1;
          if (out_valid) begin
            check(data_out == blk[got], "word order 2");
            got++;
          end
        end
        rd_en <= 0;
        @(posedge clk1);
      end
    end
    check(stalls > 0, "back-pressure happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
