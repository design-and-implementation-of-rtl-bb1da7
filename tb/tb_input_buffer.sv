// Self-checking test of the serial-to-parallel input buffer. Rows of 16
// random words are written with random gaps in en; checks that buff_full rises
// on the clock that stores the 16th word, that all 16 words appear on
// data_out in order, that req toggles one clock later, that words offered
// while full are ignored, and that buff_full falls only after ack has made the
// same transition as req (acknowledged here after a random wait).
module tb_input_buffer;
  localparam int unsigned DW = 24, WORDS = 16;
  logic clk1 = 0, rst = 1, en = 0, buff_full, req, ack = 0;
  logic [DW-1:0] data_in;
  logic [WORDS-1:0][DW-1:0] data_out;
  logic [DW-1:0] row [WORDS];
  int checks = 0, failures = 0;

  input_buffer #(.DW(DW), .WORDS(WORDS)) dut (
    .clk1(clk1), .rst(rst), .en(en), .data_in(data_in),
    .buff_full(buff_full), .data_out(data_out), .req(req), .ack(ack)
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
    for (int r = 0; r < 6; r++) begin
      logic old_req;
      old_req = req;
      for (int w = 0; w < int'(WORDS); w++) begin
        row[w] = DW'($urandom);
        while ($urandom_range(2) == 0) begin
          @(posedge clk1);
          en <= 0;
        end
        @(posedge clk1);
        en <= 1;
        data_in <= row[w];
        #1;
        check(!buff_full, "buff_full early");
      end
      @(posedge clk1);
      en <= 1;                       // offered while full: must be ignored
      data_in <= ~row[0];
      #1;
      check(buff_full, "buff_full after 16 words");
      check(req == old_req, "req toggled too early");
      for (int w = 0; w < int'(WORDS); w++)
        check(data_out[w] == row[w], "data_out word");
      @(posedge clk1);
      en <= 0;
      #1;
      check(req != old_req, "req toggled one clock after full");
      repeat ($urandom_range(8)) begin
        @(posedge clk1);
        #1;
        check(buff_full, "buff_full held until ack");
      end
      check(data_out[0] == row[0], "word ignored while full");
      ack <= req;                    // acknowledge event
      repeat (5) @(posedge clk1);
      #1;
      check(!buff_full, "buff_full cleared after ack");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
