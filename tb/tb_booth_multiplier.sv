// Self-checking test of the signed Booth multiplier: corner values (most
// negative, -1, 0, +max) and random operands, compared with a 64-bit
// signed product.
module tb_booth_multiplier;
  localparam int unsigned W = 24;
  logic signed [W-1:0]   a, b;
  logic signed [2*W-1:0] p;
  int checks = 0, failures = 0;

  booth_multiplier #(.W(W)) dut (.a(a), .b(b), .p(p));

  task automatic check_one(input logic signed [W-1:0] ta, input logic signed [W-1:0] tb_);
    longint expv;
    a = ta; b = tb_;
    #1;
    expv = longint'(ta) * longint'(tb_);
    checks++;
    if (longint'(p) !== expv) begin
      failures++;
      $display("FAIL %0d * %0d = %0d, expected %0d", ta, tb_, p, expv);
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
    logic signed [W-1:0] corner [5] = '{24'sh800000, -24'sd1, 24'sd0, 24'sh7fffff, 24'sd2896};
    foreach (corner[i])
      foreach (corner[j])
        check_one(corner[i], corner[j]);
    for (int i = 0; i < 2000; i++)
      check_one(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
