// Self-checking test of the carry look-ahead adder/subtractor: random and
// corner operands in both modes, compared with the built-in + and - on
// widened operands (sum and carry out).
module tb_cla_adder;
  localparam int unsigned W = 24;
  logic [W-1:0] a, b, sum;
  logic         sub, cout;
  int checks = 0, failures = 0;

  cla_adder #(.W(W)) dut (.a(a), .b(b), .sub(sub), .sum(sum), .cout(cout));

  task automatic check_one(input logic [W-1:0] ta, input logic [W-1:0] tb_, input logic ts);
    logic [W:0] ref_v;
    a = ta; b = tb_; sub = ts;
    #1;
    ref_v = ts ? ({1'b0, ta} + {1'b0, ~tb_} + 1'b1) : ({1'b0, ta} + {1'b0, tb_});
    checks++;
    if ({cout, sum} !== ref_v) begin
      failures++;
      $display("FAIL a=%h b=%h sub=%0d got %h/%0d exp %h", ta, tb_, ts, sum, cout, ref_v);
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
    check_one('0, '0, 0);
    check_one('1, 24'd1, 0);
    check_one('1, '1, 1);
    check_one(24'h800000, 24'h000001, 1);
    check_one(24'h7fffff, 24'h000001, 0);
    for (int i = 0; i < 2000; i++)
      check_one(W'($urandom), W'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
