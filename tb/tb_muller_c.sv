// Self-checking test of the Muller C-element: walks the inputs through every
// transition from every state and compares the output with the rule
// "copy the inputs when they agree, otherwise hold"; also checks reset.
module tb_muller_c;
  logic rst, a, b, c;
  logic model;
  int checks = 0, failures = 0;

  muller_c dut (.rst(rst), .a(a), .b(b), .c(c));

  task automatic apply(input logic na, input logic nb);
    a = na; b = nb;
    #1;
    if (na == nb) model = na;
    checks++;
    if (c !== model) begin
      failures++;
      $display("FAIL a=%0d b=%0d c=%0d expected %0d", na, nb, c, model);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; a = 1; b = 1;
    #1;
    model = 0;
    checks++;
    if (c !== 1'b0) begin failures++; $display("FAIL reset"); end
    rst = 0;
    apply(0, 1);
    apply(1, 1);
    apply(0, 1);
    apply(1, 0);
    apply(0, 0);
    apply(1, 0);
    apply(0, 1);
    for (int i = 0; i < 200; i++)
      apply(1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
