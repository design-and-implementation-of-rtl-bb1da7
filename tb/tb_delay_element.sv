// Self-checking test of the delay element model: after each transition of
// the input the output must keep its old value for just under DELAY and show
// the new value once DELAY has passed.
module tb_delay_element;
  localparam int unsigned DELAY = 4;
  logic in_sig = 0, out_sig;
  int checks = 0, failures = 0;

  delay_element #(.DELAY(DELAY)) dut (.in_sig(in_sig), .out_sig(out_sig));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10;
    checks++;
    if (out_sig !== 1'b0) begin failures++; $display("FAIL initial value"); end
    for (int i = 0; i < 20; i++) begin
      logic old;
      old = in_sig;
      in_sig = ~in_sig;
      #(DELAY - 1);
      checks++;
      if (out_sig !== old) begin failures++; $display("FAIL changed early at %0t", $time); end
      #2;
      checks++;
      if (out_sig !== in_sig) begin failures++; $display("FAIL not changed at %0t", $time); end
      #10;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
