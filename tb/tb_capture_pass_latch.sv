// Self-checking test of the capture-pass latch: transparent after reset
// (c = p = 0), opaque after each capture event, transparent again after each
// pass event, for both polarities of the 2-phase events; cd and pd must
// follow c and p.
module tb_capture_pass_latch;
  localparam int unsigned W = 32;
  logic         c = 0, p = 0, cd, pd;
  logic [W-1:0] din, dout, held;
  int checks = 0, failures = 0;

  capture_pass_latch #(.W(W)) dut (.c(c), .p(p), .din(din), .dout(dout), .cd(cd), .pd(pd));

  task automatic expect_out(input logic [W-1:0] e, input string what);
    #1;
    checks++;
    if (dout !== e || cd !== c || pd !== p) begin
      failures++;
      $display("FAIL %s: dout=%h expected %h (c=%0d cd=%0d p=%0d pd=%0d)", what, dout, e, c, cd, p, pd);
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
    for (int r = 0; r < 20; r++) begin
      din = $urandom;
      expect_out(din, "transparent");
      din = $urandom;
      expect_out(din, "transparent follows");
      held = din;
      c = ~c;                       // capture event
      expect_out(held, "captured");
      din = ~held;
      expect_out(held, "opaque holds");
      din = $urandom;
      expect_out(held, "opaque holds 2");
      p = ~p;                       // pass event
      expect_out(din, "passed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
