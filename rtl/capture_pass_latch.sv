// Capture-pass event latch of a 2-phase micropipeline.
//
// A W-bit data latch controlled by two event (transition) inputs. While the
// capture input c and the pass input p are at the same level the latch is
// transparent; a transition on c makes it opaque, holding din, and the next
// transition on p makes it transparent again. Capture done (cd) and pass done
// (pd) report the levels of c and p once the latch has changed mode; in a
// physical latch they are delayed copies, and here the delay is left to the
// delay elements placed on the request lines.
//
// Interface: c, p are 2-phase events; din -> dout; after reset both events
// are 0 and the latch is transparent. The capture/pass behaviour follows the
// micropipeline the design uses; it is written as a plain level-sensitive
// latch enabled by c == p (the latch a synthesis tool reports is intended).
module capture_pass_latch #(
  parameter int unsigned W = 384
) (
  input  logic         c,
  input  logic         p,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout,
  output logic         cd,
  output logic         pd
);
  always_latch begin
    if (c == p) dout = din;
  end

  assign cd = c;
  assign pd = p;
endmodule
