// Behavioural model of a matched delay line on a request wire.
//
// A request event (a transition) on in_sig appears on out_sig DELAY time
// units later, so that the request reaches the next stage only after the data
// it announces has settled. In silicon this is a chain of gates sized to the
// worst-case delay of the logic it matches; it has no logic function and is
// not synthesizable, which is why this file is a behavioural model. DELAY is a
// choice made here: a request that is closer than DELAY to the previous one is
// swallowed (inertial delay), which a 2-phase handshake never produces.
module delay_element #(
  parameter int unsigned DELAY = 2
) (
  input  logic in_sig,
  output logic out_sig
);
  assign #(DELAY) out_sig = in_sig;
endmodule
