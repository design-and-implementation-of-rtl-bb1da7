// Muller C-element.
//
// The output c copies the inputs when a and b agree and holds its value when
// they differ, so it changes only after both inputs have made the same
// transition. In the micropipeline its b input is driven by the inverted
// pass-done line of the latch it controls, which makes it fire on a new
// request only once the latch has passed its previous value on. rst forces
// the output to 0, the state in which every request and acknowledge starts.
//
// It is written as a level-sensitive latch (enable: a == b or rst, data: a),
// which is what a C-element is; the latch warning a synthesis tool reports for
// this module is therefore intended. The reset input is a choice made here.
module muller_c (
  input  logic rst,
  input  logic a,
  input  logic b,
  output logic c
);
  always_latch begin
    if (rst)         c = 1'b0;
    else if (a == b) c = a;
  end
endmodule
