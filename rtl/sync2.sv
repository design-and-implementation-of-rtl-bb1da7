// Two-flip-flop synchroniser for a level or 2-phase event signal that comes
// from another timing domain. The output follows the input two to three
// clock edges later. Reset clears both stages, matching the all-zero start of
// every request and acknowledge line.
module sync2 (
  input  logic clk,
  input  logic rst,
  input  logic d,
  output logic q
);
  logic meta;

  always_ff @(posedge clk) begin
    if (rst) begin
      meta <= 1'b0;
      q    <= 1'b0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
