// Signed Booth multiplier, W x W -> 2W bits.
//
// Radix-4 (modified) Booth recoding: the multiplier b is scanned in
// overlapping 3-bit windows {b[2i+1], b[2i], b[2i-1]}, each of which selects
// 0, +-a or +-2a as a partial product weighted by 4^i. The W/2 partial
// products are sign-extended to 2W bits and summed. Purely combinational;
// the product is exact for all signed inputs.
//
// The butterfly's complex multiplier uses four of these (24-bit sample times
// 24-bit twiddle, 48-bit product). That a Booth multiplier is used is the
// design's; the radix-4 recoding is a choice made here.
module booth_multiplier #(
  parameter int unsigned W = 24
) (
  input  logic signed [W-1:0]   a,
  input  logic signed [W-1:0]   b,
  output logic signed [2*W-1:0] p
);
  localparam int unsigned NPP = (W + 1) / 2;  // partial products
  localparam int unsigned PW  = 2 * W;        // product width

  logic [W+1:0]          bx;   // b sign-extended by one bit, with b[-1] = 0
  logic signed [2*W-1:0] pp;
  logic signed [2*W-1:0] acc;

  always_comb begin
    bx  = {b[W-1], b, 1'b0};
    acc = '0;
    for (int i = 0; i < int'(NPP); i++) begin
      unique case (bx[2*i +: 3])
        3'b001, 3'b010: pp = PW'(a);
        3'b011:         pp = PW'(a) <<< 1;
        3'b100:         pp = -(PW'(a) <<< 1);
        3'b101, 3'b110: pp = -(PW'(a));
        default:        pp = '0;
      endcase
      acc = acc + (pp <<< (2*i));
    end
    p = acc;
  end
endmodule
