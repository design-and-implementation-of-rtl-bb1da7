// Parallel-to-serial output buffer (clk1 domain).
//
// Holds one transformed 8x8 block: WORDS = 128 words of DW bits (3072 bits),
// stored in a single clock, then sent out one word per clock while rd_en is
// high. A block is announced by the 2-phase request req from the second
// capture-pass latch (another timing domain, synchronised with two
// flip-flops). When a request is pending and the buffer is empty, data_in is
// copied into the buffer and the pass output toggles, which lets the latch
// become transparent again. While words remain unread, a pending request
// waits, and the latch in front stays opaque: this is the back-pressure of
// the output side.
//
// Reading: on each clock with rd_en high and full high the next word (word 0
// first) is registered on data_out and out_valid is high for that clock; full
// falls after the last word. Word 2k is the real part and word 2k+1 the
// imaginary part of element k = 8*row + column.
//
// The one-clock parallel load, the 3072-bit width and serial reading under
// rd_en follow the design; driving pass from the buffer and the back-pressure
// are choices made here.
module output_buffer #(
  parameter int unsigned DW    = 24,
  parameter int unsigned WORDS = 128
) (
  input  logic                       clk1,
  input  logic                       rst,
  input  logic                       req,
  output logic                       pass,
  input  logic [WORDS-1:0][DW-1:0]   data_in,
  input  logic                       rd_en,
  output logic [DW-1:0]              data_out,
  output logic                       out_valid,
  output logic                       full
);
  localparam int unsigned CW = $clog2(WORDS);

  logic [WORDS-1:0][DW-1:0] store;
  logic [CW-1:0]            rd_ptr;
  logic                     req_s;

  sync2 u_sync (.clk(clk1), .rst(rst), .d(req), .q(req_s));

  always_ff @(posedge clk1) begin
    if (rst) begin
      pass      <= 1'b0;
      full      <= 1'b0;
      rd_ptr    <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (!full) begin
        if (req_s != pass) begin
          store  <= data_in;
          full   <= 1'b1;
          rd_ptr <= '0;
          pass   <= ~pass;
        end
      end else if (rd_en) begin
        data_out  <= store[rd_ptr];
        out_valid <= 1'b1;
        rd_ptr    <= rd_ptr + 1'b1;
        if (rd_ptr == CW'(WORDS - 1)) full <= 1'b0;
      end
    end
  end
endmodule
