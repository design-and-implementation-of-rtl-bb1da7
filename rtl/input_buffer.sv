// Serial-to-parallel input buffer (clk1 domain).
//
// Collects WORDS words of DW bits, one per clock while en is high, and then
// presents all of them at once on data_out: for an 8-point row that is 16
// words (real and imaginary part of each point: word 2i is Re x[i], word
// 2i+1 is Im x[i]), 384 bits in all, loaded in 16 clocks instead of needing
// 384 input pins. buff_full rises on the clock edge that stores the last
// word. One clock later the 2-phase request req toggles, announcing the row
// to the capture-pass latch that follows. The buffer then holds its contents
// and ignores en until the acknowledge ack (the latch's capture done, from
// another timing domain, synchronised here with two flip-flops) has made the
// same transition; buff_full then falls and filling restarts at word 0.
//
// Serial loading, the 16-cycle fill and buff_full follow the design; the
// word order, the 2-phase request derived from buff_full and ignoring en
// while full are choices made here.
module input_buffer #(
  parameter int unsigned DW    = 24,
  parameter int unsigned WORDS = 16
) (
  input  logic                       clk1,
  input  logic                       rst,
  input  logic                       en,
  input  logic [DW-1:0]              data_in,
  output logic                       buff_full,
  output logic [WORDS-1:0][DW-1:0]   data_out,
  output logic                       req,
  input  logic                       ack
);
  localparam int unsigned CW = $clog2(WORDS);

  logic [CW-1:0] sel;
  logic          req_sent;
  logic          ack_s;

  sync2 u_sync (.clk(clk1), .rst(rst), .d(ack), .q(ack_s));

  always_ff @(posedge clk1) begin
    if (rst) begin
      sel       <= '0;
      buff_full <= 1'b0;
      req       <= 1'b0;
      req_sent  <= 1'b0;
    end else if (!buff_full) begin
      if (en) begin
        data_out[sel] <= data_in;
        if (sel == CW'(WORDS - 1)) begin
          buff_full <= 1'b1;
          sel       <= '0;
        end else begin
          sel <= sel + 1'b1;
        end
      end
    end else if (!req_sent) begin
      req      <= ~req;
      req_sent <= 1'b1;
    end else if (ack_s == req) begin
      buff_full <= 1'b0;
      req_sent  <= 1'b0;
    end
  end

  // the buffer never announces a new row before the previous one is captured
  a_one_outstanding: assert property (@(posedge clk1) disable iff (rst)
    (req != $past(req)) |-> ($past(ack_s) == $past(req)));
endmodule
