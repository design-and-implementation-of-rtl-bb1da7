// Globally asynchronous, locally synchronous 8x8 2-D FFT core.
//
// Two clock domains joined by a 2-phase (transition-signalling) micropipeline:
//
//   data_in -> input_buffer -> latch 1 -> fft2d_processor -> latch 2 -> output_buffer -> data_out
//               (clk1)                     (clk2)                       (clk1)
//
// The input buffer turns 16 serial 24-bit words into one 384-bit row of
// 8 complex Q12 points. Its request fires the first Muller C-element, whose
// other input is the inverted pass-done of latch 1; the C-element's output is
// the capture event of latch 1. Capture done of latch 1 is the acknowledge
// ack1 back to the input buffer and, through a matched delay, the request req1
// to the processor. The processor copies the row and answers with the pass
// event of latch 1, so the latch reopens for the next row. After eight rows
// it transforms the image and raises its own request, which through a second
// delay and C-element captures the 3072-bit result in latch 2. Capture done
// of latch 2 acknowledges the processor (ack2) and, delayed, is the request
// req2 to the output buffer, which copies the block, sends the pass event
// back to latch 2, and streams 128 words out while rd_en is high.
//
// Every handshake line starts at 0 after rst (held for a few cycles of both
// clocks). Throughput is limited by the 16 cycles of clk1 per row and the
// 128 cycles of clk1 per output block; the processor needs about 40 cycles
// of clk2 per image once the rows are in.
//
// The buffers, latches, C-elements, delays and the two clocks follow the
// design. Routing req1 to the processor and taking the pass events of the
// two latches from their receivers (rather than wiring req1 straight into
// the second C-element and rd_en into the second pass input) are choices made
// here, because the 2-D processor must gather eight rows before it has a
// result. The delay elements are behavioural models; the rest is
// synthesizable.
module gals_fft2d_top
  import fft_pkg::*;
#(
  parameter int unsigned DELAY = 2
) (
  input  logic          clk1,
  input  logic          clk2,
  input  logic          rst,
  input  logic          en,
  input  logic [DW-1:0] data_in,
  output logic          buff_full,
  input  logic          rd_en,
  output logic [DW-1:0] data_out,
  output logic          out_valid,
  output logic          ack1,
  output logic          req2
);
  localparam int unsigned ROW_WORDS = 2 * NPT;        // 16
  localparam int unsigned IMG_WORDS = 2 * NPT * NPT;  // 128

  // stage 1
  logic [ROW_WORDS-1:0][DW-1:0] ib_data, l1_data;
  logic ib_req, c1, cd1, pd1, pd1_d, p1, req1;
  // stage 2
  logic [IMG_WORDS-1:0][DW-1:0] pr_data, l2_data;
  logic pr_req, pr_req_d, c2, cd2, pd2, pd2_d, p2;
  logic busy;

  input_buffer #(.DW(DW), .WORDS(ROW_WORDS)) u_in_buf (
    .clk1(clk1), .rst(rst), .en(en), .data_in(data_in),
    .buff_full(buff_full), .data_out(ib_data), .req(ib_req), .ack(ack1)
  );

  muller_c u_c1 (.rst(rst), .a(ib_req), .b(~pd1_d), .c(c1));

  // pass done reaches the C-element only after the latch is transparent
  delay_element #(.DELAY(DELAY)) u_dly_pd1 (.in_sig(pd1), .out_sig(pd1_d));

  capture_pass_latch #(.W(ROW_WORDS*DW)) u_latch1 (
    .c(c1), .p(p1), .din(ib_data), .dout(l1_data), .cd(cd1), .pd(pd1)
  );

  assign ack1 = cd1;
  delay_element #(.DELAY(DELAY)) u_dly1 (.in_sig(cd1), .out_sig(req1));

  fft2d_processor u_fft2d (
    .clk2(clk2), .rst(rst),
    .in_req(req1), .in_data(l1_data), .in_ack(p1),
    .out_req(pr_req), .out_data(pr_data), .out_ack(cd2),
    .busy(busy)
  );

  delay_element #(.DELAY(DELAY)) u_dly_pr (.in_sig(pr_req), .out_sig(pr_req_d));

  muller_c u_c2 (.rst(rst), .a(pr_req_d), .b(~pd2_d), .c(c2));

  delay_element #(.DELAY(DELAY)) u_dly_pd2 (.in_sig(pd2), .out_sig(pd2_d));

  capture_pass_latch #(.W(IMG_WORDS*DW)) u_latch2 (
    .c(c2), .p(p2), .din(pr_data), .dout(l2_data), .cd(cd2), .pd(pd2)
  );

  delay_element #(.DELAY(DELAY)) u_dly2 (.in_sig(cd2), .out_sig(req2));

  output_buffer #(.DW(DW), .WORDS(IMG_WORDS)) u_out_buf (
    .clk1(clk1), .rst(rst), .req(req2), .pass(p2), .data_in(l2_data),
    .rd_en(rd_en), .data_out(data_out), .out_valid(out_valid), .full()
  );
endmodule
