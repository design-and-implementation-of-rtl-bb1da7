// 8x8 two-dimensional FFT processor (clk2 domain).
//
// The 2-D transform is computed by rows and then by columns with one
// pipelined 8-point FFT (fft8_1d):
//   1. COLLECT  Eight rows arrive one by one over a 2-phase channel: when the
//               synchronised request in_req differs from in_ack, in_data
//               (16 words: Re x[0], Im x[0], ..., Im x[7]) is written into
//               row r of an 8x8 complex working store and in_ack toggles,
//               which is the pass event that frees the capture latch in front.
//   2. ROWS     The eight rows are fed to the FFT on eight consecutive clocks;
//               9 clocks later each result is written back over its row.
//   3. COLS     Likewise for the eight columns, written back over the columns.
//   4. OUTPUT   When the previous result has been acknowledged (out_ack equal
//               to out_req), the store is copied to out_data (128 words, element
//               8*u+v at words 2(8u+v) and 2(8u+v)+1, real first); on the next
//               clock out_req toggles. Collection of the next image starts at
//               once, so input and output overlap.
// A transform takes 8 + 9 clocks per pass, 34 clocks for both passes, plus
// the clocks spent collecting and handing over. busy is high in ROWS and COLS.
// Values wrap at 24 bits, so inputs must be small enough for 64-fold growth.
//
// The conversion of image rows to the frequency domain by 3-stage radix-2
// FFTs in its own clock domain follows the design; the row-column schedule,
// the working store and the channel details are choices made here.
module fft2d_processor
  import fft_pkg::*;
(
  input  logic                        clk2,
  input  logic                        rst,
  input  logic                        in_req,
  input  logic [2*NPT-1:0][DW-1:0]    in_data,
  output logic                        in_ack,
  output logic                        out_req,
  output logic [2*NPT*NPT-1:0][DW-1:0] out_data,
  input  logic                        out_ack,
  output logic                        busy
);
  typedef enum logic [1:0] {S_COLLECT, S_ROWS, S_COLS, S_OUT} state_t;

  state_t       state;
  cplx_t [7:0]  mem [8];            // mem[row][column]
  logic  [2:0]  row_cnt;
  logic  [3:0]  issue_cnt;
  logic  [3:0]  wb_cnt;
  logic         out_load;           // out_data loaded, toggle out_req next
  logic         in_req_s, out_ack_s;

  logic         fft_in_valid, fft_out_valid;
  cplx_t [7:0]  fft_x, fft_y;

  sync2 u_sync_req (.clk(clk2), .rst(rst), .d(in_req),  .q(in_req_s));
  sync2 u_sync_ack (.clk(clk2), .rst(rst), .d(out_ack), .q(out_ack_s));

  fft8_1d u_fft (
    .clk(clk2), .rst(rst),
    .in_valid(fft_in_valid), .x(fft_x),
    .out_valid(fft_out_valid), .y(fft_y)
  );

  // operand selection: a row in ROWS, a column in COLS
  always_comb begin
    fft_in_valid = ((state == S_ROWS) || (state == S_COLS)) && (issue_cnt < 4'd8);
    for (int i = 0; i < 8; i++)
      fft_x[i] = (state == S_COLS) ? mem[i][issue_cnt[2:0]] : mem[issue_cnt[2:0]][i];
  end

  assign busy = (state == S_ROWS) || (state == S_COLS);

  always_ff @(posedge clk2) begin
    if (rst) begin
      state     <= S_COLLECT;
      row_cnt   <= '0;
      issue_cnt <= '0;
      wb_cnt    <= '0;
      in_ack    <= 1'b0;
      out_req   <= 1'b0;
      out_load  <= 1'b0;
    end else begin
      if (out_load) begin
        out_req  <= ~out_req;
        out_load <= 1'b0;
      end
      unique case (state)
        S_COLLECT: begin
          if (in_req_s != in_ack) begin
            for (int i = 0; i < 8; i++) begin
              mem[row_cnt][i].re <= in_data[2*i];
              mem[row_cnt][i].im <= in_data[2*i+1];
            end
            in_ack  <= ~in_ack;
            row_cnt <= row_cnt + 1'b1;
            if (row_cnt == 3'd7) begin
              state     <= S_ROWS;
              issue_cnt <= '0;
              wb_cnt    <= '0;
            end
          end
        end
        S_ROWS, S_COLS: begin
          if (issue_cnt < 4'd8) issue_cnt <= issue_cnt + 1'b1;
          if (fft_out_valid) begin
            for (int i = 0; i < 8; i++) begin
              if (state == S_ROWS) mem[wb_cnt[2:0]][i] <= fft_y[i];
              else                 mem[i][wb_cnt[2:0]] <= fft_y[i];
            end
            wb_cnt <= wb_cnt + 1'b1;
            if (wb_cnt == 4'd7) begin
              state     <= (state == S_ROWS) ? S_COLS : S_OUT;
              issue_cnt <= '0;
              wb_cnt    <= '0;
            end
          end
        end
        S_OUT: begin
          // wait until the previous result has been captured downstream
          if (!out_load && (out_ack_s == out_req)) begin
            for (int u = 0; u < 8; u++)
              for (int v = 0; v < 8; v++) begin
                out_data[2*(8*u+v)]   <= mem[u][v].re;
                out_data[2*(8*u+v)+1] <= mem[u][v].im;
              end
            out_load <= 1'b1;
            state    <= S_COLLECT;
          end
        end
        default: state <= S_COLLECT;
      endcase
    end
  end

  // a request is raised only when the previous one has been acknowledged
  a_out_handshake: assert property (@(posedge clk2) disable iff (rst)
    (out_req != $past(out_req)) |-> $past(out_ack_s) == $past(out_req));
endmodule
