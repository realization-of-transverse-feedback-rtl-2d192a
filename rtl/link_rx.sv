// link_rx: receive side of the extended communication stack.
//
// Collects the four words of a frame from the link's user-side stream,
// checks the CRC-16 in word 3 against words 0..2 and the end-of-frame flag,
// and decodes the frame. A good frame is presented for one cycle, one clock
// after its last word: data frames on `frm_valid`, time-protocol frames
// (TR/TU) on `tup_valid`, so the time protocol stays hidden from the upper
// layers. Bad frames are dropped, flagged on `crc_err` and counted in
// `err_cnt`; `frm_cnt` counts good frames (channel verification). What
// happens to bad frames is this design's choice.
module link_rx (
  input  logic             clk,
  input  logic             rst,
  input  logic [31:0]      rx_data,
  input  logic             rx_valid,
  input  logic             rx_last,
  output logic             frm_valid,
  output logic             tup_valid,
  output tfs_pkg::frame_t  frm,
  output logic             crc_err,
  output logic [15:0]      err_cnt,
  output logic [15:0]      frm_cnt
);
  import tfs_pkg::*;

  logic [1:0]  idx;
  logic [31:0] w0, w1, w2;
  logic [15:0] crc;
  logic        end_frame, good;
  frame_t      dec;

  assign end_frame = rx_valid && ((idx == 2'd3) || rx_last);
  assign good      = (idx == 2'd3) && rx_last && (rx_data[15:0] == crc);

  crc16 u_crc (
    .clk (clk), .rst (rst),
    .clr (end_frame),
    .en  (rx_valid && !end_frame),
    .word(rx_data),
    .crc (crc)
  );

  always_comb begin
    dec.ftype = ftype_e'(w0[31:28]);
    dec.src   = w0[27:24];
    dec.rate  = w0[23:20];
    dec.seq   = w0[15:0];
    dec.ts    = w1;
    dec.data  = w2[DATA_W-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      idx <= '0; frm_valid <= 1'b0; tup_valid <= 1'b0; crc_err <= 1'b0;
      err_cnt <= '0; frm_cnt <= '0; frm <= '0;
      w0 <= '0; w1 <= '0; w2 <= '0;
    end else begin
      frm_valid <= 1'b0;
      tup_valid <= 1'b0;
      crc_err   <= 1'b0;
      if (rx_valid) begin
        unique case (idx)
          2'd0: w0 <= rx_data;
          2'd1: w1 <= rx_data;
          2'd2: w2 <= rx_data;
          default: ;
        endcase
        idx <= end_frame ? 2'd0 : idx + 1'b1;
        if (end_frame) begin
          if (good) begin
            frm     <= dec;
            frm_cnt <= frm_cnt + 1'b1;
            if (dec.ftype == FT_DATA) frm_valid <= 1'b1;
            else if (dec.ftype == FT_TR || dec.ftype == FT_TU) tup_valid <= 1'b1;
          end else begin
            crc_err <= 1'b1;
            err_cnt <= err_cnt + 1'b1;
          end
        end
      end
    end
  end
endmodule
