// aurora_core: central-unit end of one cluster link.
//
// Sits on the user side of the multi-gigabit link IP. Received frames are
// assembled and checksum-checked (link_rx); data frames go on to the frame
// unpacker, time requests go to the TUP master, which answers through the
// transmit stack (link_tx) in the same cycle with the master time, or
// suppresses the answer and blocks the channel when the stack is not idle.
// The central unit sends nothing but time updates on this link, so the
// transmit buffer's data input is unused. Error and frame counters are
// brought out for channel verification. Structure follows the system
// description; framing and counters are this design's choice.
module aurora_core (
  input  logic             clk,
  input  logic             rst,
  input  tfs_pkg::ts_t     master_time,
  // link user side
  input  logic [31:0]      rx_data,
  input  logic             rx_valid,
  input  logic             rx_last,
  output logic [31:0]      tx_data,
  output logic             tx_valid,
  output logic             tx_last,
  input  logic             tx_ready,
  // checked data frames
  output logic             frm_valid,
  output tfs_pkg::frame_t  frm,
  // status
  output logic [15:0]      crc_err_cnt,
  output logic [15:0]      frm_cnt,
  output logic [15:0]      tu_cnt,
  output logic [15:0]      sup_cnt
);
  import tfs_pkg::*;

  logic   tup_rcvd, crc_err, link_idle, tu_valid, tup_fire, block, push_ready, buf_empty;
  ts_t    tu_time;
  frame_t tu_frame;

  link_rx u_rx (
    .clk, .rst, .rx_data, .rx_valid, .rx_last,
    .frm_valid, .tup_valid(tup_rcvd), .frm, .crc_err,
    .err_cnt(crc_err_cnt), .frm_cnt
  );

  tup_master #(.TS_W(TS_W)) u_tup (
    .clk, .rst, .tr_rcvd(tup_rcvd && frm.ftype == FT_TR), .link_idle,
    .master_time, .tu_valid, .tu_time, .block, .tu_cnt, .sup_cnt
  );

  always_comb begin
    tu_frame       = '0;
    tu_frame.ftype = FT_TU;
    tu_frame.ts    = tu_time;
  end

  link_tx #(.FIFO_DEPTH(2)) u_tx (
    .clk, .rst,
    .push_valid(1'b0), .push_ready, .push_frame('0), .hold(block),
    .tup_valid(tu_valid), .tup_frame(tu_frame), .tup_fire, .idle(link_idle),
    .tx_data, .tx_valid, .tx_last, .tx_ready, .buf_empty
  );
endmodule
