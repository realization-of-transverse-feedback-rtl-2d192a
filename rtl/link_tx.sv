// link_tx: transmit side of the extended communication stack.
//
// Data frames from the upper layer are queued in a frame FIFO (the
// "dynamic data buffer") and sent as four 32-bit words on the link's
// user-side stream (tx_data/tx_valid/tx_last, with tx_ready from the link
// IP); word 3 carries the CRC-16 of words 0..2. A time-protocol message
// (TR or TU) has priority: when `tup_valid` is high in a cycle where the
// stack is `idle` (FIFO empty, no frame in flight, link ready), the message
// frame is started in that very cycle and `tup_fire` pulses, so the time
// value it carries is exact. The header word leaves one cycle after the
// start. `hold` stops the FIFO from accepting new data frames (used by the
// time master to block the channel) while the queued frames drain.
// Frames may follow each other back to back. FIFO depth is assumed.
module link_tx #(
  parameter int FIFO_DEPTH = 16
) (
  input  logic                  clk,
  input  logic                  rst,
  // upper layer data frames
  input  logic                  push_valid,
  output logic                  push_ready,
  input  tfs_pkg::frame_t       push_frame,
  input  logic                  hold,
  // time protocol message slot
  input  logic                  tup_valid,
  input  tfs_pkg::frame_t       tup_frame,
  output logic                  tup_fire,
  output logic                  idle,
  // link user side
  output logic [31:0]           tx_data,
  output logic                  tx_valid,
  output logic                  tx_last,
  input  logic                  tx_ready,
  output logic                  buf_empty
);
  import tfs_pkg::*;

  localparam int PW = $clog2(FIFO_DEPTH);

  frame_t         fifo [FIFO_DEPTH];
  logic [PW-1:0]  wr_ptr, rd_ptr;
  logic [PW:0]    count;
  frame_t         cur;
  logic           busy;
  logic [1:0]     idx;
  logic [15:0]    seq;
  logic [15:0]    crc;
  logic           accept, finishing, can_start, start_tup, start_data;

  assign buf_empty  = (count == 0);
  assign push_ready = !hold && (count < (PW+1)'(FIFO_DEPTH));
  assign accept     = busy && tx_ready;
  assign finishing  = accept && (idx == 2'd3);
  assign idle       = !busy && buf_empty && tx_ready;
  assign can_start  = !busy || finishing;
  assign start_tup  = tup_valid && idle;
  assign tup_fire   = start_tup;
  assign start_data = can_start && !start_tup && !buf_empty;

  always_comb begin
    unique case (idx)
      2'd0:    tx_data = hdr_word(cur);
      2'd1:    tx_data = cur.ts;
      2'd2:    tx_data = {16'b0, cur.data};
      default: tx_data = {16'b0, crc};
    endcase
  end
  assign tx_valid = busy;
  assign tx_last  = busy && (idx == 2'd3);

  crc16 u_crc (
    .clk (clk), .rst (rst),
    .clr (start_tup || start_data),
    .en  (accept && (idx != 2'd3)),
    .word(tx_data),
    .crc (crc)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr <= '0; rd_ptr <= '0; count <= '0;
      busy <= 1'b0; idx <= '0; seq <= '0; cur <= '0;
    end else begin
      if (push_valid && push_ready) begin
        fifo[wr_ptr] <= push_frame;
        wr_ptr <= wr_ptr + 1'b1;
      end
      count <= count + (PW+1)'(push_valid && push_ready) - (PW+1)'(start_data);
      if (accept) idx <= idx + 1'b1;
      if (start_tup) begin
        cur  <= tup_frame;
        busy <= 1'b1;
        idx  <= '0;
      end else if (start_data) begin
        cur     <= fifo[rd_ptr];
        cur.seq <= seq;
        seq     <= seq + 1'b1;
        rd_ptr  <= rd_ptr + 1'b1;
        busy    <= 1'b1;
        idx     <= '0;
      end else if (finishing) begin
        busy <= 1'b0;
      end
    end
  end

  // A time message may only start when nothing else is on the way.
  a_tup_idle: assert property (@(posedge clk) disable iff (rst)
    tup_fire |-> (!busy && buf_empty && tx_ready));
endmodule
