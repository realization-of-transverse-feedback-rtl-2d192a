// tup_master: time master of the Time Update Protocol (TUP).
//
// When a time request (TR) from a slave has been received (`tr_rcvd`, one
// cycle pulse), the master answers in the same cycle with a time update
// (TU) carrying its current time, so the receive time t2 and the send time
// t3 are equal. This is only allowed when the send constraints hold
// (`link_idle`: transmit buffer empty and link ready). If they do not, the
// TU is suppressed, the master raises `block` (which keeps new traffic out
// of its transmit buffer so it drains) and waits for the next TR, which
// clears the block. Protocol behaviour follows the system description;
// the counters `tu_cnt`/`sup_cnt` are this design's status outputs.
module tup_master #(
  parameter int TS_W = 32
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            tr_rcvd,
  input  logic            link_idle,
  input  logic [TS_W-1:0] master_time,
  output logic            tu_valid,
  output logic [TS_W-1:0] tu_time,
  output logic            block,
  output logic [15:0]     tu_cnt,
  output logic [15:0]     sup_cnt
);
  assign tu_valid = tr_rcvd && link_idle;
  assign tu_time  = master_time;

  always_ff @(posedge clk) begin
    if (rst) begin
      block <= 1'b0; tu_cnt <= '0; sup_cnt <= '0;
    end else if (tr_rcvd) begin
      if (link_idle) begin
        block  <= 1'b0;
        tu_cnt <= tu_cnt + 1'b1;
      end else begin
        block   <= 1'b1;
        sup_cnt <= sup_cnt + 1'b1;
      end
    end
  end
endmodule
