// tup_slave: time slave of the Time Update Protocol (TUP).
//
// After reset, and then every SYNC_PERIOD cycles, the slave wants to send
// a time request (TR). It raises `tr_valid` only while the send constraints
// hold (`link_idle`); the transmit stack starts the TR in that cycle and
// answers with `tr_fire`, at which the slave stores its own time t1. When
// the time update (TU) arrives (`tu_rcvd`, slave time t4) carrying the
// master time t3, the round trip is RTT = t4 - t1 and the master time at
// t4 is t3 + RTT/2, because t2 = t3 and both directions have the same
// latency. The slave counter is loaded with t3 + RTT/2 + 1 so that it
// shows the master time from the next cycle on. If no TU arrives within
// TIMEOUT cycles (the master suppressed it), the TR is repeated. A TU
// does not say which TR it answers, so TIMEOUT must exceed the longest
// round trip of the link: a TU arriving after its TR timed out would be
// taken as the answer to the repeated TR. The period and timeout values
// are this design's choice.
module tup_slave #(
  parameter int TS_W        = 32,
  parameter int SYNC_PERIOD = 4096,
  parameter int TIMEOUT     = 1024
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            link_idle,
  input  logic [TS_W-1:0] slave_time,
  output logic            tr_valid,
  input  logic            tr_fire,
  input  logic            tu_rcvd,
  input  logic [TS_W-1:0] tu_time,
  output logic            load,
  output logic [TS_W-1:0] load_val,
  output logic            synced,
  output logic [TS_W-1:0] rtt,
  output logic [15:0]     retry_cnt
);
  typedef enum logic [1:0] {S_WAIT_PERIOD, S_REQ, S_WAIT_TU} state_e;

  localparam int CW = $clog2(SYNC_PERIOD > TIMEOUT ? SYNC_PERIOD : TIMEOUT) + 1;

  state_e          state;
  logic [CW-1:0]   timer;
  logic [TS_W-1:0] t1, rtt_now;

  assign tr_valid = (state == S_REQ) && link_idle;
  assign rtt_now  = slave_time - t1;
  assign load     = (state == S_WAIT_TU) && tu_rcvd;
  assign load_val = tu_time + (rtt_now >> 1) + 1'b1;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_REQ; timer <= '0; t1 <= '0; synced <= 1'b0;
      rtt <= '0; retry_cnt <= '0;
    end else begin
      unique case (state)
        S_WAIT_PERIOD: begin
          timer <= timer + 1'b1;
          if (timer == CW'(SYNC_PERIOD - 1)) state <= S_REQ;
        end
        S_REQ: if (tr_fire) begin
          t1    <= slave_time;
          timer <= '0;
          state <= S_WAIT_TU;
        end
        S_WAIT_TU: begin
          timer <= timer + 1'b1;
          if (tu_rcvd) begin
            rtt    <= rtt_now;
            synced <= 1'b1;
            timer  <= '0;
            state  <= S_WAIT_PERIOD;
          end else if (timer == CW'(TIMEOUT - 1)) begin
            retry_cnt <= retry_cnt + 1'b1;
            state     <= S_REQ;
          end
        end
        default: state <= S_REQ;
      endcase
    end
  end
endmodule
