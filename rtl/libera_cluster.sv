// libera_cluster: a cluster of Libera devices behind one fibre link.
//
// NLIB devices each compress and tag their own BPM delta signal
// (libera_acq). The cluster master merges their samples onto the single
// link to the central unit: every device has a one-sample holding
// register, and a round-robin arbiter pushes one held sample per cycle as
// a data frame into the transmit stack (link_tx). A sample that finds its
// holding register still full is dropped and counted in `ovf_cnt`: the
// compression rate must leave enough link bandwidth (4 words per sample,
// so 2^rate_log2 >= 4*NLIB). The cluster master also keeps the slave time
// counter used for tagging and runs the TUP slave, whose requests and
// updates travel on the same link (link_rx receives the updates). Status:
// the slave time and its sync flag, overflows, checksum errors on the
// return link, the last measured round-trip time `rtt` (cycles) and the
// number of unanswered time requests `retry_cnt`. The return link carries
// only time updates, so the receive stack's data-frame outputs and its
// per-frame flags are left unconnected, as is the transmit stack's
// buffer-empty flag (its `idle` output already includes it).
// Star topology, shared link and TUP slave follow the system description;
// the arbitration and holding registers, and modelling the member devices
// as sharing the cluster master's time counter, are this design's choice.
module libera_cluster #(
  parameter int NLIB        = 3,
  parameter int FIFO_DEPTH  = 16,
  parameter int SYNC_PERIOD = 4096,
  parameter int TIMEOUT     = 1024
) (
  input  logic                       clk,
  input  logic                       rst,
  input  tfs_pkg::sample_t           delta [NLIB],
  input  logic [tfs_pkg::RATE_W-1:0] rate_log2,
  // link to the central unit (user side of the link IP)
  output logic [31:0]                tx_data,
  output logic                       tx_valid,
  output logic                       tx_last,
  input  logic                       tx_ready,
  input  logic [31:0]                rx_data,
  input  logic                       rx_valid,
  input  logic                       rx_last,
  // status
  output tfs_pkg::ts_t               slave_time,
  output logic                       synced,
  output logic [15:0]                ovf_cnt,
  output logic [15:0]                crc_err_cnt,
  output tfs_pkg::ts_t               rtt,
  output logic [15:0]                retry_cnt
);
  import tfs_pkg::*;

  localparam int IW = (NLIB > 1) ? $clog2(NLIB) : 1;

  logic    acq_valid [NLIB];
  smp_t    acq_smp   [NLIB];
  logic    held      [NLIB];
  smp_t    held_smp  [NLIB];
  logic [IW-1:0] rr;
  logic    grant_ok;
  logic [IW-1:0] grant;
  frame_t  push_frame, tup_frame, rx_frm;
  logic    push_valid, push_ready, tup_valid, tup_fire, link_idle, buf_empty;
  logic    rx_frm_valid, rx_tup_valid, rx_crc_err;
  logic [15:0] rx_frm_cnt;
  logic    tc_load;
  ts_t     tc_load_val;

  for (genvar i = 0; i < NLIB; i++) begin : g_dev
    libera_acq #(.SRC_ID(SRC_W'(i))) u_acq (
      .clk, .rst, .delta(delta[i]), .rate_log2, .slave_time,
      .out_valid(acq_valid[i]), .out_smp(acq_smp[i])
    );
  end

  // round robin: first held sample at or after rr
  always_comb begin
    grant_ok = 1'b0;
    grant    = '0;
    for (int k = 0; k < NLIB; k++) begin
      int j;
      j = (int'(rr) + k) % NLIB;
      if (!grant_ok && held[j]) begin
        grant_ok = 1'b1;
        grant    = IW'(j);
      end
    end
  end

  always_comb begin
    push_frame       = '0;
    push_frame.ftype = FT_DATA;
    push_frame.src   = held_smp[grant].src;
    push_frame.rate  = held_smp[grant].rate;
    push_frame.ts    = held_smp[grant].ts;
    push_frame.data  = held_smp[grant].data;
  end
  assign push_valid = grant_ok;

  always_ff @(posedge clk) begin
    if (rst) begin
      rr <= '0; ovf_cnt <= '0;
      for (int i = 0; i < NLIB; i++) begin
        held[i] <= 1'b0; held_smp[i] <= '0;
      end
    end else begin
      if (push_valid && push_ready) begin
        held[grant] <= 1'b0;
        rr <= (int'(grant) == NLIB - 1) ? '0 : grant + 1'b1;
      end
      for (int i = 0; i < NLIB; i++) begin
        if (acq_valid[i]) begin
          if (held[i] && !(push_valid && push_ready && int'(grant) == i))
            ovf_cnt <= ovf_cnt + 1'b1;
          else begin
            held[i]     <= 1'b1;
            held_smp[i] <= acq_smp[i];
          end
        end
      end
    end
  end

  link_tx #(.FIFO_DEPTH(FIFO_DEPTH)) u_tx (
    .clk, .rst,
    .push_valid, .push_ready, .push_frame, .hold(1'b0),
    .tup_valid, .tup_frame, .tup_fire, .idle(link_idle),
    .tx_data, .tx_valid, .tx_last, .tx_ready, .buf_empty
  );

  link_rx u_rx (
    .clk, .rst, .rx_data, .rx_valid, .rx_last,
    .frm_valid(rx_frm_valid), .tup_valid(rx_tup_valid), .frm(rx_frm),
    .crc_err(rx_crc_err), .err_cnt(crc_err_cnt), .frm_cnt(rx_frm_cnt)
  );

  always_comb begin
    tup_frame       = '0;
    tup_frame.ftype = FT_TR;
    tup_frame.ts    = slave_time;
  end

  tup_slave #(.TS_W(TS_W), .SYNC_PERIOD(SYNC_PERIOD), .TIMEOUT(TIMEOUT)) u_tup (
    .clk, .rst, .link_idle, .slave_time,
    .tr_valid(tup_valid), .tr_fire(tup_fire),
    .tu_rcvd(rx_tup_valid && rx_frm.ftype == FT_TU), .tu_time(rx_frm.ts),
    .load(tc_load), .load_val(tc_load_val), .synced, .rtt, .retry_cnt
  );

  time_counter #(.TS_W(TS_W)) u_time (
    .clk, .rst, .load(tc_load), .load_val(tc_load_val), .time_o(slave_time)
  );
endmodule
