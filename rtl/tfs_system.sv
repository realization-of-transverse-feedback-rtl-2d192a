// tfs_system: the digital transverse feedback system, end to end.
//
// NCLUSTER Libera clusters (NLIB devices each) acquire, compress and tag
// their BPM delta signals and send them over one link per cluster to the
// central unit (tfs_module), which synchronizes the cluster time counters
// with the Time Update Protocol, restores, filters and realigns the streams
// and computes the kick for the DAC. The multi-gigabit links themselves
// are external IP: each cluster's transmit stream (lib_tx_*) and receive
// stream (lib_rx_*), and the central unit's matching streams (cu_rx_*,
// cu_tx_*), are ports, to be connected through the link. Status outputs
// are those of the central unit plus, per cluster, the slave time, its
// sync flag, overflows, checksum errors on the return link, the measured
// link round-trip time and the count of time requests retried. The cluster
// count and size follow the system overview (two clusters, three devices
// in a cluster); everything else is configured through the ports.
module tfs_system #(
  parameter int NCLUSTER    = 2,
  parameter int NLIB        = 3,
  parameter int NSLOT       = 6,
  parameter int TAPS        = 32,
  parameter int COEF_W      = 18,
  parameter int SYNC_AW     = 10,
  parameter int NOTCH_AW    = 10,
  parameter int SYNC_PERIOD = 4096,
  localparam int NIN        = NCLUSTER * NLIB,
  localparam int SW         = (NIN > 1) ? $clog2(NIN) : 1
) (
  input  logic                       clk,
  input  logic                       rst,
  // BPM delta signals, one sample per clock per device
  input  tfs_pkg::sample_t           delta [NCLUSTER][NLIB],
  input  logic [tfs_pkg::RATE_W-1:0] rate_log2,
  // cluster side of the links
  output logic [31:0]                lib_tx_data  [NCLUSTER],
  output logic                       lib_tx_valid [NCLUSTER],
  output logic                       lib_tx_last  [NCLUSTER],
  input  logic                       lib_tx_ready [NCLUSTER],
  input  logic [31:0]                lib_rx_data  [NCLUSTER],
  input  logic                       lib_rx_valid [NCLUSTER],
  input  logic                       lib_rx_last  [NCLUSTER],
  // central unit side of the links
  input  logic [31:0]                cu_rx_data  [NCLUSTER],
  input  logic                       cu_rx_valid [NCLUSTER],
  input  logic                       cu_rx_last  [NCLUSTER],
  output logic [31:0]                cu_tx_data  [NCLUSTER],
  output logic                       cu_tx_valid [NCLUSTER],
  output logic                       cu_tx_last  [NCLUSTER],
  input  logic                       cu_tx_ready [NCLUSTER],
  // central unit configuration
  input  logic                       fir_we,
  input  logic [$clog2(TAPS)-1:0]    fir_addr,
  input  logic signed [COEF_W-1:0]   fir_data,
  input  logic [NOTCH_AW-1:0]        notch_n,
  input  logic signed [COEF_W-1:0]   notch_coef [5],
  input  logic [SW-1:0]              slot_sel   [NSLOT],
  input  logic [SYNC_AW-1:0]         slot_delay [NSLOT],
  input  logic [NSLOT-1:0]           slots_activated,
  input  logic signed [COEF_W-1:0]   fb_coef    [NSLOT],
  // kick to the DAC
  output logic                       fb_valid,
  output tfs_pkg::sample_t           fb_data,
  output logic                       fb_active,
  output tfs_pkg::ts_t               fb_ts,
  // status
  output tfs_pkg::ts_t               master_time,
  output tfs_pkg::ts_t               slave_time [NCLUSTER],
  output logic                       synced     [NCLUSTER],
  output logic [15:0]                lib_ovf_cnt [NCLUSTER],
  output logic [15:0]                lib_crc_err_cnt [NCLUSTER],
  output tfs_pkg::ts_t               lib_rtt         [NCLUSTER],
  output logic [15:0]                lib_retry_cnt   [NCLUSTER],
  output tfs_pkg::sample_t           data_slot  [NSLOT],
  output logic                       data_is_valid,
  output logic [15:0]                crc_err_cnt [NCLUSTER],
  output logic [15:0]                lost_cnt    [NCLUSTER],
  output logic [15:0]                tu_cnt      [NCLUSTER],
  output logic [15:0]                sup_cnt     [NCLUSTER],
  output logic [15:0]                gap_cnt     [NIN],
  output logic [15:0]                invalid_cnt,
  output logic [15:0]                late_cnt
);
  import tfs_pkg::*;

  for (genvar c = 0; c < NCLUSTER; c++) begin : g_cluster
    libera_cluster #(.NLIB(NLIB), .SYNC_PERIOD(SYNC_PERIOD)) u_cluster (
      .clk, .rst, .delta(delta[c]), .rate_log2,
      .tx_data(lib_tx_data[c]), .tx_valid(lib_tx_valid[c]), .tx_last(lib_tx_last[c]),
      .tx_ready(lib_tx_ready[c]),
      .rx_data(lib_rx_data[c]), .rx_valid(lib_rx_valid[c]), .rx_last(lib_rx_last[c]),
      .slave_time(slave_time[c]), .synced(synced[c]), .ovf_cnt(lib_ovf_cnt[c]),
      .crc_err_cnt(lib_crc_err_cnt[c]), .rtt(lib_rtt[c]), .retry_cnt(lib_retry_cnt[c])
    );
  end

  tfs_module #(.NCLUSTER(NCLUSTER), .NLIB(NLIB), .NSLOT(NSLOT), .TAPS(TAPS),
               .COEF_W(COEF_W), .SYNC_AW(SYNC_AW), .NOTCH_AW(NOTCH_AW)) u_cu (
    .clk, .rst,
    .rx_data(cu_rx_data), .rx_valid(cu_rx_valid), .rx_last(cu_rx_last),
    .tx_data(cu_tx_data), .tx_valid(cu_tx_valid), .tx_last(cu_tx_last),
    .tx_ready(cu_tx_ready),
    .fir_we, .fir_addr, .fir_data, .notch_n, .notch_coef,
    .slot_sel, .slot_delay, .slots_activated, .fb_coef,
    .fb_valid, .fb_data, .fb_active, .fb_ts,
    .master_time, .data_slot, .data_is_valid,
    .crc_err_cnt, .lost_cnt, .tu_cnt, .sup_cnt, .gap_cnt, .invalid_cnt, .late_cnt
  );
endmodule
