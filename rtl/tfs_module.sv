// tfs_module: central unit of the transverse feedback system.
//
// For each of NCLUSTER cluster links: an aurora_core (frame reception with
// checksum check, TUP master), a frame_unpacker and a source_splitter that
// give NLIB device streams per cluster. Every device stream (NIN =
// NCLUSTER*NLIB of them, stream index = cluster*NLIB + device) passes its
// own preproc_unit (decompression, FIR, notch). The sync_unit maps streams
// to NSLOT slots and realigns them by their time tags against the master
// time counter, minus the per-slot delay; the feedback_unit forms the kick
// from the synchronized slots. The master time counter also serves the
// TUP masters, so all tags and the realignment share one time base.
// Configuration (in the system: written over Ethernet) arrives as plain
// inputs; the kick stream (fb_data, with the master time fb_ts its vector
// was read at) goes to the DAC. Status outputs count checksum errors, lost
// frames, time updates sent and suppressed, interpolation gaps, invalid
// output cycles and late reads. Block structure follows the
// system description; the sizes NSLOT and memory depths are this design's.
module tfs_module #(
  parameter int NCLUSTER = 2,
  parameter int NLIB     = 3,
  parameter int NSLOT    = 6,
  parameter int TAPS     = 32,
  parameter int COEF_W   = 18,
  parameter int SYNC_AW  = 10,
  parameter int NOTCH_AW = 10,
  localparam int NIN     = NCLUSTER * NLIB,
  localparam int SW      = (NIN > 1) ? $clog2(NIN) : 1
) (
  input  logic                       clk,
  input  logic                       rst,
  // cluster links (user side of the link IP)
  input  logic [31:0]                rx_data  [NCLUSTER],
  input  logic                       rx_valid [NCLUSTER],
  input  logic                       rx_last  [NCLUSTER],
  output logic [31:0]                tx_data  [NCLUSTER],
  output logic                       tx_valid [NCLUSTER],
  output logic                       tx_last  [NCLUSTER],
  input  logic                       tx_ready [NCLUSTER],
  // configuration
  input  logic                       fir_we,
  input  logic [$clog2(TAPS)-1:0]    fir_addr,
  input  logic signed [COEF_W-1:0]   fir_data,
  input  logic [NOTCH_AW-1:0]        notch_n,
  input  logic signed [COEF_W-1:0]   notch_coef [5],
  input  logic [SW-1:0]              slot_sel   [NSLOT],
  input  logic [SYNC_AW-1:0]         slot_delay [NSLOT],
  input  logic [NSLOT-1:0]           slots_activated,
  input  logic signed [COEF_W-1:0]   fb_coef    [NSLOT],
  // data stream to the DAC
  output logic                       fb_valid,
  output tfs_pkg::sample_t           fb_data,
  output logic                       fb_active,
  output tfs_pkg::ts_t               fb_ts,
  // status / analysis
  output tfs_pkg::ts_t               master_time,
  output tfs_pkg::sample_t           data_slot [NSLOT],
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

  logic    frm_valid [NCLUSTER];
  frame_t  frm       [NCLUSTER];
  logic    up_valid  [NCLUSTER];
  smp_t    up_smp    [NCLUSTER];
  logic    st_valid  [NIN];
  smp_t    st_smp    [NIN];
  logic    pp_valid  [NIN];
  smp_t    pp_smp    [NIN];
  logic    sy_valid;
  ts_t     sy_ts;
  ts_t     t_newest  [NSLOT];
  logic [15:0] frm_cnt [NCLUSTER];
  logic [15:0] bad_cnt [NCLUSTER];
  logic [15:0] ip_ovf  [NIN];

  time_counter #(.TS_W(TS_W)) u_master_time (
    .clk, .rst, .load(1'b0), .load_val('0), .time_o(master_time)
  );

  for (genvar c = 0; c < NCLUSTER; c++) begin : g_cluster
    logic spl_valid [NLIB];
    smp_t spl_smp   [NLIB];

    aurora_core u_aurora (
      .clk, .rst, .master_time,
      .rx_data(rx_data[c]), .rx_valid(rx_valid[c]), .rx_last(rx_last[c]),
      .tx_data(tx_data[c]), .tx_valid(tx_valid[c]), .tx_last(tx_last[c]),
      .tx_ready(tx_ready[c]),
      .frm_valid(frm_valid[c]), .frm(frm[c]),
      .crc_err_cnt(crc_err_cnt[c]), .frm_cnt(frm_cnt[c]),
      .tu_cnt(tu_cnt[c]), .sup_cnt(sup_cnt[c])
    );

    frame_unpacker u_unpack (
      .clk, .rst, .frm_valid(frm_valid[c]), .frm(frm[c]),
      .smp_valid(up_valid[c]), .smp(up_smp[c]), .lost_cnt(lost_cnt[c])
    );

    source_splitter #(.NLIB(NLIB)) u_split (
      .clk, .rst, .in_valid(up_valid[c]), .in_smp(up_smp[c]),
      .out_valid(spl_valid), .out_smp(spl_smp), .bad_cnt(bad_cnt[c])
    );

    for (genvar d = 0; d < NLIB; d++) begin : g_dev
      assign st_valid[c*NLIB + d] = spl_valid[d];
      assign st_smp[c*NLIB + d]   = spl_smp[d];
    end
  end

  for (genvar i = 0; i < NIN; i++) begin : g_pre
    preproc_unit #(.TAPS(TAPS), .COEF_W(COEF_W), .NOTCH_AW(NOTCH_AW)) u_pre (
      .clk, .rst, .in_valid(st_valid[i]), .in_smp(st_smp[i]),
      .fir_we, .fir_addr, .fir_data, .notch_n, .notch_coef,
      .out_valid(pp_valid[i]), .out_smp(pp_smp[i]),
      .gap_cnt(gap_cnt[i]), .ovf_cnt(ip_ovf[i])
    );
  end

  sync_unit #(.NIN(NIN), .NSLOT(NSLOT), .AW(SYNC_AW)) u_sync (
    .clk, .rst, .in_valid(pp_valid), .in_smp(pp_smp), .master_time,
    .slot_sel, .slot_delay, .slots_activated,
    .out_valid(sy_valid), .data_slot, .data_is_valid, .timestamp(sy_ts),
    .t_newest, .invalid_cnt, .late_cnt
  );

  feedback_unit #(.NSLOT(NSLOT), .COEF_W(COEF_W)) u_fb (
    .clk, .rst, .in_valid(sy_valid), .data_slot, .data_is_valid,
    .timestamp(sy_ts), .coef(fb_coef),
    .out_valid(fb_valid), .kick(fb_data), .kick_active(fb_active), .kick_ts(fb_ts)
  );
endmodule
