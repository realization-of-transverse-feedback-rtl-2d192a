// sync_unit: realignment of all slots to a common time base.
//
// Input streams are assigned to slots by the switching module
// (sync_switch, slot_sel). Each slot has a timestamp-addressed RAM
// (sync_ram_wrapper). The read control computes for every slot the read
// time t_read[s] = master_time - slot_delay[s]; the delay both absorbs the
// uncertain transport time and sets the phase delay wanted for the
// feedback. The validity control requires valid data on every activated
// slot (slots_activated); if one of them has none, all slot values of that
// cycle are forced to zero so the kicker does nothing. The read control
// also compares each t_read with the newest time tag the slot's wrapper
// has stored (t_newest): a read time newer than that means the data has
// not arrived, because the slot delay is too short for the transport time
// or the stream has stopped. Such a read counts as invalid as well, and
// `late_cnt` counts the cycles in which it happened, so these cases can be
// told apart from a gap inside a running stream. The sync register
// then presents, every clock, the vector of slot values, `data_is_valid`
// and the timestamp (master time at which the read was issued). Output
// latency from master_time to the vector: 2 cycles. Non-activated slots
// always read zero. Structure follows the system description (switching
// module, sync RAM wrappers, read control, validity control, sync
// register); the delay-per-slot form of the read control is this design's
// reading of it.
module sync_unit #(
  parameter int NIN   = 6,
  parameter int NSLOT = 6,
  parameter int AW    = 10,
  localparam int SW   = (NIN > 1) ? $clog2(NIN) : 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid [NIN],
  input  tfs_pkg::smp_t     in_smp   [NIN],
  input  tfs_pkg::ts_t      master_time,
  input  logic [SW-1:0]     slot_sel   [NSLOT],
  input  logic [AW-1:0]     slot_delay [NSLOT],
  input  logic [NSLOT-1:0]  slots_activated,
  output logic              out_valid,
  output tfs_pkg::sample_t  data_slot [NSLOT],
  output logic              data_is_valid,
  output tfs_pkg::ts_t      timestamp,
  output tfs_pkg::ts_t      t_newest [NSLOT],
  output logic [15:0]       invalid_cnt,
  output logic [15:0]       late_cnt
);
  import tfs_pkg::*;

  logic    sw_valid [NSLOT];
  smp_t    sw_smp   [NSLOT];
  ts_t     t_read   [NSLOT];
  logic    rd_valid [NSLOT];
  sample_t rd_data  [NSLOT];
  logic    init     [NSLOT];
  logic [NSLOT-1:0] slot_ok;
  logic [NSLOT-1:0] addr_ok, slot_late;
  ts_t     t_ahead [NSLOT];
  logic    all_ok, ready;
  ts_t     ts_q;

  sync_switch #(.NIN(NIN), .NSLOT(NSLOT)) u_switch (
    .clk, .rst, .in_valid, .in_smp, .slot_sel,
    .out_valid(sw_valid), .out_smp(sw_smp)
  );

  for (genvar s = 0; s < NSLOT; s++) begin : g_slot
    // read control
    assign t_read[s] = master_time - ts_t'(slot_delay[s]);

    sync_ram_wrapper #(.AW(AW)) u_ram (
      .clk, .rst, .wr_valid(sw_valid[s]), .wr_smp(sw_smp[s]),
      .t_read(t_read[s]), .rd_valid(rd_valid[s]), .rd_data(rd_data[s]),
      .t_newest(t_newest[s]), .init(init[s])
    );
    // addr_valid: sample for t_read already written (t_newest - t_read
    // not negative); registered to line up with the RAM read
    assign t_ahead[s] = t_newest[s] - t_read[s];
    always_ff @(posedge clk) begin
      if (rst) addr_ok[s] <= 1'b0;
      else     addr_ok[s] <= !t_ahead[s][TS_W-1];
    end
    assign slot_ok[s]   = (rd_valid[s] && addr_ok[s]) || !slots_activated[s];
    assign slot_late[s] = slots_activated[s] && !addr_ok[s];
  end

  // validity control
  assign all_ok = (&slot_ok) && (|slots_activated);
  assign ready  = !init[0];

  // sync register
  always_ff @(posedge clk) begin
    if (rst) begin
      ts_q <= '0; out_valid <= 1'b0; data_is_valid <= 1'b0; timestamp <= '0;
      invalid_cnt <= '0; late_cnt <= '0;
      for (int s = 0; s < NSLOT; s++) data_slot[s] <= '0;
    end else begin
      ts_q          <= master_time;
      out_valid     <= ready;
      data_is_valid <= ready && all_ok;
      timestamp     <= ts_q;
      for (int s = 0; s < NSLOT; s++)
        data_slot[s] <= (ready && all_ok && slots_activated[s]) ? rd_data[s] : '0;
      if (ready && !all_ok) invalid_cnt <= invalid_cnt + 1'b1;
      if (ready && |slot_late) late_cnt <= late_cnt + 1'b1;
    end
  end
endmodule
