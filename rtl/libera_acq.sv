// libera_acq: data acquisition and tagging in one Libera device.
//
// The BPM delta (position) signal arrives as one signed sample per clock.
// It is compressed by low-pass filtering and down-sampling: blocks of
// 2^rate_log2 consecutive samples are summed and the block average is
// emitted once per block (accumulate and dump). Each output sample is
// tagged with the device's source ID, the compression exponent and the
// synchronized slave time of the last sample of the block, so the central
// unit can restore its original timing. `rate_log2` is sampled at the
// start of every block. Compression by low-pass and down-sampling with a
// user-set rate follows the system description; the block-average filter,
// the power-of-two rates and the choice of time tag are this design's.
module libera_acq #(
  parameter int                    MAX_RATE_LOG2 = 7,
  parameter logic [tfs_pkg::SRC_W-1:0] SRC_ID    = '0
) (
  input  logic                         clk,
  input  logic                         rst,
  input  tfs_pkg::sample_t             delta,
  input  logic [tfs_pkg::RATE_W-1:0]   rate_log2,
  input  tfs_pkg::ts_t                 slave_time,
  output logic                         out_valid,
  output tfs_pkg::smp_t                out_smp
);
  import tfs_pkg::*;

  localparam int ACC_W = DATA_W + MAX_RATE_LOG2 + 1;

  logic signed [ACC_W-1:0] acc, acc_next;
  logic [MAX_RATE_LOG2-1:0] cnt;
  logic [RATE_W-1:0]        rate_q, rate_eff;
  logic                     last;

  // rates above the supported maximum are clamped
  assign rate_eff = (rate_log2 > RATE_W'(MAX_RATE_LOG2)) ? RATE_W'(MAX_RATE_LOG2) : rate_log2;
  assign acc_next = acc + ACC_W'(delta);
  assign last     = (cnt == MAX_RATE_LOG2'((1 << rate_q) - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      acc <= '0; cnt <= '0; rate_q <= '0; out_valid <= 1'b0; out_smp <= '0;
    end else begin
      out_valid <= 1'b0;
      if (last) begin
        out_valid    <= 1'b1;
        out_smp.src  <= SRC_ID;
        out_smp.rate <= rate_q;
        out_smp.ts   <= slave_time;
        out_smp.data <= sample_t'(acc_next >>> rate_q);
        acc    <= '0;
        cnt    <= '0;
        rate_q <= rate_eff;
      end else begin
        acc <= acc_next;
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
