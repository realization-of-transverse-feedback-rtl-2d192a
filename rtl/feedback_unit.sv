// feedback_unit: feedback signal as linear combination of the slots.
//
// kick = sat( sum_s coef[s] * data_slot[s]  >>> COEF_FRAC ), registered,
// one cycle after the synchronized vector. With two or more BPM signals of
// suitable coefficients any betatron phase can be reconstructed. Because
// the synchronization unit zeroes all slots when data is missing, the kick
// is then zero. Coefficients are signed COEF_W-bit values with COEF_FRAC
// fraction bits (this design's format); the linear combination follows the
// system description.
module feedback_unit #(
  parameter int NSLOT     = 6,
  parameter int COEF_W    = 18,
  parameter int COEF_FRAC = 15
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       in_valid,
  input  tfs_pkg::sample_t           data_slot [NSLOT],
  input  logic                       data_is_valid,
  input  tfs_pkg::ts_t               timestamp,
  input  logic signed [COEF_W-1:0]   coef [NSLOT],
  output logic                       out_valid,
  output tfs_pkg::sample_t           kick,
  output logic                       kick_active,
  output tfs_pkg::ts_t               kick_ts
);
  import tfs_pkg::*;

  logic signed [63:0] acc;

  always_comb begin
    acc = '0;
    for (int s = 0; s < NSLOT; s++) acc += 64'(coef[s]) * 64'(data_slot[s]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0; kick <= '0; kick_active <= 1'b0; kick_ts <= '0;
    end else begin
      out_valid   <= in_valid;
      kick        <= sat(acc >>> COEF_FRAC);
      kick_active <= in_valid && data_is_valid;
      kick_ts     <= timestamp;
    end
  end
endmodule
