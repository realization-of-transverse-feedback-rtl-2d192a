// fir_filter: TAPS-tap FIR low-pass filter with writable coefficients.
//
// Limits the bandwidth of one decompressed stream. Direct form: on every
// input sample the delay line shifts and
//   y = sat( sum_{i=0}^{TAPS-1} c[i] * x[t-i]  >>> COEF_FRAC ),
// registered, so the result appears one cycle after the input with the
// input's time tag and source. Coefficients are signed COEF_W-bit values
// with COEF_FRAC fraction bits, written one at a time (`coef_we`,
// `coef_addr`, `coef_data`) while the filter runs; a shorter filter is
// obtained by writing zeros to the upper taps. After reset the filter
// passes the input through (c[0] = 1.0, others 0) and the delay line is
// cleared. The 32 taps and run-time coefficients follow the system
// description; number formats and reset values are this design's.
module fir_filter #(
  parameter int TAPS      = 32,
  parameter int COEF_W    = 18,
  parameter int COEF_FRAC = 16
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        coef_we,
  input  logic [$clog2(TAPS)-1:0]     coef_addr,
  input  logic signed [COEF_W-1:0]    coef_data,
  input  logic                        in_valid,
  input  tfs_pkg::smp_t               in_smp,
  output logic                        out_valid,
  output tfs_pkg::smp_t               out_smp
);
  import tfs_pkg::*;

  logic signed [COEF_W-1:0] coef  [TAPS];
  sample_t                  dline [TAPS];
  sample_t                  xn    [TAPS];
  logic signed [63:0]       acc;

  always_comb begin
    xn[0] = in_smp.data;
    for (int i = 1; i < TAPS; i++) xn[i] = dline[i-1];
    acc = '0;
    for (int i = 0; i < TAPS; i++) acc += 64'(xn[i]) * 64'(coef[i]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < TAPS; i++) begin
        dline[i] <= '0;
        coef[i]  <= (i == 0) ? COEF_W'(64'sd1 << COEF_FRAC) : '0;
      end
      out_valid <= 1'b0; out_smp <= '0;
    end else begin
      if (coef_we) coef[coef_addr] <= coef_data;
      out_valid <= in_valid;
      if (in_valid) begin
        for (int i = 0; i < TAPS; i++) dline[i] <= xn[i];
        out_smp      <= in_smp;
        out_smp.data <= sat(acc >>> COEF_FRAC);
      end
    end
  end
endmodule
