// notch_filter: suppression of DC offset and revolution harmonics.
//
// An IIR filter of order K = 3 that looks only at every n-th sample
// (n = samples per revolution), so its pass band repeats at every
// revolution harmonic:
//   y[t] = b0 x[t] + b1 x[t-n] + b2 x[t-2n] - a1 y[t-n] - a2 y[t-2n]
// It estimates the slowly changing offset; its result is subtracted from
// the current input ("contrary" use), giving out = x[t] - y[t] with little
// added latency. The past values x[t-n], x[t-2n], y[t-n], y[t-2n] are
// fetched from dual-port RAMs (depth 2^MEM_AW) indexed by a sample counter,
// so n can be changed at run time (2 <= n < 2^(MEM_AW-1)). Until 2n samples
// have been seen the missing history counts as zero.
// Pipeline: cycle 1 reads the RAMs, cycle 2 computes y and writes it back;
// the output follows two cycles after the input. Coefficients are signed
// COEF_W-bit values with COEF_FRAC fraction bits. The structure (every
// n-th sample, RAM-based history, order 3, subtraction from the input)
// follows the system description; the difference equation read from the
// transfer function, number formats and the start-up rule are this
// design's.
module notch_filter #(
  parameter int MEM_AW    = 10,
  parameter int COEF_W    = 18,
  parameter int COEF_FRAC = 15
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic [MEM_AW-1:0]         n,
  input  logic signed [COEF_W-1:0]  b0, b1, b2, a1, a2,
  input  logic                      in_valid,
  input  tfs_pkg::smp_t             in_smp,
  output logic                      out_valid,
  output tfs_pkg::smp_t             out_smp
);
  import tfs_pkg::*;

  localparam int DEPTH = 1 << MEM_AW;

  sample_t           xmem [DEPTH];
  sample_t           ymem [DEPTH];
  logic [MEM_AW-1:0] idx;
  logic [MEM_AW:0]   seen;       // samples seen, saturating at DEPTH
  sample_t           x1_q, x2_q, y1_q, y2_q;
  logic              h1_q, h2_q; // history available
  logic              s1_valid;
  smp_t              s1_smp;
  logic [MEM_AW-1:0] s1_idx;
  logic signed [63:0] acc;
  sample_t           y;

  // stage 1: read the history of the arriving sample
  always_ff @(posedge clk) begin
    if (in_valid) begin
      x1_q <= xmem[idx - n];
      y1_q <= ymem[idx - n];
      x2_q <= xmem[idx - (n << 1)];
      y2_q <= ymem[idx - (n << 1)];
    end
  end

  always_comb begin
    acc = 64'(b0) * 64'(s1_smp.data);
    if (h1_q) acc += 64'(b1) * 64'(x1_q) - 64'(a1) * 64'(y1_q);
    if (h2_q) acc += 64'(b2) * 64'(x2_q) - 64'(a2) * 64'(y2_q);
    y = sat(acc >>> COEF_FRAC);
  end

  // stage 2: compute, write back, subtract
  always_ff @(posedge clk) begin
    if (s1_valid) begin
      xmem[s1_idx] <= s1_smp.data;
      ymem[s1_idx] <= y;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      idx <= '0; seen <= '0; s1_valid <= 1'b0; s1_smp <= '0; s1_idx <= '0;
      h1_q <= 1'b0; h2_q <= 1'b0; out_valid <= 1'b0; out_smp <= '0;
    end else begin
      s1_valid <= in_valid;
      if (in_valid) begin
        s1_smp <= in_smp;
        s1_idx <= idx;
        idx    <= idx + 1'b1;
        if (seen < (MEM_AW+1)'(DEPTH)) seen <= seen + 1'b1;
        h1_q   <= seen >= (MEM_AW+1)'(n);
        h2_q   <= seen >= ((MEM_AW+1)'(n) << 1);
      end
      out_valid <= s1_valid;
      if (s1_valid) begin
        out_smp      <= s1_smp;
        out_smp.data <= sat(64'(s1_smp.data) - 64'(y));
      end
    end
  end
endmodule
