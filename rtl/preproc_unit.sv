// preproc_unit: preprocessing of one device stream.
//
// Chain of decompression (interpolator, back to one sample per clock),
// bandwidth limitation (TAPS-tap FIR low pass) and offset/revolution
// harmonic suppression (notch_filter). Latency from a compressed sample to
// the first restored sample is one interpolation segment plus 2 cycles,
// then 1 cycle FIR and 2 cycles notch. Time tags travel with the samples.
// The order of the three stages follows the system description.
module preproc_unit #(
  parameter int TAPS        = 32,
  parameter int COEF_W      = 18,
  parameter int FIR_FRAC    = 16,
  parameter int NOTCH_FRAC  = 15,
  parameter int NOTCH_AW    = 10
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       in_valid,
  input  tfs_pkg::smp_t              in_smp,
  // filter coefficients
  input  logic                       fir_we,
  input  logic [$clog2(TAPS)-1:0]    fir_addr,
  input  logic signed [COEF_W-1:0]   fir_data,
  input  logic [NOTCH_AW-1:0]        notch_n,
  input  logic signed [COEF_W-1:0]   notch_coef [5],  // b0, b1, b2, a1, a2
  output logic                       out_valid,
  output tfs_pkg::smp_t              out_smp,
  output logic [15:0]                gap_cnt,
  output logic [15:0]                ovf_cnt
);
  import tfs_pkg::*;

  logic ip_valid, fir_valid;
  smp_t ip_smp, fir_smp;

  interpolator u_ip (
    .clk, .rst, .in_valid, .in_smp,
    .out_valid(ip_valid), .out_smp(ip_smp), .gap_cnt, .ovf_cnt
  );

  fir_filter #(.TAPS(TAPS), .COEF_W(COEF_W), .COEF_FRAC(FIR_FRAC)) u_fir (
    .clk, .rst, .coef_we(fir_we), .coef_addr(fir_addr), .coef_data(fir_data),
    .in_valid(ip_valid), .in_smp(ip_smp), .out_valid(fir_valid), .out_smp(fir_smp)
  );

  notch_filter #(.MEM_AW(NOTCH_AW), .COEF_W(COEF_W), .COEF_FRAC(NOTCH_FRAC)) u_notch (
    .clk, .rst, .n(notch_n),
    .b0(notch_coef[0]), .b1(notch_coef[1]), .b2(notch_coef[2]),
    .a1(notch_coef[3]), .a2(notch_coef[4]),
    .in_valid(fir_valid), .in_smp(fir_smp), .out_valid, .out_smp
  );
endmodule
