// tb_fir_filter: 32-tap FIR against a reference convolution.
// Checks the pass-through reset state, then loads random coefficients
// while the filter runs and compares every output (one cycle latency,
// saturation at 16 bits) with a model that keeps its own input history.
// Finally a shorter filter is made by zeroing the upper taps.
module tb_fir_filter;
  import tfs_pkg::*;
  localparam int TAPS = 32, CW = 18, FRAC = 16;
  logic clk = 0, rst = 1, coef_we = 0, in_valid = 0, out_valid;
  logic [4:0] coef_addr = '0;
  logic signed [CW-1:0] coef_data = '0;
  smp_t in_smp = '0, out_smp;
  int checks = 0, failures = 0;
  longint c_model [TAPS];
  longint hist [TAPS];

  fir_filter #(.TAPS(TAPS), .COEF_W(CW), .COEF_FRAC(FRAC)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint clip(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  task automatic feed(int n, int amp);
    for (int k = 0; k < n; k++) begin
      longint acc;
      smp_t s;
      s.src = 4'd1; s.rate = 4'd0; s.ts = $urandom; s.data = sample_t'(int'($urandom % (2 * amp + 1)) - amp);
      for (int i = TAPS - 1; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = longint'(s.data);
      acc = 0;
      for (int i = 0; i < TAPS; i++) acc += hist[i] * c_model[i];
      in_smp = s; in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      check(out_valid, "output valid one cycle later");
      check(out_smp.ts == s.ts && out_smp.src == s.src, "tag passes through");
      check(longint'(out_smp.data) == clip(acc >>> FRAC),
            $sformatf("y %0d expected %0d", out_smp.data, clip(acc >>> FRAC)));
      if ($urandom % 3 == 0) @(negedge clk);
    end
  endtask

  task automatic write_coef(int i, longint v);
    coef_addr = 5'(i); coef_data = CW'(v); coef_we = 1;
    @(negedge clk);
    coef_we = 0;
    c_model[i] = v;
  endtask

  initial begin
    for (int i = 0; i < TAPS; i++) begin hist[i] = 0; c_model[i] = 0; end
    c_model[0] = 1 << FRAC;
    repeat (3) @(negedge clk);
    rst = 0;
    feed(40, 20000);
    for (int i = 0; i < TAPS; i++) write_coef(i, longint'(int'($urandom % 16384) - 8192));
    feed(200, 32768);
    // low pass: 8-tap moving average, others zero
    for (int i = 0; i < TAPS; i++) write_coef(i, i < 8 ? (1 << FRAC) / 8 : 0);
    feed(100, 30000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
