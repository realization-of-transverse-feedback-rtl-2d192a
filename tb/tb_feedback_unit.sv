// tb_feedback_unit: weighted sum of the slots, saturated.
module tb_feedback_unit;
  import tfs_pkg::*;
  localparam int NSLOT = 6, CW = 18, FRAC = 15;
  logic clk = 0, rst = 1, in_valid = 0, data_is_valid = 0;
  sample_t data_slot [NSLOT];
  ts_t timestamp = '0, kick_ts;
  logic signed [CW-1:0] coef [NSLOT];
  logic out_valid, kick_active;
  sample_t kick;
  int checks = 0, failures = 0;

  feedback_unit #(.NSLOT(NSLOT), .COEF_W(CW), .COEF_FRAC(FRAC)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nsat;
    nsat = 0;
    for (int s = 0; s < NSLOT; s++) begin data_slot[s] = '0; coef[s] = '0; end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 300; n++) begin
      longint acc, e;
      acc = 0;
      for (int s = 0; s < NSLOT; s++) begin
        data_slot[s] = sample_t'($urandom);
        coef[s] = (n < 150) ? CW'(int'($urandom % 20000) - 10000) : CW'($urandom);
        acc += longint'(data_slot[s]) * longint'(coef[s]);
      end
      e = acc >>> FRAC;
      if (e > 32767) begin e = 32767; nsat++; end
      if (e < -32768) begin e = -32768; nsat++; end
      in_valid = 1; data_is_valid = n % 5 != 0; timestamp = 32'(n);
      @(negedge clk);
      check(out_valid && kick_ts == 32'(n), "valid and timestamp follow");
      check(kick_active == (n % 5 != 0), "active flag");
      check(longint'(kick) == e, $sformatf("kick %0d expected %0d", kick, e));
    end
    check(nsat > 10, "saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
