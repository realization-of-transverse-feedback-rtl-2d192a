// tb_sync_switch: any stream to any slot, one cycle later.
module tb_sync_switch;
  import tfs_pkg::*;
  localparam int NIN = 6, NSLOT = 6;
  logic clk = 0, rst = 1;
  logic in_valid [NIN];
  smp_t in_smp [NIN];
  logic [2:0] slot_sel [NSLOT];
  logic out_valid [NSLOT];
  smp_t out_smp [NSLOT];
  int checks = 0, failures = 0;

  sync_switch #(.NIN(NIN), .NSLOT(NSLOT)) dut (.*);
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
    logic v [NIN];
    smp_t d [NIN];
    logic [2:0] sel [NSLOT];
    for (int i = 0; i < NIN; i++) begin in_valid[i] = 0; in_smp[i] = '0; end
    for (int s = 0; s < NSLOT; s++) slot_sel[s] = 3'(s);
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 200; n++) begin
      for (int i = 0; i < NIN; i++) begin
        v[i] = $urandom % 2;
        d[i] = {4'(i), 4'($urandom), 32'($urandom), 16'($urandom)};
        in_valid[i] = v[i]; in_smp[i] = d[i];
      end
      for (int s = 0; s < NSLOT; s++) begin
        sel[s] = (n % 20 == 7) ? 3'd7 : 3'($urandom % NIN);   // 7: no stream
        slot_sel[s] = sel[s];
      end
      @(negedge clk);
      for (int s = 0; s < NSLOT; s++) begin
        if (sel[s] < NIN) begin
          check(out_valid[s] == v[sel[s]], "valid routed");
          if (v[sel[s]]) check(out_smp[s] == d[sel[s]], "sample routed");
        end else check(!out_valid[s], "unassigned slot idle");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
