// tb_source_splitter: routing of samples by source ID.
module tb_source_splitter;
  import tfs_pkg::*;
  localparam int NLIB = 3;
  logic clk = 0, rst = 1, in_valid = 0;
  smp_t in_smp = '0;
  logic out_valid [NLIB];
  smp_t out_smp [NLIB];
  logic [15:0] bad_cnt;
  int checks = 0, failures = 0;

  source_splitter #(.NLIB(NLIB)) dut (.*);
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
    int bad;
    bad = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 200; n++) begin
      smp_t s;
      s.src = 4'($urandom % 4); s.rate = 4'($urandom); s.ts = $urandom; s.data = 16'($urandom);
      in_smp = s; in_valid = ($urandom % 4) != 0;
      @(negedge clk);
      for (int i = 0; i < NLIB; i++) begin
        check(out_valid[i] == (in_valid && int'(s.src) == i), "valid on the right output only");
        if (out_valid[i]) check(out_smp[i] == s, "sample passed unchanged");
      end
      if (in_valid && s.src >= NLIB) bad++;
    end
    check(bad_cnt == 16'(bad), "unknown source IDs counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
