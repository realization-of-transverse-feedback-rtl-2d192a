// tb_frame_unpacker: decoding of data frames and the sequence check.
module tb_frame_unpacker;
  import tfs_pkg::*;
  logic clk = 0, rst = 1, frm_valid = 0, smp_valid;
  frame_t frm = '0;
  smp_t smp;
  logic [15:0] lost_cnt;
  int checks = 0, failures = 0;

  frame_unpacker dut (.*);
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
    logic [15:0] seq;
    int lost;
    seq = 16'hFFF0; lost = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 100; n++) begin
      frame_t f;
      f = '0; f.ftype = FT_DATA; f.src = 4'($urandom); f.rate = 4'($urandom);
      f.ts = $urandom; f.data = 16'($urandom);
      if (n % 17 == 5) begin seq += 2; lost++; end   // a frame went missing
      f.seq = seq; seq++;
      frm = f; frm_valid = 1;
      @(negedge clk);
      frm_valid = 0;
      check(smp_valid, "output one cycle later");
      check(smp.src == f.src && smp.rate == f.rate && smp.ts == f.ts && smp.data == f.data, "decoded fields");
      if ($urandom % 2) begin
        @(negedge clk);
        check(!smp_valid, "single-cycle output");
      end
    end
    frm = '0; frm.ftype = FT_TR; frm_valid = 1; @(negedge clk); frm_valid = 0;
    check(!smp_valid, "non-data frame ignored");
    check(lost_cnt == 16'(lost), $sformatf("lost frames %0d/%0d", lost_cnt, lost));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
