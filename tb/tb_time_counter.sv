// tb_time_counter: counting and loading of the time counter.
module tb_time_counter;
  logic clk = 0, rst = 1, load = 0;
  logic [31:0] load_val = '0, t;
  int checks = 0, failures = 0;

  time_counter #(.TS_W(32)) dut (.clk, .rst, .load, .load_val, .time_o(t));
  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v;
    @(negedge clk); @(negedge clk);
    check(t == 0, "reset to zero");
    rst = 0;
    for (int i = 1; i <= 20; i++) begin
      @(negedge clk);
      check(t == 32'(i), $sformatf("count %0d got %0d", i, t));
    end
    for (int k = 0; k < 10; k++) begin
      v = $urandom; load_val = v; load = 1;
      @(negedge clk); load = 0;
      check(t == v, "loaded value");
      repeat (3) @(negedge clk);
      check(t == v + 3, "counts on from loaded value");
    end
    load_val = 32'hFFFF_FFFF; load = 1; @(negedge clk); load = 0; @(negedge clk);
    check(t == 0, "wraps around");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
