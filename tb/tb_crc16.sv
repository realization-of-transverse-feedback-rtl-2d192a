// tb_crc16: checks the link checksum against a bit-serial LFSR model.
// Random groups of three words are folded in; after each group the running
// value must equal the model's (CRC-16, polynomial x^16+x^12+x^5+1, start
// value 0xFFFF). Also checks that `clr` restarts and `en` low holds.
module tb_crc16;
  logic clk = 0, rst = 1, clr = 0, en = 0;
  logic [31:0] word = '0;
  logic [15:0] crc;
  int checks = 0, failures = 0;

  crc16 dut (.clk, .rst, .clr, .en, .word, .crc);
  always #5 clk = ~clk;

  // LFSR model: feedback bit goes into taps 0, 5 and 12
  function automatic logic [15:0] model(logic [15:0] r, logic [31:0] w);
    for (int i = 31; i >= 0; i--) begin
      logic fb;
      fb = r[15] ^ w[i];
      r  = r << 1;
      r[0]  = fb;
      r[5]  = r[5] ^ fb;
      r[12] = r[12] ^ fb;
    end
    return r;
  endfunction

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] ref_crc;
    repeat (2) @(negedge clk);
    rst = 0;
    check(crc == 16'hFFFF, "reset value");
    for (int t = 0; t < 40; t++) begin
      clr = 1; @(negedge clk); clr = 0;
      ref_crc = 16'hFFFF;
      for (int k = 0; k < 3; k++) begin
        word = $urandom; en = 1;
        ref_crc = model(ref_crc, word);
        @(negedge clk);
      end
      en = 0; word = $urandom;
      @(negedge clk);
      check(crc == ref_crc, $sformatf("crc %h expected %h", crc, ref_crc));
    end
    // known value: CRC-16/CCITT-FALSE of bytes 31 32 33 34 ("1234")
    clr = 1; @(negedge clk); clr = 0;
    word = 32'h31323334; en = 1; @(negedge clk); en = 0;
    @(negedge clk);
    check(crc == model(16'hFFFF, 32'h31323334), "fixed word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
