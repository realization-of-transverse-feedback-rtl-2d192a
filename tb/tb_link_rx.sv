// tb_link_rx: frame reception and checksum checking.
// Good data and TUP frames, frames with a flipped bit and a short frame are
// sent with random idle cycles between words. Good data frames must appear
// decoded on frm_valid, TUP frames on tup_valid, bad ones must only bump
// the error counter.
module tb_link_rx;
  import tfs_pkg::*;
  import tb_link_pkg::*;

  logic clk = 0, rst = 1;
  logic [31:0] rx_data = '0;
  logic rx_valid = 0, rx_last = 0;
  logic frm_valid, tup_valid, crc_err;
  frame_t frm;
  logic [15:0] err_cnt, frm_cnt;
  int checks = 0, failures = 0;
  int n_data = 0, n_tup = 0, n_bad = 0, got_data = 0, got_tup = 0, got_err = 0;
  frame_t exp_q[$];

  link_rx dut (.*);
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

  task automatic send(words_t w, int nwords);
    for (int i = 0; i < nwords; i++) begin
      while ($urandom % 3 == 0) begin rx_valid = 0; @(negedge clk); end
      rx_data = w[i]; rx_valid = 1; rx_last = (i == nwords - 1);
      @(negedge clk);
    end
    rx_valid = 0; rx_last = 0;
  endtask

  always @(negedge clk) if (!rst) begin
    if (frm_valid || tup_valid) begin
      frame_t e;
      if (exp_q.size() == 0) check(0, "unexpected output");
      else begin
        e = exp_q.pop_front();
        check(frm.ftype == e.ftype && frm.src == e.src && frm.rate == e.rate &&
              frm.seq == e.seq && frm.ts == e.ts && frm.data == e.data, "decoded fields");
        check(frm_valid == (e.ftype == FT_DATA), "data frame flagged as data");
        check(tup_valid == (e.ftype != FT_DATA), "TUP frame flagged as TUP");
      end
      if (frm_valid) got_data++;
      if (tup_valid) got_tup++;
    end
    if (crc_err) got_err++;
  end

  initial begin
    words_t w;
    frame_t f;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 200; n++) begin
      int kind;
      kind = $urandom % 10;
      f = '0;
      f.ftype = (kind < 6) ? FT_DATA : (kind < 8 ? FT_TR : FT_TU);
      f.src = 4'($urandom); f.rate = 4'($urandom); f.seq = 16'($urandom);
      f.ts = $urandom; f.data = 16'($urandom);
      w = make_frame(f.ftype, f.src, f.rate, f.seq, f.ts, f.data);
      if (kind == 9 && n % 2 == 0) begin
        int wi, bi;
        wi = $urandom % 4; bi = $urandom % 16;
        w[wi][bi] = !w[wi][bi];                      // corrupt
        n_bad++;
        send(w, 4);
      end else if (n == 77) begin
        n_bad++;
        send(w, 2);                                  // short frame
      end else begin
        exp_q.push_back(f);
        if (f.ftype == FT_DATA) n_data++; else n_tup++;
        send(w, 4);
      end
    end
    repeat (5) @(negedge clk);
    check(got_data == n_data, $sformatf("data frames %0d/%0d", got_data, n_data));
    check(got_tup == n_tup, $sformatf("tup frames %0d/%0d", got_tup, n_tup));
    check(got_err == n_bad && err_cnt == 16'(n_bad), $sformatf("errors %0d/%0d", got_err, n_bad));
    check(frm_cnt == 16'(n_data + n_tup), "frame counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
