// tb_link_tx: framing, checksum, flow control and the TUP message slot.
// Random data frames are pushed while the link's ready toggles randomly;
// every frame seen on the link must be four words with `last` on word 3,
// a correct checksum, the pushed contents in order and consecutive
// sequence numbers. A TUP message may start only when the stack is idle
// and must then leave as the next frame, carrying its time; `hold` must
// stop new pushes.
module tb_link_tx;
  import tfs_pkg::*;
  import tb_link_pkg::*;

  logic clk = 0, rst = 1;
  logic push_valid = 0, push_ready, hold = 0, tup_valid = 0, tup_fire, idle, buf_empty;
  frame_t push_frame = '0, tup_frame = '0;
  logic [31:0] tx_data;
  logic tx_valid, tx_last, tx_ready = 1;
  int checks = 0, failures = 0;

  link_tx #(.FIFO_DEPTH(4)) dut (.*);
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

  // expected frames, in order
  words_t exp_q[$];
  int     tup_pending = 0;
  logic [15:0] next_seq = 0;
  int     nframes = 0, ntup = 0;
  logic   rdy_random = 0;

  // link monitor
  words_t cur;
  int     widx = 0;
  always @(posedge clk) if (!rst && tx_valid && tx_ready) begin
    cur[widx] = tx_data;
    check(tx_last == (widx == 3), "last flag on word 3 only");
    if (widx == 3) begin
      words_t e;
      check(frame_crc_ok(cur), "checksum");
      if (exp_q.size() == 0) check(0, "unexpected frame");
      else begin
        e = exp_q.pop_front();
        check(cur[0][31:28] == e[0][31:28] && cur[1] == e[1] && cur[2] == e[2],
              $sformatf("frame content %h %h %h vs %h %h %h", cur[0], cur[1], cur[2], e[0], e[1], e[2]));
        if (cur[0][31:28] == 4'h1) begin
          check(cur[0][15:0] == next_seq, "sequence number");
          next_seq++;
        end
      end
      nframes++;
      widx = 0;
    end else widx++;
  end

  always @(negedge clk) if (rdy_random) tx_ready = ($urandom % 4) != 0;

  initial begin
    frame_t f;
    repeat (3) @(negedge clk);
    rst = 0;
    rdy_random = 1;
    // stream of data frames
    for (int n = 0; n < 60; n++) begin
      f = '0;
      f.ftype = FT_DATA; f.src = 4'($urandom); f.rate = 4'($urandom);
      f.ts = $urandom; f.data = 16'($urandom);
      while (!push_ready) @(negedge clk);
      push_frame = f; push_valid = 1;
      exp_q.push_back(make_frame(4'h1, f.src, f.rate, 16'h0, f.ts, f.data));
      @(negedge clk);
      push_valid = 0;
      if ($urandom % 3 == 0) @(negedge clk);
    end
    // TUP message: wait for idle, then it must fire at once
    repeat (200) @(negedge clk);
    rdy_random = 0; tx_ready = 1;
    @(negedge clk);
    check(idle && buf_empty, "idle after draining");
    tup_frame = '0; tup_frame.ftype = FT_TR; tup_frame.ts = 32'hCAFE_0001;
    tup_valid = 1;
    #1;
    check(tup_fire, "TUP fires immediately when idle");
    exp_q.push_back(make_frame(4'h2, 4'h0, 4'h0, 16'h0, 32'hCAFE_0001, 16'h0));
    @(negedge clk); tup_valid = 0; ntup++;
    // TUP request while a frame is queued: must not fire until idle
    f = '0; f.ftype = FT_DATA; f.ts = 32'h1234; f.data = 16'h55;
    push_frame = f; push_valid = 1;
    @(negedge clk); push_valid = 0;
    exp_q.push_back(make_frame(4'h1, 4'h0, 4'h0, 16'h0, 32'h1234, 16'h55));
    tup_frame.ts = 32'hCAFE_0002; tup_frame.ftype = FT_TU;
    tup_valid = 1;
    #1;
    check(!tup_fire, "TUP held back while not idle");
    while (!tup_fire) begin @(negedge clk); #1; end
    exp_q.push_back(make_frame(4'h3, 4'h0, 4'h0, 16'h0, 32'hCAFE_0002, 16'h0));
    @(negedge clk); tup_valid = 0; ntup++;
    // hold blocks pushes
    hold = 1; #1;
    check(!push_ready, "hold blocks pushes");
    hold = 0;
    repeat (50) @(negedge clk);
    check(exp_q.size() == 0, "all frames sent");
    check(nframes == 63, $sformatf("frame count %0d", nframes));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
