// tb_link_pkg: reference models shared by the testbenches of the link
// blocks: a bit-serial CRC-16 model and the frame word encoder/decoder,
// written independently of the RTL.
package tb_link_pkg;
  function automatic logic [15:0] crc_model(logic [15:0] r, logic [31:0] w);
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

  typedef logic [3:0][31:0] words_t;

  // header {type, src, rate, 0000, seq}, time, {0, data}, {0, crc}
  function automatic words_t make_frame(logic [3:0] ftype, logic [3:0] src, logic [3:0] rate,
                                        logic [15:0] seq, logic [31:0] ts, logic [15:0] data);
    words_t w;
    logic [15:0] c;
    w[0] = {ftype, src, rate, 4'h0, seq};
    w[1] = ts;
    w[2] = {16'h0, data};
    c = 16'hFFFF;
    for (int i = 0; i < 3; i++) c = crc_model(c, w[i]);
    w[3] = {16'h0, c};
    return w;
  endfunction

  function automatic bit frame_crc_ok(words_t w);
    logic [15:0] c;
    c = 16'hFFFF;
    for (int i = 0; i < 3; i++) c = crc_model(c, w[i]);
    return (w[3] == {16'h0, c});
  endfunction
endpackage
