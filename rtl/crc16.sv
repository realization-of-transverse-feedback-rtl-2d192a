// crc16: running 16-bit checksum for the link frames.
//
// The design protects every link frame with a 16-bit checksum. This block
// keeps the running value: `clr` restarts it at 0xFFFF, `en` folds one
// 32-bit word in (CRC-16 polynomial 0x1021, most significant bit first).
// `crc` is registered, so it covers the words absorbed up to the previous
// clock edge. The choice of CRC-16/0x1021 is this design's; only the 16-bit
// width is given by the system description.
module crc16 (
  input  logic        clk,
  input  logic        rst,
  input  logic        clr,
  input  logic        en,
  input  logic [31:0] word,
  output logic [15:0] crc
);
  import tfs_pkg::*;

  always_ff @(posedge clk) begin
    if (rst || clr) crc <= CRC_INIT;
    else if (en)    crc <= crc16_word(crc, word);
  end
endmodule
