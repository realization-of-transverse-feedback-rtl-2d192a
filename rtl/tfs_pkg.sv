// tfs_pkg: types and constants shared by the transverse feedback system.
//
// A position sample travels through the system as a "tagged sample":
// source ID, time tag from the synchronized time counter, the compression
// (down-sampling) exponent in force when it was taken, and the signed
// position value. On the fibre link a sample or a time-protocol message is
// carried in a fixed frame of four 32-bit words:
//   word 0  header   {type[31:28], src_id[27:24], rate_log2[23:20], 4'b0, seq[15:0]}
//   word 1  time     time tag (data) or protocol time (TR: t1, TU: t3)
//   word 2  data     {16'b0, sample}
//   word 3  check    {16'b0, crc16 over words 0..2}
// The frame contents (data, time tag, source ID, parameters) follow the
// design description; the bit layout, widths and the CRC are this design's
// own choice.
package tfs_pkg;
  localparam int DATA_W = 16;  // signed position sample
  localparam int TS_W   = 32;  // time counter width (clock cycles)
  localparam int LINK_W = 32;  // link user word
  localparam int SRC_W  = 4;   // source ID width
  localparam int RATE_W = 4;   // log2 of the down-sampling factor

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic [TS_W-1:0]          ts_t;

  typedef enum logic [3:0] {
    FT_NONE = 4'h0,
    FT_DATA = 4'h1,
    FT_TR   = 4'h2,  // time request, slave -> master
    FT_TU   = 4'h3   // time update, master -> slave
  } ftype_e;

  // Tagged sample as it flows between the processing blocks.
  typedef struct packed {
    logic [SRC_W-1:0]  src;
    logic [RATE_W-1:0] rate;
    ts_t               ts;
    sample_t           data;
  } smp_t;

  // Payload of a frame (everything but the checksum word).
  typedef struct packed {
    ftype_e            ftype;
    logic [SRC_W-1:0]  src;
    logic [RATE_W-1:0] rate;
    logic [15:0]       seq;
    ts_t               ts;
    sample_t           data;
  } frame_t;

  function automatic logic [LINK_W-1:0] hdr_word(frame_t f);
    return {f.ftype, f.src, f.rate, 4'b0, f.seq};
  endfunction

  // One step of CRC-16 (polynomial 0x1021, MSB first) over a 32-bit word.
  function automatic logic [15:0] crc16_word(logic [15:0] crc, logic [31:0] w);
    logic [15:0] c;
    c = crc;
    for (int i = 31; i >= 0; i--) begin
      if (c[15] ^ w[i]) c = {c[14:0], 1'b0} ^ 16'h1021;
      else              c = {c[14:0], 1'b0};
    end
    return c;
  endfunction

  localparam logic [15:0] CRC_INIT = 16'hFFFF;

  function automatic sample_t sat(logic signed [63:0] v);
    if (v > 64'sd32767)       return sample_t'(16'sh7FFF);
    else if (v < -64'sd32768) return sample_t'(16'sh8000);
    else                      return sample_t'(v[DATA_W-1:0]);
  endfunction
endpackage
