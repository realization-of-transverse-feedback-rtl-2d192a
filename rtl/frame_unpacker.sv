// frame_unpacker: decodes checked data frames of one cluster link.
//
// Turns each data frame into a tagged sample (source ID, compression
// exponent, time tag, position value), one cycle later. It also checks the
// link sequence number carried in every frame header and counts gaps in
// `lost_cnt` (frames lost on the link), for channel analysis. Decoding of
// data, time tags, source IDs and parameters follows the system
// description; the sequence check is this design's addition to it.
module frame_unpacker (
  input  logic             clk,
  input  logic             rst,
  input  logic             frm_valid,
  input  tfs_pkg::frame_t  frm,
  output logic             smp_valid,
  output tfs_pkg::smp_t    smp,
  output logic [15:0]      lost_cnt
);
  import tfs_pkg::*;

  logic        seen;
  logic [15:0] exp_seq;

  always_ff @(posedge clk) begin
    if (rst) begin
      smp_valid <= 1'b0; smp <= '0; seen <= 1'b0; exp_seq <= '0; lost_cnt <= '0;
    end else begin
      smp_valid <= frm_valid && (frm.ftype == FT_DATA);
      if (frm_valid && frm.ftype == FT_DATA) begin
        smp.src  <= frm.src;
        smp.rate <= frm.rate;
        smp.ts   <= frm.ts;
        smp.data <= frm.data;
        seen     <= 1'b1;
        exp_seq  <= frm.seq + 1'b1;
        if (seen && frm.seq != exp_seq) lost_cnt <= lost_cnt + 1'b1;
      end
    end
  end
endmodule
