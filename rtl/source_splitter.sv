// source_splitter: splits the merged stream of a cluster by source ID.
//
// A cluster's samples arrive interleaved on one stream. Each sample is
// forwarded, one cycle later, to output `src` (0..NLIB-1), so every Libera
// device gets a path of its own. Samples with an unknown source ID are
// dropped and counted in `bad_cnt` (this design's choice).
module source_splitter #(
  parameter int NLIB = 3
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           in_valid,
  input  tfs_pkg::smp_t  in_smp,
  output logic           out_valid [NLIB],
  output tfs_pkg::smp_t  out_smp   [NLIB],
  output logic [15:0]    bad_cnt
);
  always_ff @(posedge clk) begin
    if (rst) begin
      bad_cnt <= '0;
      for (int i = 0; i < NLIB; i++) begin
        out_valid[i] <= 1'b0; out_smp[i] <= '0;
      end
    end else begin
      for (int i = 0; i < NLIB; i++) begin
        out_valid[i] <= in_valid && (int'(in_smp.src) == i);
        if (in_valid && int'(in_smp.src) == i) out_smp[i] <= in_smp;
      end
      if (in_valid && int'(in_smp.src) >= NLIB) bad_cnt <= bad_cnt + 1'b1;
    end
  end
endmodule
