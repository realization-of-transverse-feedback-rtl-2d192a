// interpolator: decompression of a down-sampled stream.
//
// Restores the original sampling rate by linear interpolation between two
// successive compressed samples x(k-1) at time t(k-1) and x(k) at
// t(k) = t(k-1) + 2^r: for j = 0 .. 2^r-1 it emits, one per clock,
//   time t(k-1)+j,  value x(k-1) + ((x(k)-x(k-1)) * j) >>> r.
// Compressed samples wait in a small FIFO (FIFO_DEPTH) that absorbs link
// jitter; segments follow each other without a bubble, so an input rate of
// one sample per 2^r cycles is sustained. If two successive samples are
// not 2^r apart (a frame was lost), no values are made up for the gap:
// interpolation restarts at the new sample and the gap stays empty, to be
// invalidated downstream. Output is registered (one cycle after the
// segment step). Linear interpolation follows the system description; the
// FIFO, the power-of-two factors and gap handling are this design's.
module interpolator #(
  parameter int FIFO_DEPTH    = 4,
  parameter int MAX_RATE_LOG2 = 7
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           in_valid,
  input  tfs_pkg::smp_t  in_smp,
  output logic           out_valid,
  output tfs_pkg::smp_t  out_smp,
  output logic [15:0]    gap_cnt,
  output logic [15:0]    ovf_cnt
);
  import tfs_pkg::*;

  localparam int PW = $clog2(FIFO_DEPTH);
  localparam int JW = MAX_RATE_LOG2 + 1;

  smp_t          fifo [FIFO_DEPTH];
  logic [PW-1:0] wr_ptr, rd_ptr;
  logic [PW:0]   count;
  logic          pop, have_prev, busy, last_j, contiguous;
  smp_t          prev, head;
  ts_t           base_ts;
  sample_t       base_x;
  logic signed [DATA_W:0]      delta;
  logic [RATE_W-1:0]           rate;
  logic [JW-1:0]               j;
  logic signed [DATA_W+JW+1:0] prod;

  assign head       = fifo[rd_ptr];
  assign last_j     = busy && (j == JW'((1 << rate) - 1));
  assign pop        = (count != 0) && (!busy || last_j);
  assign contiguous = (head.ts - prev.ts) == (ts_t'(1) << head.rate);
  assign prod       = delta * $signed({1'b0, j});

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr <= '0; rd_ptr <= '0; count <= '0;
      have_prev <= 1'b0; busy <= 1'b0; prev <= '0;
      base_ts <= '0; base_x <= '0; delta <= '0; rate <= '0; j <= '0;
      out_valid <= 1'b0; out_smp <= '0; gap_cnt <= '0; ovf_cnt <= '0;
    end else begin
      // input FIFO
      if (in_valid) begin
        if (count < (PW+1)'(FIFO_DEPTH) || pop) begin
          fifo[wr_ptr] <= in_smp;
          wr_ptr <= wr_ptr + 1'b1;
        end else begin
          ovf_cnt <= ovf_cnt + 1'b1;
        end
      end
      count <= count + (PW+1)'(in_valid && (count < (PW+1)'(FIFO_DEPTH) || pop)) - (PW+1)'(pop);

      // output of the current segment
      out_valid <= busy;
      if (busy) begin
        out_smp.src  <= prev.src;
        out_smp.rate <= rate;
        out_smp.ts   <= base_ts + ts_t'(j);
        out_smp.data <= sample_t'(base_x + sample_t'(prod >>> rate));
        j <= j + 1'b1;
      end

      // segment step
      if (last_j) busy <= 1'b0;
      if (pop) begin
        rd_ptr    <= rd_ptr + 1'b1;
        prev      <= head;
        have_prev <= 1'b1;
        if (have_prev && contiguous && head.rate <= RATE_W'(MAX_RATE_LOG2)) begin
          busy    <= 1'b1;
          j       <= '0;
          base_ts <= prev.ts;
          base_x  <= prev.data;
          delta   <= (DATA_W+1)'(head.data) - (DATA_W+1)'(prev.data);
          rate    <= head.rate;
        end else if (have_prev) begin
          gap_cnt <= gap_cnt + 1'b1;
        end
      end
    end
  end
endmodule
