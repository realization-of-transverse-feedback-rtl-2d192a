// sync_ram_wrapper: timestamp-addressed realignment memory of one slot.
//
// Every incoming sample is written into a dual-port RAM at the address
// given by the low AW bits of its time tag, together with the remaining
// upper bits (the "wraparound" tag) and a valid bit. The second port reads
// at t_read; the result appears one cycle later and is valid only if the
// entry holds data and its tag equals the upper bits of t_read. Thus
// addresses skipped by a gap in the stream, and data from an earlier pass
// through the address space, are never used. After reset a sweep clears
// all valid bits (2^AW cycles, `init` high); writes are ignored meanwhile.
// `t_newest` is the time tag of the last sample written. Time-tag
// addressing and invalidation follow the system description; the tag
// scheme and clearing sweep are this design's way of doing it.
module sync_ram_wrapper #(
  parameter int AW = 10
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr_valid,
  input  tfs_pkg::smp_t    wr_smp,
  input  tfs_pkg::ts_t     t_read,
  output logic             rd_valid,
  output tfs_pkg::sample_t rd_data,
  output tfs_pkg::ts_t     t_newest,
  output logic             init
);
  import tfs_pkg::*;

  typedef struct packed {
    logic             v;
    logic [TS_W-AW-1:0] tag;
    sample_t          data;
  } entry_t;

  entry_t         mem [1 << AW];
  entry_t         q;
  logic [TS_W-AW-1:0] rd_tag;
  logic [AW-1:0]  clr_addr;
  logic           we, init_q;
  logic [AW-1:0]  waddr;
  entry_t         wdata;

  always_comb begin
    if (init) begin
      we = 1'b1; waddr = clr_addr; wdata = '0;
    end else begin
      we = wr_valid; waddr = wr_smp.ts[AW-1:0];
      wdata = '{v: 1'b1, tag: wr_smp.ts[TS_W-1:AW], data: wr_smp.data};
    end
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    q      <= mem[t_read[AW-1:0]];
    rd_tag <= t_read[TS_W-1:AW];
    init_q <= init;
  end

  assign rd_valid = !init_q && q.v && (q.tag == rd_tag);
  assign rd_data  = q.data;

  always_ff @(posedge clk) begin
    if (rst) begin
      init <= 1'b1; clr_addr <= '0; t_newest <= '0;
    end else begin
      if (init) begin
        clr_addr <= clr_addr + 1'b1;
        if (&clr_addr) init <= 1'b0;
      end else if (wr_valid) begin
        t_newest <= wr_smp.ts;
      end
    end
  end
endmodule
