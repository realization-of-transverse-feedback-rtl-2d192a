// sync_switch: switching module of the synchronization unit.
//
// A registered crossbar: slot s receives input stream slot_sel[s], one
// cycle later. One stream may feed several slots, each slot then with its
// own timing (delay) downstream. Assignment of inputs to slots by a user
// slot configuration follows the system description; the one-cycle
// register is this design's choice.
module sync_switch #(
  parameter int NIN   = 6,
  parameter int NSLOT = 6,
  localparam int SW   = (NIN > 1) ? $clog2(NIN) : 1
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           in_valid [NIN],
  input  tfs_pkg::smp_t  in_smp   [NIN],
  input  logic [SW-1:0]  slot_sel [NSLOT],
  output logic           out_valid [NSLOT],
  output tfs_pkg::smp_t  out_smp   [NSLOT]
);
  always_ff @(posedge clk) begin
    for (int s = 0; s < NSLOT; s++) begin
      if (rst) begin
        out_valid[s] <= 1'b0; out_smp[s] <= '0;
      end else if (int'(slot_sel[s]) < NIN) begin
        out_valid[s] <= in_valid[slot_sel[s]];
        out_smp[s]   <= in_smp[slot_sel[s]];
      end else begin
        out_valid[s] <= 1'b0;
      end
    end
  end
endmodule
