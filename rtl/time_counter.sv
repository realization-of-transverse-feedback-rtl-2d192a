// time_counter: free-running time counter of a node (master or slave).
//
// Counts clock cycles. A slave counter is corrected by the time update
// protocol: when `load` is high, the counter takes `load_val` at the next
// edge instead of incrementing. The master counter never loads. Width
// TS_W is this design's choice; the counters themselves follow the
// master/slave time counter structure of the system.
module time_counter #(
  parameter int TS_W = 32
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            load,
  input  logic [TS_W-1:0] load_val,
  output logic [TS_W-1:0] time_o
);
  always_ff @(posedge clk) begin
    if (rst)       time_o <= '0;
    else if (load) time_o <= load_val;
    else           time_o <= time_o + 1'b1;
  end
endmodule
