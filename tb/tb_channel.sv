// tb_channel: behavioural model of one direction of a fibre link as seen
// from the user side of the link IP: words come out DELAY cycles after they
// went in. `flip` corrupts one bit of the next word passing through.
// `ready` toggles randomly when `stall` is set, otherwise stays high. Like
// link IP that comes out of its own reset, the channel ignores its input
// at the first clock edge, where the sender's registers have not yet been
// reset.
module tb_channel #(
  parameter int DELAY = 20
) (
  input  logic        clk,
  input  logic [31:0] in_data,
  input  logic        in_valid,
  input  logic        in_last,
  output logic        in_ready,
  output logic [31:0] out_data,
  output logic        out_valid,
  output logic        out_last,
  input  logic        flip,
  input  logic        stall
);
  logic [33:0] pipe [DELAY];
  logic        flip_pending = 0;
  logic        rdy = 1;
  logic        up = 0;

  initial for (int i = 0; i < DELAY; i++) pipe[i] = '0;

  assign in_ready = rdy;
  assign {out_valid, out_last, out_data} = pipe[DELAY-1];

  always @(posedge clk) begin
    logic [33:0] w;
    w = {in_valid && rdy && up, in_last, in_data};
    up <= 1'b1;
    if (flip) flip_pending <= 1;
    if (w[33] && (flip_pending || flip)) begin
      w[7] = !w[7];
      flip_pending <= 0;
    end
    pipe[0] <= w;
    for (int i = 1; i < DELAY; i++) pipe[i] <= pipe[i-1];
    rdy <= stall ? ($urandom % 4 != 0) : 1'b1;
  end
endmodule
