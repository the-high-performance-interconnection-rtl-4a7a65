// 64x64 shuffle board: the first network stage (16 switch units, 64 SU chips) and the
// shuffle wiring to the four 16x16 boards.
//
// IU n enters unit n/4 at port n%4. Output j of unit s leaves the board on line 16j+s,
// i.e. it reaches 16x16 board j at board input s. Every first-stage unit thus has one
// line to every board, and the stage's address field (bits [5:4] of the IU number) picks
// the board. Units run as stage STAGE (default 0).
// The board's content and its place in front of the 16x16 boards follow the document; the
// line numbering of the shuffle is this design's choice.
module shuffle_board_64
  import pie_net_pkg::*;
#(
  parameter logic [1:0] STAGE = 2'd0
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            armode,
  input  net_fwd_t [63:0] in_f,
  output net_rev_t [63:0] in_r,
  output net_fwd_t [63:0] out_f,
  input  net_rev_t [63:0] out_r
);
  net_fwd_t [15:0][3:0] u_op_f;
  net_rev_t [15:0][3:0] u_op_r;

  always_comb
    for (int s = 0; s < 16; s++)
      for (int j = 0; j < 4; j++) out_f[16*j + s] = u_op_f[s][j];

  always_comb
    for (int s = 0; s < 16; s++)
      for (int j = 0; j < 4; j++) u_op_r[s][j] = out_r[16*j + s];

  for (genvar s = 0; s < 16; s++) begin : g_unit
    su_xbar_unit #(.STAGE(STAGE)) u_s (
      .clk(clk), .rst(rst), .armode(armode),
      .ip_f(in_f[4*s +: 4]), .ip_r(in_r[4*s +: 4]), .op_f(u_op_f[s]), .op_r(u_op_r[s])
    );
  end
endmodule
