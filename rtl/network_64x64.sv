// One 64x64 three-stage PIE64 network (PAN or DAAN): 192 SU chips.
//
// The shuffle board holds stage 0; its 64 output lines go 16 each to four 16x16 boards,
// which hold stages 1 and 2 and deliver to the IUs: IU n is output 4k+m of board j with
// n = 16j + 4k + m. A destination-addressed circuit is therefore steered by IU-number bits
// [5:4], [3:2] and [1:0] in turn. A load-distribution circuit follows, at each stage, the
// free output behind which the lowest load was reported; every IU reports its load on the
// reverse data lines [7:0] of its destination port while that port is unused.
// With one-clock arbitration a circuit to an idle destination is through three clocks after
// the request, and its ACK is back at the source by the fourth edge.
// Composition (shuffle board + four 16x16 boards) follows the document.
module network_64x64
  import pie_net_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            armode,
  input  net_fwd_t [63:0] src_f,
  output net_rev_t [63:0] src_r,
  output net_fwd_t [63:0] dst_f,
  input  net_rev_t [63:0] dst_r
);
  net_fwd_t [63:0] mid_f;
  net_rev_t [63:0] mid_r;

  shuffle_board_64 #(.STAGE(2'd0)) u_shuffle (
    .clk(clk), .rst(rst), .armode(armode),
    .in_f(src_f), .in_r(src_r), .out_f(mid_f), .out_r(mid_r)
  );

  for (genvar b = 0; b < 4; b++) begin : g_board
    net_board_16x16 #(.STAGE_A(2'd1), .STAGE_B(2'd2)) u_board (
      .clk(clk), .rst(rst), .armode(armode),
      .in_f(mid_f[16*b +: 16]), .in_r(mid_r[16*b +: 16]),
      .out_f(dst_f[16*b +: 16]), .out_r(dst_r[16*b +: 16])
    );
  end
endmodule
