// 16x16 two-stage network board: 8 switch units (32 SU chips).
//
// Input line l enters first-stage unit l/4 at port l%4. Output k of first-stage unit t goes
// to input t of second-stage unit k, and output m of second-stage unit k is board output
// line 4k+m. Stage numbers default to 1 and 2, its place in the 64x64 network, so a
// destination inside the board is chosen by address bits [3:2] then [1:0]. The same board
// works alone as a 16x16 network when driven directly on in_f/in_r.
// Board size, chip count and stand-alone use follow the document; the wiring order is this
// design's choice (the board drawing shows the crossing pattern but no line numbers).
module net_board_16x16
  import pie_net_pkg::*;
#(
  parameter logic [1:0] STAGE_A = 2'd1,
  parameter logic [1:0] STAGE_B = 2'd2
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            armode,
  input  net_fwd_t [15:0] in_f,
  output net_rev_t [15:0] in_r,
  output net_fwd_t [15:0] out_f,
  input  net_rev_t [15:0] out_r
);
  net_fwd_t [3:0][3:0] a_op_f, b_ip_f;   // [unit][port]
  net_rev_t [3:0][3:0] a_op_r, b_ip_r;

  always_comb
    for (int t = 0; t < 4; t++)
      for (int k = 0; k < 4; k++) b_ip_f[k][t] = a_op_f[t][k];

  always_comb
    for (int t = 0; t < 4; t++)
      for (int k = 0; k < 4; k++) a_op_r[t][k] = b_ip_r[k][t];

  for (genvar t = 0; t < 4; t++) begin : g_unit
    su_xbar_unit #(.STAGE(STAGE_A)) u_a (
      .clk(clk), .rst(rst), .armode(armode),
      .ip_f(in_f[4*t +: 4]), .ip_r(in_r[4*t +: 4]), .op_f(a_op_f[t]), .op_r(a_op_r[t])
    );
    su_xbar_unit #(.STAGE(STAGE_B)) u_b (
      .clk(clk), .rst(rst), .armode(armode),
      .ip_f(b_ip_f[t]), .ip_r(b_ip_r[t]), .op_f(out_f[4*t +: 4]), .op_r(out_r[4*t +: 4])
    );
  end
endmodule
