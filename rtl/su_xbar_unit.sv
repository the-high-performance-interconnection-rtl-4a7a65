// 32-bit 4x4 switch unit: one master SU chip and N_SLAVES slave SU chips.
//
// The master carries data bits [7:0] (destination address on REQ, load values on unused
// ports), REQ, LREQ, REL, DIR, STB line 0 and ACK line 0, and routes. It sends its
// connection map over the 12-line CA bus to the slaves, which switch data bits
// [8k+15:8k+8], DIR, STB lines [4k+4:4k+1] and ACK line k+1 of slave k in step with it.
// With three slaves each port has 32 data lines, 13 forward control lines (STB) and 4
// reverse control lines (ACK). All chips share clock, reset, ARMODE and STAGE.
// The 1 master + 3 slave arrangement and the line counts follow the document; which lines
// go to which chip is this design's choice. Only the master's CA outputs are used; the
// slaves drive zero there, so lint reports those bits as unused.
module su_xbar_unit
  import pie_net_pkg::*;
#(
  parameter logic [1:0] STAGE = 2'd0
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    armode,
  input  net_fwd_t [SU_PORTS-1:0] ip_f,
  output net_rev_t [SU_PORTS-1:0] ip_r,
  output net_fwd_t [SU_PORTS-1:0] op_f,
  input  net_rev_t [SU_PORTS-1:0] op_r
);
  localparam int unsigned NCH = N_SLAVES + 1;

  ca_t [SU_PORTS-1:0] ca_bus;
  ca_t [NCH-1:0][SU_PORTS-1:0] ca_out;
  su_fwd_t [NCH-1:0][SU_PORTS-1:0] c_ip_f, c_op_f;
  su_rev_t [NCH-1:0][SU_PORTS-1:0] c_ip_r, c_op_r;

  assign ca_bus = ca_out[0];

  always_comb begin
    for (int p = 0; p < SU_PORTS; p++) begin
      for (int c = 0; c < NCH; c++) begin
        c_ip_f[c][p].req  = (c == 0) ? ip_f[p].req  : 1'b0;
        c_ip_f[c][p].lreq = (c == 0) ? ip_f[p].lreq : 1'b0;
        c_ip_f[c][p].rel  = (c == 0) ? ip_f[p].rel  : 1'b0;
        c_ip_f[c][p].dir  = ip_f[p].dir;
        c_ip_f[c][p].stb  = (c == 0) ? SU_STBW'(ip_f[p].stb[0])
                                     : ip_f[p].stb[1 + SU_STBW*(c-1) +: SU_STBW];
        c_ip_f[c][p].d    = ip_f[p].d[SU_DW*c +: SU_DW];
      end
      op_f[p].req  = c_op_f[0][p].req;
      op_f[p].lreq = c_op_f[0][p].lreq;
      op_f[p].rel  = c_op_f[0][p].rel;
      op_f[p].dir  = c_op_f[0][p].dir;
      op_f[p].stb[0] = c_op_f[0][p].stb[0];
      for (int c = 0; c < NCH; c++) begin
        if (c > 0) op_f[p].stb[1 + SU_STBW*(c-1) +: SU_STBW] = c_op_f[c][p].stb;
        op_f[p].d[SU_DW*c +: SU_DW] = c_op_f[c][p].d;
      end
    end
  end

  always_comb begin
    for (int p = 0; p < SU_PORTS; p++)
      for (int c = 0; c < NCH; c++) begin
        c_op_r[c][p].ack            = op_r[p].ack[c];
        c_op_r[c][p].q              = op_r[p].q[SU_DW*c +: SU_DW];
        ip_r[p].ack[c]              = c_ip_r[c][p].ack;
        ip_r[p].q[SU_DW*c +: SU_DW] = c_ip_r[c][p].q;
      end
  end

  for (genvar c = 0; c < NCH; c++) begin : g_chip
    su_chip u_su (
      .clk(clk), .rst(rst), .chmode(c == 0), .armode(armode), .stage(STAGE),
      .ip_f(c_ip_f[c]), .ip_r(c_ip_r[c]), .op_f(c_op_f[c]), .op_r(c_op_r[c]),
      .ca_out(ca_out[c]), .ca_in(ca_bus)
    );
  end
endmodule
