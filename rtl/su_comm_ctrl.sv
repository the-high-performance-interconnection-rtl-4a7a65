// SU chip communication controller.
//
// Generates the control lines sent to the next stage and the ACK returned to the previous
// one, over the current connections map[o] = {en, src}.
//   REQ'/LREQ' : passed only to the output the input is routing to now (tgt[i]), so that a
//                repeated request of a multicast travels down one branch only.
//   REL', DIR' : passed to every output the input holds.
//   STB'       : all SU_STBW strobe lines, to every output the input holds.
//   ACK        : ORed over all outputs the input holds.
// In slave mode the chip has no REQ, LREQ or REL lines; these outputs stay low.
// Combinational. Which lines exist in each mode follows the document (Fig. 4); restricting
// REQ'/LREQ' to the routed branch is this design's choice.
module su_comm_ctrl
  import pie_net_pkg::*;
(
  input  logic                              master,
  input  ca_t   [SU_PORTS-1:0]              map,
  input  port_t [SU_PORTS-1:0]              tgt,
  input  logic  [SU_PORTS-1:0]              ip_req,
  input  logic  [SU_PORTS-1:0]              ip_lreq,
  input  logic  [SU_PORTS-1:0]              ip_rel,
  input  logic  [SU_PORTS-1:0]              ip_dir,
  input  logic  [SU_PORTS-1:0][SU_STBW-1:0] ip_stb,
  input  logic  [SU_PORTS-1:0]              op_ack,
  output logic  [SU_PORTS-1:0]              op_req,
  output logic  [SU_PORTS-1:0]              op_lreq,
  output logic  [SU_PORTS-1:0]              op_rel,
  output logic  [SU_PORTS-1:0]              op_dir,
  output logic  [SU_PORTS-1:0][SU_STBW-1:0] op_stb,
  output logic  [SU_PORTS-1:0]              ip_ack
);
  // forward lines
  always_comb begin
    for (int o = 0; o < SU_PORTS; o++) begin
      port_t s;
      s = map[o].src;
      op_req[o]  = master && map[o].en && ip_req[s]  && tgt[s] == port_t'(o);
      op_lreq[o] = master && map[o].en && ip_lreq[s] && tgt[s] == port_t'(o);
      op_rel[o]  = master && map[o].en && ip_rel[s];
      op_dir[o]  = map[o].en && ip_dir[s];
      op_stb[o]  = map[o].en ? ip_stb[s] : '0;
    end
  end

  // reverse line
  always_comb begin
    ip_ack = '0;
    for (int o = 0; o < SU_PORTS; o++)
      if (map[o].en) ip_ack[map[o].src] = ip_ack[map[o].src] | op_ack[o];
  end
endmodule
