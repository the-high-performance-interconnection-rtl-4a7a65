// Switching unit (SU) chip: the elementary switch of the PIE64 networks.
//
// A 4x4 crossbar with 8-bit data and two ways to set up a circuit:
//   - REQ with a destination address on the data lines: the router decodes the two address
//     bits of this stage (STAGE) and asks for that output;
//   - LREQ (load distribution): the router asks for the free output behind which the
//     lowest load was reported.
// Requests for the same output are resolved by ring-counter arbiters, one or two clocks
// (ARMODE). A connection is kept until the source raises REL. Repeating REQ on a connected
// input adds outputs (multicast). Unused output ports receive load values backwards on
// their reverse data lines; the lowest is sent backwards on every unused input port.
//
// Master mode (chmode = 1): the chip routes and arbitrates itself and drives the
// connection map on ca_out (CA0-CDE, 12 bits: {en, src[1:0]} per output port A..D).
// Slave mode (chmode = 0): router and arbiter are ignored; the crossbar follows ca_in from
// the master, only data, DIR, STB and ACK are switched, and unused inputs send zero back.
// Several slaves beside one master widen the data path.
//
// Timing: a request present at a clock edge (two edges with armode = 1) is connected after
// it; REQ'/LREQ' then appear combinationally at the chosen output. Data, DIR, STB and ACK go
// through without registers. Reset (synchronous, active high) clears all connections.
// Block split (Fig. 5 of the design description), master/slave modes, the line set and the
// 12-line CA bus follow the document; the bus encoding and the protocol details are this
// design's own.
module su_chip
  import pie_net_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  chmode,
  input  logic                  armode,
  input  logic [1:0]            stage,
  input  su_fwd_t [SU_PORTS-1:0] ip_f,
  output su_rev_t [SU_PORTS-1:0] ip_r,
  output su_fwd_t [SU_PORTS-1:0] op_f,
  input  su_rev_t [SU_PORTS-1:0] op_r,
  output ca_t     [SU_PORTS-1:0] ca_out,
  input  ca_t     [SU_PORTS-1:0] ca_in
);
  logic [SU_PORTS-1:0]              ip_req, ip_lreq, ip_rel, ip_dir, op_ack, ip_ack;
  logic [SU_PORTS-1:0]              op_req, op_lreq, op_rel, op_dir, op_free;
  logic [SU_PORTS-1:0][SU_STBW-1:0] ip_stb, op_stb;
  logic [SU_PORTS-1:0][SU_DW-1:0]   ip_d, op_d, ip_q, op_q;
  logic [SU_PORTS-1:0][SU_PORTS-1:0] rq;
  port_t [SU_PORTS-1:0]             tgt;
  ca_t   [SU_PORTS-1:0]             own_map, map;
  logic [LOAD_W-1:0]                min_load;
  port_t                            min_port;
  logic                             min_valid;

  // Forward and reverse lines are unpacked in separate processes so that no
  // process mixes the two directions.
  always_comb begin
    for (int p = 0; p < SU_PORTS; p++) begin
      ip_req[p]  = chmode & ip_f[p].req;
      ip_lreq[p] = chmode & ip_f[p].lreq;
      ip_rel[p]  = chmode & ip_f[p].rel;
      ip_dir[p]  = ip_f[p].dir;
      ip_stb[p]  = ip_f[p].stb;
      ip_d[p]    = ip_f[p].d;
      op_f[p]    = '{req: op_req[p], lreq: op_lreq[p], rel: op_rel[p], dir: op_dir[p],
                     stb: op_stb[p], d: op_d[p]};
    end
  end

  always_comb begin
    for (int p = 0; p < SU_PORTS; p++) begin
      op_ack[p]  = op_r[p].ack;
      op_q[p]    = op_r[p].q;
      ip_r[p]    = '{ack: ip_ack[p], q: ip_q[p]};
    end
  end

  always_comb begin
    for (int p = 0; p < SU_PORTS; p++) begin
      map[p]     = chmode ? own_map[p] : ca_in[p];
      op_free[p] = !map[p].en;
    end
  end

  assign ca_out = chmode ? own_map : '0;

  su_load_monitor u_lmon (
    .op_free (op_free), .op_load (op_q),
    .min_load(min_load), .min_port(min_port), .min_valid(min_valid)
  );

  su_router u_router (
    .stage(stage), .req(ip_req), .lreq(ip_lreq), .rel(ip_rel), .addr(ip_d), .map(map),
    .min_port(min_port), .min_valid(min_valid), .rq(rq), .tgt(tgt)
  );

  su_arbiter u_arb (
    .clk(clk), .rst(rst), .armode(armode), .rq(rq), .rel(ip_rel), .map(own_map)
  );

  su_crossbar u_xbar (
    .map(map), .ip_dir(ip_dir), .ip_d(ip_d), .op_q(op_q),
    .load_out(chmode ? min_load : '0), .op_d(op_d), .ip_q(ip_q)
  );

  su_comm_ctrl u_cc (
    .master(chmode), .map(map), .tgt(tgt), .ip_req(ip_req), .ip_lreq(ip_lreq),
    .ip_rel(ip_rel), .ip_dir(ip_dir), .ip_stb(ip_stb), .op_ack(op_ack),
    .op_req(op_req), .op_lreq(op_lreq), .op_rel(op_rel), .op_dir(op_dir),
    .op_stb(op_stb), .ip_ack(ip_ack)
  );
endmodule
