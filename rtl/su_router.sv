// SU chip router.
//
// For every input port it decides which output port the port asks the arbiter for.
// On REQ (destination-addressed) it decodes the two address bits this stage owns from the
// input's data lines (stage s uses field 2-s, see pie_net_pkg::addr_field). On LREQ (load
// distribution) it takes the free output whose load is lowest, as found by the load monitor.
// A request is only raised when the wanted connection does not exist yet: a REQ whose
// decoded output already belongs to the same input (repeated request of a multicast, or a
// request still waiting downstream) is simply forwarded; an LREQ is served once, by a
// single connection. REL masks the input's requests. Outputs: request matrix rq[o][i] and
// the forwarding target tgt[i] used by the communication controller. Combinational.
// Address decoding and lowest-load selection follow the document; the rule for repeated
// requests is this design's reading of "connection request may be repeated".
module su_router
  import pie_net_pkg::*;
(
  input  logic [1:0]                     stage,
  input  logic [SU_PORTS-1:0]            req,
  input  logic [SU_PORTS-1:0]            lreq,
  input  logic [SU_PORTS-1:0]            rel,
  input  logic [SU_PORTS-1:0][SU_DW-1:0] addr,
  input  ca_t  [SU_PORTS-1:0]            map,
  input  port_t                          min_port,
  input  logic                           min_valid,
  output logic [SU_PORTS-1:0][SU_PORTS-1:0] rq,   // rq[o][i]: input i asks for output o
  output port_t [SU_PORTS-1:0]           tgt
);
  // forwarding target (forward lines only)
  always_comb begin
    for (int i = 0; i < SU_PORTS; i++) begin
      port_t own;
      own = '0;
      for (int o = 0; o < SU_PORTS; o++)
        if (map[o].en && map[o].src == port_t'(i)) own = port_t'(o);
      tgt[i] = lreq[i] ? own : addr_field(stage, addr[i]);
    end
  end

  // requests to the arbiter
  always_comb begin
    rq = '0;
    for (int i = 0; i < SU_PORTS; i++) begin
      logic  owns_any;
      port_t dec;
      owns_any = 1'b0;
      for (int o = 0; o < SU_PORTS; o++)
        if (map[o].en && map[o].src == port_t'(i)) owns_any = 1'b1;
      dec = addr_field(stage, addr[i]);
      if (!rel[i]) begin
        if (req[i] && !(map[dec].en && map[dec].src == port_t'(i)))
          rq[dec][i] = 1'b1;
        else if (lreq[i] && !req[i] && !owns_any && min_valid)
          rq[min_port][i] = 1'b1;
      end
    end
  end
endmodule
