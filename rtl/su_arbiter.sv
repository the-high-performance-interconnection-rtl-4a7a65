// SU chip arbiter and connection registers.
//
// Each output port owns a one-hot ring counter. When several inputs ask for the same free
// output in the same cycle, the requester at or after the ring position wins; the ring then
// moves on by one place, so over four grants every input has had top priority once.
// A granted connection is stored in map[o] = {en, src} until the source input raises REL,
// which clears every output that input holds (at the same edge, no new grant is given to
// it). map is also the connection information sent to the slave chips (CA0-CDE).
//
// Timing: with armode = 0 (synchronous neighbouring stages, one-clock arbitration) a request
// seen at a clock edge is granted at that edge. With armode = 1 (asynchronous stages,
// two-clock arbitration) the request is first sampled into a register and granted at the
// next edge if it is still present. Synchronous active-high reset clears all connections
// and sets every ring to input 0. Ring counters and the two modes follow the document; the
// rotate-by-one rule, REL behaviour and reset are this design's choices.
module su_arbiter
  import pie_net_pkg::*;
(
  input  logic                              clk,
  input  logic                              rst,
  input  logic                              armode,
  input  logic [SU_PORTS-1:0][SU_PORTS-1:0] rq,    // rq[o][i]
  input  logic [SU_PORTS-1:0]               rel,
  output ca_t  [SU_PORTS-1:0]               map
);
  logic [SU_PORTS-1:0][SU_PORTS-1:0] rq_q;
  logic [SU_PORTS-1:0][SU_PORTS-1:0] ring;
  logic [SU_PORTS-1:0][SU_PORTS-1:0] rq_eff;
  logic [SU_PORTS-1:0]               win_v;
  port_t [SU_PORTS-1:0]              win;

  // Requests that may be granted this edge.
  always_comb begin
    for (int o = 0; o < SU_PORTS; o++)
      rq_eff[o] = (armode ? (rq[o] & rq_q[o]) : rq[o]) & ~rel;
  end

  // Ring-counter priority select per output.
  always_comb begin
    for (int o = 0; o < SU_PORTS; o++) begin
      win_v[o] = 1'b0;
      win[o]   = '0;
      for (int k = 0; k < SU_PORTS; k++) begin
        for (int i = 0; i < SU_PORTS; i++) begin
          // i is k places after the ring position
          if (!win_v[o] && ring[o][(i - k + SU_PORTS) % SU_PORTS] && rq_eff[o][i]) begin
            win_v[o] = 1'b1;
            win[o]   = port_t'(i);
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rq_q <= '0;
      for (int o = 0; o < SU_PORTS; o++) begin
        map[o]  <= '0;
        ring[o] <= SU_PORTS'(1);
      end
    end else begin
      rq_q <= rq;
      for (int o = 0; o < SU_PORTS; o++) begin
        if (map[o].en) begin
          if (rel[map[o].src]) map[o].en <= 1'b0;
        end else if (win_v[o]) begin
          map[o]  <= '{en: 1'b1, src: win[o]};
          ring[o] <= {ring[o][SU_PORTS-2:0], ring[o][SU_PORTS-1]};
        end
      end
    end
  end

  // A connected output keeps its source until it is released.
  for (genvar o = 0; o < SU_PORTS; o++) begin : g_chk
    a_src_stable: assert property (@(posedge clk) disable iff (rst)
      map[o].en && !rel[map[o].src] |=> map[o].en && map[o].src == $past(map[o].src));
  end
endmodule
