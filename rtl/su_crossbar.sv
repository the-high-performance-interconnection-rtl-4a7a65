// SU chip crossbar switch (data lines).
//
// Four input and four output ports of SU_DW bits. map[o] says which input drives output o;
// one input may drive several outputs (multicast). Data direction follows the DIR line of
// the source input: DIR = 0 copies the input's forward data to its outputs, DIR = 1 returns
// the reverse data of its outputs to the input, ORed together when there are several.
// Input ports that hold no connection send load_out backwards (in master mode the lowest
// load of the free outputs, in slave mode zero). Unused outputs drive zero forward.
// Purely combinational: circuit switching, no register in the data path.
// Half-duplex transfer under DIR, ORed reverse multicast and load passing on unused ports
// follow the document; zero on idle lines is this design's choice.
module su_crossbar
  import pie_net_pkg::*;
(
  input  ca_t  [SU_PORTS-1:0]            map,
  input  logic [SU_PORTS-1:0]            ip_dir,
  input  logic [SU_PORTS-1:0][SU_DW-1:0] ip_d,
  input  logic [SU_PORTS-1:0][SU_DW-1:0] op_q,
  input  logic [SU_DW-1:0]               load_out,
  output logic [SU_PORTS-1:0][SU_DW-1:0] op_d,
  output logic [SU_PORTS-1:0][SU_DW-1:0] ip_q
);
  always_comb begin
    for (int o = 0; o < SU_PORTS; o++)
      op_d[o] = (map[o].en && !ip_dir[map[o].src]) ? ip_d[map[o].src] : '0;
  end

  always_comb begin
    for (int i = 0; i < SU_PORTS; i++) begin
      logic used;
      used    = 1'b0;
      ip_q[i] = '0;
      for (int o = 0; o < SU_PORTS; o++)
        if (map[o].en && map[o].src == port_t'(i)) begin
          used = 1'b1;
          if (ip_dir[i]) ip_q[i] = ip_q[i] | op_q[o];
        end
      if (!used) ip_q[i] = load_out;
    end
  end
endmodule
