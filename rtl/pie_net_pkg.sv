// Shared types and constants of the PIE64 load-balancing interconnection network.
//
// The switching unit (SU) chip is a 4x4 crossbar with 8-bit data. Four SU chips (one
// master, three slaves) form a 32-bit 4x4 switch unit; 48 switch units in three stages
// form a 64x64 network. The bidirectional data pins of the real chip are modelled as a
// forward bus (source to destination) and a reverse bus (destination to source); which one
// carries user data is chosen by DIR, and the reverse bus of an unused port carries load
// information. Widths and port counts follow the document; the struct layout, the NO_PATH
// load code and the address field per stage are this design's own choices.
package pie_net_pkg;

  localparam int unsigned SU_PORTS  = 4;   // ports per side of an SU chip
  localparam int unsigned SU_DW     = 8;   // data width of one SU chip
  localparam int unsigned SU_STBW   = 4;   // STB lines per port on a chip (slave uses 4, master 1)
  localparam int unsigned N_SLAVES  = 3;   // slave chips per switch unit
  localparam int unsigned NET_DW    = SU_DW * (N_SLAVES + 1);   // 32 data lines
  localparam int unsigned NET_STBW  = 1 + SU_STBW * N_SLAVES;   // 13 forward control lines
  localparam int unsigned NET_ACKW  = N_SLAVES + 1;             // 4 reverse control lines
  localparam int unsigned LOAD_W    = 8;   // load value width
  localparam logic [LOAD_W-1:0] NO_PATH = '1;  // load code: no free path behind this port

  typedef logic [1:0] port_t;

  // Connection of one output port: enabled, and which input port drives it.
  // Three bits per output port, twelve in all: the CA0-CDE master-to-slave bus.
  typedef struct packed {
    logic  en;
    port_t src;
  } ca_t;

  // Forward (source to destination) lines of one SU chip port.
  typedef struct packed {
    logic               req;
    logic               lreq;
    logic               rel;
    logic               dir;   // 0: data flows forward, 1: data flows in reverse
    logic [SU_STBW-1:0] stb;
    logic [SU_DW-1:0]   d;
  } su_fwd_t;

  // Reverse (destination to source) lines of one SU chip port.
  typedef struct packed {
    logic             ack;
    logic [SU_DW-1:0] q;     // reverse data, or load value while the port is unused
  } su_rev_t;

  // Forward lines of one 32-bit network port.
  typedef struct packed {
    logic                req;
    logic                lreq;
    logic                rel;
    logic                dir;
    logic [NET_STBW-1:0] stb;
    logic [NET_DW-1:0]   d;
  } net_fwd_t;

  // Reverse lines of one 32-bit network port.
  typedef struct packed {
    logic [NET_ACKW-1:0] ack;
    logic [NET_DW-1:0]   q;
  } net_rev_t;

  // Address field used by a stage: stage s decodes bits [2f+1:2f] with f = 2 - s (mod 4),
  // so in a 3-stage network stage 0 takes the top two bits of a 6-bit IU number.
  function automatic port_t addr_field(input logic [1:0] stage, input logic [SU_DW-1:0] a);
    logic [1:0] f;
    f = 2'(2'd2 - stage);
    return a[2*f +: 2];
  endfunction

endpackage
