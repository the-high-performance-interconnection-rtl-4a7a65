// Two-phase arbiter of the IU local memory (LMEM) buses.
//
// N_MASTER processor ports (UNIRED, PAN NIP, DAAN NIP, SPARC) share N_BANK memory banks
// over N_BUS buses. In one clock the arbiter does both phases of arbitration: bus
// arbitration (at most N_BUS requests go ahead) and bank arbitration (at most one request
// per bank). Masters are visited in round-robin order from a pointer that moves one place
// past the first granted master each cycle; a visited request is granted when its bank is
// still free this cycle and a bus is left. The bank of a request is its low address bits
// (word interleaving). Output gnt[m] and bus[m] (which bus carries it) are combinational;
// the caller registers them. Losing requests are simply not granted and are retried.
// Bus and bank arbitration in one pipeline stage follow the document; round robin,
// interleaving and the bus numbering are this design's choices.
module lmem_arbiter #(
  parameter int unsigned N_MASTER = 4,
  parameter int unsigned N_BUS    = 3,
  parameter int unsigned N_BANK   = 4
) (
  input  logic                                clk,
  input  logic                                rst,
  input  logic [N_MASTER-1:0]                 req,
  input  logic [N_MASTER-1:0][$clog2(N_BANK)-1:0] bank,
  output logic [N_MASTER-1:0]                 gnt,
  output logic [N_MASTER-1:0][$clog2(N_BUS)-1:0]  bus
);
  localparam int unsigned MW = $clog2(N_MASTER);

  logic [MW-1:0] ptr;
  logic [MW-1:0] first;
  logic          any;

  always_comb begin
    logic [N_BANK-1:0] bank_busy;
    int unsigned       used;
    bank_busy = '0;
    used      = 0;
    gnt       = '0;
    bus       = '0;
    first     = ptr;
    any       = 1'b0;
    for (int unsigned k = 0; k < N_MASTER; k++) begin
      int unsigned m;
      m = (int'(ptr) + k) % N_MASTER;
      if (req[m] && !bank_busy[bank[m]] && used < N_BUS) begin
        gnt[m]             = 1'b1;
        bus[m]             = ($clog2(N_BUS))'(used);
        bank_busy[bank[m]] = 1'b1;
        used++;
        if (!any) first = MW'(m);
        any = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst)      ptr <= '0;
    else if (any) ptr <= MW'((int'(first) + 1) % N_MASTER);
  end

  // Never two grants to one bank, never more grants than buses.
  a_buses: assert property (@(posedge clk) disable iff (rst)
    $countones(gnt) <= N_BUS);
endmodule
