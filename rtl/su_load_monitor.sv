// SU chip load monitor.
//
// Compares the load values that the next stage sends backwards on the unused (free) output
// ports and reports the lowest one, the port it arrived on, and whether any free port leads
// to a reachable processor. A load of NO_PATH (all ones) means the next stage has no free
// path either and is ignored. Ties go to the lowest-numbered port. Purely combinational.
// The comparison over free ports follows the document; the NO_PATH code and the tie rule
// are this design's choices.
module su_load_monitor
  import pie_net_pkg::*;
(
  input  logic [SU_PORTS-1:0]             op_free,
  input  logic [SU_PORTS-1:0][LOAD_W-1:0] op_load,
  output logic [LOAD_W-1:0]               min_load,
  output port_t                           min_port,
  output logic                            min_valid
);
  always_comb begin
    min_load  = NO_PATH;
    min_port  = '0;
    min_valid = 1'b0;
    for (int p = 0; p < SU_PORTS; p++) begin
      if (op_free[p] && op_load[p] != NO_PATH && (!min_valid || op_load[p] < min_load)) begin
        min_load  = op_load[p];
        min_port  = port_t'(p);
        min_valid = 1'b1;
      end
    end
  end
endmodule
