// Testbench for su_router: random requests, addresses, stages and connection maps,
// compared with a reference model of the routing rules (address field 2-stage, LREQ to the
// lowest free port only for an input with no connection, REL masks requests).
module tb_su_router;
  import pie_net_pkg::*;
  logic [1:0] stage;
  logic [3:0] req, lreq, rel;
  logic [3:0][7:0] addr;
  ca_t [3:0] map;
  port_t min_port;
  logic min_valid;
  logic [3:0][3:0] rq;
  port_t [3:0] tgt;
  int checks = 0, failures = 0;

  su_router dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [3:0][3:0] erq;
      stage = 2'($urandom); req = 4'($urandom); lreq = 4'($urandom);
      rel = ($urandom % 4 == 0) ? 4'($urandom) : 4'b0;
      addr = 32'($urandom);
      for (int o = 0; o < 4; o++) map[o] = ca_t'($urandom);
      min_port = 2'($urandom); min_valid = 1'($urandom);
      #1;
      erq = '0;
      for (int i = 0; i < 4; i++) begin
        int sh, d; bit own_d, own_any;
        sh = (stage == 0) ? 4 : (stage == 1) ? 2 : (stage == 2) ? 0 : 6;
        d = (addr[i] >> sh) & 3;
        own_d = map[d].en && map[d].src == i;
        own_any = 0;
        for (int o = 0; o < 4; o++) if (map[o].en && map[o].src == i) own_any = 1;
        if (!rel[i] && req[i] && !own_d) erq[d][i] = 1;
        if (!rel[i] && !req[i] && lreq[i] && !own_any && min_valid) erq[min_port][i] = 1;
        checks++;
        if (req[i] && !lreq[i] && tgt[i] !== port_t'(d)) begin
          failures++; $display("tgt mismatch i=%0d", i);
        end
      end
      checks++;
      if (rq !== erq) begin
        failures++;
        if (failures < 5) $display("rq mismatch got %h exp %h stage=%0d", rq, erq, stage);
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
