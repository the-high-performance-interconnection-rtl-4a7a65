// Testbench for su_comm_ctrl: random connections and control lines in both modes, against
// a reference of the forwarding rules (REQ'/LREQ' only on the routed branch, REL'/DIR'/STB'
// on all held outputs, ACK ORed, no REQ/LREQ/REL in slave mode).
module tb_su_comm_ctrl;
  import pie_net_pkg::*;
  logic master;
  ca_t [3:0] map;
  port_t [3:0] tgt;
  logic [3:0] ip_req, ip_lreq, ip_rel, ip_dir, op_ack;
  logic [3:0][3:0] ip_stb, op_stb;
  logic [3:0] op_req, op_lreq, op_rel, op_dir, ip_ack;
  int checks = 0, failures = 0;

  su_comm_ctrl dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [3:0] e_req, e_lreq, e_rel, e_dir, e_ack; logic [3:0][3:0] e_stb;
      master = 1'($urandom);
      for (int o = 0; o < 4; o++) begin map[o] = ca_t'($urandom); tgt[o] = 2'($urandom); end
      ip_req = 4'($urandom); ip_lreq = 4'($urandom); ip_rel = 4'($urandom); ip_dir = 4'($urandom);
      op_ack = 4'($urandom); ip_stb = 16'($urandom);
      #1;
      e_ack = 0;
      for (int o = 0; o < 4; o++) begin
        int s; s = map[o].src;
        e_req[o]  = master & map[o].en & ip_req[s] & (tgt[s] == o);
        e_lreq[o] = master & map[o].en & ip_lreq[s] & (tgt[s] == o);
        e_rel[o]  = master & map[o].en & ip_rel[s];
        e_dir[o]  = map[o].en & ip_dir[s];
        e_stb[o]  = map[o].en ? ip_stb[s] : 4'h0;
        if (map[o].en && op_ack[o]) e_ack[s] = 1;
      end
      checks++;
      if ({op_req, op_lreq, op_rel, op_dir, op_stb, ip_ack} !== {e_req, e_lreq, e_rel, e_dir, e_stb, e_ack}) begin
        failures++;
        if (failures < 5) $display("mismatch n=%0d", n);
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
