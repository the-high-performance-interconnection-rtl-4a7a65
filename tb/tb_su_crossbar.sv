// Testbench for su_crossbar: random connection maps (with multicast), directions and data.
// Reference: forward copy on DIR=0, ORed reverse data on DIR=1, load value on inputs that
// hold no connection, zero on idle outputs.
module tb_su_crossbar;
  import pie_net_pkg::*;
  ca_t [3:0] map;
  logic [3:0] ip_dir;
  logic [3:0][7:0] ip_d, op_q, op_d, ip_q;
  logic [7:0] load_out;
  int checks = 0, failures = 0;

  su_crossbar dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      for (int o = 0; o < 4; o++) map[o] = ca_t'($urandom);
      ip_dir = 4'($urandom); ip_d = 32'($urandom); op_q = 32'($urandom); load_out = 8'($urandom);
      #1;
      for (int o = 0; o < 4; o++) begin
        logic [7:0] e;
        e = (map[o].en && !ip_dir[map[o].src]) ? ip_d[map[o].src] : 8'h00;
        checks++;
        if (op_d[o] !== e) begin failures++; $display("op_d[%0d] %h exp %h", o, op_d[o], e); end
      end
      for (int i = 0; i < 4; i++) begin
        logic [7:0] e; bit used;
        e = 0; used = 0;
        for (int o = 0; o < 4; o++) if (map[o].en && map[o].src == i) begin
          used = 1; if (ip_dir[i]) e |= op_q[o];
        end
        if (!used) e = load_out;
        checks++;
        if (ip_q[i] !== e) begin failures++; $display("ip_q[%0d] %h exp %h", i, ip_q[i], e); end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
