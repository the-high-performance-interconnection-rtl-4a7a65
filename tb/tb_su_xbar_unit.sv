// Testbench for su_xbar_unit (one master, three slaves, stage 0): all 32 data bits, 13 STB
// lines and 4 ACK lines follow the master's connection; load information only on bits
// [7:0] of unused inputs; reverse 32-bit transfer; load distribution; release.
module tb_su_xbar_unit;
  import pie_net_pkg::*;
  logic clk = 0, rst = 1, armode = 0;
  net_fwd_t [3:0] ip_f, op_f;
  net_rev_t [3:0] ip_r, op_r;
  int checks = 0, failures = 0;

  su_xbar_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    ip_f = '0;
    for (int o = 0; o < 4; o++) op_r[o] = '{ack: 4'h0, q: {24'hABCDEF, 8'(20 + 3 * o)}};
    op_r[3].q[7:0] = 8'd9;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    chk(ip_r[0].q == 32'd9, "unused input: lowest load on [7:0], zero above");
    // input 2 -> address 0x1x -> output 1
    ip_f[2].req = 1; ip_f[2].d = 32'h0000_0017;
    @(posedge clk); #1;
    chk(op_f[1].req && op_f[1].d == 32'h17, "REQ' and address on output 1");
    chk(ip_r[0].q == 32'd9, "lowest load still 9 (output D free)");
    op_r[1].ack = 4'b1111; #1;
    chk(ip_r[2].ack == 4'b1111, "four ACK lines returned");
    ip_f[2].req = 0; op_r[1].ack = 4'b1010;
    ip_f[2].d = 32'hCAFE_F00D; ip_f[2].stb = 13'h1ABC; #1;
    chk(op_f[1].d == 32'hCAFE_F00D, "32-bit forward data");
    chk(op_f[1].stb == 13'h1ABC, "13 STB lines");
    chk(ip_r[2].ack == 4'b1010, "ACK lines per chip");
    chk(op_f[0].d == 0 && op_f[0].stb == 0, "other outputs idle");
    ip_f[2].dir = 1; op_r[1].q = 32'hDEAD_BEEF; #1;
    chk(ip_r[2].q == 32'hDEAD_BEEF && op_f[1].dir && op_f[1].d == 0, "32-bit reverse data");
    // load distribution from input 0 -> output D (load 9)
    ip_f[0].lreq = 1;
    @(posedge clk); #1;
    chk(op_f[3].lreq, "LREQ' on lowest-load output D");
    ip_f[0].lreq = 0;
    // release input 2
    ip_f[2] = '0; ip_f[2].rel = 1; #1;
    chk(op_f[1].rel, "REL' forwarded");
    @(posedge clk); #1;
    ip_f[2].rel = 0;
    chk(ip_r[2].q[7:0] == 8'd20 && ip_r[2].q[31:8] == 0, "released input shows lowest free load (A=20)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
