// Testbench for su_chip in master and slave mode (stage 0, address bits [5:4]).
// Checks: load information on unused inputs, destination-addressed connection after one
// clock with REQ' and data forwarded and ACK returned, contention for one output, load
// distribution to the lowest free output, multicast by a repeated request, ORed reverse
// data, release, two-clock arbitration, and a slave chip following the master's CA bus.
module tb_su_chip;
  import pie_net_pkg::*;
  logic clk = 0, rst = 1, armode = 0;
  su_fwd_t [3:0] ip_f, s_op_f;
  su_rev_t [3:0] ip_r, s_ip_r;
  su_fwd_t [3:0] op_f;
  su_rev_t [3:0] op_r;
  ca_t [3:0] ca, s_ca_out;
  su_fwd_t [3:0] s_ip_f;
  su_rev_t [3:0] s_op_r;
  int checks = 0, failures = 0;

  su_chip dut (.clk, .rst, .chmode(1'b1), .armode, .stage(2'd0), .ip_f, .ip_r, .op_f, .op_r,
               .ca_out(ca), .ca_in('0));
  su_chip slv (.clk, .rst, .chmode(1'b0), .armode, .stage(2'd0), .ip_f(s_ip_f), .ip_r(s_ip_r),
               .op_f(s_op_f), .op_r(s_op_r), .ca_out(s_ca_out), .ca_in(ca));

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic su_fwd_t fw(bit req, bit lreq, bit rel, bit dir, logic [7:0] d);
    return '{req: req, lreq: lreq, rel: rel, dir: dir, stb: 4'h0, d: d};
  endfunction

  initial begin
    ip_f = '0; s_ip_f = '0;
    // next stage reports loads 3,4,2,5 on outputs A..D
    for (int o = 0; o < 4; o++) op_r[o] = '{ack: 1'b0, q: 8'(o == 0 ? 3 : o == 1 ? 4 : o == 2 ? 2 : 5)};
    s_op_r = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    for (int i = 0; i < 4; i++) chk(ip_r[i].q == 8'd2, "lowest load on every unused input");
    chk(s_ip_r[0].q == 8'd0, "slave sends no load");
    // input 1 requests IU address 0x2x -> field bits[5:4] = 2 -> output C
    ip_f[1] = fw(1, 0, 0, 0, 8'h25);
    #1 chk(op_f[2].req == 0, "no REQ' before the clock");
    @(posedge clk); #1;
    chk(ca[2].en && ca[2].src == 1, "connected input B to output C in one clock");
    chk(op_f[2].req && op_f[2].d == 8'h25, "REQ' and address forwarded");
    chk(ip_r[0].q == 8'd3, "free inputs now see lowest of free outputs A,B,D");
    op_r[2].ack = 1; #1;
    chk(ip_r[1].ack, "ACK returned");
    ip_f[1].req = 0; op_r[2].ack = 0;
    // data and strobe
    ip_f[1].d = 8'hA5; ip_f[1].stb = 4'b0001; #1;
    chk(op_f[2].d == 8'hA5 && op_f[2].stb[0], "forward data and STB");
    chk(!op_f[2].req, "REQ' dropped");
    // two inputs want output A in the same cycle: one wins, the other waits
    ip_f[0] = fw(1, 0, 0, 0, 8'h00); ip_f[3] = fw(1, 0, 0, 0, 8'h01);
    @(posedge clk); #1;
    chk(ca[0].en && (ca[0].src == 0 || ca[0].src == 3), "one winner for output A");
    begin
      int loser; loser = (ca[0].src == 0) ? 3 : 0;
      chk(op_f[0].req, "winner's REQ' forwarded");
      @(posedge clk); #1;
      chk(ca[0].src != port_t'(loser), "loser waits while A is busy");
      // winner releases
      ip_f[ca[0].src] = fw(0, 0, 1, 0, 8'h00);
      #1 chk(op_f[0].rel, "REL' forwarded");
      @(posedge clk); #1;
      ip_f[0].rel = 0; ip_f[3].rel = 0; ip_f[0].req = 0; ip_f[3].req = 0;
      ip_f[loser] = fw(1, 0, 0, 0, 8'h00);
      chk(!ca[0].en, "released");
      @(posedge clk); #1;
      chk(ca[0].en && ca[0].src == port_t'(loser), "loser gets A after release");
      ip_f[loser] = fw(0, 0, 1, 0, 8'h00);
      @(posedge clk); #1;
      ip_f[loser] = '0;
    end
    // load distribution from input 0: free outputs A(3) B(4) D(5) -> A
    op_r[1].q = 8'd1;  // now B is the lowest
    ip_f[0] = fw(0, 1, 0, 0, 8'h00);
    @(posedge clk); #1;
    chk(ca[1].en && ca[1].src == 0, "LREQ took the lowest-load output B");
    chk(op_f[1].lreq, "LREQ' forwarded");
    ip_f[0].lreq = 0;
    // multicast: input 1 (holds C) repeats REQ for address 0x3x -> output D
    ip_f[1] = fw(1, 0, 0, 0, 8'h30);
    @(posedge clk); #1;
    chk(ca[3].en && ca[3].src == 1 && ca[2].en && ca[2].src == 1, "multicast B->C,D");
    chk(op_f[3].req && !op_f[2].req, "repeated REQ' only down the new branch");
    ip_f[1].req = 0; ip_f[1].d = 8'h5A; #1;
    chk(op_f[2].d == 8'h5A && op_f[3].d == 8'h5A, "multicast data");
    // reverse transfer on the multicast: ORed
    ip_f[1].dir = 1; op_r[2].q = 8'h0F; op_r[3].q = 8'hF0; #1;
    chk(ip_r[1].q == 8'hFF && op_f[2].dir && op_f[2].d == 0, "reverse data ORed");
    // slave follows the CA bus
    s_ip_f[1] = '{req: 0, lreq: 0, rel: 0, dir: 0, stb: 4'b1010, d: 8'h77};
    s_op_r[0].q = 8'h99; s_ip_f[0].dir = 1; #1;
    chk(s_op_f[2].d == 8'h77 && s_op_f[3].d == 8'h77 && s_op_f[2].stb == 4'b1010, "slave forward");
    chk(s_ip_r[0].q == 8'h00, "slave input 0 follows map (to B) reverse");
    s_op_r[1].q = 8'h44; #1;
    chk(s_ip_r[0].q == 8'h44, "slave reverse data");
    chk(!s_op_f[2].req && s_ca_out == '0, "slave drives no REQ' and no CA");
    // release everything
    ip_f[1] = fw(0, 0, 1, 0, 0); ip_f[0] = fw(0, 0, 1, 0, 0);
    @(posedge clk); #1;
    ip_f = '0;
    chk(!ca[0].en && !ca[1].en && !ca[2].en && !ca[3].en, "all released");
    // two-clock arbitration
    armode = 1;
    ip_f[2] = fw(1, 0, 0, 0, 8'h10);
    @(posedge clk); #1;
    chk(!ca[1].en, "two-clock: not after one clock");
    @(posedge clk); #1;
    chk(ca[1].en && ca[1].src == 2, "two-clock: after two clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
