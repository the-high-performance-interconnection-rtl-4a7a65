// Testbench for lmem_unit at its default size: random traffic from the four processor
// ports through lmem_traffic_model (reference memory, read data two clocks after grant),
// plus a directed check that four requests to four different banks in one clock get three
// grants (three buses) and the fourth the clock after.
module tb_lmem_unit;
  localparam int unsigned AW = 10, DW = 32;
  logic clk = 0, rst = 1, enable = 0;
  logic [3:0] req, we, gnt, rvalid, m_req, m_we;
  logic [3:0][AW-1:0] addr, m_addr;
  logic [3:0][DW-1:0] wdata, rdata, m_wdata;
  logic directed = 1;
  logic [3:0] d_req = '0, d_we = '0;
  logic [3:0][AW-1:0] d_addr = '0;
  int checks = 0, failures = 0;
  int m_checks, m_failures, n_reads, n_bank_stall, n_bus_stall;

  lmem_unit dut (.clk, .rst, .req, .we, .addr, .wdata, .gnt, .rvalid, .rdata);
  lmem_traffic_model #(.AW(AW), .DW(DW)) tm (.clk, .rst, .enable, .req(m_req), .we(m_we),
    .addr(m_addr), .wdata(m_wdata), .gnt, .rvalid(directed ? '0 : rvalid), .rdata,
    .checks(m_checks), .failures(m_failures), .n_reads, .n_bank_stall, .n_bus_stall);

  assign req   = directed ? d_req : m_req;
  assign we    = directed ? d_we : m_we;
  assign addr  = directed ? d_addr : m_addr;
  assign wdata = directed ? {4{32'h1234_5678}} : m_wdata;

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    // four writes to banks 0..3 at once
    d_req = 4'b1111; d_we = 4'b1111;
    for (int m = 0; m < 4; m++) d_addr[m] = AW'(4 * m + m);   // bank m, row m
    #1 chk($countones(gnt) == 3, "three buses: three grants");
    @(posedge clk); #1;
    d_req = d_req & ~gnt;
    #1 chk(gnt == d_req && $countones(gnt) == 1, "fourth granted one clock later");
    @(posedge clk); #1;
    // two reads to the same bank: one waits; data two clocks after grant
    d_req = 4'b0011; d_we = 4'b0000; d_addr[0] = AW'(0); d_addr[1] = AW'(8);   // both bank 0
    #1 chk($countones(gnt) == 1, "bank conflict: one grant");
    @(posedge clk); #1;
    chk(rvalid == 0, "no data one clock after grant");
    d_req = d_req & ~gnt;
    @(posedge clk); #1;
    chk($countones(rvalid) == 1 && (rvalid[0] ? rdata[0] == 32'h1234_5678 : 1'b1),
        "first read data two clocks after grant");
    d_req = '0;
    repeat (3) @(posedge clk);
    directed = 0; enable = 1;
    repeat (3000) @(posedge clk);
    enable = 0;
    repeat (5) @(posedge clk);
    checks += m_checks; failures += m_failures;
    $display("random traffic: reads=%0d bank stalls=%0d bus stalls=%0d", n_reads, n_bank_stall, n_bus_stall);
    chk(n_reads > 100, "reads happened");
    chk(n_bank_stall > 0, "bank conflicts happened");
    chk(n_bus_stall > 0, "bus-limit stalls happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
