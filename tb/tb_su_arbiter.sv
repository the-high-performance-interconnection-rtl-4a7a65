// Testbench for su_arbiter: ring-counter fairness among four inputs contending for one
// output, release of every output an input holds, independent grants to different outputs
// in one cycle, and the one-clock / two-clock grant timing of ARMODE.
module tb_su_arbiter;
  import pie_net_pkg::*;
  logic clk = 0, rst = 1, armode = 0;
  logic [3:0][3:0] rq = '0;
  logic [3:0] rel = '0;
  ca_t [3:0] map;
  int checks = 0, failures = 0;

  su_arbiter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_map(int o, bit en, int src, string what);
    checks++;
    if (map[o].en !== en || (en && map[o].src !== port_t'(src))) begin
      failures++;
      $display("%s: map[%0d] = %b/%0d, expected %b/%0d", what, o, map[o].en, map[o].src, en, src);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int o = 0; o < 4; o++) expect_map(o, 0, 0, "after reset");
    // All four inputs want output 0: grants must go 0,1,2,3 as each releases.
    rq[0] <= 4'b1111;
    @(posedge clk); #1;
    expect_map(0, 1, 0, "first grant, one clock");
    for (int k = 1; k < 4; k++) begin
      rel <= 4'(1 << (k - 1));
      rq[0] <= rq[0] & ~4'(1 << (k - 1));
      @(posedge clk); #1;
      expect_map(0, 0, 0, "released");
      rel <= 0;
      @(posedge clk); #1;
      expect_map(0, 1, k, "ring order");
    end
    // Input 0 asks again together with input 3 (still connected): ring now at 0 -> 0 waits
    // for 3; after release 0 wins.
    rel <= 4'b1000; rq[0] <= 4'b0001;
    @(posedge clk); #1; rel <= 0;
    expect_map(0, 0, 0, "released 3");
    @(posedge clk); #1;
    expect_map(0, 1, 0, "input 0 again");
    // Input 0 also takes output 2 and 3 in the same cycle as input 1 takes output 1.
    rq[0] <= 0; rq[2] <= 4'b0001; rq[3] <= 4'b0001; rq[1] <= 4'b0010;
    @(posedge clk); #1;
    rq <= '0;
    expect_map(2, 1, 0, "parallel grant o2");
    expect_map(3, 1, 0, "parallel grant o3");
    expect_map(1, 1, 1, "parallel grant o1");
    // One REL from input 0 frees outputs 0, 2 and 3 but not 1.
    rel <= 4'b0001;
    @(posedge clk); #1; rel <= 0;
    expect_map(0, 0, 0, "rel o0"); expect_map(2, 0, 0, "rel o2"); expect_map(3, 0, 0, "rel o3");
    expect_map(1, 1, 1, "o1 kept");
    // Output 1 has been granted once, so its ring now points at input 1: when inputs 0 and
    // 1 both ask for it, input 1 wins, and on the next contest input 2 (ring at 2) beats 0.
    rel <= 4'b0010; rq[1] <= 4'b0011;
    @(posedge clk); #1; rel <= 0;
    expect_map(1, 0, 0, "o1 released");
    @(posedge clk); #1;
    expect_map(1, 1, 1, "ring at input 1");
    rel <= 4'b0010; rq[1] <= 4'b0101;
    @(posedge clk); #1; rel <= 0;
    @(posedge clk); #1;
    expect_map(1, 1, 2, "ring at input 2");
    rq[1] <= 0; rel <= 4'b0100;
    @(posedge clk); #1; rel <= 0;
    // Two-clock arbitration: grant only on the second edge.
    armode <= 1;
    rq[2] <= 4'b0100;
    @(posedge clk); #1;
    expect_map(2, 0, 0, "two-clock: not yet");
    @(posedge clk); #1;
    expect_map(2, 1, 2, "two-clock: granted");
    // A request withdrawn after one clock is not granted in two-clock mode.
    rq[2] <= 0; rq[3] <= 4'b1000;
    @(posedge clk); #1; rq[3] <= 0;
    @(posedge clk); #1;
    expect_map(3, 0, 0, "two-clock: withdrawn");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
