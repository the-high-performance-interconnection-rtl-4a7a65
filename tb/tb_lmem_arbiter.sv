// Testbench for lmem_arbiter: random request sets against a reference round-robin model
// (one grant per bank, at most three grants, pointer one past the first grant).
module tb_lmem_arbiter;
  logic clk = 0, rst = 1;
  logic [3:0] req, gnt;
  logic [3:0][1:0] bank, bus;
  int checks = 0, failures = 0;
  int ptr = 0;

  lmem_arbiter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0; bank = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 2000; n++) begin
      logic [3:0] eg; int used, first; logic [3:0] busy; bit ok;
      @(negedge clk);
      req = 4'($urandom); bank = 8'($urandom);
      #1;
      eg = '0; used = 0; busy = '0; first = -1;
      for (int k = 0; k < 4; k++) begin
        int m; m = (ptr + k) % 4;
        if (req[m] && !busy[bank[m]] && used < 3) begin
          eg[m] = 1; busy[bank[m]] = 1; used++;
          if (first < 0) first = m;
        end
      end
      ok = (gnt == eg);
      for (int a = 0; a < 4; a++)
        for (int b = a + 1; b < 4; b++)
          if (gnt[a] && gnt[b] && bus[a] == bus[b]) ok = 0;
      for (int a = 0; a < 4; a++) if (gnt[a] && bus[a] > 2) ok = 0;
      checks++;
      if (!ok) begin
        failures++;
        if (failures < 5) $display("req %b bank %h: gnt %b exp %b", req, bank, gnt, eg);
      end
      if (first >= 0) ptr = (first + 1) % 4;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
