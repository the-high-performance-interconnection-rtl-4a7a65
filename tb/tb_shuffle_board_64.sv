// Testbench for shuffle_board_64: IU n with address field j (bits [5:4]) must leave the
// board on line 16j + n/4 after one clock; requests from all 64 IUs to a random board each
// are served with the right data and waiting where two IUs of one unit want the same
// board; load values from the boards come back as the lowest per unit.
module tb_shuffle_board_64;
  import pie_net_pkg::*;
  logic clk = 0, rst = 1, armode = 0;
  net_fwd_t [63:0] in_f, out_f;
  net_rev_t [63:0] in_r, out_r;
  int checks = 0, failures = 0;
  int board [64];
  bit served [64];

  shuffle_board_64 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    int left, waited;
    in_f = '0;
    for (int l = 0; l < 64; l++) out_r[l] = '{ack: '0, q: 32'(50 + (l * 37) % 64)};
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    for (int n = 0; n < 64; n++) begin
      int e; e = 255;
      for (int j = 0; j < 4; j++) if (50 + ((16 * j + n / 4) * 37) % 64 < e) e = 50 + ((16 * j + n / 4) * 37) % 64;
      chk(in_r[n].q == 32'(e), $sformatf("load at IU %0d", n));
    end
    for (int n = 0; n < 64; n++) begin
      board[n] = $urandom % 4;
      served[n] = 0;
      in_f[n].req = 1; in_f[n].d = {8'(n), 18'h0, 2'(board[n]), 4'(n)};
    end
    left = 64; waited = 0;
    for (int c = 0; c < 40 && left > 0; c++) begin
      @(posedge clk); #1;
      for (int n = 0; n < 64; n++) if (!served[n]) begin
        int l; l = 16 * board[n] + n / 4;
        if (out_f[l].req && out_f[l].d[31:24] == 8'(n)) begin
          served[n] = 1; left--;
          if (c > 0) waited++;
          chk(out_f[l].d == in_f[n].d, "address/data on the right line");
          in_f[n].req = 0; in_f[n].rel = 1;   // release at the next edge
        end
      end
      @(posedge clk); #1;
      for (int n = 0; n < 64; n++) in_f[n].rel = 0;
    end
    chk(left == 0, $sformatf("all requests served (%0d left)", left));
    chk(waited > 0, "some requests waited for a busy line");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
