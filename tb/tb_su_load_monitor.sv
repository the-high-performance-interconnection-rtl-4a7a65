// Testbench for su_load_monitor: random free masks and loads (some NO_PATH), compared with
// a reference that scans the ports from the top down and keeps the lowest, ties to the
// lower port.
module tb_su_load_monitor;
  import pie_net_pkg::*;
  logic [3:0] op_free;
  logic [3:0][7:0] op_load;
  logic [7:0] min_load;
  port_t min_port;
  logic min_valid;
  int checks = 0, failures = 0;

  su_load_monitor dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [7:0] rl; int rp; logic rv;
      op_free = 4'($urandom);
      for (int p = 0; p < 4; p++) begin
        op_load[p] = ($urandom % 6 == 0) ? 8'hFF : 8'($urandom % 8);
      end
      #1;
      rl = 8'hFF; rp = 0; rv = 0;
      for (int p = 3; p >= 0; p--)
        if (op_free[p] && op_load[p] != 8'hFF && op_load[p] <= rl) begin
          rl = op_load[p]; rp = p; rv = 1;
        end
      checks++;
      if (min_valid !== rv || (rv && (min_load !== rl || min_port !== port_t'(rp))) || (!rv && min_load !== 8'hFF)) begin
        failures++;
        if (failures < 5) $display("mismatch free=%b load=%h got %0d/%0d/%h exp %0d/%0d/%h",
                                   op_free, op_load, min_valid, min_port, min_load, rv, rp, rl);
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
