// Random traffic source and checker for one lmem_unit, used by testbenches.
//
// Each of the N_MASTER ports presents a request in most clocks (reads and writes to a
// small address range, so that bank conflicts and read-after-write are common) and holds
// it until gnt. A reference memory is updated in grant order; each granted read must
// return exactly two clocks after its grant with the reference data. Counts checks,
// failures, bank-conflict stalls and bus-limit stalls (four requests to four different
// banks, one of which must wait for lack of a bus).
module lmem_traffic_model #(
  parameter int unsigned N_MASTER = 4,
  parameter int unsigned N_BUS    = 3,
  parameter int unsigned N_BANK   = 4,
  parameter int unsigned AW       = 10,
  parameter int unsigned DW       = 32,
  parameter int unsigned SPAN     = 16
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          enable,
  output logic [N_MASTER-1:0]           req,
  output logic [N_MASTER-1:0]           we,
  output logic [N_MASTER-1:0][AW-1:0]   addr,
  output logic [N_MASTER-1:0][DW-1:0]   wdata,
  input  logic [N_MASTER-1:0]           gnt,
  input  logic [N_MASTER-1:0]           rvalid,
  input  logic [N_MASTER-1:0][DW-1:0]   rdata,
  output int                            checks,
  output int                            failures,
  output int                            n_reads,
  output int                            n_bank_stall,
  output int                            n_bus_stall
);
  logic [DW-1:0] ref_mem [SPAN];
  logic [SPAN-1:0] written;
  // expected read data per master, one and two clocks ahead
  logic [N_MASTER-1:0]         exp1_v, exp2_v;
  logic [N_MASTER-1:0][DW-1:0] exp1_d, exp2_d;

  always_ff @(posedge clk) begin
    if (rst) begin
      req <= '0; we <= '0; addr <= '0; wdata <= '0; written <= '0;
      exp1_v <= '0; exp2_v <= '0;
      checks <= 0; failures <= 0; n_reads <= 0; n_bank_stall <= 0; n_bus_stall <= 0;
    end else begin
      int c, f, r, bks, bus_s;
      logic [N_BANK-1:0] banks_req;
      logic [SPAN-1:0] wr;
      c = 0; f = 0; r = 0; bks = 0; bus_s = 0;
      wr = written;
      // results due now
      for (int m = 0; m < N_MASTER; m++) begin
        if (exp2_v[m] || rvalid[m]) begin
          c++;
          if (!(exp2_v[m] && rvalid[m] && rdata[m] == exp2_d[m])) begin
            f++;
            $display("LMEM master %0d: rvalid %0d data %h, expected %0d %h",
                     m, rvalid[m], rdata[m], exp2_v[m], exp2_d[m]);
          end
        end
      end
      exp2_v <= exp1_v; exp2_d <= exp1_d;
      exp1_v <= '0;
      // stall accounting
      banks_req = '0;
      for (int m = 0; m < N_MASTER; m++)
        if (req[m]) banks_req[addr[m][$clog2(N_BANK)-1:0]] = 1'b1;
      for (int m = 0; m < N_MASTER; m++)
        if (req[m] && !gnt[m]) begin
          if ($countones(req) > N_BUS && $countones(banks_req) > N_BUS) bus_s++;
          else bks++;
        end
      // grants this clock, in any order: they touch different banks
      for (int m = 0; m < N_MASTER; m++) begin
        if (req[m] && gnt[m]) begin
          int a; a = int'(addr[m]) % SPAN;
          if (we[m]) begin
            ref_mem[a] <= wdata[m];
            wr[a] = 1'b1;
          end else begin
            exp1_v[m] <= 1'b1; exp1_d[m] <= ref_mem[a];
            r++;
          end
        end
      end
      written <= wr;
      // next requests
      for (int m = 0; m < N_MASTER; m++) begin
        if (!req[m] || gnt[m]) begin
          int a; a = $urandom % SPAN;
          req[m]   <= enable && ($urandom % 4 != 0);
          we[m]    <= !wr[a] || ($urandom % 2 == 0);
          addr[m]  <= AW'(a);
          wdata[m] <= DW'($urandom);
        end
      end
      checks <= checks + c; failures <= failures + f; n_reads <= n_reads + r;
      n_bank_stall <= n_bank_stall + bks; n_bus_stall <= n_bus_stall + bus_s;
    end
  end
endmodule
