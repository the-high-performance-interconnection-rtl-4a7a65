// Local memory (LMEM) of one inference unit with its pipeline-arbitrated buses.
//
// N_MASTER processor ports share N_BANK interleaved banks over N_BUS synchronous buses.
// The pipeline has two stages:
//   stage 1 (the clock in which a request is presented): bus and bank arbitration by
//           lmem_arbiter; gnt[m] tells the master its request was taken;
//   stage 2 (next clock): the granted requests access their banks, one per bus.
// Read data is returned with rvalid[m] in the clock after that, i.e. two clocks after the
// request was granted. A master may present a new request every clock. At a 10 MHz clock
// this is the request-every-100-ns, result-after-200-ns behaviour of the document.
// Banks are word-wide arrays; bank = addr[log2(N_BANK)-1:0], row = the remaining bits.
// Bank size and word width are not given in the document: BANK_WORDS and DW are assumed.
// Reset clears the pipeline; memory contents are not reset.
module lmem_unit #(
  parameter int unsigned N_MASTER   = 4,
  parameter int unsigned N_BUS      = 3,
  parameter int unsigned N_BANK     = 4,
  parameter int unsigned BANK_WORDS = 256,
  parameter int unsigned DW         = 32,
  localparam int unsigned BW = $clog2(N_BANK),
  localparam int unsigned RW = $clog2(BANK_WORDS),
  localparam int unsigned AW = BW + RW
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic [N_MASTER-1:0]           req,
  input  logic [N_MASTER-1:0]           we,
  input  logic [N_MASTER-1:0][AW-1:0]   addr,
  input  logic [N_MASTER-1:0][DW-1:0]   wdata,
  output logic [N_MASTER-1:0]           gnt,
  output logic [N_MASTER-1:0]           rvalid,
  output logic [N_MASTER-1:0][DW-1:0]   rdata
);
  typedef struct packed {
    logic                    valid;
    logic                    we;
    logic [$clog2(N_MASTER)-1:0] master;
    logic [BW-1:0]           bank;
    logic [RW-1:0]           row;
    logic [DW-1:0]           wdata;
  } bus_op_t;

  logic [N_MASTER-1:0][BW-1:0]              bank;
  logic [N_MASTER-1:0][$clog2(N_BUS)-1:0]   bus;
  bus_op_t [N_BUS-1:0]                      op_d, op_q;
  logic [DW-1:0]                            mem [N_BANK][BANK_WORDS];

  always_comb
    for (int m = 0; m < N_MASTER; m++) bank[m] = addr[m][BW-1:0];

  lmem_arbiter #(.N_MASTER(N_MASTER), .N_BUS(N_BUS), .N_BANK(N_BANK)) u_arb (
    .clk(clk), .rst(rst), .req(req), .bank(bank), .gnt(gnt), .bus(bus)
  );

  // Put each granted request on its bus.
  always_comb begin
    op_d = '0;
    for (int m = 0; m < N_MASTER; m++)
      if (gnt[m])
        op_d[bus[m]] = '{valid: 1'b1, we: we[m], master: ($clog2(N_MASTER))'(m),
                         bank: bank[m], row: addr[m][AW-1:BW], wdata: wdata[m]};
  end

  // Stage 1 -> 2 register.
  always_ff @(posedge clk) begin
    if (rst) op_q <= '0;
    else     op_q <= op_d;
  end

  // Stage 2: bank access, one per bus (banks differ by construction).
  always_ff @(posedge clk) begin
    for (int b = 0; b < N_BUS; b++)
      if (op_q[b].valid && op_q[b].we) mem[op_q[b].bank][op_q[b].row] <= op_q[b].wdata;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rvalid <= '0;
      rdata  <= '0;
    end else begin
      rvalid <= '0;
      for (int b = 0; b < N_BUS; b++)
        if (op_q[b].valid && !op_q[b].we) begin
          rvalid[op_q[b].master] <= 1'b1;
          rdata[op_q[b].master]  <= mem[op_q[b].bank][op_q[b].row];
        end
    end
  end
endmodule
