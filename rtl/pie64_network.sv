// The interconnection system of the PIE64 parallel inference machine.
//
// 64 inference units (IUs) are joined by two independent 64x64 three-stage networks with
// automatic load balancing: PAN, the process allocation network, and DAAN, the data
// allocation/accessing network. Each IU has, on each network, a source-side port (it opens
// circuits and sends) and a destination-side port (it receives circuits and reports its
// load). The two networks share the clock, reset and the arbitration mode.
// Each port is 32 data lines wide; at one word per 10 MHz clock this gives 40 MB/s per port
// and about 5 GB/s over all 128 ports, the figures the document gives.
module pie64_network
  import pie_net_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            armode,
  input  net_fwd_t [63:0] pan_src_f,
  output net_rev_t [63:0] pan_src_r,
  output net_fwd_t [63:0] pan_dst_f,
  input  net_rev_t [63:0] pan_dst_r,
  input  net_fwd_t [63:0] daan_src_f,
  output net_rev_t [63:0] daan_src_r,
  output net_fwd_t [63:0] daan_dst_f,
  input  net_rev_t [63:0] daan_dst_r
);
  network_64x64 u_pan (
    .clk(clk), .rst(rst), .armode(armode),
    .src_f(pan_src_f), .src_r(pan_src_r), .dst_f(pan_dst_f), .dst_r(pan_dst_r)
  );

  network_64x64 u_daan (
    .clk(clk), .rst(rst), .armode(armode),
    .src_f(daan_src_f), .src_r(daan_src_r), .dst_f(daan_dst_f), .dst_r(daan_dst_r)
  );
endmodule
