// PIE64 hardware below the processors: the two interconnection networks and the local
// memory system of each of the 64 inference units (IUs).
//
// pie64_network joins the IUs through PAN and DAAN. Each IU also has an lmem_unit: its
// local memory banks, shared by the IU's four processor ports (UNIRED, PAN NIP, DAAN NIP,
// SPARC) over three pipeline-arbitrated buses. The processors and network interface
// processors themselves are not part of this design, so the network ports and the memory
// ports of every IU are brought out as ports: lm_*[n][m] is processor port m of IU n
// (0 UNIRED, 1 PAN NIP, 2 DAAN NIP, 3 SPARC). All parts share one clock and reset.
module pie64_system
  import pie_net_pkg::*;
#(
  parameter int unsigned N_IU       = 64,
  parameter int unsigned BANK_WORDS = 256,
  localparam int unsigned LM_AW     = 2 + $clog2(BANK_WORDS),
  localparam int unsigned LM_DW     = 32
) (
  input  logic                              clk,
  input  logic                              rst,
  input  logic                              armode,
  input  net_fwd_t [63:0]                   pan_src_f,
  output net_rev_t [63:0]                   pan_src_r,
  output net_fwd_t [63:0]                   pan_dst_f,
  input  net_rev_t [63:0]                   pan_dst_r,
  input  net_fwd_t [63:0]                   daan_src_f,
  output net_rev_t [63:0]                   daan_src_r,
  output net_fwd_t [63:0]                   daan_dst_f,
  input  net_rev_t [63:0]                   daan_dst_r,
  input  logic [N_IU-1:0][3:0]              lm_req,
  input  logic [N_IU-1:0][3:0]              lm_we,
  input  logic [N_IU-1:0][3:0][LM_AW-1:0]   lm_addr,
  input  logic [N_IU-1:0][3:0][LM_DW-1:0]   lm_wdata,
  output logic [N_IU-1:0][3:0]              lm_gnt,
  output logic [N_IU-1:0][3:0]              lm_rvalid,
  output logic [N_IU-1:0][3:0][LM_DW-1:0]   lm_rdata
);
  pie64_network u_net (
    .clk(clk), .rst(rst), .armode(armode),
    .pan_src_f(pan_src_f), .pan_src_r(pan_src_r), .pan_dst_f(pan_dst_f), .pan_dst_r(pan_dst_r),
    .daan_src_f(daan_src_f), .daan_src_r(daan_src_r), .daan_dst_f(daan_dst_f),
    .daan_dst_r(daan_dst_r)
  );

  for (genvar n = 0; n < N_IU; n++) begin : g_iu
    lmem_unit #(.N_MASTER(4), .N_BUS(3), .N_BANK(4), .BANK_WORDS(BANK_WORDS), .DW(LM_DW)) u_lmem (
      .clk(clk), .rst(rst), .req(lm_req[n]), .we(lm_we[n]), .addr(lm_addr[n]),
      .wdata(lm_wdata[n]), .gnt(lm_gnt[n]), .rvalid(lm_rvalid[n]), .rdata(lm_rdata[n])
    );
  end
endmodule
