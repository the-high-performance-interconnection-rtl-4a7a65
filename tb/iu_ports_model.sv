// Behavioural model of the network side of N inference units, for testbenches.
//
// Stands in for the network interface processors, which the design does not include.
// Source side, per IU s, started by a one-clock pulse on go[s] with a job:
//   kind 0: destination-addressed circuit to dst (REQ, address on data lines [7:0]);
//   kind 1: load-distribution circuit (LREQ); after it is through, one clock of reverse
//           transfer (DIR = 1) reads the number of the IU that was reached;
//   kind 2: multicast: REQ to dst, then a repeated REQ to dst2 on the same circuit.
// It then sends len words, one per clock with STB line 0 (synchronous transfer), and
// releases the circuit with REL. lat[s] is the number of clocks from raising the request
// to seeing ACK (the last ACK for a multicast), lseen[s] the load that the network showed
// on the idle source port just before the request, reached[s] the IU read back.
// Destination side, per IU n: ACK (all four lines) follows REQ/LREQ; while its port is
// idle it shows load[n] on reverse data [7:0]; while a circuit is open and DIR = 1 it
// returns its own number on reverse data [31:24]. Every received word is checked against
// the address it carries; errors counts mismatches.
module iu_ports_model
  import pie_net_pkg::*;
#(
  parameter int N = 64
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [N-1:0]        go,
  input  logic [N-1:0][1:0]   kind,
  input  logic [N-1:0][7:0]   dst,
  input  logic [N-1:0][7:0]   dst2,
  input  int                  len,
  input  logic [N-1:0][7:0]   load,
  output net_fwd_t [N-1:0]    src_f,
  input  net_rev_t [N-1:0]    src_r,
  input  net_fwd_t [N-1:0]    dst_f,
  output net_rev_t [N-1:0]    dst_r,
  output logic [N-1:0]        done,
  output int                  lat     [N],
  output logic [N-1:0][7:0]   lseen,
  output logic [N-1:0][7:0]   reached,
  output int                  errors,
  output int                  words_rx,
  output int                  n_rev
);
  typedef enum logic [2:0] {S_IDLE, S_REQ, S_GAP, S_REQ2, S_REV, S_DATA, S_REL, S_DONE} st_t;
  st_t st [N];
  logic [N-1:0][1:0] k_q;
  logic [N-1:0][7:0] t_q, t2_q;
  int cnt [N];
  logic [N-1:0] busy;

  always_comb begin
    for (int n = 0; n < N; n++) begin
      dst_r[n].ack = {NET_ACKW{dst_f[n].req | dst_f[n].lreq}};
      if (!busy[n] && !dst_f[n].req && !dst_f[n].lreq) dst_r[n].q = NET_DW'(load[n]);
      else if (dst_f[n].dir)                            dst_r[n].q = {8'(n), 24'h0};
      else                                              dst_r[n].q = '0;
    end
  end

  // destination side
  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= '0; words_rx <= 0; errors <= 0; n_rev <= 0;
    end else begin
      int add;
      add = 0;
      for (int n = 0; n < N; n++) begin
        if (dst_f[n].req || dst_f[n].lreq) busy[n] <= 1'b1;
        if (dst_f[n].rel) busy[n] <= 1'b0;
        if (busy[n] && dst_f[n].stb[0] && !dst_f[n].dir) begin
          add++;
          if (!(dst_f[n].d[23:16] == 8'(n) || dst_f[n].d[23:16] == 8'hFE) ||
              dst_f[n].stb[12:1] != dst_f[n].d[11:0]) begin
            errors <= errors + 1;
            $display("IU %0d got word %h stb %h", n, dst_f[n].d, dst_f[n].stb);
          end
        end
      end
      words_rx <= words_rx + add;
    end
  end

  // source side
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int s = 0; s < N; s++) begin
        st[s] <= S_IDLE; src_f[s] <= '0; done[s] <= 1'b0; lat[s] <= 0; cnt[s] <= 0;
      end
    end else begin
      for (int s = 0; s < N; s++) begin
        case (st[s])
          S_IDLE: if (go[s]) begin
            k_q[s] <= kind[s]; t_q[s] <= dst[s]; t2_q[s] <= dst2[s];
            lseen[s] <= src_r[s].q[7:0];
            src_f[s].req  <= kind[s] != 2'd1;
            src_f[s].lreq <= kind[s] == 2'd1;
            src_f[s].d    <= NET_DW'(dst[s]);
            lat[s] <= 1; done[s] <= 1'b0;
            st[s] <= S_REQ;
          end
          S_REQ, S_REQ2: if (src_r[s].ack[0]) begin
            if (src_r[s].ack != '1) begin
              // all four ACK lines must come back
              $display("IU %0d: partial ACK %b", s, src_r[s].ack);
            end
            src_f[s].req <= 1'b0; src_f[s].lreq <= 1'b0;
            cnt[s] <= 0;
            if (st[s] == S_REQ && k_q[s] == 2'd2) st[s] <= S_GAP;
            else if (k_q[s] == 2'd1) begin
              src_f[s].dir <= 1'b1; st[s] <= S_REV;
            end else st[s] <= S_DATA;
          end else lat[s] <= lat[s] + 1;
          S_GAP: begin
            src_f[s].req <= 1'b1; src_f[s].d <= NET_DW'(t2_q[s]);
            lat[s] <= 1; st[s] <= S_REQ2;
          end
          S_REV: begin
            reached[s] <= src_r[s].q[31:24];
            t_q[s] <= src_r[s].q[31:24];
            n_rev <= n_rev + 1;  // at most one per clock in the testbenches
            src_f[s].dir <= 1'b0; st[s] <= S_DATA;
          end
          S_DATA: begin
            if (cnt[s] < len) begin
              logic [31:0] w;
              w = {8'(s), (k_q[s] == 2'd2) ? 8'hFE : t_q[s], 16'(cnt[s] * 7 + s)};
              src_f[s].d <= w; src_f[s].stb <= {w[11:0], 1'b1};
              cnt[s] <= cnt[s] + 1;
            end else begin
              src_f[s].stb <= '0; src_f[s].rel <= 1'b1; st[s] <= S_REL;
            end
          end
          S_REL: begin
            src_f[s].rel <= 1'b0; src_f[s].d <= '0; done[s] <= 1'b1; st[s] <= S_IDLE;
          end
          default: st[s] <= S_IDLE;
        endcase
      end
    end
  end
endmodule
