// avalon_xbar: fully connected multi-master bus with per-slave arbitration.
//
// Unlike a shared bus, every master has its own path to every slave it is
// connected to, so masters that address different slaves transfer in the
// same cycle; only masters that address the same slave compete, and each
// slave has its own arbiter. This is the behaviour the design relies on
// for the data and instruction masters of its six processors, two SSRAMs
// and on-chip memories.
//
// Decoding: a master's request selects slave s when CONN[m][s] is set and
// BASE[s] <= address < BASE[s] + SIZE[s]. A request that selects no slave
// completes at once (waitrequest low, readdata 0) and raises dec_err.
// Arbitration (this design's choice): round-robin, starting after the master
// served last. The granted master keeps the slave until its transfer
// completes (slave waitrequest low), so a multi-cycle read is never broken.
// Arbitration is combinational on the registered arbiter state: an idle
// slave is granted in the same cycle the request appears (no added latency).
// A master that waits because another master holds its slave sees
// waitrequest high and has its stall bit set.
module avalon_xbar
  import lu_pkg::*;
#(
  parameter int unsigned N_M = 12,
  parameter int unsigned N_S = 10,
  parameter logic [N_S-1:0][31:0]    BASE = lu_pkg::SLV_BASE,
  parameter logic [N_S-1:0][31:0]    SIZE = lu_pkg::SLV_SIZE,
  parameter logic [N_M-1:0][N_S-1:0] CONN = lu_pkg::SLV_CONN
) (
  input  logic    clk,
  input  logic    rst_n,
  input  av_req_t m_req [N_M],
  output av_rsp_t m_rsp [N_M],
  output av_req_t s_req [N_S],
  input  av_rsp_t s_rsp [N_S],
  output logic [N_M-1:0] stall,
  output logic [N_M-1:0] dec_err
);
  localparam int unsigned MW = (N_M > 1) ? $clog2(N_M) : 1;

  logic [N_M-1:0][N_S-1:0] sel;        // master m addresses slave s
  logic [N_S-1:0][N_M-1:0] want;       // transposed
  logic [N_S-1:0]          gnt_v;
  logic [MW-1:0]           gnt   [N_S];
  logic [N_S-1:0]          own_v;      // registered: transfer in progress
  logic [MW-1:0]           own   [N_S];
  logic [MW-1:0]           last  [N_S];

  // i-th master after master l, wrapping around
  function automatic int unsigned rr_idx(input logic [MW-1:0] l, input int i);
    int unsigned v;
    v = int'(l) + i;
    return (v >= N_M) ? v - N_M : v;
  endfunction

  // address decode
  always_comb begin
    for (int m = 0; m < N_M; m++) begin
      for (int s = 0; s < N_S; s++) begin
        sel[m][s]  = (m_req[m].read | m_req[m].write) && CONN[m][s] &&
                     (m_req[m].address >= BASE[s]) &&
                     ({1'b0, m_req[m].address} < {1'b0, BASE[s]} + {1'b0, SIZE[s]});
        want[s][m] = sel[m][s];
      end
    end
  end

  // per-slave round-robin grant
  always_comb begin
    for (int s = 0; s < N_S; s++) begin
      gnt_v[s] = 1'b0;
      gnt[s]   = '0;
      if (own_v[s] && want[s][own[s]]) begin
        gnt_v[s] = 1'b1;
        gnt[s]   = own[s];
      end else begin
        for (int i = N_M; i >= 1; i--) begin
          if (want[s][rr_idx(last[s], i)]) begin
            gnt_v[s] = 1'b1;
            gnt[s]   = MW'(rr_idx(last[s], i));
          end
        end
      end
    end
  end

  // request and response routing
  always_comb begin
    for (int s = 0; s < N_S; s++)
      s_req[s] = gnt_v[s] ? m_req[gnt[s]] : '0;
    for (int m = 0; m < N_M; m++) begin
      m_rsp[m]   = '{waitrequest: 1'b0, readdata: '0};
      stall[m]   = 1'b0;
      dec_err[m] = (m_req[m].read | m_req[m].write) && (sel[m] == '0);
      for (int s = 0; s < N_S; s++) begin
        if (sel[m][s]) begin
          if (gnt_v[s] && gnt[s] == MW'(m)) begin
            m_rsp[m] = s_rsp[s];
          end else begin
            m_rsp[m].waitrequest = 1'b1;
            stall[m] = 1'b1;
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int s = 0; s < N_S; s++) begin
      if (!rst_n) begin
        own_v[s] <= 1'b0;
        own[s]   <= '0;
        last[s]  <= MW'(N_M - 1);
      end else if (gnt_v[s]) begin
        if (!s_rsp[s].waitrequest) begin
          own_v[s] <= 1'b0;
          last[s]  <= gnt[s];
        end else begin
          own_v[s] <= 1'b1;
          own[s]   <= gnt[s];
        end
      end else begin
        own_v[s] <= 1'b0;
      end
    end
  end

  // a master addresses at most one slave
  for (genvar m = 0; m < N_M; m++) begin : g_chk
    a_one_slave: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(sel[m]));
  end

endmodule
