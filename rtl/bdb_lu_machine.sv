// bdb_lu_machine: six-processor shared-memory machine for parallel
// Bordered-Diagonal-Block (BDB) LU factorization and triangular solves.
//
// Five computation processors each factor and solve their own independent
// 3-block groups (diagonal block, right border, bottom border); partial sums
// for the last diagonal block are added pairwise through on-chip memory
// (1+2 -> 2, 3+4 -> 4, then 2+5 -> 5 and 4+5 -> 5), and processor 5 factors
// and solves the last block. A sixth processor controls the machine and
// talks to the host over the UART. This module holds everything of the
// machine except the processors themselves:
//   * one FPU per processor (custom-instruction ports ci_*),
//   * one 7 KB on-chip RAM per processor (reachable by all processors),
//   * two SSRAM controllers: processors 1-3 use SSRAM 1 (0x100000-0x1FFFFF),
//     processors 4-5 use SSRAM 2 (0x200000-0x2FFFFF), processor 6 both,
//   * the UART and the LED/button PIO, used by processor 6,
//   * the fully connected bus (avalon_xbar) joining them.
// The processors' data masters enter as cpu_av_req/cpu_av_rsp and their
// instruction masters, which fetch the programs from the SSRAMs, as
// cpu_ic_req/cpu_ic_rsp (index k is processor k+1; an instruction master
// only reaches its processor's SSRAM). The SSRAM chips are outside, on
// ss_req/ss_q. bus_stall shows which master waits for a slave another one
// holds. Timing is that
// of the blocks: bus transfers as in avalon_xbar, memory wait states as in
// onchip_ram and ssram_ctrl, FPU latencies as in fpu.
module bdb_lu_machine
  import lu_pkg::*;
#(
  parameter int unsigned RAM_BYTES = 7168,
  parameter int unsigned SSRAM_AW  = 18,
  parameter int unsigned CLK_HZ    = 40_000_000,
  parameter int unsigned BAUD      = 115_200
) (
  input  logic               clk,
  input  logic               rst_n,
  // processor data masters
  input  av_req_t            cpu_av_req [N_CPU],
  output av_rsp_t            cpu_av_rsp [N_CPU],
  // processor instruction masters (program fetch from SSRAM)
  input  av_req_t            cpu_ic_req [N_CPU],
  output av_rsp_t            cpu_ic_rsp [N_CPU],
  // per bus master (data 0..5, instruction 6..11): waiting for a held
  // slave; address reaching no connected slave
  output logic [N_MST-1:0]   bus_stall,
  output logic [N_MST-1:0]   bus_dec_err,
  // processor custom-instruction ports to the FPUs
  input  logic [N_CPU-1:0]   ci_start,
  input  logic [1:0]         ci_n      [N_CPU],
  input  logic [31:0]        ci_dataa  [N_CPU],
  input  logic [31:0]        ci_datab  [N_CPU],
  output logic [31:0]        ci_result [N_CPU],
  output logic [N_CPU-1:0]   ci_done,
  // SSRAM chips 1 and 2
  output ssram_pins_t        ss_req [2],
  input  logic [31:0]        ss_q   [2],
  // host serial line, LEDs, buttons
  output logic               uart_txd,
  input  logic               uart_rxd,
  output logic [7:0]         led,
  input  logic [3:0]         buttons
);
  av_req_t s_req [N_SLV];
  av_rsp_t s_rsp [N_SLV];
  av_req_t m_req [N_MST];
  av_rsp_t m_rsp [N_MST];

  always_comb begin
    for (int k = 0; k < N_CPU; k++) begin
      m_req[k]            = cpu_av_req[k];
      m_req[M_INSTR0 + k] = cpu_ic_req[k];
      cpu_av_rsp[k]       = m_rsp[k];
      cpu_ic_rsp[k]       = m_rsp[M_INSTR0 + k];
    end
  end

  avalon_xbar #(.N_M(N_MST), .N_S(N_SLV)) u_bus (
    .clk, .rst_n,
    .m_req, .m_rsp,
    .s_req, .s_rsp,
    .stall(bus_stall), .dec_err(bus_dec_err)
  );

  for (genvar k = 0; k < N_CPU; k++) begin : g_cpu
    fpu u_fpu (
      .clk, .rst_n,
      .start (ci_start[k]),
      .n     (ci_n[k]),
      .dataa (ci_dataa[k]),
      .datab (ci_datab[k]),
      .result(ci_result[k]),
      .done  (ci_done[k])
    );

    onchip_ram #(.BYTES(RAM_BYTES)) u_ram (
      .clk, .rst_n,
      .req(s_req[S_RAM0 + k]),
      .rsp(s_rsp[S_RAM0 + k])
    );
  end

  for (genvar j = 0; j < 2; j++) begin : g_ssram
    ssram_ctrl #(.ADDR_W(SSRAM_AW)) u_ssram (
      .clk, .rst_n,
      .req (s_req[S_SSRAM1 + j]),
      .rsp (s_rsp[S_SSRAM1 + j]),
      .ss  (ss_req[j]),
      .ss_q(ss_q[j])
    );
  end

  avalon_uart #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_uart (
    .clk, .rst_n,
    .req(s_req[S_UART]), .rsp(s_rsp[S_UART]),
    .txd(uart_txd), .rxd(uart_rxd)
  );

  avalon_pio #(.OUT_W(8), .IN_W(4)) u_pio (
    .clk, .rst_n,
    .req(s_req[S_PIO]), .rsp(s_rsp[S_PIO]),
    .pio_out(led), .pio_in(buttons)
  );

endmodule
