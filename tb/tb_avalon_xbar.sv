// tb_avalon_xbar: self-checking test of the fully connected bus.
// Twelve masters (the data and instruction masters of six processors) run
// at once, each doing random reads and writes to the slaves it is
// connected to in the machine's address map; ten behavioural
// slaves have 0 to 3 wait states. Each master writes only its own words, so
// every read has a known expected value. Also checked: an access a master is
// not connected to (processor 1 to SSRAM 2, processor 4 to the UART, the
// instruction master of processor 1 to an on-chip RAM)
// completes at once with dec_err; masters stall when they share a slave;
// transfers to different slaves happen in the same cycle; no master starves.
module tb_avalon_xbar;
  import lu_pkg::*;

  localparam int unsigned NM = N_MST;
  localparam int unsigned NS = N_SLV;
  localparam int unsigned NOPS = 400;

  logic           clk = 1'b0;
  logic           rst_n = 1'b0;
  av_req_t        m_req [NM];
  av_rsp_t        m_rsp [NM];
  av_req_t        s_req [NS];
  av_rsp_t        s_rsp [NS];
  logic [NM-1:0]  stall, dec_err;
  int             checks = 0, failures = 0;
  int             n_stall = 0, n_parallel = 0, n_decerr = 0;
  int             done_cnt = 0;

  avalon_xbar dut (.*);

  always #5 clk = ~clk;

  // behavioural slaves: 128 words each, s % 4 wait states on every access
  logic [31:0] smem [NS][128];
  int          scnt [NS];
  for (genvar s = 0; s < NS; s++) begin : g_slv
    always_comb begin
      s_rsp[s].waitrequest = (s_req[s].read || s_req[s].write) && (scnt[s] != s % 4);
      s_rsp[s].readdata    = smem[s][s_req[s].address[8:2]];
    end
    always @(posedge clk) begin
      if (!rst_n) scnt[s] <= 0;
      else if ((s_req[s].read || s_req[s].write) && scnt[s] != s % 4) scnt[s] <= scnt[s] + 1;
      else begin
        scnt[s] <= 0;
        if (s_req[s].write) smem[s][s_req[s].address[8:2]] <= s_req[s].writedata;
      end
    end
  end

  // activity monitors
  always @(posedge clk) if (rst_n) begin
    int act;
    act = 0;
    for (int s = 0; s < NS; s++) if (s_req[s].read || s_req[s].write) act++;
    if (act >= 2) n_parallel++;
    if (stall != '0) n_stall++;
  end

  task automatic xfer(input int m, input logic wr, input logic [31:0] addr, input logic [31:0] wd,
                      output logic [31:0] rd, output logic err);
    @(negedge clk);
    m_req[m] = '{read: !wr, write: wr, address: addr, writedata: wd, byteenable: 4'hF};
    #1;
    while (m_rsp[m].waitrequest) begin
      @(negedge clk);
      #1;
    end
    rd  = m_rsp[m].readdata;
    err = dec_err[m];
    @(negedge clk);
    m_req[m] = '0;
  endtask

  task automatic master(input int m);
    logic [31:0] shadow [NS][8];
    logic [7:0]  written [NS];
    logic [31:0] rd, wd, addr;
    logic        err;
    for (int s = 0; s < NS; s++) written[s] = '0;
    for (int i = 0; i < NOPS; i++) begin
      int s, k;
      do s = $urandom_range(NS - 1); while (!SLV_CONN[m][s]);
      k    = $urandom_range(7);
      addr = SLV_BASE[s] + 32'(((SLV_SIZE[s] >= 32'd512) ? m * 8 + k : k) * 4);
      if (!written[s][k] || $urandom_range(1) == 1) begin
        wd = $urandom;
        xfer(m, 1'b1, addr, wd, rd, err);
        shadow[s][k]  = wd;
        written[s][k] = 1'b1;
      end else begin
        xfer(m, 1'b0, addr, '0, rd, err);
        checks++;
        if (rd !== shadow[s][k]) begin
          failures++;
          $display("FAIL: master %0d slave %0d word %0d read %h expected %h", m, s, k, rd, shadow[s][k]);
        end
      end
    end
    done_cnt++;
  endtask

  initial begin
    logic [31:0] rd;
    logic        err;
    int          t0;
    for (int m = 0; m < NM; m++) m_req[m] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // unconnected accesses
    t0 = $time;
    xfer(0, 1'b0, SSRAM2_BASE, '0, rd, err);
    checks++;
    if (!err || rd !== '0) begin failures++; $display("FAIL: no decode error for master 0 -> SSRAM 2"); end
    else n_decerr++;
    xfer(3, 1'b1, UART_BASE, 32'h55, rd, err);
    checks++;
    if (!err) begin failures++; $display("FAIL: no decode error for master 3 -> UART"); end
    else n_decerr++;
    xfer(M_INSTR0, 1'b0, RAM_BASE, '0, rd, err);
    checks++;
    if (!err) begin failures++; $display("FAIL: no decode error for instruction master 0 -> on-chip RAM 0"); end
    else n_decerr++;
    fork
      master(0); master(1); master(2); master(3); master(4); master(5);
      master(6); master(7); master(8); master(9); master(10); master(11);
    join
    checks += 3;
    if (n_stall == 0)    begin failures++; $display("FAIL: no arbitration stall seen"); end
    if (n_parallel == 0) begin failures++; $display("FAIL: no parallel transfers seen"); end
    if (n_decerr != 3)   begin failures++; $display("FAIL: decode errors"); end
    $display("stall cycles %0d, cycles with parallel transfers %0d", n_stall, n_parallel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NOPS * 60) @(posedge clk);
    failures++;
    $display("FAIL: watchdog (%0d masters done)", done_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
