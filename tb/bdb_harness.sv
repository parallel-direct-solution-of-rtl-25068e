// bdb_harness: runs one complete BDB solve of A x = b on bdb_lu_machine.
//
// The machine's six processors are modelled here by behavioural programs
// that use only the machine's ports: bus transfers on cpu_av_req/rsp and
// floating-point work through the custom-instruction ports of their FPUs.
// The SSRAM chips are ssram_model instances. The matrix is synthetic: a
// sparse, diagonally dominant matrix in Bordered-Diagonal-Block form whose
// diagonal-block sizes are the parameters BS (up to three 3-block groups per
// computation processor) and whose last block has size M.
//
// Program, as the machine is meant to run it:
//   control (processor 6): waits for a button press and a 'G' from the host
//     on the UART, writes every 3-block group and the last block into the
//     SSRAMs, clears the flags in the on-chip RAMs, starts processors 1-5,
//     waits for their done flags, gathers x and sends x[0] to the host.
//   processors 1-5, for each of their 3-block groups stored as a
//   (bs+M) x (bs+M) matrix [A_ii A_in; A_ni 0]:
//     1. eliminate the first bs pivots in SSRAM: L_ii, U_ii, U_in, L_ni and,
//        in the corner, -L_ni*U_in; add the corners into the own on-chip RAM;
//     2. pairwise accumulation of the corners through on-chip RAM:
//        1+2 -> 2, 3+4 -> 4, then 2+5 -> 5 and 4+5 -> 5;
//     3. processor 5 adds the sum to A_nn and factors the last block;
//     4. forward reduction of each group, partial sums -L_ni*y_i accumulated
//        the same pairwise way, forward reduction of the last block;
//     5. backward substitution of the last block on processor 5, which
//        writes x_n into every processor's on-chip RAM; each processor then
//        finishes the backward substitution of its own groups.
// Flags in the on-chip RAM words 0..4 synchronise the processors.
//
// Every processor also fetches its program from its SSRAM segment through
// its instruction master: one 32-bit word every FETCH_GAP cycles, looping
// over a PROG_WORDS-word program image that build_matrix places there. The
// fetched words are compared with the image. This traffic competes with
// the data transfers for the SSRAMs, as program fetches do on the machine.
//
// The harness compares x with the x used to build b (relative error 1e-3)
// and the UART bytes with x[0], and counts how often each mechanism of the
// machine was used: arbitration stalls, transfers of several processors in
// the same cycle, SSRAM reads with wait states, accesses to another
// processor's on-chip RAM, program fetches, each FPU instruction, UART transmit and receive,
// the button edge capture and LED writes. A mechanism never used counts as
// a failure. It reports through done/checks/failures.
module bdb_harness
  import lu_pkg::*;
  import fp_ref_pkg::*;
#(
  parameter int BS [5][3] = '{'{2, 2, 0}, '{3, 0, 0}, '{3, 0, 0}, '{2, 0, 0}, '{3, 0, 0}},
  parameter int M         = 3,
  parameter string NAME   = "bdb"
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int NP = 5;                       // computation processors
  localparam int CTRL = 5;                     // control processor index

  function automatic int n_total();
    int n;
    n = M;
    for (int p = 0; p < NP; p++) for (int g = 0; g < 3; g++) n += BS[p][g];
    return n;
  endfunction
  localparam int N = n_total();

  // on-chip RAM layout (word offsets)
  localparam int F_S     = 0;    // corner sums: 1 own ready, 2 accumulated
  localparam int F_Y     = 1;    // forward partial sums, same codes
  localparam int F_X     = 2;    // x_n written by processor 5
  localparam int F_START = 3;
  localparam int F_DONE  = 4;
  localparam int A_S     = 16;               // M*M corner sum
  localparam int A_Y     = A_S + M * M;      // M forward partial sums
  localparam int A_X     = A_Y + M;          // M values of x_n
  localparam logic [31:0] START_MAGIC = 32'h5354_4152;
  localparam int FETCH_GAP  = 16;  // cycles between program fetches
  localparam int PROG_WORDS = 256; // size of the program image per processor

  // ------------------------------------------------------------------ DUT
  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  av_req_t          cpu_av_req [N_CPU];
  av_rsp_t          cpu_av_rsp [N_CPU];
  av_req_t          cpu_ic_req [N_CPU];
  av_rsp_t          cpu_ic_rsp [N_CPU];
  logic [N_MST-1:0] bus_stall, bus_dec_err;
  logic [N_CPU-1:0] ci_start = '0;
  logic [1:0]       ci_n      [N_CPU];
  logic [31:0]      ci_dataa  [N_CPU];
  logic [31:0]      ci_datab  [N_CPU];
  logic [31:0]      ci_result [N_CPU];
  logic [N_CPU-1:0] ci_done;
  ssram_pins_t      ss_req [2];
  logic [31:0]      ss_q   [2];
  logic             uart_txd;
  logic             uart_rxd = 1'b1;
  logic [7:0]       led;
  logic [3:0]       buttons = '0;

  bdb_lu_machine dut (.*);

  ssram_model #(.WORDS(65536)) u_ss1 (.clk, .ss(ss_req[0]), .q(ss_q[0]));
  ssram_model #(.WORDS(65536)) u_ss2 (.clk, .ss(ss_req[1]), .q(ss_q[1]));

  always #5 clk = ~clk;

  // ------------------------------------------------------------ counters
  int n_stall = 0, n_parallel = 0, n_ss_read = 0, n_remote = 0, n_led = 0;
  int n_fop [4] = '{0, 0, 0, 0};
  int n_uart_tx = 0, n_uart_rx = 0, n_button = 0;
  int n_fetch = 0, n_fetch_bad = 0;
  int cycle = 0;
  int t_start = 0, t_fact = 0, t_fwd = 0, t_end = 0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      int par;
      par = 0;
      if (bus_stall != '0) n_stall++;
      for (int k = 0; k < N_CPU; k++) begin
        if ((cpu_av_req[k].read || cpu_av_req[k].write) && !cpu_av_rsp[k].waitrequest) begin
          par++;
          if (cpu_av_req[k].address < 32'(N_CPU) * RAM_STRIDE &&
              int'(cpu_av_req[k].address / RAM_STRIDE) != k) n_remote++;
        end
        if (ci_start[k]) n_fop[ci_n[k]]++;
      end
      if (par >= 2) n_parallel++;
      for (int j = 0; j < 2; j++) if (ss_req[j].ce && !ss_req[j].we) n_ss_read++;
    end
  end

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("%s FAIL: %s", NAME, msg);
    end
  endtask

  // ------------------------------------------------- processor primitives
  task automatic bus(input int m, input logic wr, input logic [31:0] addr, input logic [31:0] wd,
                     output logic [31:0] rd);
    @(negedge clk);
    cpu_av_req[m] = '{read: !wr, write: wr, address: addr, writedata: wd, byteenable: 4'hF};
    #1;
    while (cpu_av_rsp[m].waitrequest) begin
      @(negedge clk);
      #1;
    end
    rd = cpu_av_rsp[m].readdata;
    if (bus_dec_err[m]) begin
      failures++;
      $display("%s FAIL: processor %0d address %h not mapped", NAME, m + 1, addr);
    end
    @(negedge clk);
    cpu_av_req[m] = '0;
  endtask

  task automatic rd(input int m, input logic [31:0] addr, output logic [31:0] d);
    bus(m, 1'b0, addr, '0, d);
  endtask

  task automatic wr(input int m, input logic [31:0] addr, input logic [31:0] d);
    logic [31:0] unused;
    bus(m, 1'b1, addr, d, unused);
  endtask

  task automatic fop(input int m, input fp_op_e op, input logic [31:0] a, input logic [31:0] b,
                     output logic [31:0] r);
    @(negedge clk);
    ci_start[m] = 1'b1;
    ci_n[m]     = op;
    ci_dataa[m] = a;
    ci_datab[m] = b;
    @(negedge clk);
    ci_start[m] = 1'b0;
    while (!ci_done[m]) @(negedge clk);
    r = ci_result[m];
  endtask

  function automatic logic [31:0] ram_addr(input int k, input int word);
    return RAM_BASE + 32'(k) * RAM_STRIDE + 32'(word * 4);
  endfunction

  task automatic wait_flag(input int m, input int k, input int word, input logic [31:0] val);
    logic [31:0] d;
    rd(m, ram_addr(k, word), d);
    while (d != val) begin
      repeat (8) @(negedge clk);
      rd(m, ram_addr(k, word), d);
    end
  endtask

  // ------------------------------------------------------- data placement
  // SSRAM region of processor p and of the last block (byte addresses)
  function automatic logic [31:0] proc_base(input int p);
    if (p < 3) return SSRAM1_BASE + 32'(p) * 32'h1_0000;
    return SSRAM2_BASE + 32'(p - 3) * 32'h1_0000;
  endfunction
  localparam logic [31:0] LAST_BASE = SSRAM2_BASE + 32'h2_0000;
  // program image: the top 16 KB of a computation processor's segment; the
  // control processor's segment follows those of processors 1-3 in SSRAM 1
  function automatic logic [31:0] prog_base(input int p);
    if (p == CTRL) return SSRAM1_BASE + 32'h3_0000;
    return proc_base(p) + 32'hC000;
  endfunction
  function automatic logic [31:0] prog_word(input int p, input int i);
    return {8'(p + 1), 8'hC0, 16'(i * 16'h9E37)};
  endfunction

  function automatic logic [31:0] grp_base(input int p, input int g);
    logic [31:0] a;
    a = proc_base(p);
    for (int h = 0; h < g; h++) a += 32'(((BS[p][h] + M) * (BS[p][h] + M) + BS[p][h]) * 4);
    return a;
  endfunction

  // global row of the first row of group (p, g)
  function automatic int grp_row(input int p, input int g);
    int r;
    r = 0;
    for (int q = 0; q < p; q++) for (int h = 0; h < 3; h++) r += BS[q][h];
    for (int h = 0; h < g; h++) r += BS[p][h];
    return r;
  endfunction

  real A [N][N];
  real xt [N];
  real bv [N];
  logic [31:0] xs [N];

  // sparse, diagonally dominant BDB matrix
  task automatic build_matrix();
    int blk [N];
    for (int i = 0; i < N; i++) begin
      blk[i] = -1;
      for (int j = 0; j < N; j++) A[i][j] = 0.0;
    end
    for (int p = 0; p < NP; p++)
      for (int g = 0; g < 3; g++)
        for (int r = 0; r < BS[p][g]; r++) blk[grp_row(p, g) + r] = p * 3 + g;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < i; j++) begin
        // coupling only inside a diagonal block or with the last block
        if (blk[i] == blk[j] || blk[i] < 0 || blk[j] < 0) begin
          if ($urandom_range(99) < 30) begin
            A[i][j] = (real'($urandom_range(2000)) - 1000.0) / 1000.0;
            A[j][i] = (real'($urandom_range(2000)) - 1000.0) / 1000.0;
          end
        end
      end
    for (int i = 0; i < N; i++) begin
      real s;
      s = 1.0;
      for (int j = 0; j < N; j++) if (j != i) s += (A[i][j] < 0.0) ? -A[i][j] : A[i][j];
      A[i][i] = s;
      xt[i] = (real'($urandom_range(2000)) - 1000.0) / 500.0;
    end
    // round A to single, then b = A x in double, rounded to single
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) A[i][j] = s2r(r2s(A[i][j]));
    for (int i = 0; i < N; i++) begin
      bv[i] = 0.0;
      for (int j = 0; j < N; j++) bv[i] += A[i][j] * xt[j];
      bv[i] = s2r(r2s(bv[i]));
    end
  endtask

  // ---------------------------------------------- computation processors
  // eliminate the first npiv pivots of a G x G row-major matrix at base
  task automatic eliminate(input int m, input logic [31:0] base, input int G, input int npiv);
    logic [31:0] piv, aik, l, aij, t, r;
    logic [31:0] rowk [];
    rowk = new[G];
    for (int k = 0; k < npiv; k++) begin
      for (int j = k; j < G; j++) rd(m, base + 32'((k * G + j) * 4), rowk[j]);
      piv = rowk[k];
      for (int i = k + 1; i < G; i++) begin
        rd(m, base + 32'((i * G + k) * 4), aik);
        if (aik[30:0] == '0) continue;
        fop(m, FP_DIV, aik, piv, l);
        wr(m, base + 32'((i * G + k) * 4), l);
        for (int j = k + 1; j < G; j++) begin
          if (rowk[j][30:0] == '0) continue;
          rd(m, base + 32'((i * G + j) * 4), aij);
          fop(m, FP_MUL, l, rowk[j], t);
          fop(m, FP_SUB, aij, t, r);
          wr(m, base + 32'((i * G + j) * 4), r);
        end
      end
    end
  endtask

  // dst[k] (own or any RAM word area) += src values read from src_addr
  task automatic add_area(input int m, input logic [31:0] dst, input logic [31:0] src, input int n);
    logic [31:0] a, b, s;
    for (int i = 0; i < n; i++) begin
      rd(m, src + 32'(i * 4), b);
      if (b[30:0] == '0) continue;
      rd(m, dst + 32'(i * 4), a);
      fop(m, FP_ADD, a, b, s);
      wr(m, dst + 32'(i * 4), s);
    end
  endtask

  // pairwise accumulation of an area of n words, flag word fw
  task automatic accumulate(input int p, input int area, input int n, input int fw);
    case (p)
      0, 2: wr(p, ram_addr(p, fw), 32'd1);
      1, 3: begin
        wait_flag(p, p - 1, fw, 32'd1);
        add_area(p, ram_addr(p, area), ram_addr(p - 1, area), n);
        wr(p, ram_addr(p, fw), 32'd2);
      end
      default: begin
        wait_flag(p, 1, fw, 32'd2);
        add_area(p, ram_addr(p, area), ram_addr(1, area), n);
        wait_flag(p, 3, fw, 32'd2);
        add_area(p, ram_addr(p, area), ram_addr(3, area), n);
      end
    endcase
  endtask

  // forward reduction of one group; adds -L_ni*y_i into the own RAM area A_Y
  task automatic forward_group(input int p, input int g);
    int          bs, G;
    logic [31:0] base, bb, y, l, t, s;
    logic [31:0] ys [];
    bs   = BS[p][g];
    G    = bs + M;
    base = grp_base(p, g);
    bb   = base + 32'(G * G * 4);
    ys   = new[bs];
    for (int i = 0; i < bs; i++) begin
      rd(p, bb + 32'(i * 4), y);
      for (int k = 0; k < i; k++) begin
        rd(p, base + 32'((i * G + k) * 4), l);
        if (l[30:0] == '0) continue;
        fop(p, FP_MUL, l, ys[k], t);
        fop(p, FP_SUB, y, t, y);
      end
      ys[i] = y;
      wr(p, bb + 32'(i * 4), y);
    end
    for (int r = 0; r < M; r++) begin
      rd(p, ram_addr(p, A_Y + r), s);
      for (int k = 0; k < bs; k++) begin
        rd(p, base + 32'(((bs + r) * G + k) * 4), l);
        if (l[30:0] == '0) continue;
        fop(p, FP_MUL, l, ys[k], t);
        fop(p, FP_SUB, s, t, s);
      end
      wr(p, ram_addr(p, A_Y + r), s);
    end
  endtask

  // backward substitution of one group with x_n from the own RAM area A_X
  task automatic backward_group(input int p, input int g);
    int          bs, G;
    logic [31:0] base, bb, s, u, t, d;
    logic [31:0] xn [];
    logic [31:0] xv [];
    bs   = BS[p][g];
    G    = bs + M;
    base = grp_base(p, g);
    bb   = base + 32'(G * G * 4);
    xn   = new[M];
    xv   = new[bs];
    for (int j = 0; j < M; j++) rd(p, ram_addr(p, A_X + j), xn[j]);
    for (int i = bs - 1; i >= 0; i--) begin
      rd(p, bb + 32'(i * 4), s);
      for (int j = 0; j < M; j++) begin
        rd(p, base + 32'((i * G + bs + j) * 4), u);
        if (u[30:0] == '0) continue;
        fop(p, FP_MUL, u, xn[j], t);
        fop(p, FP_SUB, s, t, s);
      end
      for (int j = i + 1; j < bs; j++) begin
        rd(p, base + 32'((i * G + j) * 4), u);
        if (u[30:0] == '0) continue;
        fop(p, FP_MUL, u, xv[j], t);
        fop(p, FP_SUB, s, t, s);
      end
      rd(p, base + 32'((i * G + i) * 4), d);
      fop(p, FP_DIV, s, d, xv[i]);
      wr(p, bb + 32'(i * 4), xv[i]);
    end
  endtask

  task automatic compute(input int p);
    logic [31:0] d;
    wait_flag(p, p, F_START, START_MAGIC);
    for (int i = 0; i < M * M + M; i++) wr(p, ram_addr(p, A_S + i), 32'd0);
    // 1. factor the 3-block groups, corners summed into own RAM
    for (int g = 0; g < 3; g++) begin
      int bs, G;
      logic [31:0] base;
      bs = BS[p][g];
      if (bs == 0) continue;
      G    = bs + M;
      base = grp_base(p, g);
      eliminate(p, base, G, bs);
      for (int r = 0; r < M; r++)
        add_area(p, ram_addr(p, A_S + r * M), base + 32'(((bs + r) * G + bs) * 4), M);
    end
    // 2. pairwise accumulation of the corner sums
    accumulate(p, A_S, M * M, F_S);
    // 3. last block on processor 5
    if (p == 4) begin
      for (int r = 0; r < M; r++)
        add_area(p, LAST_BASE + 32'(r * M * 4), ram_addr(p, A_S + r * M), M);
      eliminate(p, LAST_BASE, M, M);
      t_fact = cycle;
    end
    // 4. forward reduction
    for (int g = 0; g < 3; g++) if (BS[p][g] != 0) forward_group(p, g);
    accumulate(p, A_Y, M, F_Y);
    if (p == 4) begin
      logic [31:0] bb, y, l, t, u, s;
      logic [31:0] yv [M];
      logic [31:0] xv [M];
      bb = LAST_BASE + 32'(M * M * 4);
      add_area(p, bb, ram_addr(p, A_Y), M);
      for (int i = 0; i < M; i++) begin
        rd(p, bb + 32'(i * 4), y);
        for (int k = 0; k < i; k++) begin
          rd(p, LAST_BASE + 32'((i * M + k) * 4), l);
          if (l[30:0] == '0) continue;
          fop(p, FP_MUL, l, yv[k], t);
          fop(p, FP_SUB, y, t, y);
        end
        yv[i] = y;
      end
      t_fwd = cycle;
      // 5. backward substitution of the last block, broadcast of x_n
      for (int i = M - 1; i >= 0; i--) begin
        s = yv[i];
        for (int j = i + 1; j < M; j++) begin
          rd(p, LAST_BASE + 32'((i * M + j) * 4), u);
          if (u[30:0] == '0) continue;
          fop(p, FP_MUL, u, xv[j], t);
          fop(p, FP_SUB, s, t, s);
        end
        rd(p, LAST_BASE + 32'((i * M + i) * 4), u);
        fop(p, FP_DIV, s, u, xv[i]);
        wr(p, bb + 32'(i * 4), xv[i]);
      end
      for (int k = 0; k < NP; k++) begin
        for (int j = 0; j < M; j++) wr(p, ram_addr(k, A_X + j), xv[j]);
        wr(p, ram_addr(k, F_X), 32'd1);
      end
    end
    wait_flag(p, p, F_X, 32'd1);
    for (int g = 0; g < 3; g++) if (BS[p][g] != 0) backward_group(p, g);
    wr(p, ram_addr(p, F_DONE), 32'd1);
    rd(p, ram_addr(p, F_DONE), d);
  endtask

  // ---------------------------------------------------- control processor
  byte tx_bytes [$];

  task automatic control();
    logic [31:0] d;
    // wait for a button press, then for 'G' from the host
    rd(CTRL, PIO_BASE + 32'd12, d);
    while (d[3:0] == '0) begin
      repeat (16) @(negedge clk);
      rd(CTRL, PIO_BASE + 32'd12, d);
    end
    n_button++;
    wr(CTRL, PIO_BASE + 32'd12, 32'hF);
    rd(CTRL, UART_BASE + 32'd8, d);
    while (!d[0]) begin
      repeat (16) @(negedge clk);
      rd(CTRL, UART_BASE + 32'd8, d);
    end
    rd(CTRL, UART_BASE, d);
    check(d[7:0] == 8'h47, "host command byte received");
    n_uart_rx++;
    wr(CTRL, PIO_BASE, 32'h01);
    n_led++;
    // load the matrix into the SSRAMs
    for (int p = 0; p < NP; p++)
      for (int g = 0; g < 3; g++) begin
        int bs, G, r0;
        logic [31:0] base;
        bs = BS[p][g];
        if (bs == 0) continue;
        G    = bs + M;
        base = grp_base(p, g);
        r0   = grp_row(p, g);
        for (int i = 0; i < G; i++)
          for (int j = 0; j < G; j++) begin
            int gi, gj;
            gi = (i < bs) ? r0 + i : N - M + (i - bs);
            gj = (j < bs) ? r0 + j : N - M + (j - bs);
            wr(CTRL, base + 32'((i * G + j) * 4), (i >= bs && j >= bs) ? 32'd0 : r2s(A[gi][gj]));
          end
        for (int i = 0; i < bs; i++) wr(CTRL, base + 32'((G * G + i) * 4), r2s(bv[r0 + i]));
      end
    for (int i = 0; i < M; i++) begin
      for (int j = 0; j < M; j++) wr(CTRL, LAST_BASE + 32'((i * M + j) * 4), r2s(A[N - M + i][N - M + j]));
      wr(CTRL, LAST_BASE + 32'((M * M + i) * 4), r2s(bv[N - M + i]));
    end
    // clear flags, then start
    for (int k = 0; k < NP; k++) for (int w = 0; w < 5; w++) wr(CTRL, ram_addr(k, w), 32'd0);
    t_start = cycle;
    for (int k = 0; k < NP; k++) wr(CTRL, ram_addr(k, F_START), START_MAGIC);
    for (int k = 0; k < NP; k++) wait_flag(CTRL, k, F_DONE, 32'd1);
    t_end = cycle;
    // gather x
    for (int p = 0; p < NP; p++)
      for (int g = 0; g < 3; g++) begin
        int bs, G, r0;
        bs = BS[p][g];
        if (bs == 0) continue;
        G  = bs + M;
        r0 = grp_row(p, g);
        for (int i = 0; i < bs; i++) rd(CTRL, grp_base(p, g) + 32'((G * G + i) * 4), xs[r0 + i]);
      end
    for (int i = 0; i < M; i++) rd(CTRL, LAST_BASE + 32'((M * M + i) * 4), xs[N - M + i]);
    // send x[0] to the host, least significant byte first
    for (int b = 0; b < 4; b++) begin
      wr(CTRL, UART_BASE + 32'd4, {24'd0, xs[0][8*b +: 8]});
      rd(CTRL, UART_BASE + 32'd8, d);
      while (!d[1]) begin
        repeat (16) @(negedge clk);
        rd(CTRL, UART_BASE + 32'd8, d);
      end
    end
    wr(CTRL, PIO_BASE, 32'hFF);
    n_led++;
  endtask

  // ------------------------------------------------------ host serial line
  localparam int BIT_CYCLES = 40_000_000 / 115_200;

  initial begin
    forever begin
      byte b;
      @(negedge uart_txd);
      repeat (BIT_CYCLES / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (BIT_CYCLES) @(posedge clk);
        b[i] = uart_txd;
      end
      repeat (BIT_CYCLES) @(posedge clk);
      tx_bytes.push_back(b);
      n_uart_tx++;
    end
  end

  task automatic host_send(input byte b);
    uart_rxd = 1'b0;
    repeat (BIT_CYCLES) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      uart_rxd = b[i];
      repeat (BIT_CYCLES) @(posedge clk);
    end
    uart_rxd = 1'b1;
    repeat (BIT_CYCLES) @(posedge clk);
  endtask

  // ------------------------------------------------------- program fetch
  logic fetch_on = 1'b0;

  task automatic fetcher(input int p);
    int i;
    i = 0;
    @(negedge clk);
    while (fetch_on) begin
      cpu_ic_req[p] = '{read: 1'b1, write: 1'b0, address: prog_base(p) + 32'(i * 4),
                        writedata: '0, byteenable: 4'hF};
      #1;
      while (cpu_ic_rsp[p].waitrequest) begin
        @(negedge clk);
        #1;
      end
      n_fetch++;
      if (cpu_ic_rsp[p].readdata !== prog_word(p, i) || bus_dec_err[M_INSTR0 + p]) n_fetch_bad++;
      @(negedge clk);
      cpu_ic_req[p] = '0;
      i = (i + 1) % PROG_WORDS;
      repeat (FETCH_GAP - 1) @(negedge clk);
    end
  endtask

  function automatic void load_programs();
    for (int p = 0; p < N_CPU; p++)
      for (int i = 0; i < PROG_WORDS; i++) begin
        logic [31:0] a;
        a = prog_base(p) + 32'(i * 4);
        if (a < SSRAM2_BASE) u_ss1.mem[(a - SSRAM1_BASE) >> 2] = prog_word(p, i);
        else                 u_ss2.mem[(a - SSRAM2_BASE) >> 2] = prog_word(p, i);
      end
  endfunction

  // ------------------------------------------------------------ sequence
  initial begin
    done     = 1'b0;
    checks   = 0;
    failures = 0;
    for (int k = 0; k < N_CPU; k++) begin
      cpu_av_req[k] = '0;
      cpu_ic_req[k] = '0;
      ci_n[k]       = '0;
      ci_dataa[k]   = '0;
      ci_datab[k]   = '0;
    end
    build_matrix();
    #1;
    load_programs();
    repeat (4) @(negedge clk);
    rst_n    = 1'b1;
    fetch_on = 1'b1;
    fork
      fetcher(0); fetcher(1); fetcher(2); fetcher(3); fetcher(4); fetcher(5);
    join_none
    fork
      control();
      compute(0); compute(1); compute(2); compute(3); compute(4);
      begin
        repeat (50) @(negedge clk);
        buttons = 4'b0001;
        repeat (50) @(negedge clk);
        buttons = 4'b0000;
        host_send(8'h47);
      end
    join
    repeat (12 * BIT_CYCLES) @(posedge clk);
    fetch_on = 1'b0;
    repeat (2 * FETCH_GAP) @(posedge clk);
    // results
    begin
      int bad;
      real worst;
      bad   = 0;
      worst = 0.0;
      for (int i = 0; i < N; i++) begin
        real e;
        e = s2r(xs[i]) - xt[i];
        if (e < 0.0) e = -e;
        e = e / (1.0 + (xt[i] < 0.0 ? -xt[i] : xt[i]));
        if (e > worst) worst = e;
        check(e < 1.0e-3, $sformatf("x[%0d] = %f, expected %f", i, s2r(xs[i]), xt[i]));
      end
      $display("%s: N=%0d last block %0d, max relative error of x %e", NAME, N, M, worst);
    end
    check(tx_bytes.size() == 4, "four bytes sent to the host");
    if (tx_bytes.size() == 4)
      check({tx_bytes[3], tx_bytes[2], tx_bytes[1], tx_bytes[0]} == xs[0], "bytes sent are x[0]");
    check(led == 8'hFF, "LEDs show completion");
    check(n_stall > 0,     "arbitration stall seen");
    check(n_parallel > 0,  "transfers of several processors in one cycle seen");
    check(n_ss_read > 0,   "SSRAM reads seen");
    check(n_remote > 0,    "accesses to another processor's on-chip RAM seen");
    for (int k = 0; k < 4; k++) check(n_fop[k] > 0, $sformatf("FPU instruction %0d used", k));
    check(n_uart_tx > 0 && n_uart_rx > 0, "UART transmit and receive used");
    check(n_button > 0,    "button edge captured");
    check(n_led > 0,       "LEDs written");
    check(n_fetch > 0,     "program fetches seen");
    check(n_fetch_bad == 0, $sformatf("%0d program fetches returned wrong words", n_fetch_bad));
    $display("%s: cycles: factorization %0d, total solve %0d (%.3f ms at 40 MHz)", NAME,
             t_fact - t_start, t_end - t_start, real'(t_end - t_start) / 40000.0);
    $display("%s: cycles: forward reduction %0d, backward substitution %0d", NAME,
             t_fwd - t_fact, t_end - t_fwd);
    $display("%s: stall cycles %0d, parallel-transfer cycles %0d, SSRAM read cycles %0d, remote RAM accesses %0d",
             NAME, n_stall, n_parallel, n_ss_read, n_remote);
    $display("%s: program fetches %0d", NAME, n_fetch);
    $display("%s: FPU add %0d sub %0d mul %0d div %0d", NAME, n_fop[0], n_fop[1], n_fop[2], n_fop[3]);
    done = 1'b1;
  end
endmodule
