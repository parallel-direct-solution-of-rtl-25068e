// tb_fp_addsub: self-checking test of the pipelined adder/subtractor.
// Issues one operation per cycle (random operands over a wide and a narrow
// exponent range, so that both alignment and cancellation occur, plus
// directed special cases), compares each result with a double-precision
// reference rounded to single, and checks that every result arrives exactly
// LATENCY (7) cycles after its start.
module tb_fp_addsub;
  import fp_ref_pkg::*;

  localparam int unsigned LATENCY = 7;
  localparam int unsigned NRAND   = 4000;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0, sub = 1'b0;
  logic [31:0] dataa = '0, datab = '0, result;
  logic        done;
  int          checks = 0, failures = 0;
  int          cycle = 0;

  logic [31:0] exp_q [$];
  int          t_q   [$];

  fp_addsub #(.LATENCY(LATENCY)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // checker
  always @(negedge clk) begin
    if (done) begin
      logic [31:0] e;
      int t;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected done");
      end else begin
        e = exp_q.pop_front();
        t = t_q.pop_front();
        checks += 2;
        if (result !== e) begin
          failures++;
          if (failures < 10) $display("FAIL: result %h expected %h", result, e);
        end
        if (cycle - t != LATENCY) begin
          failures++;
          $display("FAIL: latency %0d", cycle - t);
        end
      end
    end
  end

  task automatic issue(input logic [31:0] a, input logic [31:0] b, input logic s, input logic [31:0] e);
    @(negedge clk);
    start = 1'b1; dataa = a; datab = b; sub = s;
    exp_q.push_back(e);
    t_q.push_back(cycle);
    @(negedge clk);
    start = 1'b0;
  endtask

  task automatic issue_stream(input logic [31:0] a, input logic [31:0] b, input logic s);
    // back-to-back: caller is at a negedge
    start = 1'b1; dataa = a; datab = b; sub = s;
    exp_q.push_back(s ? ref_sub(a, b) : ref_add(a, b));
    t_q.push_back(cycle);
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // directed cases
    issue(32'h3F80_0000, 32'h3F80_0000, 1'b0, 32'h4000_0000);  // 1 + 1 = 2
    issue(32'h3F80_0000, 32'h3F80_0000, 1'b1, 32'h0000_0000);  // 1 - 1 = +0
    issue(32'h4040_0000, 32'hBF80_0000, 1'b0, 32'h4000_0000);  // 3 + -1 = 2
    issue(32'h3F80_0000, 32'h3380_0000, 1'b0, 32'h3F80_0000);  // 1 + 2^-24: tie, stays even
    issue(32'h3F80_0001, 32'h3380_0000, 1'b0, 32'h3F80_0002);  // tie rounds up to even
    issue(32'h7F80_0000, 32'h3F80_0000, 1'b0, 32'h7F80_0000);  // inf + 1
    issue(32'h7F80_0000, 32'h7F80_0000, 1'b1, 32'h7FC0_0000);  // inf - inf = NaN
    issue(32'h7F7F_FFFF, 32'h7F7F_FFFF, 1'b0, 32'h7F80_0000);  // overflow
    issue(32'h0000_0000, 32'hC120_0000, 1'b0, 32'hC120_0000);  // 0 + -10
    issue(32'h8000_0000, 32'h8000_0000, 1'b0, 32'h8000_0000);  // -0 + -0
    // random, back to back
    @(negedge clk);
    for (int i = 0; i < NRAND; i++) begin
      logic [31:0] a, b;
      a = rand_fp(i % 2 ? 30 : 2);
      b = rand_fp(i % 2 ? 30 : 2);
      if (i % 5 == 0) b = {$urandom_range(1) == 1 ? a[31] : ~a[31], a[30:8], 8'($urandom)};
      issue_stream(a, b, 1'($urandom_range(1)));
    end
    start = 1'b0;
    repeat (LATENCY + 3) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NRAND + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
