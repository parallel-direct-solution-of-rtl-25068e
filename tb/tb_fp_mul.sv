// tb_fp_mul: self-checking test of the pipelined multiplier. One operation
// per cycle with random operands (including products that round, overflow
// and underflow to zero) and directed special cases; results are compared
// with a double-precision reference rounded to single, and each must arrive
// exactly LATENCY (5) cycles after its start.
module tb_fp_mul;
  import fp_ref_pkg::*;

  localparam int unsigned LATENCY = 5;
  localparam int unsigned NRAND   = 4000;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  logic [31:0] dataa = '0, datab = '0, result;
  logic        done;
  int          checks = 0, failures = 0;
  int          cycle = 0;
  logic [31:0] exp_q [$];
  int          t_q   [$];

  fp_mul #(.LATENCY(LATENCY)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

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
          if (failures < 10) $display("FAIL: %h expected %h", result, e);
        end
        if (cycle - t != LATENCY) begin
          failures++;
          $display("FAIL: latency %0d", cycle - t);
        end
      end
    end
  end

  task automatic issue(input logic [31:0] a, input logic [31:0] b, input logic [31:0] e);
    start = 1'b1; dataa = a; datab = b;
    exp_q.push_back(e);
    t_q.push_back(cycle);
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    issue(32'h4000_0000, 32'h4040_0000, 32'h40C0_0000);  // 2 * 3 = 6
    issue(32'hBF80_0000, 32'h3F80_0000, 32'hBF80_0000);  // -1 * 1
    issue(32'h7F80_0000, 32'h0000_0000, 32'h7FC0_0000);  // inf * 0 = NaN
    issue(32'h7F80_0000, 32'hC000_0000, 32'hFF80_0000);  // inf * -2
    issue(32'h7F00_0000, 32'h7F00_0000, 32'h7F80_0000);  // overflow
    issue(32'h0080_0000, 32'h3E80_0000, 32'h0000_0000);  // underflow flushed
    issue(32'h8000_0000, 32'h4120_0000, 32'h8000_0000);  // -0 * 10
    for (int i = 0; i < NRAND; i++) begin
      logic [31:0] a, b;
      a = rand_fp(i % 3 == 0 ? 70 : 20);
      b = rand_fp(i % 3 == 0 ? 70 : 20);
      issue(a, b, ref_mul(a, b));
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
