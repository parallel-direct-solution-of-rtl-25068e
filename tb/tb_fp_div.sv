// tb_fp_div: self-checking test of the iterative divider. Operations are
// issued one after another (the divider is not pipelined): random operands,
// including quotients that round, overflow and underflow, plus directed
// special cases. Each result is compared with a double-precision reference
// rounded to single; done must come exactly LATENCY (50) cycles after start,
// busy must be high in between, and a start while busy must be ignored.
module tb_fp_div;
  import fp_ref_pkg::*;

  localparam int unsigned LATENCY = 50;
  localparam int unsigned NRAND   = 1500;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  logic [31:0] dataa = '0, datab = '0, result;
  logic        done, busy;
  int          checks = 0, failures = 0;

  fp_div #(.LATENCY(LATENCY)) dut (.*);

  always #5 clk = ~clk;

  task automatic divide(input logic [31:0] a, input logic [31:0] b, input logic [31:0] e);
    int n;
    @(negedge clk);
    start = 1'b1; dataa = a; datab = b;
    @(negedge clk);
    start = 1'b0;
    n = 1;
    while (!done && n < 200) begin
      // a stray start while busy must not disturb the division
      if (n == 10) begin
        checks++;
        if (!busy) begin
          failures++;
          $display("FAIL: not busy");
        end
        start = 1'b1; dataa = 32'h3F80_0000; datab = 32'h3F80_0000;
      end else start = 1'b0;
      @(negedge clk);
      n++;
    end
    start = 1'b0;
    checks += 2;
    if (n != LATENCY) begin
      failures++;
      $display("FAIL: latency %0d", n);
    end
    if (result !== e) begin
      failures++;
      if (failures < 10) $display("FAIL: %h / %h = %h expected %h", a, b, result, e);
    end
    @(negedge clk);
    checks++;
    if (done || busy) begin
      failures++;
      $display("FAIL: divider did not return to idle");
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    divide(32'h40C0_0000, 32'h4040_0000, 32'h4000_0000);  // 6 / 3 = 2
    divide(32'h3F80_0000, 32'h4040_0000, 32'h3EAA_AAAB);  // 1 / 3
    divide(32'h3F80_0000, 32'h0000_0000, 32'h7F80_0000);  // 1 / 0 = inf
    divide(32'h0000_0000, 32'h0000_0000, 32'h7FC0_0000);  // 0 / 0 = NaN
    divide(32'hC000_0000, 32'h7F80_0000, 32'h8000_0000);  // -2 / inf = -0
    divide(32'h7F00_0000, 32'h3E80_0000, 32'h7F80_0000);  // overflow
    for (int i = 0; i < NRAND; i++) begin
      logic [31:0] a, b;
      a = rand_fp(i % 3 == 0 ? 70 : 20);
      b = rand_fp(i % 3 == 0 ? 70 : 20);
      divide(a, b, ref_div(a, b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NRAND + 10) * (LATENCY + 4)) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
