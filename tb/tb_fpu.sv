// tb_fpu: self-checking test of the four-instruction FPU. Issues add,
// subtract, multiply and divide instructions one at a time in random order,
// as a processor would, checks each result against a double-precision
// reference rounded to single, and checks the latency of each instruction:
// 7 cycles for add/subtract, 5 for multiply, 50 for divide.
module tb_fpu;
  import fp_ref_pkg::*;
  import lu_pkg::*;

  localparam int unsigned NOPS = 1200;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  logic [1:0]  n = '0;
  logic [31:0] dataa = '0, datab = '0, result;
  logic        done;
  int          checks = 0, failures = 0;
  int          nops [4] = '{0, 0, 0, 0};

  fpu dut (.*);

  always #5 clk = ~clk;

  function automatic int lat_of(input fp_op_e op);
    case (op)
      FP_MUL:  return 5;
      FP_DIV:  return 50;
      default: return 7;
    endcase
  endfunction

  task automatic op(input fp_op_e o, input logic [31:0] a, input logic [31:0] b);
    logic [31:0] e;
    int cyc;
    case (o)
      FP_ADD: e = ref_add(a, b);
      FP_SUB: e = ref_sub(a, b);
      FP_MUL: e = ref_mul(a, b);
      default: e = ref_div(a, b);
    endcase
    @(negedge clk);
    start = 1'b1; n = o; dataa = a; datab = b;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done && cyc < 100) begin
      @(negedge clk);
      cyc++;
    end
    checks += 2;
    nops[o]++;
    if (result !== e) begin
      failures++;
      if (failures < 10) $display("FAIL: op %s %h %h -> %h expected %h", o.name(), a, b, result, e);
    end
    if (cyc != lat_of(o)) begin
      failures++;
      $display("FAIL: op %s latency %0d", o.name(), cyc);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NOPS; i++)
      op(fp_op_e'($urandom_range(3)), rand_fp(20), rand_fp(20));
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (nops[k] == 0) begin
        failures++;
        $display("FAIL: instruction %0d never issued", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NOPS * 60 + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
