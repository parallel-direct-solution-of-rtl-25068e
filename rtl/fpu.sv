// fpu: single-precision floating-point unit of one processor.
//
// The processor reaches the unit through four custom instructions, chosen
// by n: add (0), subtract (1), multiply (2) and divide (3). The processor
// raises start for one cycle with the operands on dataa/datab and waits for
// done, which is high for one cycle with the result; it issues the next
// instruction only after that. Latency from the start cycle to done:
// 7 cycles for add and subtract, 5 for multiply, 50 for divide, the figures
// of the design's FPU. The unit holds one adder/subtractor, one multiplier
// and one divider (fp_addsub, fp_mul, fp_div); start is steered to the unit
// that n selects and done/result are taken from whichever unit finishes.
// A start while the divider is busy is ignored; an assertion flags it.
module fpu #(
  parameter int unsigned ADD_LATENCY = 7,
  parameter int unsigned MUL_LATENCY = 5,
  parameter int unsigned DIV_LATENCY = 50
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [1:0]  n,
  input  logic [31:0] dataa,
  input  logic [31:0] datab,
  output logic [31:0] result,
  output logic        done
);
  import lu_pkg::*;

  fp_op_e      op;
  logic [31:0] add_res, mul_res, div_res;
  logic        add_done, mul_done, div_done, div_busy;

  assign op = fp_op_e'(n);

  fp_addsub #(.LATENCY(ADD_LATENCY)) u_add (
    .clk, .rst_n,
    .start (start && (op == FP_ADD || op == FP_SUB)),
    .sub   (op == FP_SUB),
    .dataa, .datab,
    .result(add_res), .done(add_done)
  );

  fp_mul #(.LATENCY(MUL_LATENCY)) u_mul (
    .clk, .rst_n,
    .start (start && op == FP_MUL),
    .dataa, .datab,
    .result(mul_res), .done(mul_done)
  );

  fp_div #(.LATENCY(DIV_LATENCY)) u_div (
    .clk, .rst_n,
    .start (start && op == FP_DIV),
    .dataa, .datab,
    .result(div_res), .done(div_done), .busy(div_busy)
  );

  always_comb begin
    result = add_res;
    if (mul_done) result = mul_res;
    if (div_done) result = div_res;
  end
  assign done = add_done | mul_done | div_done;

  // one instruction at a time: two units never finish together
  a_one_done: assert property (@(posedge clk) disable iff (!rst_n)
                               $onehot0({add_done, mul_done, div_done}));
  a_div_free: assert property (@(posedge clk) disable iff (!rst_n)
                               !(start && op == FP_DIV && div_busy));

endmodule
