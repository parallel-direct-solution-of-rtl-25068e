// fp_mul: pipelined IEEE 754 single-precision multiplier.
//
// result = dataa * datab. A new operation may start every cycle; each one
// comes out LATENCY cycles after its start cycle (start high in cycle c ->
// done high in cycle c+LATENCY), 5 cycles as in the design's multiplier.
// The split into stages is this implementation's (functions in fp_pkg):
//   1  operand registers
//   2  special cases, exponent sum, 24x24-bit significand product
//   3  normalise the product (one-bit shift) and form guard/round/sticky
//   4  round to nearest even and pack
//   5+ output register(s): LATENCY-4 of them
// Number handling (flush to zero, NaN and infinity) is described in fp_pkg.
module fp_mul #(
  parameter int unsigned LATENCY = 5
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] dataa,
  input  logic [31:0] datab,
  output logic [31:0] result,
  output logic        done
);
  import fp_pkg::*;

  localparam int unsigned NSTAGE = 4;
  localparam int unsigned NOUT   = LATENCY - NSTAGE;

  logic [31:0] a_q, b_q;
  mul_a_t      s2;
  fp_norm_t    s3;
  logic [31:0] s4;
  logic [NSTAGE-1:0] v;
  logic [31:0] out_d [NOUT];
  logic        out_v [NOUT];

  always_ff @(posedge clk) begin
    if (!rst_n) v <= '0;
    else        v <= {v[NSTAGE-2:0], start};
    if (start) begin
      a_q <= dataa;
      b_q <= datab;
    end
    s2 <= mul_stage_a(a_q, b_q);
    s3 <= mul_stage_b(s2);
    s4 <= norm_round(s3);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NOUT; i++) out_v[i] <= 1'b0;
    end else begin
      out_v[0] <= v[NSTAGE-1];
      for (int i = 1; i < NOUT; i++) out_v[i] <= out_v[i-1];
    end
    out_d[0] <= s4;
    for (int i = 1; i < NOUT; i++) out_d[i] <= out_d[i-1];
  end

  assign result = out_d[NOUT-1];
  assign done   = out_v[NOUT-1];

  initial assert (LATENCY > NSTAGE) else $error("fp_mul: LATENCY must be at least %0d", NSTAGE + 1);

endmodule
