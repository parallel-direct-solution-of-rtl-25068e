// fp_addsub: pipelined IEEE 754 single-precision adder/subtractor.
//
// result = dataa + datab (sub = 0) or dataa - datab (sub = 1). A new
// operation may start every cycle; each one comes out LATENCY cycles after
// its start cycle (start high in cycle c -> done high in cycle c+LATENCY).
// The 7-cycle latency is the one the design's adder/subtractor has; the
// split into stages is this implementation's (functions in fp_pkg):
//   1  operand registers (subtraction flips the sign of datab)
//   2  special cases, swap so that |a| >= |b|, exponent difference
//   3  align the smaller significand (guard, round and sticky bits)
//   4  add or subtract the significands
//   5  normalise (leading-zero count and shift, or a right shift by one)
//   6  round to nearest even and pack
//   7+ output register(s): LATENCY-6 of them
// Number handling (flush to zero, NaN and infinity) is described in fp_pkg.
module fp_addsub #(
  parameter int unsigned LATENCY = 7
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        sub,
  input  logic [31:0] dataa,
  input  logic [31:0] datab,
  output logic [31:0] result,
  output logic        done
);
  import fp_pkg::*;

  localparam int unsigned NSTAGE = 6;           // stages with logic
  localparam int unsigned NOUT   = LATENCY - NSTAGE;

  logic [31:0] a_q, b_q;
  add_a_t      s2, s3;
  add_c_t      s4;
  fp_norm_t    s5;
  logic [31:0] s6;
  logic [NSTAGE-1:0] v;                          // valid of stages 1..6
  logic [31:0] out_d [NOUT];
  logic        out_v [NOUT];

  always_ff @(posedge clk) begin
    if (!rst_n) v <= '0;
    else        v <= {v[NSTAGE-2:0], start};
    if (start) begin
      a_q <= dataa;
      b_q <= {datab[31] ^ sub, datab[30:0]};
    end
    s2 <= add_stage_a(a_q, b_q);
    s3 <= add_stage_b(s2);
    s4 <= add_stage_c(s3);
    s5 <= add_stage_d(s4);
    s6 <= norm_round(s5);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NOUT; i++) out_v[i] <= 1'b0;
    end else begin
      out_v[0] <= v[NSTAGE-1];
      for (int i = 1; i < NOUT; i++) out_v[i] <= out_v[i-1];
    end
    out_d[0] <= s6;
    for (int i = 1; i < NOUT; i++) out_d[i] <= out_d[i-1];
  end

  assign result = out_d[NOUT-1];
  assign done   = out_v[NOUT-1];

  initial assert (LATENCY > NSTAGE) else $error("fp_addsub: LATENCY must be at least %0d", NSTAGE + 1);

endmodule
