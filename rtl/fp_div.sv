// fp_div: iterative IEEE 754 single-precision divider.
//
// result = dataa / datab. The divider takes one operation at a time: start
// in cycle c gives done (one cycle) in cycle c+LATENCY, 50 cycles as in the
// design's divider, and busy is high in between; a start while busy is
// ignored. The quotient significand is formed by restoring division, one
// bit per cycle: 28 quotient bits, enough for the 24 result bits, a guard
// and a round bit, whatever the ratio of the two significands; the final
// remainder gives the sticky bit. The result is rounded to nearest even.
// The remaining cycles up to LATENCY are waiting cycles, so the latency is
// the documented one; the restoring algorithm is this design's choice.
module fp_div #(
  parameter int unsigned LATENCY = 50
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] dataa,
  input  logic [31:0] datab,
  output logic [31:0] result,
  output logic        done,
  output logic        busy
);
  import fp_pkg::*;

  localparam int unsigned QBITS = 28;
  localparam int unsigned CW    = $clog2(LATENCY + 1);

  logic [CW-1:0]    cnt;
  logic             special;
  logic [31:0]      special_res;
  logic             sign;
  int               exp_diff;
  logic [24:0]      rem;
  logic [23:0]      divisor;
  logic [QBITS-1:0] quo;
  logic [24:0]      rem_sub;

  assign rem_sub = rem - {1'b0, divisor};

  function automatic logic [31:0] finish(input logic s, input int ed, input logic [QBITS-1:0] q,
                                         input logic rnz);
    logic [26:0] m;
    if (q[QBITS-1]) begin
      m = {q[27:2], q[1] | q[0] | rnz};
      return round_pack(s, ed + 127, m);
    end
    m = {q[26:1], q[0] | rnz};
    return round_pack(s, ed + 126, m);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          cnt  <= CW'(1);
        end
      end else begin
        cnt <= cnt + CW'(1);
        if (cnt == CW'(LATENCY - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
    // datapath
    if (!busy && start) begin
      {special, special_res} <= fp_div_special(dataa, datab);
      sign     <= dataa[31] ^ datab[31];
      exp_diff <= int'(dataa[30:23]) - int'(datab[30:23]);
      rem      <= {2'b01, dataa[22:0]};
      divisor  <= {1'b1, datab[22:0]};
      quo      <= '0;
    end else if (busy && cnt <= CW'(QBITS)) begin
      if (!rem_sub[24]) begin
        quo <= {quo[QBITS-2:0], 1'b1};
        rem <= {rem_sub[23:0], 1'b0};
      end else begin
        quo <= {quo[QBITS-2:0], 1'b0};
        rem <= {rem[23:0], 1'b0};
      end
    end
    if (busy && cnt == CW'(LATENCY - 1))
      result <= special ? special_res : finish(sign, exp_diff, quo, rem != '0);
  end

  initial assert (LATENCY > QBITS + 1) else $error("fp_div: LATENCY must exceed %0d", QBITS + 1);

endmodule
