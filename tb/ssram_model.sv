// ssram_model: behavioural model of one synchronous burst SRAM chip, for
// simulation only (not synthesizable intent). Pipelined reads: the chip
// registers a read address at a clock edge and presents the data after the
// following edge, so data appears two edges after the address cycle.
// Writes take data and byte enables in the address cycle. WORDS sets the
// modelled depth; addresses wrap inside it. Contents start at zero.
module ssram_model
  import lu_pkg::*;
#(
  parameter int unsigned WORDS = 4096
) (
  input  logic        clk,
  input  ssram_pins_t ss,
  output logic [31:0] q
);
  logic [31:0] mem [WORDS];
  logic [31:0] q1;
  int unsigned idx;

  initial begin
    for (int i = 0; i < WORDS; i++) mem[i] = '0;
    q  = '0;
    q1 = '0;
  end

  assign idx = int'(ss.addr) % WORDS;

  always @(posedge clk) begin
    if (ss.ce && ss.we)
      for (int b = 0; b < 4; b++)
        if (ss.be[b]) mem[idx][8*b +: 8] <= ss.d[8*b +: 8];
    q1 <= (ss.ce && !ss.we) ? mem[idx] : 32'hDEAD_BEEF;
    q  <= q1;
  end
endmodule
