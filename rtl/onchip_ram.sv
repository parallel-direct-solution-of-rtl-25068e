// onchip_ram: on-chip RAM of one processor, a bus slave.
//
// Each processor owns BYTES of on-chip RAM (7 KB in the design). Because the
// bus is fully connected, the other processors reach it too, and the
// processors exchange partial sums and flags through these RAMs.
// Interface: lu_pkg bus request/response; the slave decodes only the low
// address bits (word = address[..:2]); words beyond BYTES/4 read as 0 and
// ignore writes. Timing (this design's choice, matching a synchronous block
// RAM): a write completes in its first cycle with byte enables; a read has
// one wait state: the RAM is read at the end of the first cycle and the
// data is returned with waitrequest low in the second.
module onchip_ram
  import lu_pkg::*;
#(
  parameter int unsigned BYTES = 7168
) (
  input  logic    clk,
  input  logic    rst_n,
  input  av_req_t req,
  output av_rsp_t rsp
);
  localparam int unsigned WORDS = BYTES / 4;
  localparam int unsigned IW    = $clog2(WORDS);

  logic [31:0]   mem [WORDS];
  logic [IW-1:0] idx;
  logic          in_range;
  logic          rd_pend;
  logic [31:0]   rd_q;

  assign idx      = req.address[IW+1:2];
  assign in_range = (int'(idx) < WORDS);

  always_ff @(posedge clk) begin
    if (req.write && in_range)
      for (int b = 0; b < 4; b++)
        if (req.byteenable[b]) mem[idx][8*b +: 8] <= req.writedata[8*b +: 8];
    if (req.read) rd_q <= in_range ? mem[idx] : '0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) rd_pend <= 1'b0;
    else        rd_pend <= req.read && !rd_pend;
  end

  assign rsp.waitrequest = req.read && !rd_pend;
  assign rsp.readdata    = rd_q;

endmodule
