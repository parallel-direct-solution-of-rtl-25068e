// ssram_ctrl: bus slave interface to one synchronous burst SRAM chip.
//
// The board carries two SSRAM chips with separate address, data and control
// buses; each has one of these controllers. As in the design, a read has
// two wait states: the chip registers the address at the end of the first
// cycle and presents the data two clock edges later, so the controller
// holds waitrequest high for WAIT_STATES cycles and returns the chip's data
// with waitrequest low in the third cycle. A write is issued in its first
// cycle with data and byte write enables and completes at once (the chip is
// assumed to take write data in the address cycle). The word address sent
// to the chip is address[ADDR_W+1:2], the offset inside the 1 MB window.
// Address, write data, byte enables and read data are wired straight
// between bus and chip; the controller's own logic is the wait-state
// counter and the chip and write enables.
module ssram_ctrl
  import lu_pkg::*;
#(
  parameter int unsigned ADDR_W      = 18,
  parameter int unsigned WAIT_STATES = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  av_req_t     req,
  output av_rsp_t     rsp,
  output ssram_pins_t ss,
  input  logic [31:0] ss_q
);
  localparam int unsigned CW = $clog2(WAIT_STATES + 1);

  logic [CW-1:0] wcnt;

  always_ff @(posedge clk) begin
    if (!rst_n)                                   wcnt <= '0;
    else if (req.read && wcnt != CW'(WAIT_STATES)) wcnt <= wcnt + CW'(1);
    else                                          wcnt <= '0;
  end

  always_comb begin
    ss      = '0;
    ss.addr = SS_AW_MAX'(req.address[ADDR_W+1:2]);
    ss.d    = req.writedata;
    ss.ce   = req.read | req.write;
    ss.we   = req.write;
    ss.be   = req.write ? req.byteenable : '0;
  end

  assign rsp.waitrequest = req.read && (wcnt != CW'(WAIT_STATES));
  assign rsp.readdata    = ss_q;

  initial assert (ADDR_W <= SS_AW_MAX) else $error("ssram_ctrl: AW above %0d", SS_AW_MAX);

endmodule
