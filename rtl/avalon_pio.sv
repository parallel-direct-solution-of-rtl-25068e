// avalon_pio: LED output port and push-button input port of the board.
//
// Registers (word offsets; reads and writes complete in their first cycle):
//   0 DATA  read: the button inputs (synchronised); write: the LED outputs
//   1 OUT   read: the LED output register
//   3 EDGE  read: one bit per button, set on a rising edge of that input
//           and held until software clears it; a write of 1s clears bits
// Buttons are synchronised with two flip-flops before edge detection. The
// register map is this design's choice; only the existence of LED and button
// interfaces is given.
module avalon_pio
  import lu_pkg::*;
#(
  parameter int unsigned OUT_W = 8,
  parameter int unsigned IN_W  = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  av_req_t          req,
  output av_rsp_t          rsp,
  output logic [OUT_W-1:0] pio_out,
  input  logic [IN_W-1:0]  pio_in
);
  logic [1:0]      reg_sel;
  logic [IN_W-1:0] s1, s2, s3, edge_cap;

  assign reg_sel = req.address[3:2];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pio_out  <= '0;
      s1       <= '0;
      s2       <= '0;
      s3       <= '0;
      edge_cap <= '0;
    end else begin
      s1 <= pio_in;
      s2 <= s1;
      s3 <= s2;
      if (req.write && reg_sel == 2'd0) pio_out <= req.writedata[OUT_W-1:0];
      if (req.write && reg_sel == 2'd3)
        edge_cap <= (edge_cap & ~req.writedata[IN_W-1:0]) | (s2 & ~s3);
      else
        edge_cap <= edge_cap | (s2 & ~s3);
    end
  end

  always_comb begin
    rsp = '{waitrequest: 1'b0, readdata: '0};
    unique case (reg_sel)
      2'd0: rsp.readdata = 32'(s2);
      2'd1: rsp.readdata = 32'(pio_out);
      2'd3: rsp.readdata = 32'(edge_cap);
      default: ;
    endcase
  end

endmodule
