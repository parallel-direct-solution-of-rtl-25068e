// tb_avalon_pio: self-checking test of the LED/button port. Writes LED
// patterns and reads them back, reads button levels through the two-stage
// synchroniser, and checks that a press (rising edge) sets the edge-capture
// bit, that it holds after release, and that writing 1s clears it.
module tb_avalon_pio;
  import lu_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  av_req_t    req;
  av_rsp_t    rsp;
  logic [7:0] pio_out;
  logic [3:0] pio_in = '0;
  int         checks = 0, failures = 0;

  avalon_pio dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic wr(input int reg_i, input logic [31:0] d);
    @(negedge clk);
    req = '{read: 1'b0, write: 1'b1, address: PIO_BASE + 32'(reg_i * 4), writedata: d, byteenable: 4'hF};
    @(negedge clk);
    req = '0;
  endtask

  task automatic rd(input int reg_i, output logic [31:0] d);
    @(negedge clk);
    req = '{read: 1'b1, write: 1'b0, address: PIO_BASE + 32'(reg_i * 4), writedata: '0, byteenable: 4'hF};
    #1;
    d = rsp.readdata;
    @(negedge clk);
    req = '0;
  endtask

  initial begin
    logic [31:0] d;
    req = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(pio_out == 8'h00, "LEDs off after reset");
    for (int i = 0; i < 20; i++) begin
      logic [7:0] v;
      v = 8'($urandom);
      wr(0, {24'd0, v});
      check(pio_out == v, "LED pins");
      rd(1, d);
      check(d[7:0] == v, "LED readback");
    end
    rd(3, d);
    check(d[3:0] == 4'd0, "no edges yet");
    pio_in = 4'b0101;
    repeat (4) @(negedge clk);
    rd(0, d);
    check(d[3:0] == 4'b0101, "button levels");
    pio_in = 4'b0000;
    repeat (4) @(negedge clk);
    rd(3, d);
    check(d[3:0] == 4'b0101, "edges held after release");
    wr(3, 32'b0001);
    rd(3, d);
    check(d[3:0] == 4'b0100, "edge bit 0 cleared, bit 2 kept");
    pio_in = 4'b1000;
    repeat (4) @(negedge clk);
    rd(3, d);
    check(d[3:0] == 4'b1100, "new edge on button 3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
