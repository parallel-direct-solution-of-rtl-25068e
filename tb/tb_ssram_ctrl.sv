// tb_ssram_ctrl: self-checking test of the SSRAM controller against the
// behavioural chip model. Writes random words (some with partial byte
// enables), reads them back in random order and compares with a model
// array; checks that a write completes with no wait state and that a read
// has exactly two wait states.
module tb_ssram_ctrl;
  import lu_pkg::*;

  localparam int unsigned N = 256;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  av_req_t     req;
  av_rsp_t     rsp;
  ssram_pins_t ss;
  logic [31:0] ss_q;
  int          checks = 0, failures = 0;
  logic [31:0] shadow [N];

  ssram_ctrl #(.ADDR_W(18)) dut (.clk, .rst_n, .req, .rsp, .ss, .ss_q);
  ssram_model #(.WORDS(1024)) chip (.clk, .ss, .q(ss_q));

  always #5 clk = ~clk;

  // one bus transfer; returns the number of wait states
  task automatic xfer(input logic wr, input int word, input logic [31:0] wd, input logic [3:0] be,
                      output logic [31:0] rd, output int waits);
    @(negedge clk);
    req = '{read: !wr, write: wr, address: SSRAM1_BASE + 32'(word * 4), writedata: wd, byteenable: be};
    waits = 0;
    #1;
    while (rsp.waitrequest) begin
      @(negedge clk);
      #1;
      waits++;
    end
    rd = rsp.readdata;
    @(negedge clk);
    req = '0;
  endtask

  initial begin
    logic [31:0] rd, wd;
    logic [3:0]  be;
    int w;
    req = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N; i++) begin
      xfer(1'b1, i, i * 32'h0101_0101 ^ 32'hA5A5_0000, 4'hF, rd, w);
      shadow[i] = i * 32'h0101_0101 ^ 32'hA5A5_0000;
      checks++;
      if (w != 0) begin failures++; $display("FAIL: write waits %0d", w); end
    end
    for (int i = 0; i < N / 2; i++) begin
      int k;
      k  = $urandom_range(N - 1);
      wd = $urandom;
      be = 4'($urandom);
      xfer(1'b1, k, wd, be, rd, w);
      for (int b = 0; b < 4; b++) if (be[b]) shadow[k][8*b +: 8] = wd[8*b +: 8];
    end
    for (int i = 0; i < 2 * N; i++) begin
      int k;
      k = $urandom_range(N - 1);
      xfer(1'b0, k, '0, 4'hF, rd, w);
      checks += 2;
      if (rd !== shadow[k]) begin failures++; $display("FAIL: word %0d read %h expected %h", k, rd, shadow[k]); end
      if (w != 2) begin failures++; $display("FAIL: read waits %0d", w); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
