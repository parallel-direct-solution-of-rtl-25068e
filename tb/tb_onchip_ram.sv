// tb_onchip_ram: self-checking test of the on-chip RAM slave at its full
// 7 KB size. Fills every word, rewrites random words with random byte
// enables, reads back in random order against a model array, checks one
// wait state per read and none per write, and checks that an address past
// the 7 KB reads as zero.
module tb_onchip_ram;
  import lu_pkg::*;

  localparam int unsigned BYTES = 7168;
  localparam int unsigned WORDS = BYTES / 4;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  av_req_t     req;
  av_rsp_t     rsp;
  int          checks = 0, failures = 0;
  logic [31:0] shadow [WORDS];

  onchip_ram #(.BYTES(BYTES)) dut (.clk, .rst_n, .req, .rsp);

  always #5 clk = ~clk;

  task automatic xfer(input logic wr, input int word, input logic [31:0] wd, input logic [3:0] be,
                      output logic [31:0] rd, output int waits);
    @(negedge clk);
    req = '{read: !wr, write: wr, address: 32'(word * 4), writedata: wd, byteenable: be};
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
    for (int i = 0; i < WORDS; i++) begin
      shadow[i] = $urandom;
      xfer(1'b1, i, shadow[i], 4'hF, rd, w);
      checks++;
      if (w != 0) begin failures++; $display("FAIL: write waits %0d", w); end
    end
    for (int i = 0; i < 500; i++) begin
      int k;
      k  = $urandom_range(WORDS - 1);
      wd = $urandom;
      be = 4'($urandom);
      xfer(1'b1, k, wd, be, rd, w);
      for (int b = 0; b < 4; b++) if (be[b]) shadow[k][8*b +: 8] = wd[8*b +: 8];
    end
    for (int i = 0; i < 2000; i++) begin
      int k;
      k = (i < 2 || i == 1000) ? (i == 1 ? WORDS - 1 : 0) : $urandom_range(WORDS - 1);
      xfer(1'b0, k, '0, 4'hF, rd, w);
      checks += 2;
      if (rd !== shadow[k]) begin failures++; $display("FAIL: word %0d read %h expected %h", k, rd, shadow[k]); end
      if (w != 1) begin failures++; $display("FAIL: read waits %0d", w); end
    end
    xfer(1'b0, WORDS + 5, '0, 4'hF, rd, w);
    checks++;
    if (rd !== '0) begin failures++; $display("FAIL: out-of-range read %h", rd); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
