// tb_avalon_uart: self-checking test of the UART. A serial monitor in the
// testbench decodes txd and a serial driver produces rxd, both at the bit
// time the DIVISOR register holds. Checked: the divisor's reset value
// (CLK_HZ/BAUD = 347), one byte sent at that rate with the right bit time,
// bytes sent and received at a faster divisor, TRDY/RRDY flags, the write
// ignored while the transmitter is busy, and the overrun flag ROE.
module tb_avalon_uart;
  import lu_pkg::*;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  av_req_t req;
  av_rsp_t rsp;
  logic    txd;
  logic    rxd = 1'b1;
  int      checks = 0, failures = 0;
  int      bit_cycles = 347;
  int      cycle = 0;
  byte     rx_got [$];
  int      rx_time [$];

  avalon_uart dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic wr(input int reg_i, input logic [31:0] d);
    @(negedge clk);
    req = '{read: 1'b0, write: 1'b1, address: UART_BASE + 32'(reg_i * 4), writedata: d, byteenable: 4'hF};
    @(negedge clk);
    req = '0;
  endtask

  task automatic rd(input int reg_i, output logic [31:0] d);
    @(negedge clk);
    req = '{read: 1'b1, write: 1'b0, address: UART_BASE + 32'(reg_i * 4), writedata: '0, byteenable: 4'hF};
    #1;
    d = rsp.readdata;
    @(negedge clk);
    req = '0;
  endtask

  // serial monitor on txd: records each byte and its start-to-stop time
  initial begin
    forever begin
      byte b;
      int  t0;
      @(negedge txd);
      t0 = cycle;
      repeat (bit_cycles / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (bit_cycles) @(posedge clk);
        b[i] = txd;
      end
      repeat (bit_cycles) @(posedge clk);
      if (txd !== 1'b1) begin
        failures++;
        $display("FAIL: stop bit missing");
      end
      rx_got.push_back(b);
      rx_time.push_back(cycle - t0);
    end
  end

  task automatic send_serial(input byte b);
    rxd = 1'b0;
    repeat (bit_cycles) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      rxd = b[i];
      repeat (bit_cycles) @(posedge clk);
    end
    rxd = 1'b1;
    repeat (bit_cycles) @(posedge clk);
  endtask

  initial begin
    logic [31:0] d;
    byte         bytes [4] = '{8'h47, 8'h1C, 8'h01, 8'hF0};
    req = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    rd(3, d);
    check(d[15:0] == 16'd347, "divisor reset value");
    rd(2, d);
    check(d[1] && !d[0], "idle status");
    // one byte at the reset rate
    wr(1, 32'h35);
    rd(2, d);
    check(!d[1], "TRDY clears while sending");
    wr(1, 32'h11);                      // ignored: transmitter busy
    repeat (12 * bit_cycles) @(posedge clk);
    check(rx_got.size() == 1, "one byte sent");
    if (rx_got.size() == 1) begin
      check(rx_got[0] == 8'h35, "byte value at reset rate");
      check(rx_time[0] >= 9 * bit_cycles && rx_time[0] <= 10 * bit_cycles, "bit time at reset rate");
      void'(rx_got.pop_front());
      void'(rx_time.pop_front());
    end
    // faster rate
    bit_cycles = 16;
    wr(3, 32'd16);
    foreach (bytes[i]) begin
      wr(1, {24'd0, bytes[i]});
      do rd(2, d); while (!d[1]);
      repeat (2 * bit_cycles) @(posedge clk);
    end
    check(rx_got.size() == 4, "four bytes sent");
    foreach (bytes[i]) if (i < rx_got.size()) check(rx_got[i] == bytes[i], "sent byte value");
    // receive
    foreach (bytes[i]) begin
      send_serial(bytes[i]);
      rd(2, d);
      check(d[0], "RRDY after a byte");
      rd(0, d);
      check(d[7:0] == bytes[i], "received byte value");
      rd(2, d);
      check(!d[0], "RRDY cleared by read");
    end
    // overrun
    send_serial(8'h12);
    send_serial(8'h34);
    rd(2, d);
    check(d[2] && d[0], "ROE after overrun");
    wr(2, 32'd0);
    rd(2, d);
    check(!d[2], "ROE cleared");
    rd(0, d);
    check(d[7:0] == 8'h34, "newest byte kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
