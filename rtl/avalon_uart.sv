// avalon_uart: serial port through which the control processor talks to the
// host PC.
//
// 8 data bits, no parity, one stop bit, LSB first; the line idles high.
// Registers (word offsets from the slave base; reads and writes complete in
// their first cycle):
//   0 RXDATA  read: last received byte in bits 7:0; the read clears RRDY
//   1 TXDATA  write: bits 7:0 are sent when TRDY is set (ignored otherwise)
//   2 STATUS  read: bit 0 RRDY (byte waiting), bit 1 TRDY (transmitter
//             free), bit 2 ROE (a byte arrived while RRDY was set; it is
//             lost); a write clears ROE
//   3 DIVISOR clock cycles per bit; reset value CLK_HZ/BAUD
// The receiver synchronises rxd with two flip-flops, waits half a bit after
// a falling edge, checks the start bit and then samples every bit in its
// middle. The register map and framing are this design's choice; only the
// existence of the UART is given.
module avalon_uart
  import lu_pkg::*;
#(
  parameter int unsigned CLK_HZ = 40_000_000,
  parameter int unsigned BAUD   = 115_200
) (
  input  logic    clk,
  input  logic    rst_n,
  input  av_req_t req,
  output av_rsp_t rsp,
  output logic    txd,
  input  logic    rxd
);
  localparam logic [15:0] DIV_RESET = 16'(CLK_HZ / BAUD);

  logic [1:0]  reg_sel;
  logic [15:0] divisor;

  // transmitter
  logic        tx_busy;
  logic [9:0]  tx_shift;
  logic [3:0]  tx_bits;
  logic [15:0] tx_cnt;

  // receiver
  logic [1:0]  rx_sync;
  logic        rx_busy;
  logic [3:0]  rx_bits;
  logic [15:0] rx_cnt;
  logic [7:0]  rx_shift;
  logic [7:0]  rx_data;
  logic        rrdy, roe;

  assign reg_sel = req.address[3:2];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      divisor  <= DIV_RESET;
      tx_busy  <= 1'b0;
      tx_shift <= '1;
      tx_bits  <= '0;
      tx_cnt   <= '0;
      rx_sync  <= 2'b11;
      rx_busy  <= 1'b0;
      rx_bits  <= '0;
      rx_cnt   <= '0;
      rx_shift <= '0;
      rx_data  <= '0;
      rrdy     <= 1'b0;
      roe      <= 1'b0;
    end else begin
      // ---- register writes and read side effects
      if (req.write) begin
        unique case (reg_sel)
          2'd1: if (!tx_busy) begin
                  tx_busy  <= 1'b1;
                  tx_shift <= {1'b1, req.writedata[7:0], 1'b0};
                  tx_bits  <= 4'd10;
                  tx_cnt   <= divisor;
                end
          2'd2: roe <= 1'b0;
          2'd3: divisor <= req.writedata[15:0];
          default: ;
        endcase
      end
      if (req.read && reg_sel == 2'd0) rrdy <= 1'b0;

      // ---- transmitter: one bit every divisor cycles
      if (tx_busy) begin
        if (tx_cnt == 16'd1) begin
          tx_cnt   <= divisor;
          tx_shift <= {1'b1, tx_shift[9:1]};
          tx_bits  <= tx_bits - 4'd1;
          if (tx_bits == 4'd1) tx_busy <= 1'b0;
        end else begin
          tx_cnt <= tx_cnt - 16'd1;
        end
      end

      // ---- receiver
      rx_sync <= {rx_sync[0], rxd};
      if (!rx_busy) begin
        if (!rx_sync[1]) begin             // start bit edge
          rx_busy <= 1'b1;
          rx_bits <= 4'd0;
          rx_cnt  <= divisor >> 1;
        end
      end else if (rx_cnt == 16'd0) begin  // middle of a bit
        rx_cnt <= divisor - 16'd1;
        if (rx_bits == 4'd0) begin
          if (rx_sync[1]) rx_busy <= 1'b0; // false start
          else            rx_bits <= 4'd1;
        end else if (rx_bits <= 4'd8) begin
          rx_shift <= {rx_sync[1], rx_shift[7:1]};
          rx_bits  <= rx_bits + 4'd1;
        end else begin                     // stop bit
          rx_busy <= 1'b0;
          if (rx_sync[1]) begin
            rx_data <= rx_shift;
            if (rrdy && !(req.read && reg_sel == 2'd0)) roe <= 1'b1;
            rrdy    <= 1'b1;
          end
        end
      end else begin
        rx_cnt <= rx_cnt - 16'd1;
      end
    end
  end

  assign txd = tx_shift[0] | ~tx_busy;

  always_comb begin
    rsp = '{waitrequest: 1'b0, readdata: '0};
    unique case (reg_sel)
      2'd0: rsp.readdata = {24'd0, rx_data};
      2'd1: rsp.readdata = '0;
      2'd2: rsp.readdata = {29'd0, roe, ~tx_busy, rrdy};
      2'd3: rsp.readdata = {16'd0, divisor};
      default: ;
    endcase
  end

endmodule
