// uart: asynchronous serial port of the Nimbus (ATmega103 UART register set),
// 8 data bits, no parity, 1 stop bit.
// Registers: UDR (I/O 0x0C; write = transmit buffer, read = received byte),
// USR (0x0B: RXC 7, TXC 6, UDRE 5, FE 4, OR 3; writing 1 to TXC clears it),
// UCR (0x0A: RXCIE 7, TXCIE 6, UDRIE 5, RXEN 4, TXEN 3) and UBRR (0x09).
// Baud rate = clk / (16 * (UBRR + 1)): a divider makes a tick every UBRR+1
// clocks, and one bit lasts 16 ticks. The transmitter moves the buffer into
// its shift register when idle (UDRE is then set again) and sets TXC when the
// stop bit has gone out with the buffer empty. The receiver waits for a low
// level on the synchronised 'rxd', checks it again half a bit later, samples
// the 8 data bits and the stop bit in the middle of each bit, stores the byte
// (OR if the previous one was unread, FE if the stop bit was 0) and sets RXC.
// Reading UDR clears RXC; acknowledging the TX-complete interrupt clears TXC.
module uart
  import nimbus_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [5:0] io_addr,
  input  logic       io_re,
  input  logic       io_we,
  input  logic [7:0] io_wdata,
  output logic [7:0] rdata,
  output logic       hit,
  input  logic       rxd,
  output logic       txd,
  output logic       irq_rx,
  output logic       irq_udre,
  output logic       irq_tx,
  input  logic       irqack,
  input  logic [4:0] irqackad
);
  logic [7:0] ubrr, ucr, udr_tx, udr_rx, div;
  logic       rxc, txc, udre, fe, ovr;
  logic       tick;
  // transmitter
  logic       tx_busy;
  logic [9:0] tx_shift;
  logic [3:0] tx_bits, tx_ticks;
  // receiver
  logic [1:0] rx_sync;
  logic       rx_busy;
  logic [3:0] rx_ticks, rx_bits;
  logic [7:0] rx_shift;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div <= '0;
      tick <= 1'b0;
    end else if (div == ubrr) begin
      div  <= '0;
      tick <= 1'b1;
    end else begin
      div  <= div + 8'd1;
      tick <= 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ubrr <= '0; ucr <= '0; udr_tx <= '0; udr_rx <= '0;
      rxc <= 1'b0; txc <= 1'b0; udre <= 1'b1; fe <= 1'b0; ovr <= 1'b0;
      tx_busy <= 1'b0; tx_shift <= '1; tx_bits <= '0; tx_ticks <= '0;
      rx_sync <= 2'b11; rx_busy <= 1'b0; rx_ticks <= '0; rx_bits <= '0; rx_shift <= '0;
    end else begin
      rx_sync <= {rx_sync[0], rxd};
      // ---- register writes ----
      if (io_we) begin
        unique case (io_addr)
          IO_UDR:  begin udr_tx <= io_wdata; udre <= 1'b0; end
          IO_USR:  if (io_wdata[6]) txc <= 1'b0;
          IO_UCR:  ucr  <= {io_wdata[7:3], 3'd0};
          IO_UBRR: ubrr <= io_wdata;
          default: ;
        endcase
      end
      if (io_re && io_addr == IO_UDR) rxc <= 1'b0;
      if (irqack && irqackad == 5'(IRQ_UART_TX)) txc <= 1'b0;
      // ---- transmitter ----
      if (!tx_busy) begin
        if (ucr[3] && !udre && !(io_we && io_addr == IO_UDR)) begin
          tx_shift <= {1'b1, udr_tx, 1'b0};
          tx_busy  <= 1'b1;
          tx_bits  <= '0;
          tx_ticks <= '0;
          udre     <= 1'b1;
        end
      end else if (tick) begin
        tx_ticks <= tx_ticks + 4'd1;
        if (tx_ticks == 4'd15) begin
          tx_shift <= {1'b1, tx_shift[9:1]};
          tx_bits  <= tx_bits + 4'd1;
          if (tx_bits == 4'd9) begin
            tx_busy <= 1'b0;
            if (udre) txc <= 1'b1;
          end
        end
      end
      // ---- receiver ----
      if (!ucr[4]) begin
        rx_busy <= 1'b0;
      end else if (!rx_busy) begin
        if (!rx_sync[1]) begin
          rx_busy  <= 1'b1;
          rx_ticks <= '0;
          rx_bits  <= '0;
        end
      end else if (tick) begin
        rx_ticks <= rx_ticks + 4'd1;
        if (rx_bits == 4'd0 && rx_ticks == 4'd7) begin
          if (rx_sync[1]) rx_busy <= 1'b0;      // false start bit
          else begin rx_bits <= 4'd1; rx_ticks <= '0; end
        end else if (rx_bits != 4'd0 && rx_ticks == 4'd15) begin
          rx_ticks <= '0;
          rx_bits  <= rx_bits + 4'd1;
          if (rx_bits <= 4'd8) rx_shift <= {rx_sync[1], rx_shift[7:1]};
          else begin
            rx_busy <= 1'b0;
            udr_rx  <= rx_shift;
            fe      <= !rx_sync[1];
            ovr     <= rxc;
            rxc     <= 1'b1;
          end
        end
      end
    end
  end

  assign txd = tx_busy ? tx_shift[0] : 1'b1;

  always_comb begin
    hit = 1'b1;
    unique case (io_addr)
      IO_UDR:  rdata = udr_rx;
      IO_USR:  rdata = {rxc, txc, udre, fe, ovr, 3'd0};
      IO_UCR:  rdata = ucr;
      IO_UBRR: rdata = ubrr;
      default: begin rdata = '0; hit = 1'b0; end
    endcase
  end

  assign irq_rx   = rxc  & ucr[7];
  assign irq_tx   = txc  & ucr[6];
  assign irq_udre = udre & ucr[5];
endmodule
