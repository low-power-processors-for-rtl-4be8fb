// timer_counter: Timer/Counter0 of the Nimbus (8-bit, ATmega103 style).
// Registers: TCNT0 (counter), OCR0 (compare value), TCCR0 (CS02:0 clock
// select in bits 2:0, CTC0 clear-on-compare in bit 3), TIMSK (OCIE0 bit 1,
// TOIE0 bit 0), TIFR (OCF0 bit 1, TOV0 bit 0; a flag is cleared by writing 1
// or when its interrupt is acknowledged) and ASSR (AS0 bit 3 selects the
// external clock; the update-busy bits 2:0 read 0 because writes take
// effect at once).
// The counter advances on prescaler ticks. The prescaler counts cycles of the
// timer clock, or, with AS0 set, rising edges of 'clk_ext', which is
// synchronised to the timer clock (so 'clk_ext' must be slower than half the
// timer clock). Clock select: 0 stop, 1 /1, 2 /8, 3 /32, 4 /64, 5 /128,
// 6 /256, 7 /1024. A tick with TCNT0 = OCR0 sets OCF0 (and clears the counter
// when CTC0 is set); a tick with TCNT0 = 0xFF sets TOV0.
// The timer runs on its own gated clock so it keeps counting in idle and
// power-save sleep.
module timer_counter
  import nimbus_pkg::*;
(
  input  logic       clk,         // timer clock (gated internal clock)
  input  logic       rst_n,
  input  logic       clk_ext,     // external (32 kHz class) clock
  input  logic [5:0] io_addr,
  input  logic       io_we,
  input  logic [7:0] io_wdata,
  output logic [7:0] rdata,
  output logic       hit,
  output logic       irq_comp,
  output logic       irq_ovf,
  input  logic       irqack,
  input  logic [4:0] irqackad
);
  logic [7:0] tcnt, ocr, tccr, timsk, tifr, assr;
  logic [9:0] presc;
  logic [2:0] ext_sync;
  logic       src_tick, tick;

  // external clock synchroniser and rising-edge detect
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ext_sync <= '0;
    else        ext_sync <= {ext_sync[1:0], clk_ext};
  end
  assign src_tick = assr[3] ? (ext_sync[1] & ~ext_sync[2]) : 1'b1;

  always_comb begin
    unique case (tccr[2:0])
      3'd1:    tick = src_tick;
      3'd2:    tick = src_tick && presc[2:0] == 3'h7;
      3'd3:    tick = src_tick && presc[4:0] == 5'h1F;
      3'd4:    tick = src_tick && presc[5:0] == 6'h3F;
      3'd5:    tick = src_tick && presc[6:0] == 7'h7F;
      3'd6:    tick = src_tick && presc[7:0] == 8'hFF;
      3'd7:    tick = src_tick && presc[9:0] == 10'h3FF;
      default: tick = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tcnt  <= '0;
      ocr   <= '0;
      tccr  <= '0;
      timsk <= '0;
      tifr  <= '0;
      assr  <= '0;
      presc <= '0;
    end else begin
      if (src_tick && tccr[2:0] != 3'd0) presc <= presc + 10'd1;
      if (tick) begin
        if (tcnt == ocr) tifr[1] <= 1'b1;
        if (tcnt == 8'hFF) tifr[0] <= 1'b1;
        tcnt <= (tccr[3] && tcnt == ocr) ? 8'd0 : tcnt + 8'd1;
      end
      if (irqack && irqackad == 5'(IRQ_T0_COMP)) tifr[1] <= 1'b0;
      if (irqack && irqackad == 5'(IRQ_T0_OVF))  tifr[0] <= 1'b0;
      if (io_we) begin
        unique case (io_addr)
          IO_TCNT0: tcnt  <= io_wdata;
          IO_OCR0:  ocr   <= io_wdata;
          IO_TCCR0: tccr  <= {4'd0, io_wdata[3:0]};
          IO_TIMSK: timsk <= {6'd0, io_wdata[1:0]};
          IO_TIFR:  tifr  <= tifr & ~{6'd0, io_wdata[1:0]};
          IO_ASSR:  assr  <= {4'd0, io_wdata[3], 3'd0};
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    hit = 1'b1;
    unique case (io_addr)
      IO_TCNT0: rdata = tcnt;
      IO_OCR0:  rdata = ocr;
      IO_TCCR0: rdata = tccr;
      IO_TIMSK: rdata = timsk;
      IO_TIFR:  rdata = tifr;
      IO_ASSR:  rdata = assr;
      default: begin rdata = '0; hit = 1'b0; end
    endcase
  end

  assign irq_comp = tifr[1] & timsk[1];
  assign irq_ovf  = tifr[0] & timsk[0];
endmodule
