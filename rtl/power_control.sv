// power_control: the sleep-mode controller of the Nimbus. It implements the
// sleep modes by clock gating, with three gated clocks: the core clock (core,
// ROM, RAM), the device clock (ports, UART, service registers) and the timer
// clock. When the core executes SLEEP ('sleep_req') with SE set in MCUCR,
// the mode is taken from SM1:SM0 (MCUCR bits 4:3):
//   00 idle        core clock stopped; wakes on any interrupt request
//   10 power-down  all three clocks stopped; wakes on an external interrupt
//   11 power-save  core and device clocks stopped, timer runs; wakes on an
//                  external or Timer0 interrupt
//   01             (reserved on the ATmega103) treated as idle
// SM2 is ignored. The enables are combinational from the request so that the
// core clock stops right after the SLEEP cycle; the clock gates apply them
// only while the clock is low, so the clocks stop low and restart on the
// first rising edge after the wake-up request. The oscillator itself is never
// stopped, so every mode behaves like the ATmega128 standby variant.
// 'sleep_status' is high while asleep.
module power_control
  import nimbus_pkg::*;
#(
  parameter int unsigned NIRQ = IRQ_LINES
) (
  input  logic            clk,          // internal clock, never gated
  input  logic            rst_n,
  input  logic            sleep_req,
  input  logic            se,
  input  logic [2:0]      sm,           // {SM2, SM1, SM0}
  input  logic [NIRQ-1:0] irq_lines,
  output logic            clk_core_enable,
  output logic            clk_dev_enable,
  output logic            clk_timer_enable,
  output logic            mode_idle,
  output logic            mode_power_down,
  output logic            mode_power_save,
  output logic            sleep_status
);
  localparam logic [NIRQ-1:0] EXT_MASK   = NIRQ'(8'hFF);
  localparam logic [NIRQ-1:0] TIMER_MASK = NIRQ'((1 << IRQ_T0_COMP) | (1 << IRQ_T0_OVF));

  sleep_mode_e mode_q, req_mode, mode;
  logic        asleep_q, enter, sleeping, wake;

  always_comb begin
    unique case (sm[1:0])
      2'b10:   req_mode = SLEEP_POWER_DOWN;
      2'b11:   req_mode = SLEEP_POWER_SAVE;
      default: req_mode = SLEEP_IDLE;
    endcase
    mode = asleep_q ? mode_q : req_mode;
    unique case (mode)
      SLEEP_POWER_DOWN: wake = |(irq_lines & EXT_MASK);
      SLEEP_POWER_SAVE: wake = |(irq_lines & (EXT_MASK | TIMER_MASK));
      default:          wake = |irq_lines;
    endcase
    enter    = !asleep_q && sleep_req && se && !wake;
    sleeping = (asleep_q && !wake) || enter;

    clk_core_enable  = !sleeping;
    clk_dev_enable   = !(sleeping && mode != SLEEP_IDLE);
    clk_timer_enable = !(sleeping && mode == SLEEP_POWER_DOWN);
    mode_idle        = sleeping && mode == SLEEP_IDLE;
    mode_power_down  = sleeping && mode == SLEEP_POWER_DOWN;
    mode_power_save  = sleeping && mode == SLEEP_POWER_SAVE;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      asleep_q <= 1'b0;
      mode_q   <= SLEEP_IDLE;
    end else if (enter) begin
      asleep_q <= 1'b1;
      mode_q   <= req_mode;
    end else if (asleep_q && wake) begin
      asleep_q <= 1'b0;
    end
  end

  assign sleep_status = asleep_q;
endmodule
