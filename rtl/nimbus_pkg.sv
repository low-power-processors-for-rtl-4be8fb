// nimbus_pkg: types and constants shared by the Nimbus AVR microcontroller.
// The I/O addresses, SREG bit order and interrupt vector numbers are those of
// the ATmega103, whose instruction set and memory map Nimbus follows. I/O
// addresses are in I/O space (IN/OUT numbering); data-space address = I/O + 0x20.
package nimbus_pkg;

  // SREG bit positions
  localparam int unsigned SREG_C = 0;
  localparam int unsigned SREG_Z = 1;
  localparam int unsigned SREG_N = 2;
  localparam int unsigned SREG_V = 3;
  localparam int unsigned SREG_S = 4;
  localparam int unsigned SREG_H = 5;
  localparam int unsigned SREG_T = 6;
  localparam int unsigned SREG_I = 7;

  // Core I/O registers
  localparam logic [5:0] IO_SREG   = 6'h3F;
  localparam logic [5:0] IO_SPH    = 6'h3E;
  localparam logic [5:0] IO_SPL    = 6'h3D;
  // Service module
  localparam logic [5:0] IO_EIMSK  = 6'h39;
  localparam logic [5:0] IO_EIFR   = 6'h38;
  localparam logic [5:0] IO_MCUCR  = 6'h35;
  // Timer/Counter0
  localparam logic [5:0] IO_TIMSK  = 6'h37;
  localparam logic [5:0] IO_TIFR   = 6'h36;
  localparam logic [5:0] IO_TCCR0  = 6'h33;
  localparam logic [5:0] IO_TCNT0  = 6'h32;
  localparam logic [5:0] IO_OCR0   = 6'h31;
  localparam logic [5:0] IO_ASSR   = 6'h30;
  // Ports
  localparam logic [5:0] IO_PORTA  = 6'h1B;
  localparam logic [5:0] IO_DDRA   = 6'h1A;
  localparam logic [5:0] IO_PINA   = 6'h19;
  localparam logic [5:0] IO_PORTB  = 6'h18;
  localparam logic [5:0] IO_DDRB   = 6'h17;
  localparam logic [5:0] IO_PINB   = 6'h16;
  // UART
  localparam logic [5:0] IO_UDR    = 6'h0C;
  localparam logic [5:0] IO_USR    = 6'h0B;
  localparam logic [5:0] IO_UCR    = 6'h0A;
  localparam logic [5:0] IO_UBRR   = 6'h09;

  // Interrupt request lines: line n is vector n+1 (vector 0 is reset);
  // the vector's word address is 2*(n+1).
  localparam int unsigned IRQ_LINES     = 23;
  localparam int unsigned IRQ_INT0      = 0;   // INT0..INT7 are lines 0..7
  localparam int unsigned IRQ_T0_COMP   = 14;  // vector 15, word 0x1E (byte 0x3C)
  localparam int unsigned IRQ_T0_OVF    = 15;  // vector 16
  localparam int unsigned IRQ_UART_RX   = 17;
  localparam int unsigned IRQ_UART_UDRE = 18;
  localparam int unsigned IRQ_UART_TX   = 19;

  // ALU operations
  typedef enum logic [4:0] {
    ALU_ADD, ALU_ADC, ALU_SUB, ALU_SBC, ALU_AND, ALU_OR, ALU_EOR,
    ALU_COM, ALU_NEG, ALU_INC, ALU_DEC, ALU_LSR, ALU_ROR, ALU_ASR,
    ALU_SWAP, ALU_PASS, ALU_ADIW, ALU_SBIW
  } alu_op_e;

  // Bit processor operations
  typedef enum logic [2:0] {
    BIT_NONE, BIT_BSET, BIT_BCLR, BIT_BST, BIT_BLD, BIT_SBI, BIT_CBI
  } bit_op_e;

  // Sleep modes as implemented (ATmega103 SM1:SM0 decoding)
  typedef enum logic [1:0] {
    SLEEP_IDLE, SLEEP_POWER_DOWN, SLEEP_POWER_SAVE
  } sleep_mode_e;

endpackage
