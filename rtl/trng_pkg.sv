// trng_pkg: constants shared by the ring-oscillator TRNG.
//
// The board clock (50 MHz), the ring restart rate (25 kHz), the serial rate
// (115200 baud, 8 data bits, no parity, one stop bit) and the four ring
// lengths with their measured cycle-to-cycle jitter all come from the
// design's description. The clocks-per-bit figure is derived from them:
// 50e6 / 115200 = 434 (rounded down). The restart pulse width is this
// design's own choice (see pulse_generator).
package trng_pkg;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned CLK_FREQ_HZ    = 50_000_000;
  localparam int unsigned PULSE_FREQ_HZ  = 25_000;
  localparam int unsigned BAUD_RATE      = 115_200;
  localparam int unsigned CLKS_PER_BIT   = CLK_FREQ_HZ / BAUD_RATE;  // 434
  localparam int unsigned DATA_BITS      = 8;

  // Rings: nine of each length, three injection points per ring.
  localparam int unsigned RINGS_PER_GROUP = 9;
  localparam int unsigned RO_INJECTIONS   = 3;
  localparam int unsigned RO_LEN_A = 9;
  localparam int unsigned RO_LEN_B = 13;
  localparam int unsigned RO_LEN_C = 15;
  localparam int unsigned RO_LEN_D = 21;

  // Propagation delay per stage and measured jitter (standard deviation) per
  // ring length, in picoseconds.
  localparam int unsigned RO_TAU_PS      = 700;
  localparam int unsigned RO_JITTER_A_PS = 172;
  localparam int unsigned RO_JITTER_B_PS = 1850;
  localparam int unsigned RO_JITTER_C_PS = 812;
  localparam int unsigned RO_JITTER_D_PS = 844;

  // Von Neumann rule on a pair (first, second) of raw bits.
  typedef enum logic [1:0] {
    VN_DISCARD = 2'b00,
    VN_EMIT0   = 2'b01,
    VN_EMIT1   = 2'b10
  } vn_action_e;

  function automatic vn_action_e vn_rule(input logic first, input logic second);
    if (first == second) return VN_DISCARD;
    return first ? VN_EMIT1 : VN_EMIT0;
  endfunction

  // UART transmitter states.
  typedef enum logic [1:0] {
    TX_IDLE  = 2'b00,
    TX_START = 2'b01,
    TX_DATA  = 2'b10,
    TX_STOP  = 2'b11
  } tx_state_e;
endpackage
