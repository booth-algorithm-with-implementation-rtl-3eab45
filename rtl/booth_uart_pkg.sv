// booth_uart_pkg: types and helper functions shared by the Booth multiplier
// and the UART blocks.
//
// - parity_e selects the optional parity bit of a UART frame. A frame is a
//   start bit ('0'), the data bits LSB first, the optional parity bit and the
//   stop bit(s) ('1'); the line idles at '1'.
// - booth_op_e names the three actions of one radix-2 Booth step, chosen by
//   the pair {Q[0], Q-1}: 00 and 11 shift only, 10 subtracts the multiplicand
//   and shifts, 01 adds the multiplicand and shifts.
// - parity_bit() gives the parity bit sent after the data bits.
package booth_uart_pkg;

  typedef enum logic [1:0] {
    PARITY_NONE = 2'd0,
    PARITY_EVEN = 2'd1,
    PARITY_ODD  = 2'd2
  } parity_e;

  typedef enum logic [1:0] {
    BOOTH_SHIFT = 2'd0,
    BOOTH_ADD   = 2'd1,
    BOOTH_SUB   = 2'd2
  } booth_op_e;

  // Booth step decode from the multiplier's current LSB and the Q-1 bit.
  function automatic booth_op_e booth_decode(input logic q0, input logic qm1);
    case ({q0, qm1})
      2'b10:   return BOOTH_SUB;
      2'b01:   return BOOTH_ADD;
      default: return BOOTH_SHIFT;
    endcase
  endfunction

  // Parity bit to send / expect for a data word under the given mode.
  function automatic logic parity_bit(input logic [15:0] data, input parity_e mode);
    return (mode == PARITY_ODD) ? ~(^data) : (^data);
  endfunction

endpackage
