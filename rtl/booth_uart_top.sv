// booth_uart_top: an 8 x 8 Booth multiplier served over a serial line.
//
// A computer sends two operand bytes over RS-232; the board multiplies them
// with a sequential radix-2 Booth multiplier and sends the 16-bit product
// back as two bytes, high byte first. Data path:
//
//   uart_rxd -> uart (baud generator, receiver, receive FIFO)
//            -> booth_uart_ctrl -> operand_loader A / B (shift register,
//               modulo-8 counter, parallel load)
//            -> booth_multiplier -> booth_uart_ctrl
//            -> uart (transmit FIFO, transmitter) -> uart_txd
//
// signed_mode (for example a board switch) chooses two's-complement (1) or
// unsigned (0) operands. result / result_valid show each product on the
// board as well. parity_err and frame_err report the last received frame;
// rx_overflow pulses when a received byte is lost because the receive FIFO
// is full. The RS-232 level shifter between the pins and the cable is
// outside this design.
//
// Timing at the defaults (50 MHz, 19200 baud, 8N1): a byte takes 10 bit
// times (about 0.52 ms); after the second operand byte has been received the
// product is ready about 30 clock cycles later (8 + 8 loader cycles, 9 Booth
// steps and handshakes) and the two result bytes leave back to back.
//
// The parts and their roles follow the source design (Booth multiplier fed
// by two shift-register operand loaders, UART made of baud generator,
// receiver, FIFOs and transmitter). How they are tied together (the
// sequencer, binary operand bytes, the byte order of the result, the
// signed_mode input) and the line settings are this design's choices.
module booth_uart_top
  import booth_uart_pkg::*;
#(
  parameter int unsigned CLK_FREQ   = 50_000_000,
  parameter int unsigned BAUD       = 19_200,
  parameter int unsigned OVERSAMPLE = 16,
  parameter int unsigned STOP_BITS  = 1,
  parameter parity_e     PARITY     = PARITY_NONE,
  parameter int unsigned FIFO_DEPTH = 4,
  parameter bit          SELECT_Q   = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        uart_rxd,
  output logic        uart_txd,
  input  logic        signed_mode,
  output logic [15:0] result,
  output logic        result_valid,
  output logic        parity_err,
  output logic        frame_err,
  output logic        rx_overflow
);

  localparam int unsigned N = 8;

  logic [N-1:0]   r_data, w_data, op_a, op_b;
  logic           rx_empty, rd_uart, tx_full, wr_uart, tx_busy;
  logic [$clog2(FIFO_DEPTH):0] rx_level, tx_level;
  logic           ser_bit, shift_a, shift_b, a_valid, b_valid;
  logic [$clog2(N)-1:0] a_bits, b_bits;
  logic           mul_start, mul_busy, mul_done, mul_swapped, mul_step;
  booth_op_e      mul_op;
  logic [2*N-1:0] product;

  uart #(
    .CLK_FREQ  (CLK_FREQ),
    .BAUD      (BAUD),
    .OVERSAMPLE(OVERSAMPLE),
    .DATA_BITS (N),
    .STOP_BITS (STOP_BITS),
    .PARITY    (PARITY),
    .FIFO_DEPTH(FIFO_DEPTH)
  ) u_uart (
    .clk        (clk),
    .rst_n      (rst_n),
    .rx         (uart_rxd),
    .tx         (uart_txd),
    .rd_uart    (rd_uart),
    .r_data     (r_data),
    .rx_empty   (rx_empty),
    .wr_uart    (wr_uart),
    .w_data     (w_data),
    .tx_full    (tx_full),
    .parity_err (parity_err),
    .frame_err  (frame_err),
    .rx_overflow(rx_overflow),
    .tx_busy    (tx_busy),
    .rx_level   (rx_level),
    .tx_level   (tx_level)
  );

  booth_uart_ctrl #(.N(N)) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .rx_empty    (rx_empty),
    .r_data      (r_data),
    .rd_uart     (rd_uart),
    .tx_full     (tx_full),
    .wr_uart     (wr_uart),
    .w_data      (w_data),
    .ser_bit     (ser_bit),
    .shift_a     (shift_a),
    .shift_b     (shift_b),
    .a_valid     (a_valid),
    .b_valid     (b_valid),
    .mul_start   (mul_start),
    .mul_done    (mul_done),
    .product     (product),
    .result      (result),
    .result_valid(result_valid)
  );

  operand_loader #(.WIDTH(N)) u_load_a (
    .clk      (clk),
    .rst_n    (rst_n),
    .shift_en (shift_a),
    .serial_in(ser_bit),
    .data_out (op_a),
    .valid    (a_valid),
    .bit_count(a_bits)
  );

  operand_loader #(.WIDTH(N)) u_load_b (
    .clk      (clk),
    .rst_n    (rst_n),
    .shift_en (shift_b),
    .serial_in(ser_bit),
    .data_out (op_b),
    .valid    (b_valid),
    .bit_count(b_bits)
  );

  booth_multiplier #(.N(N), .SELECT_Q(SELECT_Q)) u_mul (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (mul_start),
    .is_signed(signed_mode),
    .op_a     (op_a),
    .op_b     (op_b),
    .busy     (mul_busy),
    .done     (mul_done),
    .product  (product),
    .swapped  (mul_swapped),
    .step_o   (mul_step),
    .op_o     (mul_op)
  );

endmodule
