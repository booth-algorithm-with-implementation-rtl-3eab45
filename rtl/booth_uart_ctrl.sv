// booth_uart_ctrl: sequencer that joins the UART to the Booth multiplier.
//
// One multiplication takes two received bytes and returns two bytes:
//   1. pop the first byte from the receive FIFO and send it bit-serially,
//      LSB first, into operand loader A (8 cycles); wait for A's parallel
//      load;
//   2. do the same with the second byte into operand loader B;
//   3. start the multiplier and wait for its done pulse;
//   4. write the 2N-bit product into the transmit FIFO as two N-bit words,
//      high word first, each as soon as the FIFO has room.
// Then it waits for the next pair of bytes. The first byte of each pair is
// operand A, the second operand B.
//
// Interface: the rd_uart / wr_uart strobes follow uart's FIFO handshake
// (pop only while rx_empty is low, push only while tx_full is low).
// result and result_valid give each finished product to the board (for
// example to displays) in the cycle it is captured. Active-low asynchronous
// reset returns to waiting for the first operand.
//
// Two operands per operation, received over the UART, bit-serial loading
// through shift registers and the product sent back to the computer follow
// the source design; the byte order, the sequencing and the handshakes are
// this design's choices.
module booth_uart_ctrl #(
  parameter int unsigned N = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  // receive side of the UART
  input  logic           rx_empty,
  input  logic [N-1:0]   r_data,
  output logic           rd_uart,
  // transmit side of the UART
  input  logic           tx_full,
  output logic           wr_uart,
  output logic [N-1:0]   w_data,
  // operand loaders
  output logic           ser_bit,
  output logic           shift_a,
  output logic           shift_b,
  input  logic           a_valid,
  input  logic           b_valid,
  // multiplier
  output logic           mul_start,
  input  logic           mul_done,
  input  logic [2*N-1:0] product,
  // result to the board
  output logic [2*N-1:0] result,
  output logic           result_valid
);

  typedef enum logic [2:0] {
    C_GET, C_SHIFT, C_LOAD, C_MUL, C_WAIT_MUL, C_SEND_HI, C_SEND_LO
  } ctrl_state_e;

  localparam int unsigned BW = (N < 2) ? 1 : $clog2(N);

  ctrl_state_e   state;
  logic          second;   // 0: loading operand A, 1: operand B
  logic [N-1:0]  byte_q;
  logic [BW-1:0] bitn;

  always_comb begin
    rd_uart   = 1'b0;
    wr_uart   = 1'b0;
    w_data    = result[N-1:0];
    shift_a   = 1'b0;
    shift_b   = 1'b0;
    ser_bit   = byte_q[bitn];
    mul_start = 1'b0;
    unique case (state)
      C_GET:     rd_uart = !rx_empty;
      C_SHIFT:   begin shift_a = !second; shift_b = second; end
      C_MUL:     mul_start = 1'b1;
      C_SEND_HI: begin wr_uart = !tx_full; w_data = result[2*N-1:N]; end
      C_SEND_LO: wr_uart = !tx_full;
      default:   ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= C_GET;
      second       <= 1'b0;
      byte_q       <= '0;
      bitn         <= '0;
      result       <= '0;
      result_valid <= 1'b0;
    end else begin
      result_valid <= 1'b0;
      unique case (state)
        C_GET: if (!rx_empty) begin
          byte_q <= r_data;
          bitn   <= '0;
          state  <= C_SHIFT;
        end
        C_SHIFT: begin
          bitn <= bitn + 1'b1;
          if (bitn == BW'(N - 1)) state <= C_LOAD;
        end
        C_LOAD: begin
          if (!second && a_valid) begin
            second <= 1'b1;
            state  <= C_GET;
          end else if (second && b_valid) begin
            second <= 1'b0;
            state  <= C_MUL;
          end
        end
        C_MUL:      state <= C_WAIT_MUL;
        C_WAIT_MUL: if (mul_done) begin
          result       <= product;
          result_valid <= 1'b1;
          state        <= C_SEND_HI;
        end
        C_SEND_HI:  if (!tx_full) state <= C_SEND_LO;
        C_SEND_LO:  if (!tx_full) state <= C_GET;
        default:    state <= C_GET;
      endcase
    end
  end

endmodule
