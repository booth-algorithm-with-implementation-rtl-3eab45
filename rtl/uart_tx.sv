// uart_tx: UART transmitter.
//
// A shift register that is loaded in parallel and shifted out one bit per
// bit time: start bit ('0'), DATA_BITS data bits LSB first, the optional
// parity bit, then STOP_BITS stop bits ('1'). Bit times are counted in baud
// ticks, OVERSAMPLE per bit, from uart_baud_gen, so the transmitter and the
// receiver share one generator. The line idles at '1'.
//
// Interface: when busy is low, a one-cycle tx_start loads din and starts a
// frame; busy stays high until the end of the last stop bit, when done_tick
// pulses for one cycle. tx_start while busy is ignored. tx is registered, so
// it is glitch free. Active-low asynchronous reset.
//
// The frame format and the 8-bit width follow the source design; the
// handshake, the tick counting and the default of no parity and one stop bit
// are this design's choices.
module uart_tx
  import booth_uart_pkg::*;
#(
  parameter int unsigned DATA_BITS  = 8,
  parameter int unsigned STOP_BITS  = 1,
  parameter int unsigned OVERSAMPLE = 16,
  parameter parity_e     PARITY     = PARITY_NONE
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 tx_start,
  input  logic                 s_tick,
  input  logic [DATA_BITS-1:0] din,
  output logic                 busy,
  output logic                 done_tick,
  output logic                 tx
);

  typedef enum logic [2:0] {TX_IDLE, TX_START, TX_DATA, TX_PARITY, TX_STOP} tx_state_e;

  localparam int unsigned TW = $clog2(OVERSAMPLE * STOP_BITS + 1);
  localparam int unsigned NW = (DATA_BITS < 2) ? 1 : $clog2(DATA_BITS);

  tx_state_e            state;
  logic [TW-1:0]        tcnt;
  logic [NW-1:0]        nbit;
  logic [DATA_BITS-1:0] shreg;
  logic                 par_q;

  assign busy = (state != TX_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= TX_IDLE;
      tcnt      <= '0;
      nbit      <= '0;
      shreg     <= '0;
      par_q     <= 1'b0;
      tx        <= 1'b1;
      done_tick <= 1'b0;
    end else begin
      done_tick <= 1'b0;
      unique case (state)
        TX_IDLE: begin
          tx <= 1'b1;
          if (tx_start) begin
            state <= TX_START;
            tcnt  <= '0;
            shreg <= din;
            par_q <= parity_bit(16'(din), PARITY);
            tx    <= 1'b0;
          end
        end
        TX_START: if (s_tick) begin
          if (tcnt == TW'(OVERSAMPLE - 1)) begin
            state <= TX_DATA;
            tcnt  <= '0;
            nbit  <= '0;
            tx    <= shreg[0];
          end else begin
            tcnt <= tcnt + 1'b1;
          end
        end
        TX_DATA: if (s_tick) begin
          if (tcnt == TW'(OVERSAMPLE - 1)) begin
            tcnt  <= '0;
            shreg <= shreg >> 1;
            if (nbit == NW'(DATA_BITS - 1)) begin
              if (PARITY == PARITY_NONE) begin
                state <= TX_STOP;
                tx    <= 1'b1;
              end else begin
                state <= TX_PARITY;
                tx    <= par_q;
              end
            end else begin
              nbit <= nbit + 1'b1;
              tx   <= shreg[1];
            end
          end else begin
            tcnt <= tcnt + 1'b1;
          end
        end
        TX_PARITY: if (s_tick) begin
          if (tcnt == TW'(OVERSAMPLE - 1)) begin
            tcnt  <= '0;
            state <= TX_STOP;
            tx    <= 1'b1;
          end else begin
            tcnt <= tcnt + 1'b1;
          end
        end
        TX_STOP: if (s_tick) begin
          if (tcnt == TW'(OVERSAMPLE * STOP_BITS - 1)) begin
            state     <= TX_IDLE;
            done_tick <= 1'b1;
          end else begin
            tcnt <= tcnt + 1'b1;
          end
        end
        default: state <= TX_IDLE;
      endcase
    end
  end

endmodule
