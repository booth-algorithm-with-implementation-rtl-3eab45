// uart_rx: UART receiver with oversampling.
//
// The serial line idles at '1'. A frame is a start bit ('0'), DATA_BITS data
// bits LSB first, an optional parity bit and STOP_BITS stop bits ('1'). The
// receiver counts baud ticks (OVERSAMPLE per bit time, from uart_baud_gen):
// after a falling edge it waits half a bit time and checks that the line is
// still '0' (a shorter pulse is taken as a glitch and ignored), then samples
// each following bit in its middle, OVERSAMPLE ticks apart, shifting the data
// bits into a shift register that reassembles the word.
//
// Interface: rx is the asynchronous line, passed through a two-flop
// synchroniser. When the stop bit(s) have been sampled, done_tick pulses for
// one cycle with the word on dout; parity_err (parity enabled and wrong) and
// frame_err (a stop bit read as '0') are valid in that same cycle.
// Active-low asynchronous reset.
//
// The frame format and the 8-bit data width follow the source design; the
// oversampling, the mid-bit sampling, the synchroniser, the error flags and
// the default of no parity and one stop bit are this design's choices.
module uart_rx
  import booth_uart_pkg::*;
#(
  parameter int unsigned DATA_BITS  = 8,
  parameter int unsigned STOP_BITS  = 1,
  parameter int unsigned OVERSAMPLE = 16,
  parameter parity_e     PARITY     = PARITY_NONE
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 rx,
  input  logic                 s_tick,
  output logic [DATA_BITS-1:0] dout,
  output logic                 done_tick,
  output logic                 parity_err,
  output logic                 frame_err
);

  typedef enum logic [2:0] {RX_IDLE, RX_START, RX_DATA, RX_PARITY, RX_STOP} rx_state_e;

  localparam int unsigned TW = $clog2(OVERSAMPLE * STOP_BITS + 1);
  localparam int unsigned NW = (DATA_BITS < 2) ? 1 : $clog2(DATA_BITS);

  rx_state_e            state;
  logic [TW-1:0]        tcnt;   // baud ticks within the current bit
  logic [NW-1:0]        nbit;   // data bits received
  logic [DATA_BITS-1:0] shreg;
  logic                 par_q;
  logic                 ferr_q;
  logic                 rx_meta, rx_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_meta <= 1'b1;
      rx_s    <= 1'b1;
    end else begin
      rx_meta <= rx;
      rx_s    <= rx_meta;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= RX_IDLE;
      tcnt       <= '0;
      nbit       <= '0;
      shreg      <= '0;
      par_q      <= 1'b0;
      ferr_q     <= 1'b0;
      dout       <= '0;
      done_tick  <= 1'b0;
      parity_err <= 1'b0;
      frame_err  <= 1'b0;
    end else begin
      done_tick <= 1'b0;
      unique case (state)
        RX_IDLE: begin
          if (!rx_s) begin
            state <= RX_START;
            tcnt  <= '0;
          end
        end
        RX_START: if (s_tick) begin
          if (tcnt == TW'(OVERSAMPLE / 2 - 1)) begin
            if (!rx_s) begin
              state  <= RX_DATA;
              tcnt   <= '0;
              nbit   <= '0;
              ferr_q <= 1'b0;
            end else begin
              state <= RX_IDLE;        // glitch, not a start bit
            end
          end else begin
            tcnt <= tcnt + 1'b1;
          end
        end
        RX_DATA: if (s_tick) begin
          if (tcnt == TW'(OVERSAMPLE - 1)) begin
            tcnt  <= '0;
            shreg <= {rx_s, shreg[DATA_BITS-1:1]};
            if (nbit == NW'(DATA_BITS - 1)) begin
              state <= (PARITY == PARITY_NONE) ? RX_STOP : RX_PARITY;
            end else begin
              nbit <= nbit + 1'b1;
            end
          end else begin
            tcnt <= tcnt + 1'b1;
          end
        end
        RX_PARITY: if (s_tick) begin
          if (tcnt == TW'(OVERSAMPLE - 1)) begin
            tcnt  <= '0;
            par_q <= rx_s;
            state <= RX_STOP;
          end else begin
            tcnt <= tcnt + 1'b1;
          end
        end
        RX_STOP: if (s_tick) begin
          // Each stop bit is sampled in its middle; the state is left at the
          // middle of the last one so that the next start bit is not missed.
          if ((tcnt % TW'(OVERSAMPLE)) == TW'(OVERSAMPLE - 1) && !rx_s) ferr_q <= 1'b1;
          if (tcnt == TW'(OVERSAMPLE * STOP_BITS - 1)) begin
            state      <= RX_IDLE;
            done_tick  <= 1'b1;
            dout       <= shreg;
            frame_err  <= ferr_q | ~rx_s;
            parity_err <= (PARITY != PARITY_NONE) &&
                          (par_q != parity_bit(16'(shreg), PARITY));
          end else begin
            tcnt <= tcnt + 1'b1;
          end
        end
        default: state <= RX_IDLE;
      endcase
    end
  end

endmodule
