// uart_baud_gen: baud rate generator for the UART receiver and transmitter.
//
// A free-running modulo-DIVISOR counter that emits a one-cycle tick every
// DIVISOR clock cycles, i.e. OVERSAMPLE ticks per bit time, with
// DIVISOR = round(CLK_FREQ / (BAUD * OVERSAMPLE)). The receiver and the
// transmitter both count these ticks, so one generator serves both
// directions. With the defaults (50 MHz board clock, 19200 baud, 16x
// oversampling) DIVISOR is 163 and the real rate is 19171 baud, 0.15 % slow.
//
// Interface: tick is high for one clock cycle every DIVISOR cycles, the first
// time in the DIVISOR-th cycle after reset is released. Active-low asynchronous reset.
// The source design names the generator only; the counter structure, the
// clock, the baud rate and the oversampling factor are this design's choices.
module uart_baud_gen #(
  parameter int unsigned CLK_FREQ   = 50_000_000,
  parameter int unsigned BAUD       = 19_200,
  parameter int unsigned OVERSAMPLE = 16
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);

  localparam int unsigned DIVISOR_RAW = (CLK_FREQ + (BAUD * OVERSAMPLE) / 2) / (BAUD * OVERSAMPLE);
  localparam int unsigned DIVISOR     = (DIVISOR_RAW < 1) ? 1 : DIVISOR_RAW;
  localparam int unsigned CW          = (DIVISOR < 2) ? 1 : $clog2(DIVISOR);

  logic [CW-1:0] count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                         count <= '0;
    else if (count == CW'(DIVISOR - 1)) count <= '0;
    else                                count <= count + 1'b1;
  end

  assign tick = (count == CW'(DIVISOR - 1));

endmodule
