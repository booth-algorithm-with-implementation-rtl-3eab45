// uart: the complete UART system: baud rate generator, receiver, receive
// FIFO, transmit FIFO and transmitter.
//
// Received frames are reassembled by uart_rx and pushed into the receive
// FIFO; the user sees the oldest byte on r_data while rx_empty is low and
// pops it with rd_uart. Bytes written with wr_uart go into the transmit FIFO;
// whenever the transmitter is idle and the FIFO is not empty the head byte is
// popped and sent. One baud tick stream (OVERSAMPLE ticks per bit) drives
// both directions.
//
// Interface and timing: rd_uart and wr_uart are one-cycle strobes (rd_uart
// only while rx_empty is low; a write while tx_full is high is dropped).
// parity_err and frame_err are sticky flags for the last received frame,
// updated with each frame; rx_overflow pulses when a received byte is lost
// because the receive FIFO is full. rx_level and tx_level
// give the number of bytes waiting in each FIFO. Active-low asynchronous reset.
//
// The structure (generator, receiver, FIFOs, transmitter) and the 8-bit
// data width follow the source design; the FIFO depth, the line rate and the
// frame options are this design's choices.
module uart
  import booth_uart_pkg::*;
#(
  parameter int unsigned CLK_FREQ   = 50_000_000,
  parameter int unsigned BAUD       = 19_200,
  parameter int unsigned OVERSAMPLE = 16,
  parameter int unsigned DATA_BITS  = 8,
  parameter int unsigned STOP_BITS  = 1,
  parameter parity_e     PARITY     = PARITY_NONE,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // serial side
  input  logic                 rx,
  output logic                 tx,
  // parallel side
  input  logic                 rd_uart,
  output logic [DATA_BITS-1:0] r_data,
  output logic                 rx_empty,
  input  logic                 wr_uart,
  input  logic [DATA_BITS-1:0] w_data,
  output logic                 tx_full,
  // status
  output logic                 parity_err,
  output logic                 frame_err,
  output logic                 rx_overflow,
  output logic                 tx_busy,
  output logic [$clog2(FIFO_DEPTH):0] rx_level,
  output logic [$clog2(FIFO_DEPTH):0] tx_level
);

  logic                 tick;
  logic [DATA_BITS-1:0] rx_dout, tx_din;
  logic                 rx_done, rx_perr, rx_ferr;
  logic                 tx_empty, tx_start, tx_done;
  logic                 tx_ovf;

  uart_baud_gen #(.CLK_FREQ(CLK_FREQ), .BAUD(BAUD), .OVERSAMPLE(OVERSAMPLE)) u_baud (
    .clk (clk),
    .rst_n(rst_n),
    .tick(tick)
  );

  uart_rx #(.DATA_BITS(DATA_BITS), .STOP_BITS(STOP_BITS), .OVERSAMPLE(OVERSAMPLE),
            .PARITY(PARITY)) u_rx (
    .clk       (clk),
    .rst_n     (rst_n),
    .rx        (rx),
    .s_tick    (tick),
    .dout      (rx_dout),
    .done_tick (rx_done),
    .parity_err(rx_perr),
    .frame_err (rx_ferr)
  );

  fifo #(.WIDTH(DATA_BITS), .DEPTH(FIFO_DEPTH)) u_rx_fifo (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr      (rx_done),
    .w_data  (rx_dout),
    .rd      (rd_uart),
    .r_data  (r_data),
    .empty   (rx_empty),
    .full    (),
    .level   (rx_level),
    .overflow(rx_overflow)
  );

  fifo #(.WIDTH(DATA_BITS), .DEPTH(FIFO_DEPTH)) u_tx_fifo (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr      (wr_uart),
    .w_data  (w_data),
    .rd      (tx_start),
    .r_data  (tx_din),
    .empty   (tx_empty),
    .full    (tx_full),
    .level   (tx_level),
    .overflow(tx_ovf)
  );

  // Start the next frame as soon as the transmitter is idle.
  assign tx_start = !tx_empty && !tx_busy;

  uart_tx #(.DATA_BITS(DATA_BITS), .STOP_BITS(STOP_BITS), .OVERSAMPLE(OVERSAMPLE),
            .PARITY(PARITY)) u_tx (
    .clk      (clk),
    .rst_n    (rst_n),
    .tx_start (tx_start),
    .s_tick   (tick),
    .din      (tx_din),
    .busy     (tx_busy),
    .done_tick(tx_done),
    .tx       (tx)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      parity_err <= 1'b0;
      frame_err  <= 1'b0;
    end else if (rx_done) begin
      parity_err <= rx_perr;
      frame_err  <= rx_ferr;
    end
  end

endmodule
