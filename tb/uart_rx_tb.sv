// uart_rx_tb: self-checking test of the UART receiver.
//
// Two receivers, one without parity and one with even parity, listen to
// serial lines driven here at 19200 baud (52083 ns per bit, from the real
// bit rate, not from the receiver's divisor) while their 16x sample ticks
// come from a counter here (one tick every 163 cycles of the 50 MHz clock).
// Random bytes must arrive intact, also when the sender is 2 % fast or slow.
// Also checked: done_tick comes about 9.5 bit times after the start edge
// (the middle of the stop bit); a stop bit sent as '0' sets frame_err; a
// wrong parity bit sets parity_err; a '0' pulse shorter than half a bit is
// not taken as a start bit.
import booth_uart_pkg::*;

module uart_rx_tb;
  timeunit 1ns; timeprecision 1ps;

  localparam real BIT_NS   = 1.0e9 / 19200.0;
  localparam int  DIVISOR  = 163;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       line0 = 1'b1, line1 = 1'b1;
  logic       tick;
  int         tcount = 0;
  logic [7:0] dout0, dout1;
  logic       done0, done1, perr0, perr1, ferr0, ferr1;

  int checks = 0, failures = 0;
  int n_done0 = 0, n_done1 = 0;
  logic [7:0] got0, got1;
  logic       gperr1, gferr0;
  realtime    t_start, t_done0;

  uart_rx #(.PARITY(PARITY_NONE)) dut0 (
    .clk(clk), .rst_n(rst_n), .rx(line0), .s_tick(tick), .dout(dout0),
    .done_tick(done0), .parity_err(perr0), .frame_err(ferr0)
  );
  uart_rx #(.PARITY(PARITY_EVEN)) dut1 (
    .clk(clk), .rst_n(rst_n), .rx(line1), .s_tick(tick), .dout(dout1),
    .done_tick(done1), .parity_err(perr1), .frame_err(ferr1)
  );

  always #10 clk = ~clk;

  always_ff @(posedge clk) tcount <= (tcount == DIVISOR - 1) ? 0 : tcount + 1;
  assign tick = (tcount == DIVISOR - 1);

  always @(posedge clk) if (rst_n) begin
    if (done0) begin n_done0++; got0 = dout0; gferr0 = ferr0; t_done0 = $realtime; end
    if (done1) begin n_done1++; got1 = dout1; gperr1 = perr1; end
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Send one frame on line 0 (no parity) and line 1 (even parity) at once.
  task automatic send(input logic [7:0] d, input real scale, input logic bad_stop,
                      input logic bad_parity);
    real bt;
    bt = BIT_NS * scale;
    t_start = $realtime;
    line0 = 1'b0; line1 = 1'b0;
    #(bt);
    for (int i = 0; i < 8; i++) begin
      line0 = d[i]; line1 = d[i];
      #(bt);
    end
    line1 = (^d) ^ bad_parity;
    // A broken stop bit is '0' only up to a little past its middle, so that
    // the receiver does not take the rest of it for a new start bit.
    line0 = !bad_stop;
    #(0.6 * bt);
    line0 = 1'b1;
    #(0.4 * bt);
    line1 = 1'b1;
    line0 = 1'b1;
    #(bt);
    line0 = 1'b1;
    #(bt);
    #(bt);
  endtask

  initial begin
    int d0, d1;
    real lat;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    #(BIT_NS);
    for (int i = 0; i < 60; i++) begin
      logic [7:0] d;
      real sc;
      d  = 8'($urandom);
      sc = (i % 3 == 0) ? 1.0 : ((i % 3 == 1) ? 0.98 : 1.02);
      d0 = n_done0; d1 = n_done1;
      send(d, sc, 1'b0, 1'b0);
      checks += 6;
      if (n_done0 != d0 + 1 || got0 !== d) begin
        failures++; $display("FAIL no-parity rx byte %h got %h (%0d frames)", d, got0, n_done0 - d0);
      end
      if (n_done1 != d1 + 1 || got1 !== d) begin
        failures++; $display("FAIL even-parity rx byte %h got %h", d, got1);
      end
      if (gferr0) begin failures++; $display("FAIL spurious frame error"); end
      if (gperr1) begin failures++; $display("FAIL spurious parity error"); end
      lat = (t_done0 - t_start) / (BIT_NS * sc);
      if (lat < 9.2 || lat > 9.8) begin
        failures++; $display("FAIL done_tick at %f bit times", lat);
      end
      if (perr0) begin failures++; $display("FAIL parity error without parity"); end
    end
    // Broken stop bit.
    send(8'hA5, 1.0, 1'b1, 1'b0);
    checks++;
    if (!gferr0) begin failures++; $display("FAIL frame error not flagged"); end
    // Wrong parity.
    send(8'h3C, 1.0, 1'b0, 1'b1);
    checks += 2;
    if (!gperr1) begin failures++; $display("FAIL parity error not flagged"); end
    if (gferr0)  begin failures++; $display("FAIL frame error after good frame"); end
    // Short glitch: 0.3 bit times low.
    d0 = n_done0;
    line0 = 1'b0; #(0.3 * BIT_NS); line0 = 1'b1;
    #(12 * BIT_NS);
    checks++;
    if (n_done0 != d0) begin failures++; $display("FAIL glitch taken as a frame"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
