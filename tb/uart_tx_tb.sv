// uart_tx_tb: self-checking test of the UART transmitter.
//
// Two transmitters, one without parity and one with even parity, get their
// 16x ticks from a counter here (every 163 cycles of the 50 MHz clock, so a
// bit lasts 16 x 163 = 2608 cycles). For random bytes a receiver written
// here samples each line in the middle of every bit, timed from the falling
// edge of the start bit, and checks the start bit, the data bits LSB first,
// the parity bit and the stop bit. It also checks that busy covers the whole
// frame, that done_tick comes at the end of the stop bit (10 or 11 bit times
// after the start edge, less at most one tick period for the phase of the
// first tick), that the line idles high, and that a tx_start while busy is
// ignored.
import booth_uart_pkg::*;

module uart_tx_tb;

  localparam int DIVISOR = 163;
  localparam int BITC    = 16 * DIVISOR;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       start = 1'b0;
  logic [7:0] din = '0;
  logic       tick;
  int         tcount = 0;
  logic       busy0, busy1, done0, done1, tx0, tx1;

  int checks = 0, failures = 0;

  uart_tx #(.PARITY(PARITY_NONE)) dut0 (
    .clk(clk), .rst_n(rst_n), .tx_start(start), .s_tick(tick), .din(din),
    .busy(busy0), .done_tick(done0), .tx(tx0)
  );
  uart_tx #(.PARITY(PARITY_EVEN)) dut1 (
    .clk(clk), .rst_n(rst_n), .tx_start(start), .s_tick(tick), .din(din),
    .busy(busy1), .done_tick(done1), .tx(tx1)
  );

  always #10 clk = ~clk;

  always_ff @(posedge clk) tcount <= (tcount == DIVISOR - 1) ? 0 : tcount + 1;
  assign tick = (tcount == DIVISOR - 1);

  initial begin
    repeat (10_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Receive one frame from a line: wait for the start edge, then sample.
  task automatic receive(input int which, input int nbits, output logic [10:0] bits,
                         output int frame_cycles);
    int c;
    c = 0;
    if (which == 0) while (tx0) @(posedge clk);
    else            while (tx1) @(posedge clk);
    // Now at the start edge; sample in the middle of each bit.
    for (int b = 0; b < nbits; b++) begin
      repeat ((b == 0) ? BITC / 2 : BITC) begin @(posedge clk); c++; end
      bits[b] = (which == 0) ? tx0 : tx1;
      checks++;
      if (((which == 0) ? busy0 : busy1) !== 1'b1) begin
        failures++; $display("FAIL busy low inside the frame");
      end
    end
    while (!((which == 0) ? done0 : done1)) begin @(posedge clk); c++; end
    frame_cycles = c;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (10) @(negedge clk);
    checks++;
    if (tx0 !== 1'b1 || tx1 !== 1'b1) begin failures++; $display("FAIL line not idle high"); end
    for (int i = 0; i < 40; i++) begin
      logic [7:0] d;
      logic [10:0] b0, b1;
      int fc0, fc1;
      d = 8'($urandom);
      @(negedge clk);
      din = d; start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      // A second request while busy must be ignored.
      din = ~d; start = (i % 2 == 0);
      @(negedge clk);
      start = 1'b0;
      fork
        receive(0, 10, b0, fc0);
        receive(1, 11, b1, fc1);
      join
      checks += 8;
      if (b0[0] !== 1'b0 || b1[0] !== 1'b0) begin failures++; $display("FAIL start bit"); end
      if (b0[8:1] !== d) begin failures++; $display("FAIL data %h got %h", d, b0[8:1]); end
      if (b1[8:1] !== d) begin failures++; $display("FAIL data (parity) %h got %h", d, b1[8:1]); end
      if (b0[9] !== 1'b1) begin failures++; $display("FAIL stop bit"); end
      if (b1[9] !== ^d) begin failures++; $display("FAIL parity bit for %h", d); end
      if (b1[10] !== 1'b1) begin failures++; $display("FAIL stop bit after parity"); end
      // The start edge was seen one cycle late in receive(): allow for it.
      if (fc0 > 10 * BITC || fc0 < 10 * BITC - DIVISOR - 2) begin
        failures++; $display("FAIL frame length %0d cycles", fc0);
      end
      if (fc1 > 11 * BITC || fc1 < 11 * BITC - DIVISOR - 2) begin
        failures++; $display("FAIL parity frame length %0d cycles", fc1);
      end
      @(negedge clk);
      checks++;
      if (busy0 || busy1 || tx0 !== 1'b1) begin failures++; $display("FAIL not idle after frame"); end
      // The byte sent must be d, never the ignored ~d: no extra frame follows.
      repeat (BITC) @(negedge clk);
      checks++;
      if (busy0 || tx0 !== 1'b1) begin failures++; $display("FAIL request while busy was kept"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
