// uart_tb: self-checking test of the complete UART (baud generator,
// receiver, receive FIFO, transmit FIFO, transmitter) in loopback: the
// serial output is wired to the serial input.
//
// Bytes written with wr_uart are sent and come back through the receiver in
// the same order; writing more bytes than the transmit FIFO holds must show
// tx_full. Reading is then stopped for longer than the receive FIFO can
// buffer, so rx_overflow must pulse and the first FIFO_DEPTH bytes must be
// the ones kept. Each byte takes 10 bit times of 16 x 163 clock cycles; the
// time from the first write to the first byte becoming readable is checked
// to be about 9.5 bit times. Runs at the default 50 MHz / 19200 baud.
module uart_tb;

  localparam int BITC = 16 * 163;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       line;
  logic       rd = 1'b0, wr = 1'b0;
  logic [7:0] w_data = '0, r_data;
  logic       rx_empty, tx_full, perr, ferr, ovf, tx_busy;
  logic [2:0] rx_level, tx_level;

  int checks = 0, failures = 0;
  int n_full = 0, n_ovf = 0;

  uart dut (
    .clk(clk), .rst_n(rst_n), .rx(line), .tx(line),
    .rd_uart(rd), .r_data(r_data), .rx_empty(rx_empty),
    .wr_uart(wr), .w_data(w_data), .tx_full(tx_full),
    .parity_err(perr), .frame_err(ferr), .rx_overflow(ovf), .tx_busy(tx_busy),
    .rx_level(rx_level), .tx_level(tx_level)
  );

  always #10 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    if (tx_full) n_full++;
    if (ovf) n_ovf++;
  end

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(input logic [7:0] d);
    @(negedge clk);
    while (tx_full) @(negedge clk);
    wr = 1'b1; w_data = d;
    @(negedge clk);
    wr = 1'b0;
  endtask

  task automatic get(input logic [7:0] expected);
    int waited;
    waited = 0;
    @(negedge clk);
    while (rx_empty && waited < 20 * BITC) begin @(negedge clk); waited++; end
    checks++;
    if (rx_empty || r_data !== expected) begin
      failures++;
      $display("FAIL expected %h got %h (empty %0b)", expected, r_data, rx_empty);
    end
    rd = !rx_empty;
    @(negedge clk);
    rd = 1'b0;
  endtask

  initial begin
    logic [7:0] bytes[$];
    int c;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Latency of one byte.
    put(8'h5A);
    c = 0;
    while (rx_empty) begin @(negedge clk); c++; end
    checks++;
    if (c < 9 * BITC || c > 10 * BITC) begin failures++; $display("FAIL first byte after %0d cycles", c); end
    get(8'h5A);
    // A burst of 8 bytes: more than the transmit FIFO holds.
    for (int i = 0; i < 8; i++) bytes.push_back(8'($urandom));
    fork
      foreach (bytes[i]) put(bytes[i]);
      foreach (bytes[i]) get(bytes[i]);
    join
    checks++;
    if (n_full == 0) begin failures++; $display("FAIL transmit FIFO never full"); end
    // Overflow: six bytes, no reads until all have arrived.
    bytes.delete();
    for (int i = 0; i < 6; i++) bytes.push_back(8'($urandom));
    foreach (bytes[i]) put(bytes[i]);
    while (tx_busy || tx_level != 0) @(negedge clk);
    repeat (BITC) @(negedge clk);
    checks += 3;
    if (n_ovf != 2) begin failures++; $display("FAIL %0d overflow pulses, expected 2", n_ovf); end
    if (rx_level != 4) begin failures++; $display("FAIL rx_level %0d", rx_level); end
    for (int i = 0; i < 4; i++) get(bytes[i]);
    if (!rx_empty) failures++;
    checks += 2;
    if (perr || ferr) begin failures++; $display("FAIL error flag set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
