// uart_baud_gen_tb: self-checking test of the baud rate generator.
//
// With the default parameters (50 MHz clock, 19200 baud, 16x oversampling)
// the divisor is round(50e6 / 307200) = 163, worked out here by hand. The
// test checks that each tick lasts one cycle, that the first tick is seen
// 162 clock edges after reset is released (in the 163rd cycle) and that every later tick follows the previous one by
// exactly 163 cycles.
module uart_baud_gen_tb;

  localparam int EXPECTED_DIVISOR = 163;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic tick;
  int   checks = 0, failures = 0;

  uart_baud_gen dut (.clk(clk), .rst_n(rst_n), .tick(tick));

  always #10 clk = ~clk;

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, last;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    cyc = 0; last = 0;
    for (int n = 0; n < 500; ) begin
      @(posedge clk);
      cyc++;
      #1;
      if (tick) begin
        checks++;
        if (cyc - last != ((n == 0) ? EXPECTED_DIVISOR - 1 : EXPECTED_DIVISOR)) begin
          failures++;
          if (failures < 10) $display("FAIL tick %0d after %0d cycles", n, cyc - last);
        end
        last = cyc;
        n++;
        @(posedge clk);
        cyc++;
        #1;
        checks++;
        if (tick) begin failures++; $display("FAIL tick longer than one cycle"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
