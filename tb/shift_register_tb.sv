// shift_register_tb: self-checking test of the serial-in shift register.
//
// Shifts random bit streams in with a random enable and compares q, every
// cycle, with a reference register updated here: on an enabled edge the new
// bit enters at the top and every bit moves one place down; a disabled edge
// holds q. Also checks that an 8-bit word sent LSB first is complete after
// exactly 8 enabled edges.
module shift_register_tb;

  localparam int unsigned WIDTH = 8;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             shift_en = 1'b0;
  logic             serial_in = 1'b0;
  logic [WIDTH-1:0] q;
  logic [WIDTH-1:0] ref_q;

  int checks = 0, failures = 0;

  shift_register #(.WIDTH(WIDTH)) dut (
    .clk(clk), .rst_n(rst_n), .shift_en(shift_en), .serial_in(serial_in), .q(q)
  );

  always #10 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_q = '0;
    repeat (2) @(negedge clk);
    checks++; if (q !== '0) failures++;
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      shift_en  = 1'($urandom);
      serial_in = 1'($urandom);
      @(posedge clk);
      if (shift_en) ref_q = {serial_in, ref_q[WIDTH-1:1]};
      #1;
      checks++;
      if (q !== ref_q) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: q=%b expected %b", i, q, ref_q);
      end
    end
    // Whole words, LSB first.
    for (int w = 0; w < 50; w++) begin
      logic [WIDTH-1:0] word;
      word = WIDTH'($urandom);
      for (int b = 0; b < WIDTH; b++) begin
        @(negedge clk);
        shift_en = 1'b1; serial_in = word[b];
      end
      @(negedge clk);
      shift_en = 1'b0;
      checks++;
      if (q !== word) begin
        failures++;
        $display("FAIL word %h got %h", word, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
