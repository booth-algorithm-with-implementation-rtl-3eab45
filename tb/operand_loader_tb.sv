// operand_loader_tb: self-checking test of the serial operand loader.
//
// Sends random 8-bit words LSB first, one bit per enabled cycle, with random
// idle cycles between bits. Checks that valid pulses for exactly one cycle,
// exactly one clock after the edge that shifted the last bit, that data_out
// then holds the word sent, and that data_out keeps the previous word while
// the next one is being shifted in.
module operand_loader_tb;

  localparam int unsigned WIDTH = 8;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             shift_en = 1'b0;
  logic             serial_in = 1'b0;
  logic [WIDTH-1:0] data_out;
  logic             valid;
  logic [2:0]       bit_count;

  int checks = 0, failures = 0;
  int n_valid = 0;

  operand_loader #(.WIDTH(WIDTH)) dut (
    .clk(clk), .rst_n(rst_n), .shift_en(shift_en), .serial_in(serial_in),
    .data_out(data_out), .valid(valid), .bit_count(bit_count)
  );

  always #10 clk = ~clk;
  always @(posedge clk) if (rst_n && valid) n_valid++;

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] prev;
    prev = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < 500; w++) begin
      logic [WIDTH-1:0] word;
      word = WIDTH'($urandom);
      for (int b = 0; b < WIDTH; b++) begin
        @(negedge clk);
        shift_en = 1'b1; serial_in = word[b];
        @(negedge clk);
        shift_en = 1'b0;
        checks++;
        if (valid || (b < WIDTH - 1 && data_out !== prev)) begin
          failures++;
          if (failures < 10) $display("FAIL word %0d bit %0d: early valid or output changed", w, b);
        end
        if (b < WIDTH - 1 && ($urandom % 2)) repeat ($urandom % 3) @(negedge clk);
      end
      // One clock after the last shift edge.
      @(negedge clk);
      checks += 2;
      if (!valid) begin failures++; $display("FAIL word %0d: no valid", w); end
      if (data_out !== word) begin failures++; $display("FAIL word %h got %h", word, data_out); end
      @(negedge clk);
      checks++;
      if (valid) begin failures++; $display("FAIL valid longer than one cycle"); end
      prev = word;
    end
    checks++;
    if (n_valid != 500) begin failures++; $display("FAIL %0d valid pulses", n_valid); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
