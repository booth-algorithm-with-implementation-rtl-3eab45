// fifo_tb: self-checking test of the FIFO buffer.
//
// Random reads and writes (never a read while empty) against a queue kept
// here. Every cycle it checks empty, full, level and the head word on r_data;
// writes to a full FIFO must be dropped and flagged by overflow. It also
// counts how often the FIFO was seen full and how often a write hit a full
// FIFO, and fails if either never happened.
module fifo_tb;

  localparam int unsigned WIDTH = 8;
  localparam int unsigned DEPTH = 4;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             wr = 1'b0, rd = 1'b0;
  logic [WIDTH-1:0] w_data = '0;
  logic [WIDTH-1:0] r_data;
  logic             empty, full, overflow;
  logic [2:0]       level;

  logic [WIDTH-1:0] model[$];
  int checks = 0, failures = 0;
  int n_full = 0, n_drop = 0;

  fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .wr(wr), .w_data(w_data), .rd(rd), .r_data(r_data),
    .empty(empty), .full(full), .level(level), .overflow(overflow)
  );

  always #10 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_ovf;
    exp_ovf = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      checks += 4;
      if (empty !== (model.size() == 0)) begin failures++; $display("FAIL empty at %0d", i); end
      if (full !== (model.size() == DEPTH)) begin failures++; $display("FAIL full at %0d", i); end
      if (int'(level) != model.size()) begin failures++; $display("FAIL level at %0d", i); end
      if (overflow !== exp_ovf) begin failures++; $display("FAIL overflow at %0d", i); end
      if (model.size() > 0) begin
        checks++;
        if (r_data !== model[0]) begin
          failures++;
          if (failures < 10) $display("FAIL head %h expected %h", r_data, model[0]);
        end
      end
      if (full) n_full++;
      // Phases bias towards filling or draining.
      wr = ($urandom % 100) < (((i / 200) % 2) ? 70 : 30);
      rd = (model.size() > 0) && (($urandom % 100) < (((i / 200) % 2) ? 30 : 70));
      w_data = WIDTH'($urandom);
      exp_ovf = wr && full && !rd;
      if (exp_ovf) n_drop++;
      @(posedge clk);
      if (rd) void'(model.pop_front());
      if (wr && model.size() < DEPTH) model.push_back(w_data);
    end
    checks++;
    if (n_full == 0 || n_drop == 0) begin
      failures++; $display("FAIL full (%0d) or dropped write (%0d) never seen", n_full, n_drop);
    end
    $display("full seen %0d cycles, %0d writes dropped", n_full, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
