// booth_uart_top_tb: end-to-end test of the serial Booth multiplier at its
// default parameters (50 MHz clock, 19200 baud, 8 data bits, no parity, one
// stop bit).
//
// A model of the computer sends operand pairs as serial frames at the true
// 19200 baud (52083 ns per bit) and, at the same time, decodes the frames
// coming back on uart_txd. For each pair the two returned bytes (high byte
// first) must equal the product worked out here, in signed or unsigned mode
// as set by signed_mode; result/result_valid must show the same product.
// The pairs are the two worked examples (-16 x -15 = 240, 17 x 57 = 969),
// corner values and random values, sent back to back so that reception of
// the next pair overlaps transmission of the last result.
//
// It then sends one pair whose first frame has a '0' stop bit and checks
// that frame_err is raised (the byte is still used).
//
// Mechanisms counted, each of which must happen at least once: Booth add
// steps, subtract steps, shift-only steps, operand swaps (the multiplier
// register takes the operand with fewer transitions), signed and unsigned
// products, parallel loads of each operand loader, the transmit FIFO holding
// two bytes, and a frame error.
module booth_uart_top_tb;
  timeunit 1ns; timeprecision 1ps;

  localparam real BIT_NS = 1.0e9 / 19200.0;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        rxd = 1'b1;
  logic        txd;
  logic        signed_mode = 1'b1;
  logic [15:0] result;
  logic        result_valid, parity_err, frame_err, rx_overflow;

  int checks = 0, failures = 0;
  int n_add = 0, n_sub = 0, n_shift = 0, n_swap = 0, n_signed = 0, n_unsigned = 0;
  int n_load_a = 0, n_load_b = 0, n_tx_two = 0, n_frame_err = 0;

  logic [7:0]  got[$];
  logic [15:0] results[$];

  booth_uart_top dut (
    .clk(clk), .rst_n(rst_n), .uart_rxd(rxd), .uart_txd(txd), .signed_mode(signed_mode),
    .result(result), .result_valid(result_valid), .parity_err(parity_err),
    .frame_err(frame_err), .rx_overflow(rx_overflow)
  );

  always #10 clk = ~clk;

  // Mechanism counters, observed inside the design.
  always @(posedge clk) if (rst_n) begin
    if (dut.u_mul.step_o) begin
      case (dut.u_mul.op_o)
        booth_uart_pkg::BOOTH_ADD: n_add++;
        booth_uart_pkg::BOOTH_SUB: n_sub++;
        default:                   n_shift++;
      endcase
    end
    if (dut.u_mul.done) begin
      if (dut.u_mul.swapped) n_swap++;
      if (signed_mode) n_signed++; else n_unsigned++;
    end
    if (dut.u_load_a.valid) n_load_a++;
    if (dut.u_load_b.valid) n_load_b++;
    if (dut.u_uart.tx_level >= 2) n_tx_two++;
    if (result_valid) results.push_back(result);
    if (rx_overflow) begin failures++; $display("FAIL receive FIFO overflow"); end
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Computer side: send one frame.
  task automatic send_byte(input logic [7:0] d, input logic bad_stop);
    rxd = 1'b0;
    #(BIT_NS);
    for (int i = 0; i < 8; i++) begin
      rxd = d[i];
      #(BIT_NS);
    end
    rxd = !bad_stop;
    #(0.6 * BIT_NS);
    rxd = 1'b1;
    #(0.4 * BIT_NS);
  endtask

  // Computer side: receive frames forever.
  initial begin
    logic [7:0] d;
    forever begin
      @(negedge txd);
      #(1.5 * BIT_NS);
      for (int i = 0; i < 8; i++) begin
        d[i] = txd;
        #(BIT_NS);
      end
      if (txd !== 1'b1) begin failures++; $display("FAIL returned stop bit"); end
      got.push_back(d);
    end
  end

  typedef struct {
    logic [7:0] a;
    logic [7:0] b;
    logic       s;
  } pair_t;

  initial begin
    pair_t pairs[$];
    int exp_p;
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    #(2 * BIT_NS);
    pairs.push_back('{8'(-16), 8'(-15), 1'b1});
    pairs.push_back('{8'd17, 8'd57, 1'b1});
    pairs.push_back('{8'h80, 8'h80, 1'b1});
    pairs.push_back('{8'h7F, 8'h80, 1'b1});
    pairs.push_back('{8'hFF, 8'hFF, 1'b0});
    pairs.push_back('{8'h00, 8'hA5, 1'b0});
    for (int i = 0; i < 14; i++) pairs.push_back('{8'($urandom), 8'($urandom), 1'(i % 2)});
    foreach (pairs[i]) begin
      // The mode switch changes only between pairs, when the design is idle.
      signed_mode = pairs[i].s;
      send_byte(pairs[i].a, 1'b0);
      send_byte(pairs[i].b, 1'b0);
      // Let the first two results out before the next mode change.
      if (i + 1 < pairs.size() && pairs[i + 1].s != pairs[i].s) #(25 * BIT_NS);
    end
    #(25 * BIT_NS);
    checks++;
    if (got.size() != 2 * pairs.size() || results.size() != pairs.size()) begin
      failures++;
      $display("FAIL %0d bytes / %0d results for %0d pairs", got.size(), results.size(), pairs.size());
    end
    foreach (pairs[i]) begin
      exp_p = pairs[i].s ? int'($signed(pairs[i].a)) * int'($signed(pairs[i].b))
                         : int'(pairs[i].a) * int'(pairs[i].b);
      checks += 2;
      if (2 * i + 1 < got.size()) begin
        if ({got[2 * i], got[2 * i + 1]} !== 16'(exp_p)) begin
          failures++;
          $display("FAIL pair %0d %h x %h (%s): got %h%h expected %h", i, pairs[i].a, pairs[i].b,
                   pairs[i].s ? "signed" : "unsigned", got[2 * i], got[2 * i + 1], 16'(exp_p));
        end
      end else failures++;
      if (i < results.size()) begin
        if (results[i] !== 16'(exp_p)) begin failures++; $display("FAIL result port %0d", i); end
      end else failures++;
    end
    // A frame with a broken stop bit.
    got.delete();
    signed_mode = 1'b1;
    send_byte(8'd3, 1'b1);
    @(posedge clk);
    if (frame_err) n_frame_err++;
    send_byte(8'd7, 1'b0);
    #(25 * BIT_NS);
    checks += 3;
    if (n_frame_err == 0) begin failures++; $display("FAIL frame error not flagged"); end
    if (frame_err) begin failures++; $display("FAIL frame_err not cleared by a good frame"); end
    if (got.size() != 2 || {got[0], got[1]} !== 16'd21) begin failures++; $display("FAIL 3 x 7"); end
    // Every mechanism must have happened.
    checks++;
    if (n_add == 0 || n_sub == 0 || n_shift == 0 || n_swap == 0 || n_signed == 0 ||
        n_unsigned == 0 || n_load_a == 0 || n_load_b == 0 || n_tx_two == 0 || n_frame_err == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("add steps %0d, subtract steps %0d, shift-only steps %0d, operand swaps %0d",
             n_add, n_sub, n_shift, n_swap);
    $display("signed products %0d, unsigned products %0d, loads A %0d B %0d",
             n_signed, n_unsigned, n_load_a, n_load_b);
    $display("cycles with two bytes in the transmit FIFO %0d, frame errors %0d", n_tx_two, n_frame_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
