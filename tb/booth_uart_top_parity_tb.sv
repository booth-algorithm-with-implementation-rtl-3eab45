// booth_uart_top_parity_tb: end-to-end test of the serial Booth multiplier in
// a second line configuration: even parity, two stop bits, 115200 baud
// (divisor round(50e6 / (115200 x 16)) = 27, i.e. 115741 baud, 0.5 % fast).
//
// A model of the computer sends operand pairs as 12-bit frames (start, 8
// data bits, even parity, two stop bits) at the true 115200 baud and decodes
// the returned frames, checking their parity bit and both stop bits. Each
// returned pair of bytes must be the product worked out here (signed and
// unsigned pairs alternate). A final pair with a wrong parity bit in its
// first frame must raise parity_err, and a following good frame must clear
// it. Counted and required at least once: even-parity frames returned,
// signed and unsigned products, and a parity error.
module booth_uart_top_parity_tb;
  timeunit 1ns; timeprecision 1ps;

  localparam real BIT_NS = 1.0e9 / 115200.0;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        rxd = 1'b1;
  logic        txd;
  logic        signed_mode = 1'b1;
  logic [15:0] result;
  logic        result_valid, parity_err, frame_err, rx_overflow;

  int checks = 0, failures = 0;
  int n_signed = 0, n_unsigned = 0, n_parity_err = 0, n_frames = 0;
  logic [7:0] got[$];

  booth_uart_top #(
    .BAUD     (115_200),
    .STOP_BITS(2),
    .PARITY   (booth_uart_pkg::PARITY_EVEN)
  ) dut (
    .clk(clk), .rst_n(rst_n), .uart_rxd(rxd), .uart_txd(txd), .signed_mode(signed_mode),
    .result(result), .result_valid(result_valid), .parity_err(parity_err),
    .frame_err(frame_err), .rx_overflow(rx_overflow)
  );

  always #10 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_mul.done) begin
      if (signed_mode) n_signed++; else n_unsigned++;
    end
  end

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_byte(input logic [7:0] d, input logic bad_parity);
    rxd = 1'b0;
    #(BIT_NS);
    for (int i = 0; i < 8; i++) begin
      rxd = d[i];
      #(BIT_NS);
    end
    rxd = (^d) ^ bad_parity;
    #(BIT_NS);
    rxd = 1'b1;
    #(2 * BIT_NS);
  endtask

  initial begin
    logic [7:0] d;
    forever begin
      @(negedge txd);
      #(1.5 * BIT_NS);
      for (int i = 0; i < 8; i++) begin
        d[i] = txd;
        #(BIT_NS);
      end
      checks += 2;
      if (txd !== ^d) begin failures++; $display("FAIL returned parity bit"); end
      #(BIT_NS);
      if (txd !== 1'b1) begin failures++; $display("FAIL returned first stop bit"); end
      #(BIT_NS);
      checks++;
      if (txd !== 1'b1) begin failures++; $display("FAIL returned second stop bit"); end
      n_frames++;
      got.push_back(d);
    end
  end

  initial begin
    int exp_p;
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    #(2 * BIT_NS);
    for (int i = 0; i < 12; i++) begin
      logic [7:0] a, b;
      a = 8'($urandom); b = 8'($urandom);
      signed_mode = i[0];
      got.delete();
      send_byte(a, 1'b0);
      send_byte(b, 1'b0);
      #(30 * BIT_NS);
      exp_p = signed_mode ? int'($signed(a)) * int'($signed(b)) : int'(a) * int'(b);
      checks += 2;
      if (got.size() != 2 || {got[0], got[1]} !== 16'(exp_p)) begin
        failures++; $display("FAIL pair %0d: %h x %h", i, a, b);
      end
      if (parity_err || frame_err) begin failures++; $display("FAIL error flag on a good frame"); end
    end
    // Wrong parity on the first operand byte.
    got.delete();
    send_byte(8'd6, 1'b1);
    @(posedge clk);
    if (parity_err) n_parity_err++;
    send_byte(8'd9, 1'b0);
    #(30 * BIT_NS);
    checks += 3;
    if (n_parity_err == 0) begin failures++; $display("FAIL parity error not flagged"); end
    if (parity_err) begin failures++; $display("FAIL parity_err not cleared"); end
    if (got.size() != 2 || {got[0], got[1]} !== 16'd54) begin failures++; $display("FAIL 6 x 9"); end
    checks++;
    if (n_signed == 0 || n_unsigned == 0 || n_parity_err == 0 || n_frames == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("frames returned %0d, signed %0d, unsigned %0d, parity errors %0d",
             n_frames, n_signed, n_unsigned, n_parity_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
