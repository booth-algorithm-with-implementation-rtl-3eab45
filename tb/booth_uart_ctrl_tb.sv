// booth_uart_ctrl_tb: self-checking test of the sequencer between the UART
// FIFOs and the Booth multiplier.
//
// The sequencer drives the real operand loaders and multiplier; the UART's
// two FIFOs are modelled here by queues. Random operand pairs are offered
// with random gaps (rx_empty high between bytes) and tx_full is held high at
// random, so the sequencer must wait on both sides. For every pair the two
// words written to the transmit side must be the high and then the low byte
// of the product worked out here, result/result_valid must show the product
// once, no byte may be read while rx_empty is high and none written while
// tx_full is high. Signed and unsigned pairs are both run.
import booth_uart_pkg::*;

module booth_uart_ctrl_tb;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        rx_empty, rd_uart, tx_full = 1'b0, wr_uart;
  logic [7:0]  r_data, w_data, op_a, op_b;
  logic        ser_bit, shift_a, shift_b, a_valid, b_valid;
  logic [2:0]  a_bits, b_bits;
  logic        mul_start, mul_done, mul_busy, swapped, step;
  logic [15:0] product, result;
  logic        result_valid;
  logic        signed_mode = 1'b1;
  booth_op_e   op;

  logic [7:0]  rxq[$];
  logic [7:0]  txq[$];
  logic [15:0] resq[$];
  int checks = 0, failures = 0;
  int n_full_wait = 0;

  booth_uart_ctrl dut (
    .clk(clk), .rst_n(rst_n), .rx_empty(rx_empty), .r_data(r_data), .rd_uart(rd_uart),
    .tx_full(tx_full), .wr_uart(wr_uart), .w_data(w_data),
    .ser_bit(ser_bit), .shift_a(shift_a), .shift_b(shift_b), .a_valid(a_valid), .b_valid(b_valid),
    .mul_start(mul_start), .mul_done(mul_done), .product(product),
    .result(result), .result_valid(result_valid)
  );
  operand_loader u_a (.clk(clk), .rst_n(rst_n), .shift_en(shift_a), .serial_in(ser_bit),
                      .data_out(op_a), .valid(a_valid), .bit_count(a_bits));
  operand_loader u_b (.clk(clk), .rst_n(rst_n), .shift_en(shift_b), .serial_in(ser_bit),
                      .data_out(op_b), .valid(b_valid), .bit_count(b_bits));
  booth_multiplier u_mul (.clk(clk), .rst_n(rst_n), .start(mul_start), .is_signed(signed_mode),
                          .op_a(op_a), .op_b(op_b), .busy(mul_busy), .done(mul_done),
                          .product(product), .swapped(swapped), .step_o(step), .op_o(op));

  always #10 clk = ~clk;

  // Receive FIFO model: head on r_data, popped by rd_uart.
  // rx_empty and r_data are refreshed after every change of the queue.
  initial begin rx_empty = 1'b1; r_data = 8'h00; end

  always @(posedge clk) begin
    if (rst_n) begin
      if (rd_uart) begin
        if (rx_empty) begin failures++; $display("FAIL read while empty"); end
        else begin
          void'(rxq.pop_front());
          rx_empty <= (rxq.size() == 0);
          r_data   <= (rxq.size() == 0) ? 8'h00 : rxq[0];
        end
      end
      if (wr_uart) begin
        if (tx_full) begin failures++; $display("FAIL write while full"); end
        else txq.push_back(w_data);
      end
      if (tx_full && (dut.state == dut.C_SEND_HI || dut.state == dut.C_SEND_LO)) n_full_wait++;
      if (result_valid) resq.push_back(result);
    end
  end

  // The transmit side is full a third of the time.
  always @(negedge clk) tx_full <= ($urandom % 3) == 0;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      logic [7:0] a, b;
      int exp_p, waited;
      a = 8'($urandom); b = 8'($urandom);
      if (i == 0) begin a = 8'(-16); b = 8'(-15); end
      if (i == 1) begin a = 8'd17;   b = 8'd57;  end
      signed_mode = (i < 200);
      exp_p = signed_mode ? int'($signed(a)) * int'($signed(b)) : int'(a) * int'(b);
      @(negedge clk);
      rxq.push_back(a);
      rx_empty = 1'b0; r_data = rxq[0];
      repeat ($urandom % 40) @(negedge clk);
      rxq.push_back(b);
      rx_empty = 1'b0; r_data = rxq[0];
      waited = 0;
      while (txq.size() < 2 && waited < 1000) begin @(negedge clk); waited++; end
      checks += 3;
      if (txq.size() != 2) begin
        failures++; $display("FAIL pair %0d: %0d bytes sent", i, txq.size());
      end else if ({txq[0], txq[1]} !== 16'(exp_p)) begin
        failures++; $display("FAIL pair %0d: %h x %h sent %h%h expected %h", i, a, b,
                             txq[0], txq[1], 16'(exp_p));
      end
      if (resq.size() != 1 || resq[0] !== 16'(exp_p)) begin
        failures++; $display("FAIL pair %0d: result port", i);
      end
      if (rxq.size() != 0) begin failures++; $display("FAIL pair %0d: bytes left", i); end
      txq.delete(); resq.delete();
    end
    checks++;
    if (n_full_wait == 0) begin failures++; $display("FAIL never waited on tx_full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
