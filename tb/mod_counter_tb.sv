// mod_counter_tb: self-checking test of the modulo-8 counter.
//
// Drives a random enable for many cycles and checks count and wrap every
// cycle against a reference counter kept here: count advances only on
// enabled edges, runs 0..7 and wraps to 0; wrap is high exactly when the
// enable is high and count is 7. Also checks that wrap comes once every 8
// enabled cycles.
module mod_counter_tb;

  localparam int unsigned MOD = 8;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       en = 1'b0;
  logic [2:0] count;
  logic       wrap;
  int         ref_count;
  int         n_en, n_wrap;

  int checks = 0, failures = 0;

  mod_counter #(.MOD(MOD)) dut (.clk(clk), .rst_n(rst_n), .en(en), .count(count), .wrap(wrap));

  always #10 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_count = 0; n_en = 0; n_wrap = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      en = ($urandom % 3) != 0;
      #1;
      checks += 2;
      if (count !== 3'(ref_count)) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: count=%0d expected %0d", i, count, ref_count);
      end
      if (wrap !== (en && ref_count == MOD - 1)) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: wrap=%0b", i, wrap);
      end
      if (en) begin
        n_en++;
        if (wrap) n_wrap++;
        ref_count = (ref_count + 1) % MOD;
      end
    end
    checks++;
    if (n_wrap != n_en / MOD) begin
      failures++;
      $display("FAIL %0d wraps for %0d enabled cycles", n_wrap, n_en);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
