// booth_multiplier_tb: self-checking test of the sequential Booth multiplier.
//
// Runs every pair of 8-bit operands in signed and in unsigned mode (plus the
// two worked examples -16 x -15 = 240 and 17 x 57 = 969) and checks, against
// values computed here with plain integer arithmetic:
//   - the 16-bit product;
//   - the latency: done exactly N+2 cycles after the cycle start is sampled
//     (one load edge, N+1 step edges), busy high in between;
//   - the operand choice: the multiplier register gets the operand with fewer
//     bit transitions (a swap happens exactly when op_b has more);
//   - the number of add and subtract steps seen on op_o, which must equal
//     the number of 0->1 and 1->0 pairs in the chosen multiplier.
import booth_uart_pkg::*;

module booth_multiplier_tb;

  localparam int unsigned N = 8;
  localparam int unsigned W = N + 1;

  logic           clk = 1'b0;
  logic           rst_n = 1'b0;
  logic           start = 1'b0;
  logic           is_signed = 1'b1;
  logic [N-1:0]   op_a = '0, op_b = '0;
  logic           busy, done, swapped, step;
  logic [2*N-1:0] product;
  booth_op_e      op;

  int checks = 0, failures = 0;
  int n_add = 0, n_sub = 0, n_shift = 0;

  booth_multiplier #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .is_signed(is_signed),
    .op_a(op_a), .op_b(op_b), .busy(busy), .done(done), .product(product),
    .swapped(swapped), .step_o(step), .op_o(op)
  );

  always #10 clk = ~clk;

  // Count the actions taken on each step.
  always @(posedge clk) if (rst_n) begin
    if (step) begin
      case (op)
        BOOTH_ADD: n_add++;
        BOOTH_SUB: n_sub++;
        default:   n_shift++;
      endcase
    end
  end

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ext(input logic [N-1:0] v, input logic s);
    return s ? int'($signed(v)) : int'(v);
  endfunction

  // Transitions of the W-bit extended value with an implied 0 below bit 0.
  function automatic int transitions(input logic [N-1:0] v, input logic s, output int adds, output int subs);
    logic [W-1:0] e;
    logic prev;
    int t;
    e = {s & v[N-1], v};
    prev = 1'b0; t = 0; adds = 0; subs = 0;
    for (int i = 0; i < W; i++) begin
      if (e[i] && !prev) subs++;
      if (!e[i] && prev) adds++;
      if (e[i] != prev) t++;
      prev = e[i];
    end
    return t;
  endfunction

  task automatic run_one(input logic [N-1:0] a, input logic [N-1:0] b, input logic s);
    int exp_p, ta, tb, aa, sa, ab, sb, cyc, add0, sub0;
    logic exp_swap;
    @(negedge clk);
    op_a = a; op_b = b; is_signed = s; start = 1'b1;
    add0 = n_add; sub0 = n_sub;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done && cyc < 50) begin
      @(negedge clk);
      cyc++;
    end
    exp_p = ext(a, s) * ext(b, s);
    ta = transitions(a, s, aa, sa);
    tb = transitions(b, s, ab, sb);
    exp_swap = (tb > ta);
    checks += 4;
    if (product !== 16'(exp_p)) begin
      failures++;
      if (failures < 10) $display("FAIL %s %0d x %0d: got %0d (0x%h) expected %0d",
                                  s ? "signed" : "unsigned", ext(a, s), ext(b, s),
                                  s ? int'($signed(product)) : int'(product), product, exp_p);
    end
    if (cyc != W + 1) begin
      failures++;
      if (failures < 10) $display("FAIL latency %0d cycles, expected %0d", cyc, W + 1);
    end
    if (swapped !== exp_swap) begin
      failures++;
      if (failures < 10) $display("FAIL operand choice for %h x %h", a, b);
    end
    if ((n_add - add0) != (exp_swap ? aa : ab) || (n_sub - sub0) != (exp_swap ? sa : sb)) begin
      failures++;
      if (failures < 10) $display("FAIL add/sub step count for %h x %h: %0d/%0d", a, b,
                                  n_add - add0, n_sub - sub0);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // The two worked examples.
    run_one(8'(-16), 8'(-15), 1'b1);
    checks++; if ($signed(product) != 240) failures++;
    run_one(8'd17, 8'd57, 1'b1);
    checks++; if (product != 16'd969) failures++;
    // start while busy is ignored.
    @(negedge clk); op_a = 8'd3; op_b = 8'd5; start = 1'b1;
    @(negedge clk); op_a = 8'd100; op_b = 8'd100;
    @(negedge clk); start = 1'b0;
    wait (done); @(negedge clk);
    checks++; if (product != 16'd15) begin failures++; $display("FAIL start while busy"); end
    // Exhaustive, both modes.
    for (int m = 0; m < 2; m++)
      for (int a = 0; a < 256; a++)
        for (int b = 0; b < 256; b++)
          run_one(8'(a), 8'(b), m[0]);
    checks++;
    if (n_add == 0 || n_sub == 0 || n_shift == 0) begin
      failures++; $display("FAIL some step kind never seen");
    end
    $display("steps: add=%0d sub=%0d shift-only=%0d", n_add, n_sub, n_shift);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
