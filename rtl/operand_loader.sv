// operand_loader: turns a bit-serial operand into a parallel word for the
// Booth multiplier.
//
// It joins the three parts the multiplier's input path is built from: a
// WIDTH-bit serial-in shift register (cascaded D flip-flops), a modulo-WIDTH
// counter of the shifted bits, and a parallel-load output register. Bits
// arrive LSB first, one per cycle in which shift_en is high. When the counter
// wraps on the WIDTH-th bit, the next cycle loads the completed word into
// data_out in parallel and pulses valid for one cycle. data_out then holds
// the word until the next one is complete, so the multiplier sees a stable
// operand while new bits are shifted in.
//
// bit_count shows how many bits of the current word have arrived.
// Timing: valid is high one clock after the edge that shifted the last bit.
// Active-low asynchronous reset clears all state. The three parts and the
// 8-bit width follow the source design; the bit order, the one-cycle load
// delay and the valid pulse are this design's choices.
module operand_loader #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             shift_en,
  input  logic             serial_in,
  output logic [WIDTH-1:0] data_out,
  output logic             valid,
  output logic [$clog2(WIDTH)-1:0] bit_count
);

  logic [WIDTH-1:0]         sr_q;
  logic                     wrap;
  logic                     load_q;

  shift_register #(.WIDTH(WIDTH)) u_sr (
    .clk      (clk),
    .rst_n    (rst_n),
    .shift_en (shift_en),
    .serial_in(serial_in),
    .q        (sr_q)
  );

  mod_counter #(.MOD(WIDTH)) u_cnt (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (shift_en),
    .count(bit_count),
    .wrap (wrap)
  );

  // Parallel load one cycle after the last bit, when the shift register
  // already holds the whole word.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      load_q   <= 1'b0;
      data_out <= '0;
      valid    <= 1'b0;
    end else begin
      load_q <= wrap;
      valid  <= load_q;
      if (load_q) data_out <= sr_q;
    end
  end

endmodule
