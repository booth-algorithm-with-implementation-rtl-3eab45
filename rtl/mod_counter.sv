// mod_counter: modulo-MOD up counter (MOD = 8 by default) with a wrap tick.
//
// count advances by one on each clock edge where en is high and returns to
// 0 after MOD-1. wrap is high, combinationally, in the cycle where en is high
// and count is MOD-1, i.e. during the MOD-th counted event; a user that
// registers wrap sees it one cycle after that event. Active-low asynchronous
// reset clears the count.
//
// The modulo-8 count used to frame 8-bit words follows the source design;
// the enable, the wrap output and the reset are this design's choices.
module mod_counter #(
  parameter int unsigned MOD = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       en,
  output logic [$clog2(MOD)-1:0]     count,
  output logic                       wrap
);

  localparam int unsigned CW = $clog2(MOD);

  assign wrap = en && (count == CW'(MOD - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   count <= '0;
    else if (en)  count <= wrap ? '0 : count + 1'b1;
  end

endmodule
