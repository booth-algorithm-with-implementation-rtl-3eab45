// shift_register: WIDTH-bit serial-in, parallel-out shift register made of a
// chain of D flip-flops.
//
// Each enabled clock edge moves every flop's value one place towards bit 0
// and loads serial_in into the top flop (bit WIDTH-1). A word sent LSB first,
// one bit per enabled cycle, is therefore complete in q after WIDTH enabled
// edges, with its first bit in q[0]. This is the bit order of a UART frame.
//
// Interface: shift_en qualifies the clock; q is the flop chain. Active-low
// asynchronous reset clears the chain. The cascaded-D-flip-flop structure and
// the 8-bit default follow the source design; the bit order, the enable and
// the reset are this design's choices.
module shift_register #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             shift_en,
  input  logic             serial_in,
  output logic [WIDTH-1:0] q
);

  // Flop i takes the output of flop i+1; the last flop takes serial_in.
  for (genvar i = 0; i < WIDTH; i++) begin : g_dff
    logic d;
    if (i == WIDTH - 1) begin : g_head
      assign d = serial_in;
    end else begin : g_link
      assign d = q[i+1];
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)        q[i] <= 1'b0;
      else if (shift_en) q[i] <= d;
    end
  end

endmodule
