// fifo: synchronous first-in first-out buffer, used on both sides of the
// UART to hold received bytes until they are used and result bytes until the
// transmitter is free.
//
// A DEPTH-entry register array (DEPTH a power of two) with write and read
// pointers one bit wider than the address, so full and empty are told apart
// by the extra bit. The head entry is always shown on r_data (first-word
// fall-through): rd pops it.
//
// Interface and timing: wr writes w_data on the clock edge unless the FIFO is
// full and not read in the same cycle (such a write is dropped and flagged by
// overflow, which pulses for one cycle); rd pops the head unless the FIFO is empty. A read
// and a write in the same cycle both take effect. level is the number of
// stored entries. Active-low asynchronous reset empties the FIFO.
//
// The source design names the receive and transmit FIFOs and their purpose;
// the depth, the fall-through read and the overflow policy are this design's
// choices.
module fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   wr,
  input  logic [WIDTH-1:0]       w_data,
  input  logic                   rd,
  output logic [WIDTH-1:0]       r_data,
  output logic                   empty,
  output logic                   full,
  output logic [$clog2(DEPTH):0] level,
  output logic                   overflow
);

  localparam int unsigned AW = (DEPTH < 2) ? 1 : $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;
  logic             do_wr, do_rd;

  assign level  = wptr - rptr;
  assign empty  = (wptr == rptr);
  assign full   = (wptr[AW] != rptr[AW]) && (wptr[AW-1:0] == rptr[AW-1:0]);
  assign do_rd  = rd && !empty;
  assign do_wr  = wr && (!full || do_rd);
  assign r_data = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= w_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr     <= '0;
      rptr     <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= wr && full && !rd;
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
    end
  end

  // A read of an empty FIFO is a protocol error of the reader.
  a_no_read_when_empty: assert property (@(posedge clk) disable iff (!rst_n) rd |-> !empty)
    else $error("fifo: read while empty");

endmodule
