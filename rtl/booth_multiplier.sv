// booth_multiplier: sequential radix-2 Booth multiplier, N x N bits -> 2N bits.
//
// How it works. The classic four-column Booth datapath: A (accumulator), M
// (multiplicand), Q (multiplier) and the single bit Q-1. Every clock cycle
// one step is made: the pair {Q[0], Q-1} selects "shift only" (00, 11),
// "A = A - M then shift" (10) or "A = A + M then shift" (01); the shift is an
// arithmetic right shift of the joined {A, Q, Q-1}, so A's LSB moves into
// Q's MSB and Q's LSB into Q-1. After the last step {A, Q} holds the product.
//
// Operand choice. Before the first step the operand with fewer bit
// transitions (scanned from the right with an implied 0 below bit 0) is put
// into Q and the other into M, which minimises the number of add/subtract
// steps. SELECT_Q = 0 disables this and always uses op_b as the multiplier.
//
// Signed and unsigned. The registers are N+1 bits wide. Operands are sign
// extended (is_signed = 1) or zero extended (is_signed = 0) to N+1 bits and
// N+1 steps are made, so the same datapath gives the two's-complement or the
// unsigned product; the extra bit also keeps A - M from overflowing when M is
// the most negative N-bit number. In signed mode the last step always decodes
// to "shift only".
//
// Interface and timing. Pulse start (one cycle, while busy = 0) with the
// operands valid; they are captured on that edge and busy rises. Steps are
// made on the next N+1 rising edges; on the last one busy falls and done
// pulses for one cycle. product is valid from the done cycle until the next
// start. start while busy is ignored. op_o/step_o expose the action taken on
// the current step (for observation). Reset is active-low asynchronous.
//
// The algorithm, the operand choice, the Table-1 decode and the 8-bit default
// width follow the source design; the N+1-bit extension used for unsigned
// operands, the handshake and the reset are this design's choices.
module booth_multiplier
  import booth_uart_pkg::*;
#(
  parameter int unsigned N        = 8,
  parameter bit          SELECT_Q = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             is_signed,
  input  logic [N-1:0]     op_a,
  input  logic [N-1:0]     op_b,
  output logic             busy,
  output logic             done,
  output logic [2*N-1:0]   product,
  output logic             swapped,
  output logic             step_o,
  output booth_op_e        op_o
);

  localparam int unsigned W  = N + 1;
  localparam int unsigned CW = $clog2(W + 1);

  logic [W-1:0]  a_q, m_q, q_q;
  logic          qm1_q;
  logic [CW-1:0] cnt_q;
  logic          swap_q;

  // Operand extension and transition counts.
  logic [W-1:0]  ext_a, ext_b, diff_a, diff_b;
  logic [CW-1:0] trans_a, trans_b;
  logic          swap_d;

  always_comb begin
    ext_a   = {is_signed & op_a[N-1], op_a};
    ext_b   = {is_signed & op_b[N-1], op_b};
    // A transition at bit i is ext[i] != ext[i-1], with ext[-1] = 0.
    diff_a  = ext_a ^ {ext_a[W-2:0], 1'b0};
    diff_b  = ext_b ^ {ext_b[W-2:0], 1'b0};
    trans_a = '0;
    trans_b = '0;
    for (int unsigned i = 0; i < W; i++) begin
      trans_a = trans_a + CW'(diff_a[i]);
      trans_b = trans_b + CW'(diff_b[i]);
    end
    swap_d = SELECT_Q && (trans_b > trans_a);
  end

  // One Booth step.
  booth_op_e    op;
  logic [W-1:0] sum;

  always_comb begin
    op = booth_decode(q_q[0], qm1_q);
    unique case (op)
      BOOTH_ADD: sum = a_q + m_q;
      BOOTH_SUB: sum = a_q - m_q;
      default:   sum = a_q;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q    <= '0;
      m_q    <= '0;
      q_q    <= '0;
      qm1_q  <= 1'b0;
      cnt_q  <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
      swap_q <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          a_q    <= '0;
          m_q    <= swap_d ? ext_b : ext_a;
          q_q    <= swap_d ? ext_a : ext_b;
          qm1_q  <= 1'b0;
          cnt_q  <= CW'(W);
          busy   <= 1'b1;
          swap_q <= swap_d;
        end
      end else begin
        // Arithmetic right shift of {A, Q, Q-1} after the add/subtract.
        a_q   <= {sum[W-1], sum[W-1:1]};
        q_q   <= {sum[0], q_q[W-1:1]};
        qm1_q <= q_q[0];
        cnt_q <= cnt_q - 1'b1;
        if (cnt_q == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  logic [2*W-1:0] aq;
  assign aq      = {a_q, q_q};
  assign product = aq[2*N-1:0];
  assign swapped = swap_q;
  assign step_o  = busy;
  assign op_o    = op;

endmodule
