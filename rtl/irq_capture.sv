// irq_capture: static-side end of the time-multiplexed interrupt scheme.
//
// A counter steps through the interrupt numbers 0 .. M-1, one per clock, and
// is broadcast to the slots, whose interrupt select generators put the
// interrupt of the module configured for that number onto the single
// interrupt chain. A decoder of the counter enables the flip-flop of the
// current number, which samples the chain at the end of the cycle. A module's
// interrupt state therefore reaches its output flip-flop within M + 1 clock
// cycles in the worst case. Structure after the document; the counter
// wrapping at M (instead of at 2**BE_W) and the reset are this design's choices.
module irq_capture
  import recobus_pkg::*;
#(
  parameter int unsigned M = 15      // interrupt lines to the master (max 15)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         irq_chain,    // interrupt chain output at the master
  output be_t          irq_cnt,      // counter broadcast to the slots
  output logic [M-1:0] irq_lines     // interrupt lines to the master
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      irq_cnt   <= '0;
      irq_lines <= '0;
    end else begin
      irq_cnt <= (irq_cnt == be_t'(M - 1)) ? '0 : irq_cnt + 1'b1;
      for (int i = 0; i < int'(M); i++)
        if (irq_cnt == be_t'(i)) irq_lines[i] <= irq_chain;
    end
  end

  // The counter never produces the reserved address.
  initial assert (M >= 1 && M <= int'(LUT_DEPTH) - 1)
    else $error("irq_capture: M must be 1..15");

endmodule
