// sample_splitter: splits the 200 MHz sample stream into two 100 MHz streams.
//
// The sampler delivers one 2-bit sample per 200 MHz clock. Successive samples
// are strobed alternately into two holding flip-flops, so that each of the two
// parallel delay systems runs at half the sample rate. The second strobe falls
// one 200 MHz period (5 ns) after the first, which is the role of the 5 ns
// delay in the system block diagram.
//
// Interface and timing: `clk` is the 200 MHz sample clock and `phase` the
// 100 MHz phase shared by the whole system (it toggles every clk). On an edge
// with phase = 0 the incoming sample is held; on the edge with phase = 1 the
// held sample is presented on `x` and the incoming one on `y`. Hence after
// that edge x = s(2t) and y = s(2t+1): x is the earlier sample of the pair.
// Both outputs change only on phase = 1 edges, so 100 MHz logic clocked with
// enable = phase sees them stable for a whole 100 MHz period.
// The alternate strobing is the memo's; which stream is earlier and the
// phase convention are choices of this design.
module sample_splitter
  import ddc_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    phase,
  input  sample_t s_in,
  output sample_t x,
  output sample_t y
);

  sample_t held;

  always_ff @(posedge clk) begin
    if (rst) begin
      held <= '0;
      x    <= '0;
      y    <= '0;
    end else if (!phase) begin
      held <= s_in;
    end else begin
      x <= held;
      y <= s_in;
    end
  end

endmodule
