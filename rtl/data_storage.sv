// data_storage: output numbers of every cross correlation, kept for the
// computer between dumps.
//
// On each dump all N_POINTS reversible-counter values are captured at once
// (two per cross correlation: centre, then difference), and a dump counter
// advances so the computer can tell a new set from the old one. The computer
// reads one word per clock through a registered read port, while the next
// integration proceeds.
//
// Interface and timing: capture on a `clk` edge with `en` and `capture` high;
// `rd_data` shows the word at `rd_addr` one clk after the address is applied.
// The memo names the data storage and gives 2808 output points; the parallel
// capture and the read port are this design's choices.
module data_storage #(
  parameter int unsigned N_POINTS = 2808,  // 351 baselines x 4 polarizations x 2
  parameter int unsigned W        = 32,
  parameter int unsigned AW       = (N_POINTS > 1) ? $clog2(N_POINTS) : 1
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic                capture,
  input  logic signed [W-1:0] points [N_POINTS],
  input  logic [AW-1:0]       rd_addr,
  output logic signed [W-1:0] rd_data,
  output logic [15:0]         dump_count
);

  logic signed [W-1:0] mem [N_POINTS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N_POINTS; i++) mem[i] <= '0;
      dump_count <= '0;
    end else if (en && capture) begin
      for (int i = 0; i < N_POINTS; i++) mem[i] <= points[i];
      dump_count <= dump_count + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) rd_data <= '0;
    else     rd_data <= (int'(rd_addr) < N_POINTS) ? mem[rd_addr] : '0;
  end

endmodule
