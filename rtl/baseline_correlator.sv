// baseline_correlator: one cross correlation (two antennas, one polarization
// each), from delayed samples to the two output numbers.
//
// The high-speed section forms the 12 gated sign products of three lags in
// the two alternate-sample groups; the low-speed section prescales them and
// combines them into two reversible counters: `acc_center` (centre lag, both
// groups, + minus -) and `acc_diff` (lag "1" minus lag "3", both groups).
// Each count stands for 2**PRESCALE_BITS products.
//
// Interface and timing: all inputs on `clk` edges with `en` = 1. The scan
// and dump controls come from correlator_control; `clear` is its dump.
// The split into high- and low-speed sections is the memo's.
module baseline_correlator
  import ddc_pkg::*;
#(
  parameter int unsigned PRESCALE_BITS = 8,
  parameter int unsigned ACC_W         = 32
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    en,
  input  sample_t                 a_x,
  input  sample_t                 a_y,
  input  sample_t                 b_x,
  input  sample_t                 b_y,
  input  logic                    count_en,
  input  logic                    clear,
  input  logic [2:0]              sel,
  input  logic                    scan,
  output logic signed [ACC_W-1:0] acc_center,
  output logic signed [ACC_W-1:0] acc_diff
);

  logic [N_CH-1:0] ch;

  correlator_hs u_hs (
    .clk, .rst, .en, .a_x, .a_y, .b_x, .b_y, .ch
  );

  corr_lowspeed #(.PRESCALE_BITS(PRESCALE_BITS), .ACC_W(ACC_W)) u_ls (
    .clk, .rst, .en, .count_en, .clear, .ch, .sel, .scan, .acc_center, .acc_diff
  );

endmodule
