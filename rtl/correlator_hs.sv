// correlator_hs: high-speed section of one cross correlation.
//
// Antenna A (the one whose extra lags are formed here) and antenna B each
// deliver two 100 MHz streams, X (earlier sample of each pair) and Y (later
// sample). A's streams pass two register stages and B's one:
//   A1 = A.Y(t)   A2 = A.X(t)   A3 = A.Y(t-1)   A4 = A.X(t-1)
//   BX = B.X(t)   BY = B.Y(t)
// Six sample pairs are correlated. A pair contributes only when both
// amplitude bits are 1 (the (+-2)x(+-2) products); it then raises the "+"
// channel when the signs agree and the "-" channel when they differ:
//   ch1/ch2   A2 x BX   centre lag, X group
//   ch3/ch4   A3 x BY   centre lag, Y group
//   ch5/ch6   A1 x BX   side lag "1", X group
//   ch7/ch8   A3 x BX   side lag "3", X group
//   ch9/ch10  A2 x BY   side lag "1", Y group
//   ch11/ch12 A4 x BY   side lag "3", Y group
// With X = s(2t) and Y = s(2t+1), the X group covers lags of A against B of
// +1, 0, -1 samples (5 ns) and the Y group -1, -2, -3 samples.
//
// Interface and timing: inputs are registered on `clk` edges with `en` = 1;
// `ch[k-1]` is channel k and is a combinational function of the registers,
// valid for the following enabled edge.
// The registers, pairings and channel numbers follow the memo's high-speed
// drawing; the sign rule follows its identities (+2 x +2 = +1 count).
module correlator_hs
  import ddc_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            en,
  input  sample_t         a_x,
  input  sample_t         a_y,
  input  sample_t         b_x,
  input  sample_t         b_y,
  output logic [N_CH-1:0] ch
);

  sample_t a1, a2, a3, a4, bx, by;

  always_ff @(posedge clk) begin
    if (rst) begin
      {a1, a2, a3, a4, bx, by} <= '0;
    end else if (en) begin
      a1 <= a_y;
      a2 <= a_x;
      a3 <= a1;
      a4 <= a2;
      bx <= b_x;
      by <= b_y;
    end
  end

  // "+" and "-" count for one pair: index 0 = "+", 1 = "-"
  function automatic logic [1:0] pair_counts(sample_t a, sample_t b);
    logic both, differ;
    both   = a.amp & b.amp;
    differ = a.sign ^ b.sign;
    return {both & differ, both & ~differ};
  endfunction

  assign ch[1:0]   = pair_counts(a2, bx);
  assign ch[3:2]   = pair_counts(a3, by);
  assign ch[5:4]   = pair_counts(a1, bx);
  assign ch[7:6]   = pair_counts(a3, bx);
  assign ch[9:8]   = pair_counts(a2, by);
  assign ch[11:10] = pair_counts(a4, by);

endmodule
