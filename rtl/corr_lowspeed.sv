// corr_lowspeed: counter, subtractor and combiner of one cross correlation.
//
// Each of the 12 count channels first drives its own binary prescaler
// (PRESCALE_BITS stages: the JK stage, the two flip-flop stages, the 4-bit
// ripple counter and the final JK stage of the low-speed drawing). The most
// significant prescaler bits are then read at low speed through two
// multiplexers: a 4-input one over channels 1-4 and an 8-input one over
// channels 5-12. Each multiplexer output is compared with the value the same
// channel had one scan earlier, kept in a circulating shift register (4 and 8
// bits). A 1 -> 0 change is the carry out of the prescaler, i.e. 2**PRESCALE_BITS
// counts, and steps a reversible counter up or down:
//   centre counter      ch1 up, ch2 down, ch3 up, ch4 down
//   difference counter  channel-1 lag minus channel-3 lag:
//                       ch5 up, ch6 down, ch7 down, ch8 up,
//                       ch9 up, ch10 down, ch11 down, ch12 up
// The two groups of alternate samples are thereby combined, and the channel 1
// and 3 lags subtracted, only after the prescalers: two reversible counters
// remain per cross correlation.
//
// Interface and timing: products `ch` count on `clk` edges with `en` = 1 and
// `count_en` = 1. On an enabled edge with `scan` = 1 the channels selected by
// `sel` (sel for the 8-input multiplexer, sel[1:0] for the 4-input one) are
// examined. `sel` must advance by one, modulo 8, from one scan to the next,
// as the circulating registers assume; scans must come often enough that
// every channel is seen at least once per 2**(PRESCALE_BITS-1) enabled edges.
// `clear`, on an enabled edge, zeroes prescalers, shift registers and both
// counters. The counters hold floor(n/2**PRESCALE_BITS) carries per channel:
// the prescaler remainder at a clear is not carried over.
// The structure is the memo's (Fig. 4); the up/down assignment follows its
// difference equations; edge detection, widths and the scan rule are this
// design's choices.
module corr_lowspeed
  import ddc_pkg::*;
#(
  parameter int unsigned PRESCALE_BITS = 8,
  parameter int unsigned ACC_W         = 32
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    en,
  input  logic                    count_en,
  input  logic                    clear,
  input  logic [N_CH-1:0]         ch,
  input  logic [2:0]              sel,
  input  logic                    scan,
  output logic signed [ACC_W-1:0] acc_center,
  output logic signed [ACC_W-1:0] acc_diff
);

  logic [PRESCALE_BITS-1:0] psc [N_CH];
  logic [3:0] prev4;
  logic [7:0] prev8;
  logic       cur4, cur8;
  logic       carry4, carry8;
  logic       up4, up8;

  always_ff @(posedge clk) begin
    if (rst || (en && clear)) begin
      for (int c = 0; c < N_CH; c++) psc[c] <= '0;
    end else if (en && count_en) begin
      for (int c = 0; c < N_CH; c++) psc[c] <= psc[c] + PRESCALE_BITS'(ch[c]);
    end
  end

  // multiplexers
  assign cur4   = psc[{2'b00, sel[1:0]}][PRESCALE_BITS-1];
  assign cur8   = psc[4 + int'(sel)][PRESCALE_BITS-1];
  assign carry4 = prev4[3] & ~cur4;
  assign carry8 = prev8[7] & ~cur8;
  assign up4    = CENTER_UP[sel[1:0]];
  assign up8    = DIFF_UP[sel];

  always_ff @(posedge clk) begin
    if (rst || (en && clear)) begin
      prev4      <= '0;
      prev8      <= '0;
      acc_center <= '0;
      acc_diff   <= '0;
    end else if (en && scan) begin
      prev4 <= {prev4[2:0], cur4};
      prev8 <= {prev8[6:0], cur8};
      if (carry4) acc_center <= up4 ? acc_center + 1'b1 : acc_center - 1'b1;
      if (carry8) acc_diff   <= up8 ? acc_diff + 1'b1 : acc_diff - 1'b1;
    end
  end

  // the circulating registers line up with the channels only if the scan
  // visits them in order
  logic [2:0] last_sel;
  logic       scanned;
  always_ff @(posedge clk) begin
    if (rst || (en && clear)) begin
      last_sel <= '0;
      scanned  <= 1'b0;
    end else if (en && scan) begin
      last_sel <= sel;
      scanned  <= 1'b1;
    end
  end

  a_scan_order: assert property (@(posedge clk) disable iff (rst || (en && clear))
                                 (en && scan && scanned) |-> sel == last_sel + 3'd1)
    else $error("corr_lowspeed: scan out of order");

endmodule
