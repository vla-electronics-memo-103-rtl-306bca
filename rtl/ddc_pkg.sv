// ddc_pkg: types and constants shared by the digital delay and correlator RTL.
//
// A sample is the 2-bit output of the 200 MHz sampler: a sign bit (1 = positive,
// 0 = negative) and an amplitude bit (1 = magnitude above the threshold Vo,
// 0 = below it). With the low and intermediate products deleted, only samples
// whose amplitude bit is 1 contribute to a correlation, and each contributing
// product counts +1 when the signs agree and -1 when they differ.
//
// The delay word is 14 bits in units of one 100 MHz clock (10 ns): the upper
// 10 bits select the length of the circular RAM buffer in 16-sample words and
// the lower 4 bits the position of the output strobe inside the 160 ns memory
// cycle. The correlator produces 12 count channels per cross correlation: six
// sample pairs (three lags in each of the two alternate-sample groups), each
// with a "+" and a "-" counter.
package ddc_pkg;

  typedef struct packed {
    logic sign;  // 1 = positive, 0 = negative
    logic amp;   // 1 = |v| > Vo
  } sample_t;

  localparam int unsigned DELAY_W   = 14;  // delay word width (Fig. 2 buffer)
  localparam int unsigned ADDR_W    = 10;  // RAM address width (1024 x 1 RAMs)
  localparam int unsigned PHASE_W   = 4;   // position in the 16-clock memory cycle
  localparam int unsigned WORD_W    = 16;  // bits per RAM word (16 RAMs)
  localparam int unsigned N_CH      = 12;  // count channels per cross correlation

  // Fixed latency of a delay line, in 100 MHz clocks, on top of the delay word.
  localparam int unsigned DELAY_LATENCY = 35;

  // Direction of each count channel into the centre and difference reversible
  // counters. Channels are numbered 1..12 as in the correlator drawings; index
  // 0 of these vectors is channel 1. Channels 1-4 feed the centre counter,
  // 5-12 the difference counter (channel 1 lag minus channel 3 lag).
  // Bit set = count up, clear = count down.
  localparam logic [3:0] CENTER_UP = 4'b0101;      // ch1 +, ch2 -, ch3 +, ch4 -
  localparam logic [7:0] DIFF_UP   = 8'b1001_1001; // ch5 +, ch6 -, ch7 -, ch8 +,
                                                   // ch9 +, ch10 -, ch11 -, ch12 +

endpackage
