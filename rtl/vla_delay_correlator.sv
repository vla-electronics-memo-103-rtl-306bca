// vla_delay_correlator: digital delay and cross-correlation system for an
// array of N_ANT antennas with N_POL IF signals (polarizations) each.
//
// Every IF signal arrives from its sampler as 2-bit samples at 200 MHz. A
// sample_splitter sends alternate samples into two 100 MHz streams, and a
// delay_unit (one delay control, four one-bit RAM delay lines) delays both
// streams by the IF's delay word, in 10 ns steps; finer steps are left to
// the sampler's aperture phase, outside this logic. For every antenna pair
// i < j and every combination of their IFs a baseline_correlator correlates
// IF (i, pa) as antenna A with IF (j, pb) as antenna B and keeps two numbers:
// the centre lag and the difference of the two neighbouring lags. One
// correlator_control scans all low-speed sections and times the dump; at
// each dump the data_storage captures all 2 * N_CORR numbers.
//
// Numbering: IF k = ant * N_POL + pol. Antenna pairs are taken in the order
// (0,1), (0,2), ... (0,N-1), (1,2), ...; correlator c = pair * N_POL**2 +
// pa * N_POL + pb; storage word 2c is its centre number and 2c+1 its
// difference number. With the defaults (27 antennas, 2 polarizations) this
// gives 351 pairs, 1404 correlators and 2808 stored numbers.
//
// Interface and timing: `clk` is the 200 MHz sample clock; all 100 MHz logic
// runs on it with an enable on every second edge. `samples[k]` is sampled on
// every clk edge. The computer side is plain ports: `delay_word[k]` with
// `delay_strobe[k]` (held for two clk edges), `dump_period` in 100 MHz clocks,
// `dump` (one enabled clock per dump), `dump_count`, and the storage read
// port `rd_addr`/`rd_data` (one clk latency).
// The organisation follows the memo's block diagram; the IF/pair numbering,
// the single shared correlator control and the port protocol are this
// design's choices.
module vla_delay_correlator
  import ddc_pkg::*;
#(
  parameter int unsigned N_ANT         = 27,
  parameter int unsigned N_POL         = 2,
  parameter int unsigned PRESCALE_BITS = 8,
  parameter int unsigned ACC_W         = 32,
  parameter int unsigned SCAN_SLOT     = 8,
  parameter int unsigned PERIOD_W      = 30,
  localparam int unsigned N_IF     = N_ANT * N_POL,
  localparam int unsigned N_PAIR   = N_ANT * (N_ANT - 1) / 2,
  localparam int unsigned N_CORR   = N_PAIR * N_POL * N_POL,
  localparam int unsigned N_POINTS = 2 * N_CORR,
  localparam int unsigned RD_AW    = (N_POINTS > 1) ? $clog2(N_POINTS) : 1
) (
  input  logic                    clk,
  input  logic                    rst,
  input  sample_t                 samples      [N_IF],
  input  logic [DELAY_W-1:0]      delay_word   [N_IF],
  input  logic [N_IF-1:0]         delay_strobe,
  input  logic [PERIOD_W-1:0]     dump_period,
  input  logic [RD_AW-1:0]        rd_addr,
  output logic signed [ACC_W-1:0] rd_data,
  output logic                    dump,
  output logic [15:0]             dump_count
);

  if (8 * SCAN_SLOT > 2 ** (PRESCALE_BITS - 1)) begin : g_bad_scan
    $error("a full multiplexer scan must be shorter than half a prescaler cycle");
  end

  // 100 MHz phase: the slow logic advances on edges with phase = 1
  logic phase;
  always_ff @(posedge clk) begin
    if (rst) phase <= 1'b0;
    else     phase <= ~phase;
  end
  logic en;
  assign en = phase;

  // delay systems
  sample_t sx [N_IF];
  sample_t sy [N_IF];
  sample_t dx [N_IF];
  sample_t dy [N_IF];

  for (genvar k = 0; k < N_IF; k++) begin : g_if
    sample_splitter u_split (
      .clk, .rst, .phase, .s_in(samples[k]), .x(sx[k]), .y(sy[k])
    );
    delay_unit u_delay (
      .clk, .rst, .en,
      .delay_word(delay_word[k]), .strobe(delay_strobe[k]),
      .x_in(sx[k]), .y_in(sy[k]), .x_out(dx[k]), .y_out(dy[k])
    );
  end

  // correlator control
  logic [2:0] sel;
  logic       scan, count_en;

  correlator_control #(.SCAN_SLOT(SCAN_SLOT), .PERIOD_W(PERIOD_W)) u_cctl (
    .clk, .rst, .en, .dump_period, .sel, .scan, .count_en, .dump
  );

  // correlators
  logic signed [ACC_W-1:0] points [N_POINTS];

  for (genvar i = 0; i < N_ANT; i++) begin : g_a
    for (genvar j = i + 1; j < N_ANT; j++) begin : g_b
      localparam int unsigned PAIR = i * (2 * N_ANT - i - 1) / 2 + (j - i - 1);
      for (genvar pa = 0; pa < N_POL; pa++) begin : g_pa
        for (genvar pb = 0; pb < N_POL; pb++) begin : g_pb
          localparam int unsigned C  = PAIR * N_POL * N_POL + pa * N_POL + pb;
          localparam int unsigned IA = i * N_POL + pa;
          localparam int unsigned IB = j * N_POL + pb;
          baseline_correlator #(.PRESCALE_BITS(PRESCALE_BITS), .ACC_W(ACC_W)) u_corr (
            .clk, .rst, .en,
            .a_x(dx[IA]), .a_y(dy[IA]), .b_x(dx[IB]), .b_y(dy[IB]),
            .count_en, .clear(dump), .sel, .scan,
            .acc_center(points[2*C]), .acc_diff(points[2*C+1])
          );
        end
      end
    end
  end

  data_storage #(.N_POINTS(N_POINTS), .W(ACC_W)) u_store (
    .clk, .rst, .en, .capture(dump), .points, .rd_addr, .rd_data, .dump_count
  );

endmodule
