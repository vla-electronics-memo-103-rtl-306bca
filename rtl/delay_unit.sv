// delay_unit: the delay system of one IF signal.
//
// One delay_control drives four delay_line instances: the amplitude and sign
// bits of each of the two alternate-sample streams (X and Y). All four share
// one address, one set of strobes and hence one delay. Loading a delay word
// with `strobe` restarts the address counter; the outputs carry the buffer's
// old contents until the new delay has elapsed.
//
// Interface and timing: `x_in`/`y_in` are sampled on `clk` edges with `en` = 1
// (100 MHz). `x_out`/`y_out` equal the inputs delayed by
// delay_word + DELAY_LATENCY enabled edges.
// "One controller drives four delay systems" is the memo's.
module delay_unit
  import ddc_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               en,
  input  logic [DELAY_W-1:0] delay_word,
  input  logic               strobe,
  input  sample_t            x_in,
  input  sample_t            y_in,
  output sample_t            x_out,
  output sample_t            y_out
);

  logic [ADDR_W-1:0] addr;
  logic in_strobe, wr_en, rd_en, out_strobe;

  delay_control u_ctl (
    .clk, .rst, .en, .delay_word, .strobe,
    .addr, .in_strobe, .wr_en, .rd_en, .out_strobe
  );

  logic [3:0] d_in, d_out;
  assign d_in = {x_in.sign, x_in.amp, y_in.sign, y_in.amp};

  for (genvar b = 0; b < 4; b++) begin : g_line
    delay_line u_line (
      .clk, .rst, .en,
      .d_in (d_in[b]),
      .addr, .in_strobe, .wr_en, .rd_en, .out_strobe,
      .d_out(d_out[b])
    );
  end

  assign x_out = '{sign: d_out[3], amp: d_out[2]};
  assign y_out = '{sign: d_out[1], amp: d_out[0]};

endmodule
