// delay_line: one-bit digital delay built from a circular RAM buffer.
//
// Serial data enter a 16-bit shift register at 100 MHz. Once per 160 ns
// memory cycle the 16 bits are strobed into the input buffer; the RAM word at
// the current address is read into the output buffer and then overwritten by
// the input buffer; the address then advances. At a programmable phase of the
// memory cycle the output buffer is strobed into the 16-bit output shift
// register, which shifts the bits out at 100 MHz, earliest bit first. The RAM
// is sixteen 1024 x 1 devices side by side, modelled as one 1024 x 16 array.
//
// Interface and timing: `d_in` is sampled on every `clk` edge with `en` = 1;
// `d_out` is the head of the output shift register. The controls come from
// delay_control; with delay word D the bit sampled on one enabled edge
// appears on `d_out` after D + DELAY_LATENCY enabled edges.
// The structure is the memo's (Fig. 2); bit order and the read-before-write
// sequence are this design's choices.
module delay_line
  import ddc_pkg::*;
#(
  parameter int unsigned AW = ADDR_W,   // 1024-word RAMs
  parameter int unsigned WW = WORD_W    // 16 RAMs per delay line
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic          d_in,
  input  logic [AW-1:0] addr,
  input  logic          in_strobe,
  input  logic          wr_en,
  input  logic          rd_en,
  input  logic          out_strobe,
  output logic          d_out
);

  logic [WW-1:0] isr;     // input shift register
  logic [WW-1:0] ibuf;    // input buffer
  logic [WW-1:0] obuf;    // output buffer
  logic [WW-1:0] osr;     // output shift register
  logic [WW-1:0] ram [2**AW];

  always_ff @(posedge clk) begin
    if (en && wr_en) ram[addr] <= ibuf;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      isr  <= '0;
      ibuf <= '0;
      obuf <= '0;
      osr  <= '0;
    end else if (en) begin
      isr <= {isr[WW-2:0], d_in};
      if (in_strobe) ibuf <= isr;
      if (rd_en)     obuf <= ram[addr];
      if (out_strobe) osr <= obuf;
      else            osr <= {osr[WW-2:0], 1'b0};
    end
  end

  assign d_out = osr[WW-1];

endmodule
