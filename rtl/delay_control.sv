// delay_control: address and strobe generator shared by four delay lines.
//
// A 14-bit buffer holds the delay word written by the computer. A 14-bit
// counter advances at 100 MHz: its upper 10 bits are the RAM address and its
// lower 4 bits the phase inside the 160 ns (16-clock) memory cycle. A 10-bit
// comparator matches the address against the upper 10 bits of the buffer;
// at the end of the memory cycle in which they match, the counter returns to
// zero, so the RAMs form a circular buffer of (delay[13:4] + 1) words. The
// computer strobe both loads the buffer and resets the counter.
//
// Decode of the phase, once per memory cycle:
//   phase 0  in_strobe   - the 16 bits in the input shift register go to the
//                          input buffer
//   phase 1  rd_en       - the RAM word at `addr` goes to the output buffer
//   phase 2  wr_en       - the input buffer is written to `addr`
//   phase (delay[3:0] + 2) mod 16  out_strobe - the output buffer goes to the
//                          output shift register
// The 4-bit comparator compares the phase with the low 4 bits of the delay
// word; the offset of 2 places the output strobe after the read, so that the
// total delay of a delay line is exactly delay + DELAY_LATENCY clocks, in
// steps of one 10 ns clock, with no jump at the word boundary.
//
// Timing: everything advances on `clk` edges with `en` = 1 (the 100 MHz
// enable). `strobe` must be high on one such edge. Outputs are combinational
// from the counter and buffer.
// The buffer, counter, comparators and decode are the memo's (Fig. 2); the
// phases of the decoded controls and the wrap rule are this design's choices.
module delay_control
  import ddc_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               en,
  input  logic [DELAY_W-1:0] delay_word,
  input  logic               strobe,
  output logic [ADDR_W-1:0]  addr,
  output logic               in_strobe,
  output logic               wr_en,
  output logic               rd_en,
  output logic               out_strobe
);

  localparam logic [PHASE_W-1:0] PH_IN   = 4'd0;
  localparam logic [PHASE_W-1:0] PH_RD   = 4'd1;
  localparam logic [PHASE_W-1:0] PH_WR   = 4'd2;
  localparam logic [PHASE_W-1:0] PH_LAST = 4'd15;
  // the output buffer is valid from the phase after the read
  localparam logic [PHASE_W-1:0] OUT_OFS = PH_RD + 4'd1;

  logic [DELAY_W-1:0] dbuf;
  logic [DELAY_W-1:0] cnt;
  logic [PHASE_W-1:0] ph;
  logic               addr_match;  // 10-bit comparator
  logic               fine_match;  // 4-bit comparator

  assign addr       = cnt[DELAY_W-1:PHASE_W];
  assign ph         = cnt[PHASE_W-1:0];
  assign addr_match = (addr == dbuf[DELAY_W-1:PHASE_W]);
  assign fine_match = ((ph - OUT_OFS) == dbuf[PHASE_W-1:0]);

  always_ff @(posedge clk) begin
    if (rst) begin
      dbuf <= '0;
      cnt  <= '0;
    end else if (en) begin
      if (strobe) begin
        dbuf <= delay_word;
        cnt  <= '0;
      end else if (addr_match && ph == PH_LAST) begin
        cnt <= '0;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  assign in_strobe  = (ph == PH_IN);
  assign rd_en      = (ph == PH_RD);
  assign wr_en      = (ph == PH_WR);
  assign out_strobe = fine_match;

endmodule
