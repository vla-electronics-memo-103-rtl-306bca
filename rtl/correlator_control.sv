// correlator_control: timing of the low-speed correlator section.
//
// It steps the multiplexer select through channels 0..7, one slot of
// SCAN_SLOT 100 MHz clocks each, and issues the scan pulse (the up/down
// clock timing) on the last clock of every slot. It also times the dump
// period: after `dump_period` clocks of integration the products are blanked
// (`count_en` low) for one full scan, so that every prescaler carry already
// made reaches the reversible counters; then `dump` is raised for one clock,
// on which the data storage captures all reversible counters and the
// correlators clear. Integration then restarts.
//
// Interface and timing: state advances on `clk` edges with `en` = 1. The
// outputs are levels, meaningful on enabled edges. One dump cycle lasts
// dump_period + 8*SCAN_SLOT + 1 enabled clocks; a dump_period of 0 acts as 1.
// `dump_period` is read at the start of each integration.
// The existence of this controller, the multiplexer control and the up/down
// clocks are the memo's; the slot length, flush and dump sequence are this
// design's choices.
module correlator_control #(
  parameter int unsigned SCAN_SLOT = 8,   // 100 MHz clocks per multiplexer slot
  parameter int unsigned PERIOD_W  = 30   // holds 10 s at 100 MHz
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic [PERIOD_W-1:0] dump_period,
  output logic [2:0]          sel,
  output logic                scan,
  output logic                count_en,
  output logic                dump
);

  localparam int unsigned SLOT_W    = (SCAN_SLOT > 1) ? $clog2(SCAN_SLOT) : 1;
  localparam int unsigned FLUSH_LEN = 8 * SCAN_SLOT;

  typedef enum logic [1:0] {S_INTEGRATE, S_FLUSH, S_DUMP} state_t;

  state_t              state;
  logic [SLOT_W-1:0]   slot;
  logic [PERIOD_W-1:0] icnt;
  logic [PERIOD_W-1:0] period;

  assign scan     = (slot == SLOT_W'(SCAN_SLOT - 1));
  assign count_en = (state == S_INTEGRATE);
  assign dump     = (state == S_DUMP);

  always_ff @(posedge clk) begin
    if (rst) begin
      slot <= '0;
      sel  <= '0;
    end else if (en) begin
      if (scan) begin
        slot <= '0;
        sel  <= sel + 3'd1;
      end else begin
        slot <= slot + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_INTEGRATE;
      icnt   <= '0;
      period <= (dump_period == '0) ? PERIOD_W'(1) : dump_period;
    end else if (en) begin
      unique case (state)
        S_INTEGRATE: begin
          if (icnt == period - 1'b1) begin
            state <= S_FLUSH;
            icnt  <= '0;
          end else begin
            icnt <= icnt + 1'b1;
          end
        end
        S_FLUSH: begin
          if (icnt == PERIOD_W'(FLUSH_LEN - 1)) begin
            state <= S_DUMP;
          end
          icnt <= icnt + 1'b1;
        end
        default: begin  // S_DUMP
          state  <= S_INTEGRATE;
          icnt   <= '0;
          period <= (dump_period == '0) ? PERIOD_W'(1) : dump_period;
        end
      endcase
    end
  end

endmodule
