// correlator_control_tb: checks the multiplexer scan and the dump timing.
//
// With the enable on every second edge it checks that a scan pulse comes on
// every 8th enabled clock with the select advancing by one each time, that
// counting stays enabled for exactly dump_period clocks, is blanked for one
// full scan (64 clocks) and that `dump` then lasts one enabled clock. It
// changes dump_period between dumps and checks that the next period uses the
// new value, and that a period of 0 acts as 1.
module correlator_control_tb;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic en  = 1'b0;
  logic [29:0] dump_period = 30'd100;
  logic [2:0] sel;
  logic scan, count_en, dump;
  int checks = 0, failures = 0;

  always #2.5 clk = ~clk;

  correlator_control dut (.clk, .rst, .en, .dump_period, .sel, .scan, .count_en, .dump);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int m = 0;          // enabled edges
  int last_scan = -1;
  logic [2:0] last_sel;
  int run_int = 0, run_blank = 0;
  int dumps = 0;
  int expect_period;
  int periods [5] = '{100, 37, 0, 1, 500};

  initial begin
    expect_period = periods[0];
    repeat (4) @(negedge clk);
    rst = 1'b0;
    while (dumps < 5) begin
      // state before an enabled edge
      @(negedge clk);
      en = 1'b1;
      #0;
      if (scan) begin
        if (last_scan >= 0) begin
          check(m - last_scan == 8, "scan spacing");
          check(sel == last_sel + 3'd1, "select order");
        end
        last_scan = m;
        last_sel = sel;
      end
      if (count_en) begin
        check(run_blank == 0 && !dump, "count enable during blank");
        run_int++;
      end else if (!dump) begin
        run_blank++;
      end else begin
        check(run_int == (expect_period == 0 ? 1 : expect_period), "integration length");
        check(run_blank == 64, "blank length");
        dumps++;
        run_int = 0;
        run_blank = 0;
        if (dumps < 5) begin
          dump_period = 30'(periods[dumps]);
          expect_period = periods[dumps];
        end
      end
      @(negedge clk);
      en = 1'b0;
      m++;
      check(!(dump && count_en), "dump while counting");
    end
    check(dumps == 5, "dumps seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
