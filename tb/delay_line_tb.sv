// delay_line_tb: checks that a delay line, driven by delay_control, delays a
// random bit stream by exactly delay_word + DELAY_LATENCY 100 MHz clocks.
//
// For a set of delay words (zero, each side of a word boundary, a middle
// value, the largest word) the testbench loads the word, waits until the
// buffer has been refilled, and compares every output bit with the input bit
// it recorded delay_word + DELAY_LATENCY clocks earlier. The enable is held
// high. A watchdog ends the run if it hangs.
module delay_line_tb;
  import ddc_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic en  = 1'b1;
  logic d_in = 1'b0;
  logic [DELAY_W-1:0] delay_word = '0;
  logic strobe = 1'b0;
  logic [ADDR_W-1:0] addr;
  logic in_strobe, wr_en, rd_en, out_strobe, d_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  delay_control u_ctl (.clk, .rst, .en, .delay_word, .strobe,
                       .addr, .in_strobe, .wr_en, .rd_en, .out_strobe);
  delay_line dut (.clk, .rst, .en, .d_in, .addr, .in_strobe, .wr_en, .rd_en,
                  .out_strobe, .d_out);

  localparam int HIST = 1 << 15;
  bit hist [HIST];
  int t = 0;   // number of edges since the start

  // record the input sampled on each edge
  always @(posedge clk) begin
    hist[t % HIST] <= d_in;
    t <= t + 1;
  end

  task automatic run_delay(input int d, input int n_check);
    int t_load, mism;
    @(negedge clk);
    delay_word = DELAY_W'(d);
    strobe = 1'b1;
    @(negedge clk);
    strobe = 1'b0;
    t_load = t;
    // wait for the buffer to hold only new data
    repeat (d + DELAY_LATENCY + 32) @(negedge clk);
    mism = 0;
    repeat (n_check) begin
      // at this negedge, t edges have passed; the output shows the bit
      // sampled on edge t-1-(d+DELAY_LATENCY)+1 ... expressed via index
      checks++;
      if (d_out !== hist[(t - d - DELAY_LATENCY) % HIST]) begin
        failures++;
        mism++;
      end
      @(negedge clk);
    end
    if (mism != 0) $display("delay %0d: %0d mismatches", d, mism);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    fork
      forever begin
        @(negedge clk);
        d_in = 1'($urandom);
      end
    join_none
    run_delay(0, 200);
    run_delay(1, 200);
    run_delay(13, 200);
    run_delay(14, 200);
    run_delay(15, 200);
    run_delay(16, 200);
    run_delay(17, 200);
    run_delay(37, 200);
    run_delay(1000, 300);
    run_delay(16383, 300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
