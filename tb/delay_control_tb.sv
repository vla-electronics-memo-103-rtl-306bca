// delay_control_tb: checks the address counter and the decoded strobes of
// delay_control against a reference count kept by the testbench.
//
// After each delay word is loaded the testbench counts enabled edges n and
// expects count = n mod (16 * (delay[13:4] + 1)); address = count / 16; the
// input strobe, read and write controls on phases 0, 1 and 2 of the 16-clock
// memory cycle; the output strobe on phase (delay[3:0] + 2) mod 16. It also
// measures the address wrap period in clocks. The enable is toggled at
// random so that disabled edges are seen to change nothing.
module delay_control_tb;
  import ddc_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic en  = 1'b0;
  logic [DELAY_W-1:0] delay_word = '0;
  logic strobe = 1'b0;
  logic [ADDR_W-1:0] addr;
  logic in_strobe, wr_en, rd_en, out_strobe;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  delay_control dut (.clk, .rst, .en, .delay_word, .strobe,
                     .addr, .in_strobe, .wr_en, .rd_en, .out_strobe);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic run_word(input int d, input int n_edges);
    int n, len, cnt, ph, k, last_wrap, period;
    len = 16 * ((d >> 4) + 1);
    k = d & 15;
    @(negedge clk);
    delay_word = DELAY_W'(d);
    strobe = 1'b1;
    en = 1'b1;
    @(negedge clk);
    strobe = 1'b0;
    n = 0;
    last_wrap = -1;
    period = -1;
    while (n < n_edges) begin
      cnt = n % len;
      ph = cnt % 16;
      check(addr == ADDR_W'(cnt / 16), "address");
      check(in_strobe == (ph == 0), "input strobe");
      check(rd_en == (ph == 1), "read control");
      check(wr_en == (ph == 2), "write control");
      check(out_strobe == (ph == ((k + 2) % 16)), "output strobe");
      en = 1'($urandom_range(0, 3) != 0);
      @(negedge clk);
      if (en) n++;
      if (addr == 0 && in_strobe && en) begin
        // measure the memory-cycle wrap in enabled edges
        if (last_wrap >= 0) period = n - last_wrap;
        last_wrap = n;
      end
    end
    if (n_edges >= 2 * len) check(period == len, "wrap period");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    run_word(0, 100);
    run_word(5, 100);
    run_word(14, 100);
    run_word(15, 100);
    run_word(16 * 3 + 7, 400);
    run_word(16 * 40 + 13, 3000);
    run_word(16383, 40000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
