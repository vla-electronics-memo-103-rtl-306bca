// delay_unit_tb: checks that one delay control and its four delay lines delay
// both sample streams (sign and amplitude bits) by delay_word +
// DELAY_LATENCY enabled clocks, with the enable high on every second edge as
// in the full system, and that a newly loaded word takes effect.
module delay_unit_tb;
  import ddc_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic en  = 1'b0;
  logic [DELAY_W-1:0] delay_word = '0;
  logic strobe = 1'b0;
  sample_t x_in = '0, y_in = '0, x_out, y_out;
  int checks = 0, failures = 0;

  always #2.5 clk = ~clk;

  delay_unit dut (.clk, .rst, .en, .delay_word, .strobe, .x_in, .y_in, .x_out, .y_out);

  localparam int HIST = 1 << 15;
  sample_t hx [HIST];
  sample_t hy [HIST];
  int m = 0;   // enabled edges so far

  // one enabled edge: present new inputs, take the edge, then the edge after
  task automatic step();
    @(negedge clk);
    en = 1'b1;
    x_in = sample_t'($urandom);
    y_in = sample_t'($urandom);
    hx[m % HIST] = x_in;
    hy[m % HIST] = y_in;
    @(negedge clk);
    m++;
    en = 1'b0;
  endtask

  task automatic run_delay(input int d, input int n_check);
    @(negedge clk);
    delay_word = DELAY_W'(d);
    strobe = 1'b1;
    step();
    strobe = 1'b0;
    repeat (d + DELAY_LATENCY + 32) step();
    repeat (n_check) begin
      step();
      // after m enabled edges the output holds the input of edge m-1-(d+L)+... :
      // the input sampled on enabled edge (m - 1) - (d + L) + 1 is at index
      // m - d - L
      checks++;
      if (x_out !== hx[(m - d - DELAY_LATENCY) % HIST] ||
          y_out !== hy[(m - d - DELAY_LATENCY) % HIST]) failures++;
    end
  endtask

  initial begin
    repeat (4) @(negedge clk);
    rst = 1'b0;
    run_delay(0, 100);
    run_delay(31, 100);
    run_delay(16 * 100 + 9, 200);
    run_delay(2, 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
