// sample_splitter_tb: checks that alternate 200 MHz samples land in the X and
// Y streams, X holding the earlier sample of each pair, and that the outputs
// change only on edges with phase = 1.
module sample_splitter_tb;
  import ddc_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic phase = 1'b0;
  sample_t s_in = '0;
  sample_t x, y;
  sample_t prev_s, prev_x, prev_y;
  int checks = 0, failures = 0;

  always #2.5 clk = ~clk;

  sample_splitter dut (.clk, .rst, .phase, .s_in, .x, .y);

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (2000) begin
      s_in = sample_t'($urandom);
      prev_x = x;
      prev_y = y;
      @(negedge clk);
      checks++;
      if (phase) begin
        // the edge just taken had phase = 1: x = previous sample, y = this one
        if (x !== prev_s || y !== s_in) failures++;
      end else begin
        if (x !== prev_x || y !== prev_y) failures++;
      end
      prev_s = s_in;
      phase = ~phase;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
