// correlator_hs_tb: checks the 12 count channels of the high-speed correlator
// against products worked out in integer arithmetic.
//
// Each sample is given its numeric value (+1, +2, -1, -2: amplitude bit 1
// means magnitude 2). A pair's product of +4 must raise exactly its "+"
// channel, -4 exactly its "-" channel, and any other product neither. The
// testbench keeps its own history of the inputs to form the lags:
//   ch1/2 A.X(t) x B.X(t)     ch3/4 A.Y(t-1) x B.Y(t)
//   ch5/6 A.Y(t) x B.X(t)     ch7/8 A.Y(t-1) x B.X(t)
//   ch9/10 A.X(t) x B.Y(t)    ch11/12 A.X(t-1) x B.Y(t)
// The enable is toggled so that held registers are checked too.
module correlator_hs_tb;
  import ddc_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic en  = 1'b0;
  sample_t a_x = '0, a_y = '0, b_x = '0, b_y = '0;
  logic [N_CH-1:0] ch;
  int checks = 0, failures = 0;
  int hits [N_CH];

  always #5 clk = ~clk;

  correlator_hs dut (.clk, .rst, .en, .a_x, .a_y, .b_x, .b_y, .ch);

  function automatic int val(sample_t s);
    return (s.amp ? 2 : 1) * (s.sign ? 1 : -1);
  endfunction

  // expected "+" and "-" bits of one pair
  function automatic logic [1:0] exp_pair(sample_t a, sample_t b);
    int p;
    p = val(a) * val(b);
    return {p == -4, p == 4};
  endfunction

  sample_t ax0, ay0, bx0, by0, ax1, ay1;   // registered now, and one step earlier
  logic [N_CH-1:0] expect_ch;

  initial begin
    ax0 = '0; ay0 = '0; bx0 = '0; by0 = '0; ax1 = '0; ay1 = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (5000) begin
      a_x = sample_t'($urandom);
      a_y = sample_t'($urandom);
      b_x = sample_t'($urandom);
      b_y = sample_t'($urandom);
      en  = 1'($urandom_range(0, 4) != 0);
      @(negedge clk);
      if (en) begin
        ax1 = ax0; ay1 = ay0;
        ax0 = a_x; ay0 = a_y; bx0 = b_x; by0 = b_y;
      end
      expect_ch = {exp_pair(ax1, by0), exp_pair(ax0, by0), exp_pair(ay1, bx0),
                   exp_pair(ay0, bx0), exp_pair(ay1, by0), exp_pair(ax0, bx0)};
      checks++;
      if (ch !== expect_ch) begin
        failures++;
        if (failures < 10) $display("FAIL ch=%b expected %b", ch, expect_ch);
      end
      for (int c = 0; c < N_CH; c++) hits[c] += int'(ch[c]);
    end
    // every channel must have fired
    for (int c = 0; c < N_CH; c++) begin
      checks++;
      if (hits[c] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
