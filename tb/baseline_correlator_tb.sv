// baseline_correlator_tb: runs one cross correlation end to end under a
// correlator_control and checks each dump against numbers the testbench
// works out from the samples it applied.
//
// Antenna B is a copy of antenna A, shifted by a lag that changes from dump
// to dump and with a few samples replaced by noise, so that the lags carry
// real correlation and both reversible counters move up and down. The testbench forms the lags itself (A's streams
// registered twice, B's once), counts per channel the products of +4 and -4
// while counting is enabled, and expects per dump
//   centre     = sum of floor(n/256) over ch1, ch3 minus over ch2, ch4
//   difference = (ch5 - ch6 - ch7 + ch8 + ch9 - ch10 - ch11 + ch12) carries.
module baseline_correlator_tb;
  import ddc_pkg::*;

  localparam int PB = 8;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic en  = 1'b0;
  sample_t a_x = '0, a_y = '0, b_x = '0, b_y = '0;
  logic [29:0] dump_period = 30'd3000;
  logic [2:0] sel;
  logic scan, count_en, dump;
  logic signed [31:0] acc_center, acc_diff;
  int checks = 0, failures = 0;

  always #2.5 clk = ~clk;

  correlator_control u_ctl (.clk, .rst, .en, .dump_period, .sel, .scan, .count_en, .dump);
  baseline_correlator dut (.clk, .rst, .en, .a_x, .a_y, .b_x, .b_y, .count_en,
                           .clear(dump), .sel, .scan, .acc_center, .acc_diff);

  function automatic int val(sample_t s);
    return (s.amp ? 2 : 1) * (s.sign ? 1 : -1);
  endfunction

  int n [N_CH];
  int dumps = 0;
  sample_t r_a1, r_a2, r_a3, r_a4, r_bx, r_by;   // reference registers
  sample_t hist [8];    // the last samples of A, by 200 MHz index mod 8
  int hn = 8;           // 200 MHz index of the next A sample

  // B's sample n: dump 0 B = A, dump 1 B(n) = A(n+1) (exact for B's X
  // samples; B's Y samples then read an old entry and act as noise),
  // dump 2 B(n) = A(n-3), dump 3 B = -A
  function automatic sample_t b_sample(int idx);
    sample_t s;
    case (dumps % 4)
      0: s = hist[idx % 8];
      1: s = hist[(idx + 1) % 8];
      2: s = hist[(idx - 3) % 8];
      default: s = '{sign: ~hist[idx % 8].sign, amp: hist[idx % 8].amp};
    endcase
    if ($urandom_range(0, 9) == 0) s = sample_t'($urandom);
    return s;
  endfunction

  task automatic count_pair(int idx, sample_t a, sample_t b);
    int p;
    p = val(a) * val(b);
    if (p == 4)  n[idx]++;
    if (p == -4) n[idx + 1]++;
  endtask

  initial begin
    sample_t s0, s1;
    int ec, ed;
    r_a1 = '0; r_a2 = '0; r_a3 = '0; r_a4 = '0; r_bx = '0; r_by = '0;
    for (int i = 0; i < 8; i++) hist[i] = '0;
    repeat (4) @(negedge clk);
    rst = 1'b0;
    while (dumps < 8) begin
      // products visible now count on this enabled edge if count_en
      @(negedge clk);
      en = 1'b1;
      #0;
      if (count_en) begin
        count_pair(0, r_a2, r_bx);
        count_pair(2, r_a3, r_by);
        count_pair(4, r_a1, r_bx);
        count_pair(6, r_a3, r_bx);
        count_pair(8, r_a2, r_by);
        count_pair(10, r_a4, r_by);
      end
      if (dump) begin
        ec = (n[0] >> PB) - (n[1] >> PB) + (n[2] >> PB) - (n[3] >> PB);
        ed = (n[4] >> PB) - (n[5] >> PB) - (n[6] >> PB) + (n[7] >> PB)
           + (n[8] >> PB) - (n[9] >> PB) - (n[10] >> PB) + (n[11] >> PB);
        checks += 2;
        if (acc_center != ec) failures++;
        if (acc_diff != ed) failures++;
        $display("dump %0d: centre %0d (expected %0d), difference %0d (expected %0d)",
                 dumps, acc_center, ec, acc_diff, ed);
        for (int c = 0; c < N_CH; c++) n[c] = 0;
        dumps++;
      end
      // new samples: A gets s(2t), s(2t+1); B is A shifted by a lag that
      // changes per dump, with a few samples replaced by noise
      s0 = sample_t'($urandom);
      s1 = sample_t'($urandom);
      hist[hn % 8] = s0;
      hist[(hn + 1) % 8] = s1;
      a_x = s0;
      a_y = s1;
      b_x = b_sample(hn);
      b_y = b_sample(hn + 1);
      hn += 2;
      // the design registers on this edge; mirror it
      r_a3 = r_a1; r_a4 = r_a2;
      r_a1 = a_y; r_a2 = a_x; r_bx = b_x; r_by = b_y;
      @(negedge clk);
      en = 1'b0;
    end
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
