// corr_lowspeed_tb: checks the prescalers, multiplexed carry detection and the
// two reversible counters of the low-speed correlator section.
//
// Each round gives every channel its own random firing probability, drives
// random count pulses for a few thousand enabled edges (with count_en low in
// short stretches), scans the multiplexers the way the correlator control
// does (8 enabled edges per slot, select advancing by one), then blanks the
// counts for a full scan and compares both counters with
//   sum over channels of direction * floor(n / 2**PRESCALE_BITS)
// where n is the number of pulses the testbench itself counted. Between
// rounds `clear` must zero both counters. Rounds are chosen so that both
// counters move up and down.
module corr_lowspeed_tb;
  import ddc_pkg::*;

  localparam int PB = 8;
  localparam int AW = 32;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic en  = 1'b0;
  logic count_en = 1'b0;
  logic clear = 1'b0;
  logic [N_CH-1:0] ch = '0;
  logic [2:0] sel = '0;
  logic scan = 1'b0;
  logic signed [AW-1:0] acc_center, acc_diff;
  int checks = 0, failures = 0;
  int n [N_CH];
  int prob [N_CH];
  int slot = 0;
  int saw_up_c = 0, saw_dn_c = 0, saw_up_d = 0, saw_dn_d = 0;
  // direction of each channel, written out independently of the design
  int dir [N_CH] = '{1, -1, 1, -1, 1, -1, -1, 1, 1, -1, -1, 1};

  always #5 clk = ~clk;

  corr_lowspeed #(.PRESCALE_BITS(PB), .ACC_W(AW)) dut (
    .clk, .rst, .en, .count_en, .clear, .ch, .sel, .scan, .acc_center, .acc_diff);

  // one clk period; the scan sequencing advances on enabled edges
  task automatic tick(input bit counting);
    logic signed [AW-1:0] c0, d0;
    en = 1'($urandom_range(0, 3) != 0);
    count_en = counting;
    for (int c = 0; c < N_CH; c++) ch[c] = ($urandom_range(0, 99) < prob[c]);
    scan = (slot == 7);
    c0 = acc_center;
    d0 = acc_diff;
    @(negedge clk);
    if (en) begin
      if (counting) for (int c = 0; c < N_CH; c++) n[c] += int'(ch[c]);
      if (slot == 7) begin
        slot = 0;
        sel = sel + 3'd1;
      end else begin
        slot++;
      end
    end
    if (acc_center > c0) saw_up_c++;
    if (acc_center < c0) saw_dn_c++;
    if (acc_diff > d0) saw_up_d++;
    if (acc_diff < d0) saw_dn_d++;
  endtask

  task automatic round(input int edges);
    int ec, ed;
    for (int c = 0; c < N_CH; c++) begin
      n[c] = 0;
      prob[c] = $urandom_range(0, 100);
    end
    for (int i = 0; i < edges; i++) tick((i % 1000) < 900);
    for (int i = 0; i < 200; i++) tick(1'b0);
    ec = 0;
    ed = 0;
    for (int c = 0; c < 4; c++) ec += dir[c] * (n[c] >> PB);
    for (int c = 4; c < N_CH; c++) ed += dir[c] * (n[c] >> PB);
    checks += 2;
    if (acc_center != ec) failures++;
    if (acc_diff != ed) failures++;
    $display("round: centre %0d (expected %0d), difference %0d (expected %0d)",
             acc_center, ec, acc_diff, ed);
    // clear
    @(negedge clk);
    en = 1'b1;
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    if (slot == 7) begin slot = 0; sel = sel + 3'd1; end else slot++;
    checks++;
    if (acc_center != 0 || acc_diff != 0) failures++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (8) round(6000);
    checks += 4;
    if (saw_up_c == 0) failures++;
    if (saw_dn_c == 0) failures++;
    if (saw_up_d == 0) failures++;
    if (saw_dn_d == 0) failures++;
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
