// vla_delay_correlator_6ant_tb: end-to-end test of the delay and correlator
// system with 6 antennas and 2 polarizations (12 IF signals, 15 antenna pairs,
// 60 cross correlations, 120 stored numbers). Every other parameter keeps its
// default: 8-stage prescalers, 8-clock multiplexer slots, 14-bit delay words
// and 1024-word buffers. It is the same test as vla_delay_correlator_tb, with
// dump periods long enough (40000 and 52000 clocks) that the 256-count
// prescalers carry often on every channel.
//
// A common random 2-bit signal reaches each antenna with its own geometric
// delay (an even number of 200 MHz samples); polarization 1 carries it with
// the sign inverted, and 10% of all samples are replaced by noise. The delay
// words are set so that the delay systems line the antennas up again; later
// the geometry and the delay words change (a reload), and the dump period
// changes too.
//
// The testbench keeps its own model of the data path: after enabled clock q
// the delayed X/Y samples of IF k are its 200 MHz samples 2(q - D - 35) and
// 2(q - D - 35) + 1, and the correlator registers and lag pairings follow.
// It counts the +4/-4 products of every channel while the correlator control
// has counting enabled and, at every dump whose window saw only settled delay
// outputs, reads all stored numbers back through the read port and compares
// them with sum(direction * floor(n / 2**PRESCALE_BITS)).
//
// Mechanisms counted, each of which must occur: delay word loads, address
// wrap of the circular buffer, a non-zero fine (output strobe) delay, blanked
// flush clocks, dumps, positive and negative centre numbers, positive and
// negative difference numbers, read-back words.
module vla_delay_correlator_6ant_tb;
  import ddc_pkg::*;

  localparam int NA = 6;
  localparam int NP = 2;
  localparam int NIF = NA * NP;
  localparam int NPAIR = NA * (NA - 1) / 2;
  localparam int NCORR = NPAIR * NP * NP;
  localparam int NPTS = 2 * NCORR;
  localparam int PB = 8;
  localparam int HIST = 1 << 16;

  logic clk = 1'b0;
  logic rst = 1'b1;
  sample_t samples [NIF];
  logic [DELAY_W-1:0] delay_word [NIF];
  logic [NIF-1:0] delay_strobe = '0;
  logic [29:0] dump_period = 30'd40000;
  logic [$clog2(NPTS)-1:0] rd_addr = '0;
  logic signed [31:0] rd_data;
  logic dump;
  logic [15:0] dump_count;
  int checks = 0, failures = 0;

  always #2.5 clk = ~clk;

  vla_delay_correlator #(.N_ANT(NA)) dut (
    .clk, .rst, .samples, .delay_word, .delay_strobe, .dump_period,
    .rd_addr, .rd_data, .dump, .dump_count);

  // ---------------------------------------------------------------- stimulus
  sample_t hist [NIF][HIST];  // 200 MHz samples of each IF, by index
  sample_t common [HIST];
  int e = 0;                  // 200 MHz samples applied so far
  int geo [NA];               // geometric delay of each antenna, in samples
  int dly [NIF];              // delay word of each IF
  int q_settled = 0;          // enabled clock from which outputs are valid

  function automatic sample_t noisy(sample_t s);
    return ($urandom_range(0, 9) == 0) ? sample_t'($urandom) : s;
  endfunction

  // drive the next sample of every IF (called between clock edges)
  task automatic drive_samples();
    sample_t c, s;
    common[e % HIST] = sample_t'($urandom);
    for (int a = 0; a < NA; a++) begin
      c = (e >= geo[a]) ? common[(e - geo[a]) % HIST] : sample_t'($urandom);
      for (int p = 0; p < NP; p++) begin
        s = (p == 0) ? c : '{sign: ~c.sign, amp: c.amp};
        s = noisy(s);
        samples[a * NP + p] = s;
        hist[a * NP + p][e % HIST] = s;
      end
    end
    e++;
  endtask

  // ------------------------------------------------------------ mechanisms
  int n_loads = 0, n_wraps = 0, n_fine = 0, n_flush = 0, n_dumps = 0;
  int n_cpos = 0, n_cneg = 0, n_dpos = 0, n_dneg = 0, n_reads = 0, n_checked = 0;

  // ---------------------------------------------------------------- model
  int n [NCORR][N_CH];
  bit window_ok;
  int expect_pts [NPTS];
  bit expect_ok;
  int dir [N_CH] = '{1, -1, 1, -1, 1, -1, -1, 1, 1, -1, -1, 1};

  function automatic int val(sample_t s);
    return (s.amp ? 2 : 1) * (s.sign ? 1 : -1);
  endfunction

  // delayed X (y = 0) or Y (y = 1) sample of IF k after enabled clock q
  function automatic sample_t dsamp(int k, int q, int y);
    int idx;
    idx = 2 * (q - dly[k] - int'(DELAY_LATENCY)) + y;
    return hist[k][idx % HIST];
  endfunction

  task automatic count_pair(int c, int chn, sample_t a, sample_t b);
    int p;
    p = val(a) * val(b);
    if (p == 4)  n[c][chn]++;
    if (p == -4) n[c][chn + 1]++;
  endtask

  // products visible after enabled clock q (registers loaded at q)
  task automatic count_products(int q);
    int c, ia, ib;
    sample_t a1, a2, a3, a4, bx, by;
    c = 0;
    for (int i = 0; i < NA; i++)
      for (int j = i + 1; j < NA; j++)
        for (int pa = 0; pa < NP; pa++)
          for (int pb = 0; pb < NP; pb++) begin
            ia = i * NP + pa;
            ib = j * NP + pb;
            a1 = dsamp(ia, q - 1, 1);
            a2 = dsamp(ia, q - 1, 0);
            a3 = dsamp(ia, q - 2, 1);
            a4 = dsamp(ia, q - 2, 0);
            bx = dsamp(ib, q - 1, 0);
            by = dsamp(ib, q - 1, 1);
            count_pair(c, 0, a2, bx);
            count_pair(c, 2, a3, by);
            count_pair(c, 4, a1, bx);
            count_pair(c, 6, a3, bx);
            count_pair(c, 8, a2, by);
            count_pair(c, 10, a4, by);
            c++;
          end
  endtask

  // geometric delay of antenna a, in 100 MHz clocks: (a * mul + add) mod 23
  task automatic load_delays(input int mul, input int add, input int base);
    int gmax;
    gmax = 0;
    for (int a = 0; a < NA; a++) begin
      geo[a] = 2 * ((a * mul + add) % 23);
      if (geo[a] / 2 > gmax) gmax = geo[a] / 2;
    end
    for (int a = 0; a < NA; a++)
      for (int p = 0; p < NP; p++) begin
        dly[a * NP + p] = base + gmax - geo[a] / 2;
        delay_word[a * NP + p] = DELAY_W'(dly[a * NP + p]);
        if ((dly[a * NP + p] % 16) != 0) n_fine++;
      end
    delay_strobe = '1;
    n_loads++;
  endtask

  // -------------------------------------------------------------- main loop
  int q = 0;            // enabled clocks since reset
  int max_dly;

  initial begin
    for (int k = 0; k < NIF; k++) begin
      samples[k] = '0;
      delay_word[k] = '0;
      dly[k] = 0;
    end
    for (int a = 0; a < NA; a++) geo[a] = 0;
    load_delays(5, 0, 40);
    delay_strobe = '0;
    repeat (4) @(negedge clk);
    rst = 1'b0;
    window_ok = 1'b0;
    // the first edge after reset is a phase-0 edge
    while (n_dumps < 10) begin
      // phase-0 edge
      drive_samples();
      if (q == 0) delay_strobe = '1;
      @(negedge clk);
      // enabled edge number q
      drive_samples();
      @(negedge clk);
      delay_strobe = '0;
      if (q == 0 || (n_dumps == 7 && dump)) q_settled = q;
      max_dly = 0;
      for (int k = 0; k < NIF; k++) if (dly[k] > max_dly) max_dly = dly[k];
      // state after enabled edge q
      if (dut.g_if[0].u_delay.u_ctl.addr == '0 && dut.g_if[0].u_delay.u_ctl.in_strobe &&
          q > 0) n_wraps++;
      if (dump) begin
        expect_ok = window_ok;
        for (int c = 0; c < NCORR; c++) begin
          expect_pts[2 * c] = 0;
          expect_pts[2 * c + 1] = 0;
          for (int h = 0; h < 4; h++) expect_pts[2 * c] += dir[h] * (n[c][h] >> PB);
          for (int h = 4; h < N_CH; h++) expect_pts[2 * c + 1] += dir[h] * (n[c][h] >> PB);
          for (int h = 0; h < N_CH; h++) n[c][h] = 0;
        end
        window_ok = 1'b1;
        n_dumps++;
        if (n_dumps == 5) dump_period = 30'd52000;
        if (n_dumps == 7) begin
          // new geometry: reload every delay word on the next enabled edge
          load_delays(9, 3, 300);
          window_ok = 1'b0;
        end
      end else if (!dut.count_en) begin
        n_flush++;
      end else begin
        if (q < q_settled + max_dly + 40) window_ok = 1'b0;
        count_products(q);
      end
      q++;
    end
    check_mechanisms();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // read back and compare every stored number after each dump
  initial begin
    logic [15:0] seen;
    seen = '0;
    forever begin
      @(negedge clk);
      if (!rst && dump_count != seen) begin
        seen = dump_count;
        if (expect_ok) begin
          n_checked++;
          for (int i = 0; i < NPTS; i++) begin
            rd_addr = $bits(rd_addr)'(i);
            @(negedge clk);
            checks++;
            n_reads++;
            if (rd_data != expect_pts[i]) begin
              failures++;
              if (failures < 10)
                $display("FAIL word %0d: %0d, expected %0d", i, rd_data, expect_pts[i]);
            end
            if (i % 2 == 0 && rd_data > 0) n_cpos++;
            if (i % 2 == 0 && rd_data < 0) n_cneg++;
            if (i % 2 == 1 && rd_data > 0) n_dpos++;
            if (i % 2 == 1 && rd_data < 0) n_dneg++;
          end
        end
      end
    end
  end

  task automatic mech(input string name, input int count);
    $display("%-28s %0d", name, count);
    checks++;
    if (count == 0) failures++;
  endtask

  task automatic check_mechanisms();
    mech("delay word loads", n_loads);
    mech("buffer address wraps", n_wraps);
    mech("fine (sub-word) delays", n_fine);
    mech("flush clocks", n_flush);
    mech("dumps", n_dumps);
    mech("dumps checked", n_checked);
    mech("positive centre numbers", n_cpos);
    mech("negative centre numbers", n_cneg);
    mech("positive difference numbers", n_dpos);
    mech("negative difference numbers", n_dneg);
    mech("words read back", n_reads);
  endtask

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
