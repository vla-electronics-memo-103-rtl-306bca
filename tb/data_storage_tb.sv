// data_storage_tb: checks that a dump captures all output numbers at once,
// that every word reads back through the registered read port, that the
// dump counter advances once per capture, and that nothing changes while
// `capture` is low or `en` is low. Runs at the full 2808 points.
module data_storage_tb;

  localparam int N = 2808;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic en  = 1'b0;
  logic capture = 1'b0;
  logic signed [31:0] points [N];
  logic [11:0] rd_addr = '0;
  logic signed [31:0] rd_data;
  logic [15:0] dump_count;
  logic signed [31:0] ref_mem [N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  data_storage #(.N_POINTS(N), .W(32)) dut (
    .clk, .rst, .en, .capture, .points, .rd_addr, .rd_data, .dump_count);

  task automatic read_all();
    for (int i = 0; i < N; i++) begin
      rd_addr = 12'(i);
      @(negedge clk);
      checks++;
      if (rd_data !== ref_mem[i]) failures++;
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin
      points[i] = '0;
      ref_mem[i] = '0;
    end
    repeat (3) @(negedge clk);
    rst = 1'b0;
    read_all();
    for (int d = 1; d <= 3; d++) begin
      for (int i = 0; i < N; i++) begin
        points[i] = $urandom;
        ref_mem[i] = points[i];
      end
      // capture with en low must not store
      capture = 1'b1;
      en = 1'b0;
      @(negedge clk);
      checks++;
      if (dump_count != 16'(d - 1)) failures++;
      en = 1'b1;
      @(negedge clk);
      capture = 1'b0;
      checks++;
      if (dump_count != 16'(d)) failures++;
      // new inputs without capture must not show
      for (int i = 0; i < N; i++) points[i] = $urandom;
      read_all();
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
