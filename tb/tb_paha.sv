// tb_paha: streams random groups of M values (including groups where all M
// hit the same bin) into the histogram, one group per clock, with random
// per-input enables, and compares all 2^N bins with a histogram the
// testbench keeps. Also checks that the bins change in the clock after the
// group is presented, that idle cycles keep them, and that clear zeroes them.
module tb_paha;
  localparam int M = 8, N = 8, PW = 20, NB = 1 << N;
  logic clk = 0, rst_n = 0, en = 0, clear = 0;
  logic [N-1:0] din [M];
  logic [M-1:0] din_ok;
  logic [N-1:0] rd_addr;
  logic [PW-1:0] rd_data;
  int checks = 0, failures = 0;
  int hist [NB];

  paha #(.M(M), .N(N), .PW(PW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare_all();
    for (int b = 0; b < NB; b++) begin
      rd_addr = N'(b); #1;
      checks++;
      if (int'(rd_data) != hist[b]) begin
        failures++;
        if (failures < 10) $display("FAIL bin %0d = %0d exp %0d", b, rd_data, hist[b]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < M; i++) din[i] = '0;
    din_ok = '1; rd_addr = '0;
    for (int b = 0; b < NB; b++) hist[b] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int g = 0; g < 2000; g++) begin
      @(negedge clk);
      en = (g % 10 != 9);
      din_ok = (g < 1000) ? '1 : M'($urandom);
      for (int i = 0; i < M; i++) din[i] = (g % 17 == 0) ? N'(42) : N'($urandom_range(0, NB - 1));
      if (en) for (int i = 0; i < M; i++) if (din_ok[i]) hist[din[i]]++;
      if (g == 0) begin
        rd_addr = 42; #1;
        checks++;
        if (rd_data != 0) begin failures++; $display("FAIL bin changed before the clock"); end
        @(posedge clk); #1;
        checks++;
        if (rd_data != M) begin failures++; $display("FAIL bin 42 = %0d after one group", rd_data); end
      end
    end
    @(negedge clk); en = 0;
    compare_all();
    @(negedge clk); clear = 1; en = 1; @(negedge clk); clear = 0; en = 0;
    for (int b = 0; b < NB; b++) hist[b] = 0;
    compare_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
