// tb_fpaha: feeds misaligned data to the flexible histogram: random groups
// whose number of valid inputs m (0..M) and most/least select vary, and
// compares all bins with the histogram of only the valid items. Checks that
// m = M behaves as the plain PAHA and that both selects are exercised.
module tb_fpaha;
  localparam int M = 8, N = 8, PW = 20, NB = 1 << N;
  logic clk = 0, rst_n = 0, en = 0, clear = 0;
  logic [N-1:0] din [M];
  logic [$clog2(M+1)-1:0] num;
  logic most;
  logic [N-1:0] rd_addr;
  logic [PW-1:0] rd_data;
  int checks = 0, failures = 0, partial_most = 0, partial_least = 0, full = 0;
  int hist [NB];

  fpaha #(.M(M), .N(N), .PW(PW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < M; i++) din[i] = '0;
    num = '0; most = 0; rd_addr = '0;
    for (int b = 0; b < NB; b++) hist[b] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int g = 0; g < 3000; g++) begin
      int n;
      @(negedge clk);
      en = 1;
      n = (g % 3 == 0) ? M : $urandom_range(0, M);
      num = n[$clog2(M+1)-1:0];
      most = $urandom_range(0, 1);
      for (int i = 0; i < M; i++) din[i] = N'($urandom_range(0, NB - 1));
      for (int i = 0; i < M; i++)
        if ((most && i >= M - n) || (!most && i < n)) hist[din[i]]++;
      if (n == M) full++;
      else if (n > 0 && most) partial_most++;
      else if (n > 0) partial_least++;
    end
    @(negedge clk); en = 0;
    for (int b = 0; b < NB; b++) begin
      rd_addr = N'(b); #1;
      checks++;
      if (int'(rd_data) != hist[b]) begin
        failures++;
        if (failures < 10) $display("FAIL bin %0d = %0d exp %0d", b, rd_data, hist[b]);
      end
    end
    checks++;
    if (full == 0 || partial_most == 0 || partial_least == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
