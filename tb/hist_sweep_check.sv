// hist_sweep_check: testbench helper that streams a whole IMG_W x IMG_H
// image of 8-bit values into an M-way flexible histogram, M pixels per
// clock, and checks all 256 bins and that the image took
// ceil(IMG_W*IMG_H/M) clocks. Pixel values come from a fixed formula plus
// noise, so the histogram is uneven.
module hist_sweep_check #(
  parameter int M     = 16,
  parameter int IMG_W = 640,
  parameter int IMG_H = 480
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   cycles
);
  localparam int N = 8, PW = 20, NB = 256, NPIX = IMG_W * IMG_H;
  logic en = 0, clear = 0, most = 0;
  logic [N-1:0] din [M];
  logic [$clog2(M+1)-1:0] num = '0;
  logic [N-1:0] rd_addr = '0;
  logic [PW-1:0] rd_data;
  int hist [NB];

  fpaha #(.M(M), .N(N), .PW(PW)) dut (.*);

  initial begin
    automatic int pos = 0;
    done = 0; checks = 0; failures = 0; cycles = 0;
    for (int b = 0; b < NB; b++) hist[b] = 0;
    for (int i = 0; i < M; i++) din[i] = '0;
    wait (rst_n);
    @(negedge clk);
    while (pos < NPIX) begin
      automatic int n = (NPIX - pos < M) ? NPIX - pos : M;
      for (int i = 0; i < M; i++) begin
        automatic int p = pos + i;
        automatic int x = p % IMG_W, y = p / IMG_W;
        din[i] = N'((x * 3 + y * 5) / 16 + $urandom_range(0, 3));
        if (i < n) hist[din[i]]++;
      end
      num = ($clog2(M+1))'(n); en = 1;
      pos += n; cycles++;
      @(negedge clk);
    end
    en = 0;
    checks++;
    if (cycles != (NPIX + M - 1) / M) failures++;
    for (int b = 0; b < NB; b++) begin
      rd_addr = N'(b); #1;
      checks++;
      if (int'(rd_data) != hist[b]) begin
        failures++;
        if (failures < 5) $display("FAIL %0d-way bin %0d = %0d exp %0d", M, b, rd_data, hist[b]);
      end
    end
    done = 1;
  end
endmodule
