// tb_uqle_unit: loads the boundaries T_delta, T_1..T_(M-1) of a Gaussian
// likelihood (T_m = sqrt(-2 ln(mQ) sigma^2), computed here with real
// arithmetic), evaluates random distances and boundary values, and compares
// weight and interval index with a linear-search model of UQLE. Checks the
// 8-bit high-value code 8'b0111_1111 of the second interval for M = 4, that
// every interval including the delta interval is hit, and the one-cycle
// result latency.
module tb_uqle_unit;
  import pf_pkg::*;
  localparam int M = 4, DW = 32, WW = 8;
  logic clk = 0, rst_n = 0, bnd_we = 0, issue = 0;
  logic [$clog2(M)-1:0] bnd_idx;
  logic [DW-1:0] bnd_data, distance;
  logic res_valid;
  logic [WW-1:0] weight;
  logic [$clog2(M):0] index;
  int checks = 0, failures = 0;
  int hit [M+1];
  longint T [M];

  uqle_unit #(.M(M), .DW(DW), .WW(WW), .WMODE(UQLE_HIGH), .DELTA_CODE(1)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic eval(input longint d);
    int em, ew;
    // linear search of the pseudo-code: d >= T_delta -> delta, else m with
    // T_m > d >= T_(m+1)  (T_M taken as 0)
    if (d >= T[0]) begin em = 0; ew = 1; end
    else begin
      em = M;
      for (int m = 1; m < M; m++) if (d >= T[m]) begin em = m; break; end
      // interval m-1 in 0-based terms; high value = m/M of full scale
      ew = (em * 255) / M;
    end
    @(negedge clk);
    distance = DW'(d); issue = 1;
    @(negedge clk);
    issue = 0;
    checks++;
    if (!res_valid || int'(index) != em || int'(weight) != ew) begin
      failures++;
      $display("FAIL d=%0d index=%0d exp %0d weight=%0d exp %0d", d, index, em, weight, ew);
    end
    hit[em]++;
  endtask

  initial begin
    static real sigma2 = 1.0e6, q = 1.0 / M, delta = 0.001;
    bnd_idx = '0; bnd_data = '0; distance = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    T[0] = longint'($sqrt(-2.0 * $ln(delta) * sigma2));
    for (int m = 1; m < M; m++) T[m] = longint'($sqrt(-2.0 * $ln(m * q) * sigma2));
    for (int m = 0; m < M; m++) begin
      @(negedge clk);
      bnd_we = 1; bnd_idx = m[$clog2(M)-1:0]; bnd_data = DW'(T[m]);
    end
    @(negedge clk); bnd_we = 0;
    // example: d in [T_2, T_1) -> second interval, 0111_1111
    eval((T[1] + T[2]) / 2);
    checks++;
    if (weight != 8'b0111_1111) begin failures++; $display("FAIL example weight %b", weight); end
    for (int m = 0; m < M; m++) begin eval(T[m]); eval(T[m] - 1); end
    eval(0);
    for (int t = 0; t < 500; t++) eval($urandom_range(0, 2 * T[0]));
    for (int m = 0; m <= M; m++) begin
      checks++;
      if (hit[m] == 0) begin failures++; $display("FAIL interval %0d never hit", m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
