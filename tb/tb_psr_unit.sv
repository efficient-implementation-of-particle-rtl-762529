// tb_psr_unit: runs the PSR program (cwcalculation over all weights,
// paradef, Integerdivisionforcrf and rfcalculation per group of P) for
// N = M particles and compares every RF with the closed form
// ceil(M*(CW_i-U^1)/CW_N) - ceil(M*(CW_(i-1)-U^1)/CW_N) computed by the
// testbench. Checks that the RFs sum to M, and that when CW_N is a multiple
// of M the RFs equal those of a sequential systematic resampling with
// U_size = CW_N/M. Each instruction must return its result one cycle after
// issue; the program must take 3*N/P + 1 instructions.
module tb_psr_unit;
  import pf_pkg::*;
  localparam int P = 4, M = 512, W = 32, RW = 16, RFW = 16, N = 512;
  logic clk = 0, rst_n = 0, issue = 0;
  psr_op_e op;
  logic [W-1:0] vin [P], vout [P];
  logic [RW-1:0] rnd;
  logic res_valid;
  int checks = 0, failures = 0, instrs = 0, sr_compared = 0;
  longint wts [N], cws [N];
  int crs [N], rfs [N];

  psr_unit #(.P(P), .M(M), .W(W), .RW(RW), .RFW(RFW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic exec(input psr_op_e o);
    @(negedge clk);
    op = o; issue = 1; instrs++;
    @(negedge clk);
    issue = 0;
    checks++;
    if (!res_valid) begin failures++; $display("FAIL no result one cycle after issue"); end
  endtask

  function automatic longint ceil_crf(longint c, longint u, longint n);
    if (c <= u) return 0;
    return (longint'(M) * (c - u) + n - 1) / n;
  endfunction

  task automatic run(input int kind, input int r);
    longint acc = 0, u1, prev;
    int sum = 0, start = instrs, m = 0;
    for (int i = 0; i < N; i++) begin
      case (kind)
        0: wts[i] = $urandom;
        1: wts[i] = ($urandom_range(0, 31) == 0) ? $urandom_range(1 << 16, 1 << 20) : $urandom_range(0, 3);
        default: wts[i] = (i % 2) ? 3000 : 1000;  // CW_N multiple of M
      endcase
      if (kind == 0) wts[i] = wts[i] >> 10;
    end
    for (int g = 0; g < N / P; g++) begin
      for (int k = 0; k < P; k++) vin[k] = W'(wts[g*P+k]);
      exec(PSR_CWCALC);
      for (int k = 0; k < P; k++) cws[g*P+k] = vout[k];
    end
    vin[0] = W'(cws[N-1]); rnd = RW'(r);
    exec(PSR_PARADEF);
    for (int i = 0; i < N; i++) acc += wts[i];
    u1 = ((acc / M) * r) >> RW;
    for (int g = 0; g < N / P; g++) begin
      for (int k = 0; k < P; k++) vin[k] = W'(cws[g*P+k]);
      exec(PSR_CRFDIV);
      for (int k = 0; k < P; k++) crs[g*P+k] = int'(vout[k]);
    end
    for (int g = 0; g < N / P; g++) begin
      for (int k = 0; k < P; k++) vin[k] = W'(crs[g*P+k]);
      exec(PSR_RFCALC);
      for (int k = 0; k < P; k++) rfs[g*P+k] = int'(vout[k]);
    end
    prev = 0;
    for (int i = 0; i < N; i++) begin
      longint c, e;
      c = ceil_crf(cws[i], u1, acc);
      e = c - prev;
      prev = c;
      sum += rfs[i];
      checks++;
      if (rfs[i] != e || cws[i] != acc - (acc - cws[i])) begin
        failures++;
        if (failures < 10) $display("FAIL RF %0d = %0d exp %0d", i, rfs[i], e);
      end
    end
    checks++;
    if (sum != M) begin failures++; $display("FAIL RF sum %0d", sum); end
    if (acc % M == 0) begin
      longint usz = acc / M;
      sr_compared++;
      for (int i = 0; i < N; i++) begin
        int r_sr = 0;
        while (m < M && u1 + longint'(m) * usz < cws[i]) begin r_sr++; m++; end
        checks++;
        if (r_sr != rfs[i]) begin failures++; $display("FAIL PSR/SR mismatch at %0d", i); end
      end
    end
    checks++;
    if (instrs - start != 3 * N / P + 1) begin failures++; $display("FAIL instruction count"); end
  endtask

  initial begin
    op = PSR_CWCALC; rnd = '0;
    for (int k = 0; k < P; k++) vin[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(0, 4321);
    run(1, 65535);
    run(2, 31000);
    run(0, 0);
    checks++;
    if (sr_compared == 0) begin failures++; $display("FAIL no SR comparison"); end
    $display("instructions %0d", instrs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
