// tb_pf_asip_ext: end-to-end test of the particle-filter instruction
// extensions at their default sizes (512 particles, 4 weights per
// instruction, 8 UDNs per group, 4 UQLE intervals, 8-input histogram).
//
// The testbench plays the processor program for three filter iterations:
//   1. likelihood: 512 particle distances go through the UQLE instruction
//      back to back (one per clock); each weight is checked against a
//      linear-search model of the quantized Gaussian likelihood.
//   2. resampling with the reformulated SR instructions; RFs are checked
//      against a sequential systematic resampling.
//   3. resampling of the same weights with the PSR instructions; RFs are
//      checked against the closed form and must sum to 512; when CW_N is a
//      multiple of 512 they must equal the SR RFs.
//   4. colour histogram of a 120 x 140 region of interest streamed into the
//      flexible histogram 8 pixels per clock, starting at a misaligned
//      address (first group uses the most significant inputs, last group
//      the least significant ones); all 256 bins are checked.
// Mechanisms counted and required at least once: UQLE delta interval and
// every ordinary interval, SR while loop repeated and stopped, PSR CRF with
// and without rounding up, histogram groups that are full, partial-most and
// partial-least, and a group with several pixels in one bin.
module tb_pf_asip_ext;
  import pf_pkg::*;
  localparam int UQ_M = 4, P = 4, M = 512, N = 512, W = 32, RW = 16;
  localparam int H_M = 8, H_N = 8, NB = 1 << H_N;
  localparam int ROI_W = 120, ROI_H = 140, NPIX = ROI_W * ROI_H;

  logic clk = 0, rst_n = 0;
  logic uq_bnd_we = 0, uq_issue = 0;
  logic [$clog2(UQ_M)-1:0] uq_bnd_idx;
  logic [31:0] uq_bnd_data, uq_dist;
  logic uq_valid;
  logic [7:0] uq_weight;
  logic [$clog2(UQ_M):0] uq_index;
  logic sr_issue = 0;
  sr_op_e sr_op;
  logic [W-1:0] sr_vin_a [P], sr_vin_b [P], sr_vout [P];
  logic [RW-1:0] sr_rnd;
  logic sr_valid, sr_flag;
  logic psr_issue = 0;
  psr_op_e psr_op;
  logic [W-1:0] psr_vin [P], psr_vout [P];
  logic [RW-1:0] psr_rnd;
  logic psr_valid;
  logic hist_en = 0, hist_clear = 0;
  logic [H_N-1:0] hist_din [H_M];
  logic [$clog2(H_M+1)-1:0] hist_num;
  logic hist_most;
  logic [H_N-1:0] hist_rd_addr;
  logic [19:0] hist_rd_data;

  pf_asip_ext dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_delta = 0, n_int [UQ_M], n_repeat = 0, n_stop = 0, n_exact = 0, n_round = 0;
  int n_full = 0, n_pmost = 0, n_pleast = 0, n_samebin = 0;
  longint T [UQ_M];
  longint dists [N], wts [N], cws [N];
  int wexp [N], rf_sr [N], rf_psr [N], hist [NB];
  logic [H_N-1:0] pix [NPIX];

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  // ---------------- likelihood (UQLE) ----------------
  task automatic likelihood(input longint spread);
    int got = 0, c0, c1;
    for (int i = 0; i < N; i++) begin
      int em;
      dists[i] = $urandom_range(0, int'(spread));
      if (dists[i] >= T[0]) begin em = 0; wexp[i] = 1; n_delta++; end
      else begin
        em = UQ_M;
        for (int m = 1; m < UQ_M; m++) if (dists[i] >= T[m]) begin em = m; break; end
        wexp[i] = (em * 255) / UQ_M;
        n_int[em-1]++;
      end
    end
    @(negedge clk);
    c0 = $time;
    fork
      begin
        for (int i = 0; i < N; i++) begin
          uq_issue = 1; uq_dist = 32'(dists[i]);
          @(negedge clk);
        end
        uq_issue = 0;
      end
      begin
        while (got < N) begin
          @(posedge clk); #1;
          if (uq_valid) begin
            wts[got] = uq_weight;
            chk(int'(uq_weight) == wexp[got], $sformatf("UQLE weight %0d: %0d exp %0d", got, uq_weight, wexp[got]));
            got++;
          end
        end
        c1 = $time;
      end
    join
    chk((c1 - c0) / 10 <= N + 1, $sformatf("UQLE throughput: %0d cycles for %0d distances", (c1 - c0) / 10, N));
  endtask

  // ---------------- reformulated SR ----------------
  task automatic sr_exec(input sr_op_e o);
    @(negedge clk); sr_op = o; sr_issue = 1;
    @(negedge clk); sr_issue = 0;
    chk(sr_valid, "SR result latency");
  endtask

  task automatic resample_sr(input int r, output longint u1, output longint total);
    logic [W-1:0] cnt [P];
    longint acc = 0, usz;
    int m = 0, sum = 0;
    for (int g = 0; g < N / P; g++) begin
      for (int k = 0; k < P; k++) sr_vin_a[k] = W'(wts[g*P+k]);
      sr_exec(SR_CWCALC);
      for (int k = 0; k < P; k++) cws[g*P+k] = sr_vout[k];
    end
    total = cws[N-1];
    sr_vin_a[0] = W'(total); sr_rnd = RW'(r);
    sr_exec(SR_PARADEF);
    usz = total / M;
    u1 = (usz * r) >> RW;
    for (int g = 0; g < N / P; g++) begin
      for (int k = 0; k < P; k++) sr_vin_b[k] = W'(cws[g*P+k]);
      sr_exec(SR_BASEADD);
      for (int k = 0; k < P; k++) cnt[k] = sr_vout[k];
      forever begin
        for (int k = 0; k < P; k++) sr_vin_a[k] = cnt[k];
        sr_exec(SR_CRFCOUNT);
        for (int k = 0; k < P; k++) cnt[k] = sr_vout[k];
        sr_exec(SR_NEXTIT);
        if (!sr_flag) break;
        n_repeat++;
      end
      n_stop++;
      for (int k = 0; k < P; k++) sr_vin_a[k] = cnt[k];
      sr_exec(SR_RFCALC);
      for (int k = 0; k < P; k++) rf_sr[g*P+k] = int'(sr_vout[k]);
    end
    for (int i = 0; i < N; i++) begin
      int r_ref = 0;
      acc += wts[i];
      chk(cws[i] == acc, "SR cumulative weight");
      while (m < M && u1 + longint'(m) * usz < cws[i]) begin r_ref++; m++; end
      chk(rf_sr[i] == r_ref, $sformatf("SR RF %0d = %0d exp %0d", i, rf_sr[i], r_ref));
      sum += rf_sr[i];
    end
    chk(sum == M, $sformatf("SR RF sum %0d", sum));
  endtask

  // ---------------- PSR ----------------
  task automatic psr_exec(input psr_op_e o);
    @(negedge clk); psr_op = o; psr_issue = 1;
    @(negedge clk); psr_issue = 0;
    chk(psr_valid, "PSR result latency");
  endtask

  task automatic resample_psr(input int r, input longint u1, input longint total);
    int crs [N];
    longint prev = 0;
    int sum = 0;
    for (int g = 0; g < N / P; g++) begin
      for (int k = 0; k < P; k++) psr_vin[k] = W'(wts[g*P+k]);
      psr_exec(PSR_CWCALC);
      for (int k = 0; k < P; k++) chk(psr_vout[k] == W'(cws[g*P+k]), "PSR cumulative weight");
    end
    psr_vin[0] = W'(total); psr_rnd = RW'(r);
    psr_exec(PSR_PARADEF);
    for (int g = 0; g < N / P; g++) begin
      for (int k = 0; k < P; k++) psr_vin[k] = W'(cws[g*P+k]);
      psr_exec(PSR_CRFDIV);
      for (int k = 0; k < P; k++) crs[g*P+k] = int'(psr_vout[k]);
    end
    for (int g = 0; g < N / P; g++) begin
      for (int k = 0; k < P; k++) psr_vin[k] = W'(crs[g*P+k]);
      psr_exec(PSR_RFCALC);
      for (int k = 0; k < P; k++) rf_psr[g*P+k] = int'(psr_vout[k]);
    end
    for (int i = 0; i < N; i++) begin
      longint num, c;
      num = (cws[i] > u1) ? longint'(M) * (cws[i] - u1) : 0;
      c = (num + total - 1) / total;
      if (num != 0 && num % total == 0) n_exact++; else if (num != 0) n_round++;
      chk(crs[i] == c, $sformatf("PSR CRF %0d = %0d exp %0d", i, crs[i], c));
      chk(rf_psr[i] == c - prev, "PSR RF");
      prev = c;
      sum += rf_psr[i];
    end
    chk(sum == M, $sformatf("PSR RF sum %0d", sum));
    if (total % M == 0)
      for (int i = 0; i < N; i++) chk(rf_psr[i] == rf_sr[i], "PSR equals SR when CW_N is a multiple of M");
  endtask

  // ---------------- histogram ----------------
  task automatic histogram(input int offset);
    int pos = 0, groups = 0, c0, c1;
    for (int b = 0; b < NB; b++) hist[b] = 0;
    for (int i = 0; i < NPIX; i++) begin
      // a smooth colour blob with noise, so that bins repeat within a group
      pix[i] = H_N'(((i % ROI_W) / 8) * 16 + ((i / ROI_W) / 10) + $urandom_range(0, 1));
      hist[pix[i]]++;
    end
    @(negedge clk); hist_clear = 1; @(negedge clk); hist_clear = 0;
    c0 = $time;
    while (pos < NPIX) begin
      int n, lo;
      // the first group is misaligned: only H_M - offset items, in the most
      // significant positions; the last may be short, in the least significant
      if (pos == 0 && offset != 0) begin n = H_M - offset; hist_most = 1; lo = offset; end
      else begin n = (NPIX - pos < H_M) ? NPIX - pos : H_M; hist_most = 0; lo = 0; end
      for (int i = 0; i < H_M; i++) hist_din[i] = H_N'($urandom);
      for (int i = 0; i < n; i++) hist_din[lo + i] = pix[pos + i];
      begin
        bit same = 0;
        for (int a = 0; a < n; a++) for (int b = a + 1; b < n; b++)
          if (pix[pos + a] == pix[pos + b]) same = 1;
        if (same) n_samebin++;
      end
      if (n == H_M) n_full++; else if (hist_most) n_pmost++; else n_pleast++;
      hist_num = 4'(n); hist_en = 1;
      pos += n; groups++;
      @(negedge clk);
    end
    hist_en = 0;
    c1 = $time;
    chk((c1 - c0) / 10 == groups && groups == (NPIX + offset + H_M - 1) / H_M,
        $sformatf("histogram took %0d cycles for %0d groups", (c1 - c0) / 10, groups));
    for (int b = 0; b < NB; b++) begin
      hist_rd_addr = H_N'(b); #1;
      chk(int'(hist_rd_data) == hist[b], $sformatf("bin %0d = %0d exp %0d", b, hist_rd_data, hist[b]));
    end
  endtask

  initial begin
    static real sigma2 = 4.0e6, q = 1.0 / UQ_M, delta = 0.001;
    longint u1, total;
    uq_bnd_idx = '0; uq_bnd_data = '0; uq_dist = '0;
    sr_op = SR_CWCALC; psr_op = PSR_CWCALC; sr_rnd = '0; psr_rnd = '0;
    for (int k = 0; k < P; k++) begin sr_vin_a[k] = '0; sr_vin_b[k] = '0; psr_vin[k] = '0; end
    for (int i = 0; i < H_M; i++) hist_din[i] = '0;
    hist_num = '0; hist_most = 0; hist_rd_addr = '0;
    for (int m = 0; m < UQ_M; m++) n_int[m] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // boundaries of the quantized likelihood, computed once by software
    T[0] = longint'($sqrt(-2.0 * $ln(delta) * sigma2));
    for (int m = 1; m < UQ_M; m++) T[m] = longint'($sqrt(-2.0 * $ln(m * q) * sigma2));
    for (int m = 0; m < UQ_M; m++) begin
      @(negedge clk); uq_bnd_we = 1; uq_bnd_idx = 2'(m); uq_bnd_data = 32'(T[m]);
    end
    @(negedge clk); uq_bnd_we = 0;

    // iteration 2 puts every particle on the observation: all weights are
    // equal, CW_N is a multiple of 512 and PSR divides exactly
    for (int it = 0; it < 3; it++) begin
      automatic int r = (it == 0) ? 23456 : (it == 1) ? 65535 : 100;
      likelihood(it == 0 ? 2 * T[0] : (it == 1) ? T[0] + T[0] / 4 : 0);
      resample_sr(r, u1, total);
      resample_psr(r, u1, total);
      $display("iteration %0d: CW_N=%0d U1=%0d", it, total, u1);
    end
    histogram(3);

    $display("UQLE delta %0d, intervals %0d %0d %0d %0d", n_delta, n_int[0], n_int[1], n_int[2], n_int[3]);
    $display("SR while repeated %0d, stopped %0d; PSR CRF exact %0d, rounded %0d", n_repeat, n_stop, n_exact, n_round);
    $display("histogram groups full %0d, partial-most %0d, partial-least %0d, same-bin %0d", n_full, n_pmost, n_pleast, n_samebin);
    chk(n_delta > 0, "UQLE delta interval never used");
    for (int m = 0; m < UQ_M; m++) chk(n_int[m] > 0, "UQLE interval never used");
    chk(n_repeat > 0 && n_stop > 0, "SR while loop mechanisms");
    chk(n_exact > 0 && n_round > 0, "PSR rounding mechanisms");
    chk(n_full > 0 && n_pmost > 0 && n_pleast > 0 && n_samebin > 0, "histogram mechanisms");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
