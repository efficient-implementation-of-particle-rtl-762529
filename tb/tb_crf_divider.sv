// tb_crf_divider: compares every lane with ceil(M*(CW-U^1)/CW_N) computed in
// 64-bit arithmetic, over random operands and the corner cases CW <= U^1,
// CW = CW_N (result must be M) and exact divisions (no increment).
module tb_crf_divider;
  localparam int P = 4, M = 512, W = 32, RFW = 16;
  logic [W-1:0] cw [P], u1, cw_n;
  logic [RFW-1:0] cr [P];
  int checks = 0, failures = 0, exact = 0;

  crf_divider #(.P(P), .M(M), .W(W), .RFW(RFW)) dut (.*);

  function automatic longint ref_crf(longint c, longint u, longint n);
    longint num;
    if (n == 0 || c <= u) return 0;
    num = longint'(M) * (c - u);
    return (num + n - 1) / n;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint n, u;
    for (int t = 0; t < 2000; t++) begin
      n = (t % 2) ? longint'($urandom) : longint'($urandom_range(M, 1 << 24));
      if (n < M) n = M;
      u = longint'($urandom) % (n / M);
      cw_n = W'(n); u1 = W'(u);
      for (int k = 0; k < P; k++) cw[k] = W'(longint'($urandom) % (n + 1));
      if (t % 5 == 0) cw[P-1] = W'(n);
      if (t % 7 == 0) cw[0] = W'(u);
      if (t % 11 == 0) cw[1] = W'(u + (n / M) * 3); // exact when n % M == 0
      if (t % 13 == 0) cw_n = W'(n - n % M);
      #1;
      for (int k = 0; k < P; k++) begin
        longint e;
        e = ref_crf(cw[k], u1, cw_n);
        if (cw[k] > u1 && cw_n != 0 && (longint'(M) * (cw[k] - u1)) % cw_n == 0) exact++;
        checks++;
        if (cr[k] != RFW'(e)) begin
          failures++;
          if (failures < 10) $display("FAIL cw=%0d u1=%0d n=%0d cr=%0d exp=%0d", cw[k], u1, cw_n, cr[k], e);
        end
        if (cw[k] == cw_n) begin
          checks++;
          if (cr[k] != M) failures++;
        end
      end
      #1;
    end
    checks++;
    if (exact == 0) begin failures++; $display("FAIL no exact division exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
