// resample_sweep_check: testbench helper that runs one resampling
// configuration end to end: the reformulated SR program on an rsr_unit with
// P weights per instruction and U UDNs per group, and the PSR program on a
// psr_unit with P lanes, both for NP = M particles with WB-bit weights.
// SR RFs are checked against a sequential systematic resampling, PSR RFs
// against the closed form; both must sum to M. Reports the number of
// instructions each program issued (SR varies with the data, PSR is
// 3*NP/P + 1).
module resample_sweep_check
  import pf_pkg::*;
#(
  parameter int P    = 4,
  parameter int U    = 8,
  parameter int M    = 512,
  parameter int WB   = 16,
  parameter int RUNS = 2
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   sr_instrs,
  output int   psr_instrs
);
  localparam int W = 32, RW = 16, RFW = 16, NP = M;
  logic sr_issue = 0, psr_issue = 0, sr_valid, psr_valid, flag;
  sr_op_e sr_op = SR_CWCALC;
  psr_op_e psr_op = PSR_CWCALC;
  logic [W-1:0] a [P], b [P], sr_out [P], pin [P], psr_out [P];
  logic [RW-1:0] rnd = '0;
  longint wts [NP], cws [NP];
  int rsr [NP], rpsr [NP];

  rsr_unit #(.P(P), .U(U), .M(M)) u_sr (
    .clk, .rst_n, .issue(sr_issue), .op(sr_op), .vin_a(a), .vin_b(b), .rnd,
    .res_valid(sr_valid), .vout(sr_out), .flag);
  psr_unit #(.P(P), .M(M)) u_psr (
    .clk, .rst_n, .issue(psr_issue), .op(psr_op), .vin(pin), .rnd,
    .res_valid(psr_valid), .vout(psr_out));

  task automatic sr(input sr_op_e o);
    sr_op = o; sr_issue = 1; sr_instrs++;
    @(negedge clk); sr_issue = 0;
  endtask
  task automatic psr(input psr_op_e o);
    psr_op = o; psr_issue = 1; psr_instrs++;
    @(negedge clk); psr_issue = 0;
  endtask
  task automatic chk(input bit ok);
    checks++;
    if (!ok) failures++;
  endtask

  initial begin
    logic [W-1:0] cnt [P];
    done = 0; checks = 0; failures = 0; sr_instrs = 0; psr_instrs = 0;
    for (int k = 0; k < P; k++) begin a[k] = '0; b[k] = '0; pin[k] = '0; end
    wait (rst_n);
    @(negedge clk);
    for (int run = 0; run < RUNS; run++) begin
      automatic longint total = 0, usz, u1, prev = 0;
      automatic int m = 0, sum_sr = 0, sum_psr = 0;
      for (int i = 0; i < NP; i++) begin
        wts[i] = (run % 2) ? (($urandom_range(0, 15) == 0) ? longint'($urandom) % (longint'(1) << WB) : 0)
                           : longint'($urandom) % (longint'(1) << WB);
        total += wts[i];
        cws[i] = total;
      end
      if (total == 0) begin wts[0] = 1; total = 1; for (int i = 0; i < NP; i++) cws[i] += 1; end
      rnd = RW'($urandom);
      usz = total / M;
      u1 = (usz * rnd) >> RW;
      // reformulated SR
      for (int g = 0; g < NP / P; g++) begin
        for (int k = 0; k < P; k++) a[k] = W'(wts[g*P+k]);
        sr(SR_CWCALC);
        for (int k = 0; k < P; k++) chk(sr_out[k] == W'(cws[g*P+k]));
      end
      a[0] = W'(total); sr(SR_PARADEF);
      for (int g = 0; g < NP / P; g++) begin
        for (int k = 0; k < P; k++) b[k] = W'(cws[g*P+k]);
        sr(SR_BASEADD);
        for (int k = 0; k < P; k++) cnt[k] = sr_out[k];
        forever begin
          a = cnt; sr(SR_CRFCOUNT); cnt = sr_out;
          sr(SR_NEXTIT);
          if (!flag) break;
        end
        a = cnt; sr(SR_RFCALC);
        for (int k = 0; k < P; k++) rsr[g*P+k] = int'(sr_out[k]);
      end
      // PSR
      for (int g = 0; g < NP / P; g++) begin
        for (int k = 0; k < P; k++) pin[k] = W'(wts[g*P+k]);
        psr(PSR_CWCALC);
      end
      pin[0] = W'(total); psr(PSR_PARADEF);
      for (int g = 0; g < NP / P; g++) begin
        for (int k = 0; k < P; k++) pin[k] = W'(cws[g*P+k]);
        psr(PSR_CRFDIV);
        for (int k = 0; k < P; k++) pin[k] = psr_out[k];
        psr(PSR_RFCALC);
        for (int k = 0; k < P; k++) rpsr[g*P+k] = int'(psr_out[k]);
      end
      for (int i = 0; i < NP; i++) begin
        automatic int r_ref = 0;
        automatic longint c;
        while (m < M && u1 + longint'(m) * usz < cws[i]) begin r_ref++; m++; end
        chk(rsr[i] == r_ref);
        c = (cws[i] > u1) ? (longint'(M) * (cws[i] - u1) + total - 1) / total : 0;
        chk(rpsr[i] == c - prev);
        prev = c;
        sum_sr += rsr[i]; sum_psr += rpsr[i];
      end
      chk(sum_sr == M); chk(sum_psr == M);
    end
    done = 1;
  end
endmodule
