// tb_rsr_unit: runs the whole reformulated SR program on the unit for N = M
// particles: cwcalculation over all weights, paradef, then per group of P
// baseadder, {crfcounter, nextiterationdef} while the flag is set, and
// rfcalculation. Every RF is compared with a sequential systematic
// resampling (while loop per particle) written in the testbench with the
// same U^1 and U_size, and the RFs must sum to M. Instruction count and
// cycles are reported; each instruction must return its result one cycle
// after issue.
module tb_rsr_unit;
  import pf_pkg::*;
  localparam int P = 4, U = 8, M = 512, W = 32, RW = 16, RFW = 16, N = 512;
  logic clk = 0, rst_n = 0, issue = 0;
  sr_op_e op;
  logic [W-1:0] vin_a [P], vin_b [P], vout [P];
  logic [RW-1:0] rnd;
  logic res_valid, flag;
  int checks = 0, failures = 0, instrs = 0, repeats = 0;
  longint wts [N], cws [N];
  int rfs [N], rref [N];
  logic [W-1:0] cnt [P];

  rsr_unit #(.P(P), .U(U), .M(M), .W(W), .RW(RW), .RFW(RFW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic exec(input sr_op_e o);
    @(negedge clk);
    op = o; issue = 1; instrs++;
    @(negedge clk);
    issue = 0;
    checks++;
    if (!res_valid) begin failures++; $display("FAIL no result one cycle after issue"); end
  endtask

  task automatic run(input int kind, input int r);
    longint acc = 0, usz, u1;
    int sum = 0, m = 0;
    for (int i = 0; i < N; i++) begin
      case (kind)
        0: wts[i] = $urandom_range(0, 65535);
        1: wts[i] = ($urandom_range(0, 31) == 0) ? $urandom_range(1 << 16, 1 << 20) : $urandom_range(0, 3);
        default: wts[i] = 1000;
      endcase
    end
    // cwcalculation
    for (int g = 0; g < N / P; g++) begin
      for (int k = 0; k < P; k++) vin_a[k] = W'(wts[g*P+k]);
      exec(SR_CWCALC);
      for (int k = 0; k < P; k++) cws[g*P+k] = vout[k];
    end
    for (int i = 0; i < N; i++) begin
      acc += wts[i];
      checks++;
      if (cws[i] != acc) begin failures++; $display("FAIL CW %0d", i); end
    end
    // paradef
    vin_a[0] = W'(acc); rnd = RW'(r);
    exec(SR_PARADEF);
    usz = acc / M;
    u1 = ((acc / M) * r) >> RW;
    // reference: sequential SR
    for (int i = 0; i < N; i++) begin
      rref[i] = 0;
      while (m < M && u1 + longint'(m) * usz < cws[i]) begin rref[i]++; m++; end
    end
    // RF calculation
    for (int g = 0; g < N / P; g++) begin
      for (int k = 0; k < P; k++) vin_b[k] = W'(cws[g*P+k]);
      exec(SR_BASEADD);
      for (int k = 0; k < P; k++) cnt[k] = vout[k];
      forever begin
        for (int k = 0; k < P; k++) vin_a[k] = cnt[k];
        exec(SR_CRFCOUNT);
        for (int k = 0; k < P; k++) cnt[k] = vout[k];
        exec(SR_NEXTIT);
        if (!flag) break;
        repeats++;
      end
      for (int k = 0; k < P; k++) vin_a[k] = cnt[k];
      exec(SR_RFCALC);
      for (int k = 0; k < P; k++) rfs[g*P+k] = int'(vout[k]);
    end
    for (int i = 0; i < N; i++) begin
      sum += rfs[i];
      checks++;
      if (rfs[i] != rref[i]) begin
        failures++;
        if (failures < 10) $display("FAIL RF %0d = %0d exp %0d", i, rfs[i], rref[i]);
      end
    end
    checks++;
    if (sum != M) begin failures++; $display("FAIL RF sum %0d", sum); end
  endtask

  initial begin
    op = SR_CWCALC; rnd = '0;
    for (int k = 0; k < P; k++) begin vin_a[k] = '0; vin_b[k] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(0, 12345);
    $display("run 0: %0d instructions", instrs);
    run(1, 65535);
    run(2, 0);
    run(1, 777);
    checks++;
    if (repeats == 0) begin failures++; $display("FAIL while loop never repeated"); end
    $display("instructions %0d, repeated while-loop iterations %0d", instrs, repeats);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
