// tb_pf_workloads: the configurations the design is evaluated with, run
// side by side at full size:
//   - UQLE with 4, 8, 16, 32 and 64 intervals, each with low, middle and
//     high representative values (15 units);
//   - resampling of 512 particles with every (weights, UDNs) per
//     instruction pair from {2,4} x {1,2,4,8} for the reformulated SR, and
//     2 and 4 lanes for PSR; 1 lane is run for PSR (and SR with (1,1));
//   - resampling at 128, 256 and 1024 particles with 4 lanes;
//   - colour histograms of a 640 x 480 image with 1-, 4- and 16-way
//     histogram engines, and the (M, N, P) = (8, 8, 20) engine.
// Every helper checks its results against its own model; the instruction
// and cycle counts are printed.
module tb_pf_workloads;
  import pf_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NU = 15, NR = 12, NH = 4;
  logic u_done [NU], r_done [NR], h_done [NH];
  int   u_chk [NU], u_fail [NU];
  int   r_chk [NR], r_fail [NR], r_sr [NR], r_psr [NR];
  int   h_chk [NH], h_fail [NH], h_cyc [NH];

  localparam int UM [5] = '{4, 8, 16, 32, 64};
  for (genvar i = 0; i < 5; i++) begin : g_uq
    uqle_sweep_check #(.M(UM[i]), .WMODE(UQLE_LOW))  u_lo (.clk, .rst_n, .done(u_done[3*i]),   .checks(u_chk[3*i]),   .failures(u_fail[3*i]));
    uqle_sweep_check #(.M(UM[i]), .WMODE(UQLE_MID))  u_mi (.clk, .rst_n, .done(u_done[3*i+1]), .checks(u_chk[3*i+1]), .failures(u_fail[3*i+1]));
    uqle_sweep_check #(.M(UM[i]), .WMODE(UQLE_HIGH)) u_hi (.clk, .rst_n, .done(u_done[3*i+2]), .checks(u_chk[3*i+2]), .failures(u_fail[3*i+2]));
  end

  localparam int RP [NR] = '{1, 2, 2, 2, 2, 4, 4, 4, 4, 4, 4, 4};
  localparam int RU [NR] = '{1, 1, 2, 4, 8, 1, 2, 4, 8, 8, 8, 8};
  localparam int RM [NR] = '{512, 512, 512, 512, 512, 512, 512, 512, 512, 128, 256, 1024};
  for (genvar i = 0; i < NR; i++) begin : g_rs
    resample_sweep_check #(.P(RP[i]), .U(RU[i]), .M(RM[i])) u_rs (
      .clk, .rst_n, .done(r_done[i]), .checks(r_chk[i]), .failures(r_fail[i]),
      .sr_instrs(r_sr[i]), .psr_instrs(r_psr[i]));
  end

  localparam int HM [NH] = '{1, 4, 16, 8};
  for (genvar i = 0; i < NH; i++) begin : g_h
    hist_sweep_check #(.M(HM[i])) u_h (
      .clk, .rst_n, .done(h_done[i]), .checks(h_chk[i]), .failures(h_fail[i]), .cycles(h_cyc[i]));
  end

  int checks = 0, failures = 0;

  initial begin
    repeat (2000000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit all_done();
    for (int i = 0; i < NU; i++) if (!u_done[i]) return 0;
    for (int i = 0; i < NR; i++) if (!r_done[i]) return 0;
    for (int i = 0; i < NH; i++) if (!h_done[i]) return 0;
    return 1;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    while (!all_done()) @(posedge clk);
    for (int i = 0; i < NU; i++) begin
      checks += u_chk[i]; failures += u_fail[i];
      if (i % 3 == 0) $display("UQLE M=%0d: %0d checks, %0d failures (low/mid/high)", UM[i/3],
                               u_chk[i] + u_chk[i+1] + u_chk[i+2], u_fail[i] + u_fail[i+1] + u_fail[i+2]);
    end
    for (int i = 0; i < NR; i++) begin
      checks += r_chk[i]; failures += r_fail[i];
      // each helper runs two weight sets (random, then sparse)
      $display("resampling %0d particles, P=%0d U=%0d: per run SR %0d instr, PSR %0d instr, %0d failures",
               RM[i], RP[i], RU[i], r_sr[i] / 2, r_psr[i] / 2, r_fail[i]);
    end
    for (int i = 0; i < NH; i++) begin
      checks += h_chk[i]; failures += h_fail[i];
      $display("histogram %0d-way, 640x480: %0d cycles, %0d failures", HM[i], h_cyc[i], h_fail[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
