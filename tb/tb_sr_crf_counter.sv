// tb_sr_crf_counter: runs the parallel while loop (baseadder, then
// crfcounter/nextiterationdef until the flag drops) over N cumulative
// weights, with U^1 and U_size driven directly, and checks each count
// against the number of UDNs U^1 + m*U_size (m < M) below the CW, computed
// by the testbench. Weight sets include degenerate ones so that the loop
// moves through several UDN groups for one group of CWs.
module tb_sr_crf_counter;
  import pf_pkg::*;
  localparam int P = 4, U = 8, M = 512, W = 32, RFW = 16, N = 512;
  logic clk = 0, rst_n = 0, init = 0, issue = 0;
  sr_op_e op;
  logic [W-1:0] u1, usize, cw [P];
  logic [RFW-1:0] r_in [P], r_out [P];
  logic next_it;
  int checks = 0, failures = 0, loops = 0, multi = 0;
  longint cws [N];

  sr_crf_counter #(.P(P), .U(U), .M(M), .W(W), .RFW(RFW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_count(longint c);
    int n = 0;
    for (int m = 0; m < M; m++) if (longint'(u1) + longint'(m) * usize < c) n++;
    return n;
  endfunction

  task automatic run(input int kind);
    longint acc = 0;
    for (int i = 0; i < N; i++) begin
      int wv;
      case (kind)
        0: wv = $urandom_range(0, 1000);
        1: wv = ($urandom_range(0, 15) == 0) ? $urandom_range(1000, 20000) : 0;
        default: wv = (i % 64 == 5) ? 50000 : 1;
      endcase
      acc += wv;
      cws[i] = acc;
    end
    usize = W'(acc / M);
    u1 = W'(longint'($urandom_range(0, 65535)) * usize / 65536);
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    for (int g = 0; g < N / P; g++) begin
      int iters = 0;
      for (int k = 0; k < P; k++) cw[k] = W'(cws[g*P+k]);
      op = SR_BASEADD; #1;
      for (int k = 0; k < P; k++) r_in[k] = r_out[k];
      forever begin
        op = SR_CRFCOUNT; #1;
        for (int k = 0; k < P; k++) r_in[k] = r_out[k];
        op = SR_NEXTIT; issue = 1; #1;
        iters++;
        if (!next_it) begin
          @(negedge clk); issue = 0;
          break;
        end
        @(negedge clk); issue = 0;
      end
      loops += iters;
      if (iters > 1) multi++;
      for (int k = 0; k < P; k++) begin
        checks++;
        if (int'(r_in[k]) != ref_count(cws[g*P+k])) begin
          failures++;
          if (failures < 10) $display("FAIL i=%0d r=%0d exp=%0d", g*P+k, r_in[k], ref_count(cws[g*P+k]));
        end
      end
    end
  endtask

  initial begin
    op = SR_BASEADD; u1 = '0; usize = '0;
    for (int k = 0; k < P; k++) begin cw[k] = '0; r_in[k] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) run(t % 3);
    checks++;
    if (multi == 0) begin failures++; $display("FAIL loop never repeated"); end
    $display("groups with repeated while loop: %0d, total iterations %0d", multi, loops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
