// tb_paradef_unit: checks U_size = floor(CW_N/M) and
// U^1 = floor(rnd*U_size/2^RW), and that M*U^1 < CW_N and U^1 < U_size
// whenever CW_N >= M, for random totals and random words.
module tb_paradef_unit;
  localparam int M = 512, W = 32, RW = 16;
  logic clk = 0, rst_n = 0, issue = 0;
  logic [W-1:0] cw_total, u1, usize, cw_n;
  logic [RW-1:0] rnd;
  int checks = 0, failures = 0;

  paradef_unit #(.M(M), .W(W), .RW(RW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    longint c, r;
    cw_total = '0; rnd = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      c = (t % 3 == 0) ? longint'($urandom_range(M, 1 << 20)) : longint'($urandom);
      if (t == 1) c = 10000;
      r = (t == 2) ? 65535 : longint'($urandom_range(0, 65535));
      @(negedge clk);
      cw_total = W'(c); rnd = RW'(r); issue = 1;
      @(negedge clk);
      issue = 0;
      check(usize, c / M, "usize");
      check(u1, ((c / M) * r) >> RW, "u1");
      check(cw_n, c, "cw_n");
      if (c >= M) begin
        check(longint'(u1 < usize), 1, "u1<usize");
        check(longint'(longint'(u1) * M < c), 1, "M*u1<CW_N");
      end
      // state must hold while not issued
      cw_total = $urandom; rnd = $urandom;
      @(negedge clk);
      check(cw_n, c, "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
