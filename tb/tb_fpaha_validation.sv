// tb_fpaha_validation: every num in 0..M (and above) with both values of
// `most`: the enables must select the num lowest (most = 0) or the num
// highest (most = 1) input positions.
module tb_fpaha_validation;
  localparam int M = 8;
  logic [$clog2(M+1)-1:0] num;
  logic most;
  logic [M-1:0] ok;
  int checks = 0, failures = 0;

  fpaha_validation #(.M(M)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < (1 << $clog2(M+1)); n++) begin
      for (int s = 0; s < 2; s++) begin
        logic [M-1:0] exp;
        automatic int nn = (n > M) ? M : n;
        num = n[$clog2(M+1)-1:0]; most = s[0];
        exp = (nn == M) ? '1 : M'((1 << nn) - 1);
        if (s == 1) exp = M'(exp << (M - nn));
        #1;
        checks++;
        if (ok !== exp) begin
          failures++;
          $display("FAIL num=%0d most=%0d ok=%b exp=%b", n, s, ok, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
