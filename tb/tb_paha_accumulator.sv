// tb_paha_accumulator: exhaustive over all 2^M hit patterns with random bin
// values (and the largest bin value, to see wrap-around): bin_out must be
// bin_in plus the number of ones.
module tb_paha_accumulator;
  localparam int M = 8, PW = 20;
  logic [M-1:0] hits;
  logic [PW-1:0] bin_in, bin_out;
  int checks = 0, failures = 0;

  paha_accumulator #(.M(M), .PW(PW)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < (1 << M); p++) begin
      for (int t = 0; t < 3; t++) begin
        automatic int ones = 0;
        hits = M'(p);
        bin_in = (t == 2) ? '1 : PW'($urandom);
        for (int i = 0; i < M; i++) ones += (p >> i) & 1;
        #1;
        checks++;
        if (bin_out !== PW'(bin_in + ones)) begin
          failures++;
          $display("FAIL hits=%b in=%0d out=%0d", hits, bin_in, bin_out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
