// tb_rf_calc: drives non-decreasing cumulative counts in groups of P and
// checks every RF against the difference computed by the testbench, across
// group boundaries (lastRf) and after `clear`.
module tb_rf_calc;
  localparam int P = 4, RFW = 16;
  logic clk = 0, rst_n = 0, clear = 0, issue = 0;
  logic [RFW-1:0] cr [P], rf [P];
  int checks = 0, failures = 0;
  int prev, cum;

  rf_calc #(.P(P), .RFW(RFW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic group();
    int exp [P];
    for (int k = 0; k < P; k++) begin
      exp[k] = $urandom_range(0, 5);
      cum += exp[k];
      cr[k] = RFW'(cum);
    end
    @(negedge clk);
    issue = 1;
    #1;
    for (int k = 0; k < P; k++) begin
      checks++;
      if (rf[k] !== RFW'(exp[k])) begin
        failures++;
        $display("FAIL rf[%0d]=%0d exp %0d", k, rf[k], exp[k]);
      end
    end
    @(negedge clk);
    issue = 0;
  endtask

  initial begin
    for (int k = 0; k < P; k++) cr[k] = '0;
    cum = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int g = 0; g < 30; g++) group();
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    cum = 0;
    for (int g = 0; g < 30; g++) group();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
