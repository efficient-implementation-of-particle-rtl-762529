// tb_cw_calc: self-checking test of the cwcalculation unit.
// Feeds random weights in groups of P, compares every CW with a running sum
// kept by the testbench, checks that `clear` restarts the sum.
module tb_cw_calc;
  localparam int P = 4, W = 32;
  logic clk = 0, rst_n = 0, clear = 0, issue = 0;
  logic [W-1:0] w [P], cw [P];
  int checks = 0, failures = 0;
  longint ref_sum;

  cw_calc #(.P(P), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_group();
    for (int k = 0; k < P; k++) w[k] = $urandom_range(0, 1 << 20);
    issue = 1;
    #1;
    for (int k = 0; k < P; k++) begin
      ref_sum += w[k];
      checks++;
      if (cw[k] !== W'(ref_sum)) begin
        failures++;
        $display("FAIL cw[%0d]=%0d exp %0d", k, cw[k], ref_sum);
      end
    end
    @(posedge clk); #1 issue = 0;
  endtask

  initial begin
    for (int k = 0; k < P; k++) w[k] = '0;
    ref_sum = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int g = 0; g < 20; g++) run_group();
    // idle cycle must not change the state
    @(posedge clk); #1;
    run_group();
    clear = 1; @(posedge clk); #1 clear = 0;
    ref_sum = 0;
    for (int g = 0; g < 10; g++) run_group();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
