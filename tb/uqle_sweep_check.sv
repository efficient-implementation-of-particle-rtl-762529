// uqle_sweep_check: testbench helper that loads Gaussian-likelihood
// boundaries into one uqle_unit of M intervals and representation WMODE,
// evaluates NT random distances, and compares weight and interval index with
// a linear-search model: weight code floor(w*(2^WW-1)) with w = mQ (low),
// mQ+Q/2 (middle) or (m+1)Q (high), 2*delta for the low value of interval 0
// and delta beyond T_delta. Raises `done` and reports its counts.
module uqle_sweep_check
  import pf_pkg::*;
#(
  parameter int          M     = 4,
  parameter uqle_wmode_e WMODE = UQLE_HIGH,
  parameter int          NT    = 400
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int DW = 32, WW = 8, FULL = 255, DELTA = 1;
  logic bnd_we = 0, issue = 0;
  logic [$clog2(M)-1:0] bnd_idx = '0;
  logic [DW-1:0] bnd_data = '0, distance = '0;
  logic res_valid;
  logic [WW-1:0] weight;
  logic [$clog2(M):0] index;
  longint T [M];

  uqle_unit #(.M(M), .DW(DW), .WW(WW), .WMODE(WMODE), .DELTA_CODE(DELTA)) dut (.*);

  function automatic int model_w(int m);  // m = interval 0..M-1
    case (WMODE)
      UQLE_LOW: return (m == 0) ? 2 * DELTA : (m * FULL) / M;
      UQLE_MID: return ((2 * m + 1) * FULL) / (2 * M);
      default:  return ((m + 1) * FULL) / M;
    endcase
  endfunction

  initial begin
    static real sigma2 = 1.0e8, q = 1.0 / M;
    done = 0; checks = 0; failures = 0;
    wait (rst_n);
    T[0] = longint'($sqrt(-2.0 * $ln(0.001) * sigma2));
    for (int m = 1; m < M; m++) T[m] = longint'($sqrt(-2.0 * $ln(m * q) * sigma2));
    for (int m = 0; m < M; m++) begin
      @(negedge clk); bnd_we = 1; bnd_idx = m[$clog2(M)-1:0]; bnd_data = DW'(T[m]);
    end
    @(negedge clk); bnd_we = 0;
    for (int t = 0; t < NT; t++) begin
      longint d;
      int em, ew;
      d = (t < M) ? T[t] : longint'($urandom_range(0, int'(T[0] + T[0] / 8)));
      if (d >= T[0]) begin em = 0; ew = DELTA; end
      else begin
        em = M;
        for (int m = 1; m < M; m++) if (d >= T[m]) begin em = m; break; end
        ew = model_w(em - 1);
      end
      distance = DW'(d); issue = 1;
      @(negedge clk); issue = 0;
      checks++;
      if (!res_valid || int'(index) != em || int'(weight) != ew) begin
        failures++;
        if (failures < 5) $display("FAIL UQLE M=%0d mode=%0d d=%0d idx=%0d/%0d w=%0d/%0d", M, WMODE, d, index, em, weight, ew);
      end
    end
    done = 1;
  end
endmodule
