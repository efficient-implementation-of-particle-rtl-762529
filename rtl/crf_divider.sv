// crf_divider: the "Integerdivisionforcrf" instruction of the parallel
// systematic resampling (PSR) unit.
//
// For each of P cumulative weights it computes the cumulative replication
// factor (CRF)
//   cr = ceil( M * (CW - U^1) / CW_N )
// Multiplying by M before dividing by CW_N, instead of dividing by a rounded
// U_size, makes the last CRF exactly M in fixed point. Each lane is a
// restoring subtract/shift divider that produces only the QB quotient bits a
// value in 0..M needs; a non-zero remainder then increments the quotient,
// which gives the ceiling. A CW not above U^1 gives 0, as does CW_N = 0
// (both are this design's choices).
//
// Fully combinational: `cr` follows `cw`, `u1` and `cw_n` in the same cycle.
module crf_divider #(
  parameter int unsigned P   = 4,
  parameter int unsigned M   = 512,
  parameter int unsigned W   = 32,
  parameter int unsigned RFW = 16
) (
  input  logic [W-1:0]   cw [P],
  input  logic [W-1:0]   u1,
  input  logic [W-1:0]   cw_n,
  output logic [RFW-1:0] cr [P]
);

  localparam int unsigned QB = $clog2(M + 1);   // quotient bits
  localparam int unsigned MB = $clog2(M + 1);   // bits of the factor M
  localparam int unsigned NW = W + MB;          // numerator width
  localparam int unsigned DW = NW + QB;         // shifted-divisor width

  always_comb begin
    for (int k = 0; k < int'(P); k++) begin
      logic [NW-1:0] num, rem;
      logic [DW-1:0] dsh;
      logic [QB-1:0] q;
      num = (cw[k] > u1) ? NW'(cw[k] - u1) * NW'(M) : '0;
      rem = num;
      q   = '0;
      for (int b = int'(QB) - 1; b >= 0; b--) begin
        dsh = DW'(cw_n) << b;
        if (DW'(rem) >= dsh) begin
          rem  = rem - NW'(dsh);
          q[b] = 1'b1;
        end
      end
      if (cw_n == '0)       cr[k] = '0;
      else if (rem != '0)   cr[k] = RFW'(q) + 1'b1;
      else                  cr[k] = RFW'(q);
    end
  end

endmodule
