// cw_calc: the "cwcalculation" instruction of both resampling units.
//
// It turns P particle weights into P cumulative weights (CWs) in one
// instruction: a cascade of P adders starting from the last CW of the
// previous group, which a state register keeps between instructions. Calling
// it N/P times over a weight array yields CW_1..CW_N.
//
// Interface: `w` are the weights of one group; `cw` the CWs, combinational
// from `w` and the state register. `issue` commits cw[P-1] into the state
// register at the clock edge; `clear` zeroes it (start of a new run).
// The adder chain follows the design; clearing and the lack of overflow
// detection (the caller keeps the total within W bits) are this design's
// choices.
module cw_calc #(
  parameter int unsigned P = 4,   // weights per instruction
  parameter int unsigned W = 32   // weight and CW width
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         issue,
  input  logic [W-1:0] w  [P],
  output logic [W-1:0] cw [P]
);

  logic [W-1:0] last_q;

  always_comb begin
    logic [W-1:0] acc;
    acc = last_q;
    for (int k = 0; k < int'(P); k++) begin
      acc   = acc + w[k];
      cw[k] = acc;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      last_q <= '0;
    else if (clear)  last_q <= '0;
    else if (issue)  last_q <= cw[P-1];
  end

endmodule
