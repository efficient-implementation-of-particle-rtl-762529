// rf_calc: the "rfcalculation" instruction of both resampling units.
//
// The replication factor (RF) of a particle is the difference between its
// cumulative count and that of the particle before it. For a group of P
// cumulative counts this is P subtractors in parallel; the first uses the
// last count of the previous group, which a state register (lastRf) keeps.
//
// Interface: `cr` are P cumulative counts, `rf` the P RFs (combinational).
// `issue` stores cr[P-1] as the new lastRf; `clear` zeroes it. Used for the
// reformulated SR (counts from the parallel while loop) and for the PSR
// (cumulative replication factors from the dividers).
module rf_calc #(
  parameter int unsigned P   = 4,
  parameter int unsigned RFW = 16  // count width
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clear,
  input  logic           issue,
  input  logic [RFW-1:0] cr [P],
  output logic [RFW-1:0] rf [P]
);

  logic [RFW-1:0] last_q;

  always_comb begin
    rf[0] = cr[0] - last_q;
    for (int k = 1; k < int'(P); k++) rf[k] = cr[k] - cr[k-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      last_q <= '0;
    else if (clear)  last_q <= '0;
    else if (issue)  last_q <= cr[P-1];
  end

endmodule
