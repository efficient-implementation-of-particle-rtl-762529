// paradef_unit: the "paradef" instruction of both resampling units.
//
// From the total weight CW_N it derives the systematic-resampling parameters
//   U_size = floor(CW_N / M)             (interval between UDNs)
//   U^1    = floor(rnd * U_size / 2^RW)  (first UDN, uniform in [0, U_size))
// and keeps U^1, U_size and CW_N in state registers so that later
// instructions need no extra operands. `rnd` is a uniform RW-bit random word
// supplied with the instruction; how the random number is produced is this
// design's choice. This form of U^1 keeps M*U^1 < CW_N, which guarantees that
// the last cumulative replication factor equals M.
//
// Timing: the state registers load on the clock edge where `issue` is high;
// the outputs show the new values from the next cycle.
module paradef_unit #(
  parameter int unsigned M  = 512, // resampled particles
  parameter int unsigned W  = 32,  // weight width
  parameter int unsigned RW = 16   // random word width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          issue,
  input  logic [W-1:0]  cw_total,
  input  logic [RW-1:0] rnd,
  output logic [W-1:0]  u1,
  output logic [W-1:0]  usize,
  output logic [W-1:0]  cw_n
);

  logic [W+RW-1:0] prod;
  logic [W-1:0]    usize_d, u1_d;

  always_comb begin
    usize_d = cw_total / W'(M);
    prod    = (W+RW)'(usize_d) * (W+RW)'(rnd);
    u1_d    = W'(prod >> RW);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      u1 <= '0; usize <= '0; cw_n <= '0;
    end else if (issue) begin
      u1 <= u1_d; usize <= usize_d; cw_n <= cw_total;
    end
  end

endmodule
