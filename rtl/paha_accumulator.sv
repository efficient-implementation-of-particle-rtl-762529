// paha_accumulator: the M-bit accumulator of one histogram bin.
//
// A compressor tree counts how many of the M decoder outputs addressed to
// this bin are 1, giving an R-bit count with R = ceil(log2(M+1)); a
// two-operand adder adds it to the PW-bit bin value. Purely combinational;
// the bin register lives in the PAHA. The count is written as a sum of single
// bits, which synthesis maps to a counter/compressor tree.
module paha_accumulator #(
  parameter int unsigned M  = 8,   // parallel inputs
  parameter int unsigned PW = 20   // bin width
) (
  input  logic [M-1:0]  hits,
  input  logic [PW-1:0] bin_in,
  output logic [PW-1:0] bin_out
);

  localparam int unsigned R = $clog2(M + 1);

  logic [R-1:0] ones;

  always_comb begin
    ones = '0;
    for (int i = 0; i < int'(M); i++) ones = ones + R'(hits[i]);
    bin_out = bin_in + PW'(ones);
  end

endmodule
