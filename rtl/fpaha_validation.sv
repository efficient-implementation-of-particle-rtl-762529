// fpaha_validation: validation logic of the flexible PAHA.
//
// When a group holds only m < M valid items (a misaligned first or last
// group), the others must not reach the histogram. From the number of items
// `num` and the `most` select it drives one enable per input:
//   most = 0: the num least significant inputs (indices 0..num-1) are used
//   most = 1: the num most significant inputs (indices M-num..M-1) are used
// num above M counts as M. Combinational.
module fpaha_validation #(
  parameter int unsigned M = 8
) (
  input  logic [$clog2(M+1)-1:0] num,
  input  logic                   most,
  output logic [M-1:0]           ok
);

  always_comb begin
    int n;
    n = (int'(num) > int'(M)) ? int'(M) : int'(num);
    for (int i = 0; i < int'(M); i++)
      ok[i] = most ? (i >= int'(M) - n) : (i < n);
  end

endmodule
