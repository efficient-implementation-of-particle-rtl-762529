// fpaha: Flexible Parallel Array Histogram Architecture.
//
// A PAHA whose number of active inputs can change from group to group: the
// validation logic turns (`num`, `most`) into per-input enables that gate the
// decoder outputs (M x 2^N AND gates), so items outside the valid range of a
// misaligned group do not update the bins. With num = M it behaves as the
// plain PAHA. Timing and the bin read/clear interface are those of `paha`:
// bins update on the clock edge where `en` is high.
module fpaha #(
  parameter int unsigned M  = 8,
  parameter int unsigned N  = 8,
  parameter int unsigned PW = 20
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic                   clear,
  input  logic [N-1:0]           din [M],
  input  logic [$clog2(M+1)-1:0] num,
  input  logic                   most,
  input  logic [N-1:0]           rd_addr,
  output logic [PW-1:0]          rd_data
);

  logic [M-1:0] ok;

  fpaha_validation #(.M(M)) u_val (.num, .most, .ok);

  paha #(.M(M), .N(N), .PW(PW)) u_paha (
    .clk, .rst_n, .en, .clear, .din, .din_ok(ok), .rd_addr, .rd_data);

endmodule
