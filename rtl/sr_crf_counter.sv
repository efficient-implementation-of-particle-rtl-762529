// sr_crf_counter: the parallel while loop of the reformulated systematic
// resampling (instructions baseadder, crfcounter and nextiterationdef).
//
// Systematic resampling compares the cumulative weights (CWs) with M evenly
// spaced uniformly distributed numbers (UDNs) U^m = U^1 + (m-1)*U_size; the
// cumulative count of a particle is the number of UDNs below its CW. The
// reformulated algorithm handles P CWs against a group of U UDNs at a time:
//   baseadder        r_k = j*U                 (UDNs of groups 0..j-1 lie below)
//   crfcounter       r_k += #{l : CW_k > U^(jU+l)}, l = 1..U, for all k at once
//   nextiterationdef if CW_P > U^(jU+U+1): j = j+1, return 1 (loop again)
//                    else return 0 (move on to the next group of CWs)
// The group index j lives in a state register, together with the offset
// j*U*U_size of the group's first UDN, so the UDNs of a group are U^1 plus
// this offset plus l*U_size. UDNs with index above M are never counted and j
// stops at the last group; this keeps the RFs summing to M although U_size
// is rounded down (this design's choice).
//
// Interface: `op` selects the operation, `r_out` and `next_it` are
// combinational. j and the offset change on the clock edge of an issued
// nextiterationdef that returns 1, and are reset by `init` (paradef).
module sr_crf_counter
  import pf_pkg::*;
#(
  parameter int unsigned P   = 4,   // CWs per instruction
  parameter int unsigned U   = 8,   // UDNs per group
  parameter int unsigned M   = 512, // resampled particles, multiple of U
  parameter int unsigned W   = 32,
  parameter int unsigned RFW = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           init,
  input  logic           issue,
  input  sr_op_e         op,
  input  logic [W-1:0]   u1,
  input  logic [W-1:0]   usize,
  input  logic [W-1:0]   cw   [P],
  input  logic [RFW-1:0] r_in [P],
  output logic [RFW-1:0] r_out [P],
  output logic           next_it
);

  localparam int unsigned GROUPS = M / U;
  localparam int unsigned JW     = $clog2(GROUPS + 1);

  logic [JW-1:0] j_q;
  logic [W-1:0]  uoff_q;       // j*U*U_size
  logic [W-1:0]  ubase;        // U^(jU+1)
  logic [W-1:0]  ustep;        // U*U_size
  logic          more;

  always_comb begin
    ubase = u1 + uoff_q;
    ustep = usize * W'(U);
    more  = (32'(j_q) + 1) < GROUPS;
    next_it = more && (cw[P-1] > ubase + ustep);
  end

  always_comb begin
    for (int k = 0; k < int'(P); k++) begin
      logic [RFW-1:0] cnt;
      cnt = '0;
      for (int l = 0; l < int'(U); l++) begin
        // UDN index (0-based) j*U + l must be below M
        if ((32'(j_q) * U + 32'(l)) < M && cw[k] > ubase + W'(l) * usize)
          cnt = cnt + 1'b1;
      end
      unique case (op)
        SR_BASEADD:  r_out[k] = RFW'(32'(j_q) * U);
        SR_CRFCOUNT: r_out[k] = r_in[k] + cnt;
        default:     r_out[k] = r_in[k];
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      j_q <= '0; uoff_q <= '0;
    end else if (init) begin
      j_q <= '0; uoff_q <= '0;
    end else if (issue && op == SR_NEXTIT && next_it) begin
      j_q    <= j_q + 1'b1;
      uoff_q <= uoff_q + ustep;
    end
  end

endmodule
