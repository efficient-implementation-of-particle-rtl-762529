// rsr_unit: custom-instruction unit for the reformulated systematic
// resampling (SR) algorithm.
//
// The six instructions let a processor compute replication factors (RFs) for
// N particles P at a time (opcodes in pf_pkg::sr_op_e):
//   cwcalculation    vout = CWs of the P weights in vin_a
//   paradef          U^1, U_size from CW_N = vin_a[0] and the random word rnd (vout = 0)
//                    (into state registers; vout = 0)
//   baseadder        vout = j*U for all P lanes
//   crfcounter       vout = vin_a (running counts) + comparisons of the CWs
//                    in vin_b with the U UDNs of group j
//   nextiterationdef flag = 1 when CW in vin_b[P-1] exceeds the first UDN of
//                    the next group (j advances), else 0
//   rfcalculation    vout = RFs from the P cumulative counts in vin_a
// Software loop per group of P particles: baseadder; repeat {crfcounter;
// nextiterationdef} while flag; rfcalculation. The results equal sequential
// SR for the same U^1 and U_size. State registers: last CW, U^1, U_size,
// CW_N, j and lastRf. paradef also clears the last-CW and lastRf registers so
// a new run can follow (this design's choice).
//
// Timing: one instruction per cycle; `vout`/`flag` are registered and valid
// with `res_valid` one cycle after `issue`. Operand and result vectors are P
// words of W bits; counts use the low RFW bits. The operand buses and the
// one-cycle latency are this design's choices.
module rsr_unit
  import pf_pkg::*;
#(
  parameter int unsigned P   = 4,
  parameter int unsigned U   = 8,
  parameter int unsigned M   = 512,
  parameter int unsigned W   = 32,
  parameter int unsigned RW  = 16,
  parameter int unsigned RFW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          issue,
  input  sr_op_e        op,
  input  logic [W-1:0]  vin_a [P],
  input  logic [W-1:0]  vin_b [P],
  input  logic [RW-1:0] rnd,
  output logic          res_valid,
  output logic [W-1:0]  vout [P],
  output logic          flag
);

  logic [W-1:0]   cw [P];
  logic [W-1:0]   u1, usize, cw_n;
  logic [RFW-1:0] r_in [P], r_cnt [P], rf [P];
  logic           next_it;
  logic           is_para;

  assign is_para = issue && op == SR_PARADEF;

  always_comb
    for (int k = 0; k < int'(P); k++) r_in[k] = vin_a[k][RFW-1:0];

  cw_calc #(.P(P), .W(W)) u_cw (
    .clk, .rst_n, .clear(is_para), .issue(issue && op == SR_CWCALC),
    .w(vin_a), .cw);

  paradef_unit #(.M(M), .W(W), .RW(RW)) u_para (
    .clk, .rst_n, .issue(is_para), .cw_total(vin_a[0]), .rnd,
    .u1, .usize, .cw_n);

  sr_crf_counter #(.P(P), .U(U), .M(M), .W(W), .RFW(RFW)) u_cnt (
    .clk, .rst_n, .init(is_para), .issue, .op, .u1, .usize,
    .cw(vin_b), .r_in, .r_out(r_cnt), .next_it);

  rf_calc #(.P(P), .RFW(RFW)) u_rf (
    .clk, .rst_n, .clear(is_para), .issue(issue && op == SR_RFCALC),
    .cr(r_in), .rf);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      flag      <= 1'b0;
      for (int k = 0; k < int'(P); k++) vout[k] <= '0;
    end else begin
      res_valid <= issue;
      if (issue) begin
        flag <= (op == SR_NEXTIT) && next_it;
        for (int k = 0; k < int'(P); k++) begin
          unique case (op)
            SR_CWCALC:               vout[k] <= cw[k];
            SR_BASEADD, SR_CRFCOUNT: vout[k] <= W'(r_cnt[k]);
            SR_RFCALC:               vout[k] <= W'(rf[k]);
            default:                 vout[k] <= '0;
          endcase
        end
      end
    end
  end

  // cw_n is kept for symmetry with the PSR unit; the SR loop does not use it.
  logic unused_cw_n;
  assign unused_cw_n = ^cw_n;

endmodule
