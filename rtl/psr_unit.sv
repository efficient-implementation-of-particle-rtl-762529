// psr_unit: custom-instruction unit for the parallel systematic resampling
// (PSR) algorithm.
//
// PSR replaces the data-dependent while loop of systematic resampling by a
// closed form: the cumulative replication factor of particle i is the index
// of the UDN interval its cumulative weight falls in,
// cr_i = ceil(M*(CW_i - U^1)/CW_N), and RF_i = cr_i - cr_(i-1). Every
// particle is independent, so P are handled per instruction
// (opcodes in pf_pkg::psr_op_e):
//   cwcalculation         vout = CWs of the P weights in vin
//   paradef               U^1 (and CW_N) from CW_N = vin[0] and rnd; vout = 0
//   Integerdivisionforcrf vout = CRFs of the P CWs in vin
//   rfcalculation         vout = RFs from the P CRFs in vin
// Software runs cwcalculation over all weights, paradef once, then the
// division and RF passes. paradef also clears the last-CW and lastRf state
// registers (this design's choice).
//
// Timing: one instruction per cycle, result registered and valid with
// `res_valid` one cycle after `issue` (this design's choice).
module psr_unit
  import pf_pkg::*;
#(
  parameter int unsigned P   = 4,
  parameter int unsigned M   = 512,
  parameter int unsigned W   = 32,
  parameter int unsigned RW  = 16,
  parameter int unsigned RFW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          issue,
  input  psr_op_e       op,
  input  logic [W-1:0]  vin [P],
  input  logic [RW-1:0] rnd,
  output logic          res_valid,
  output logic [W-1:0]  vout [P]
);

  logic [W-1:0]   cw [P];
  logic [W-1:0]   u1, usize, cw_n;
  logic [RFW-1:0] cr [P], cr_in [P], rf [P];
  logic           is_para;

  assign is_para = issue && op == PSR_PARADEF;

  always_comb
    for (int k = 0; k < int'(P); k++) cr_in[k] = vin[k][RFW-1:0];

  cw_calc #(.P(P), .W(W)) u_cw (
    .clk, .rst_n, .clear(is_para), .issue(issue && op == PSR_CWCALC),
    .w(vin), .cw);

  paradef_unit #(.M(M), .W(W), .RW(RW)) u_para (
    .clk, .rst_n, .issue(is_para), .cw_total(vin[0]), .rnd,
    .u1, .usize, .cw_n);

  crf_divider #(.P(P), .M(M), .W(W), .RFW(RFW)) u_div (
    .cw(vin), .u1, .cw_n, .cr);

  rf_calc #(.P(P), .RFW(RFW)) u_rf (
    .clk, .rst_n, .clear(is_para), .issue(issue && op == PSR_RFCALC),
    .cr(cr_in), .rf);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      for (int k = 0; k < int'(P); k++) vout[k] <= '0;
    end else begin
      res_valid <= issue;
      if (issue) begin
        for (int k = 0; k < int'(P); k++) begin
          unique case (op)
            PSR_CWCALC: vout[k] <= cw[k];
            PSR_CRFDIV: vout[k] <= W'(cr[k]);
            PSR_RFCALC: vout[k] <= W'(rf[k]);
            default:    vout[k] <= '0;
          endcase
        end
      end
    end
  end

  // U_size is not needed by PSR (CRFs use M*(CW-U^1)/CW_N directly).
  logic unused_usize;
  assign unused_usize = ^usize;

endmodule
