// pf_asip_ext: custom-instruction extensions of a particle-filter ASIP.
//
// A particle filter repeats prediction, weight calculation, resampling and
// estimation for N particles. Profiling on a small general-purpose core shows
// three hot spots, each of which gets a hardware unit that the core calls as
// a custom instruction:
//   - uqle_unit  likelihood evaluation: weight from particle distance by
//                comparison with precomputed boundaries (UQLE)
//   - rsr_unit   resampling by the reformulated systematic resampling
//                (P CWs against U UDNs per instruction)
//   - psr_unit   resampling by parallel systematic resampling (closed-form
//                cumulative replication factors by integer division)
//   - fpaha      histogram for colour-histogram video tracking (M pixels per
//                clock, flexible number of valid inputs)
// The two resampling units are alternatives computing the same RFs; a system
// would normally carry one of them. The base processor and its load/store
// path are outside this module: each unit's issue, opcode, operand and result
// signals are ports. All units share one clock and an asynchronous
// active-low reset. Defaults: UQLE with 4 intervals and 8-bit high-value
// weights; resampling of 512 particles with 32-bit weights, 4 weights per
// instruction and 8 UDNs per group; histogram with 8 inputs of 8 bits and
// 20-bit bins.
module pf_asip_ext
  import pf_pkg::*;
#(
  parameter int unsigned UQ_M   = 4,
  parameter int unsigned UQ_DW  = 32,
  parameter int unsigned UQ_WW  = 8,
  parameter uqle_wmode_e UQ_WMODE = UQLE_HIGH,
  parameter int unsigned RS_P   = 4,
  parameter int unsigned RS_U   = 8,
  parameter int unsigned RS_M   = 512,
  parameter int unsigned RS_W   = 32,
  parameter int unsigned RS_RW  = 16,
  parameter int unsigned RS_RFW = 16,
  parameter int unsigned H_M    = 8,
  parameter int unsigned H_N    = 8,
  parameter int unsigned H_PW   = 20
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // UQLE
  input  logic                      uq_bnd_we,
  input  logic [$clog2(UQ_M)-1:0]   uq_bnd_idx,
  input  logic [UQ_DW-1:0]          uq_bnd_data,
  input  logic                      uq_issue,
  input  logic [UQ_DW-1:0]          uq_dist,
  output logic                      uq_valid,
  output logic [UQ_WW-1:0]          uq_weight,
  output logic [$clog2(UQ_M):0]     uq_index,
  // reformulated SR
  input  logic                      sr_issue,
  input  sr_op_e                    sr_op,
  input  logic [RS_W-1:0]           sr_vin_a [RS_P],
  input  logic [RS_W-1:0]           sr_vin_b [RS_P],
  input  logic [RS_RW-1:0]          sr_rnd,
  output logic                      sr_valid,
  output logic [RS_W-1:0]           sr_vout [RS_P],
  output logic                      sr_flag,
  // PSR
  input  logic                      psr_issue,
  input  psr_op_e                   psr_op,
  input  logic [RS_W-1:0]           psr_vin [RS_P],
  input  logic [RS_RW-1:0]          psr_rnd,
  output logic                      psr_valid,
  output logic [RS_W-1:0]           psr_vout [RS_P],
  // flexible parallel array histogram
  input  logic                      hist_en,
  input  logic                      hist_clear,
  input  logic [H_N-1:0]            hist_din [H_M],
  input  logic [$clog2(H_M+1)-1:0]  hist_num,
  input  logic                      hist_most,
  input  logic [H_N-1:0]            hist_rd_addr,
  output logic [H_PW-1:0]           hist_rd_data
);

  uqle_unit #(.M(UQ_M), .DW(UQ_DW), .WW(UQ_WW), .WMODE(UQ_WMODE)) u_uqle (
    .clk, .rst_n, .bnd_we(uq_bnd_we), .bnd_idx(uq_bnd_idx), .bnd_data(uq_bnd_data),
    .issue(uq_issue), .distance(uq_dist), .res_valid(uq_valid), .weight(uq_weight),
    .index(uq_index));

  rsr_unit #(.P(RS_P), .U(RS_U), .M(RS_M), .W(RS_W), .RW(RS_RW), .RFW(RS_RFW)) u_rsr (
    .clk, .rst_n, .issue(sr_issue), .op(sr_op), .vin_a(sr_vin_a), .vin_b(sr_vin_b),
    .rnd(sr_rnd), .res_valid(sr_valid), .vout(sr_vout), .flag(sr_flag));

  psr_unit #(.P(RS_P), .M(RS_M), .W(RS_W), .RW(RS_RW), .RFW(RS_RFW)) u_psr (
    .clk, .rst_n, .issue(psr_issue), .op(psr_op), .vin(psr_vin), .rnd(psr_rnd),
    .res_valid(psr_valid), .vout(psr_vout));

  fpaha #(.M(H_M), .N(H_N), .PW(H_PW)) u_hist (
    .clk, .rst_n, .en(hist_en), .clear(hist_clear), .din(hist_din), .num(hist_num),
    .most(hist_most), .rd_addr(hist_rd_addr), .rd_data(hist_rd_data));

endmodule
