// uqle_unit: the UQLE custom instruction, weight = likelihood(distance).
//
// Uniform quantization likelihood evaluation replaces the Gaussian weight
// exp(-d^2/(2 sigma^2)) by a step function. The weight range [0,1] is cut
// into M intervals of size Q = 1/M plus a small interval [0, delta); the
// matching distance boundaries T_delta > T_1 > ... > T_(M-1) (with
// T_m = sqrt(-2 ln(mQ) sigma^2)) are computed once by software and written
// into M state registers T[0..M-1], where T[0] holds T_delta.
// Per instruction:
//   1. M comparators give c_k = (d >= T[k])  (a thermometer code 0..01..1)
//   2. XOR gates of neighbouring comparator outputs give a one-hot code
//      e_k = c_k ^ c_(k+1), e_(M-1) = ~c_(M-1)
//   3. an encoder turns it into the interval index m (T_m > d >= T_(m+1))
//   4. a multiplexer picks the quantized weight W_m; d >= T_delta picks the
//      delta weight.
// W_m (WW-bit code = floor(w*(2^WW-1))) is the low (mQ), middle (mQ+Q/2) or
// high ((m+1)Q) value of the interval, set by WMODE; for m = 0 the low value
// is 2*delta. With M = 4 and high values, d in [T_2, T_1) gives 8'b0111_1111.
//
// Interface: bnd_we/bnd_idx/bnd_data write one boundary register. On
// `issue`, `weight` and `index` (0 = delta interval, m+1 otherwise) are
// registered and valid with `res_valid` one cycle later; one distance per
// cycle. The comparator/XOR/encoder/multiplexer organization follows the
// design; the distance width, the delta code and the one-cycle latency are
// this design's choices.
module uqle_unit
  import pf_pkg::*;
#(
  parameter int unsigned M          = 4,      // quantization intervals
  parameter int unsigned DW         = 32,     // distance width
  parameter int unsigned WW         = 8,      // weight width
  parameter uqle_wmode_e WMODE      = UQLE_HIGH,
  parameter int unsigned DELTA_CODE = 1       // weight code of delta
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 bnd_we,
  input  logic [$clog2(M)-1:0] bnd_idx,
  input  logic [DW-1:0]        bnd_data,
  input  logic                 issue,
  input  logic [DW-1:0]        distance,
  output logic                 res_valid,
  output logic [WW-1:0]        weight,
  output logic [$clog2(M):0]   index
);

  localparam int unsigned MB   = $clog2(M);
  localparam longint      FULL = (longint'(1) << WW) - 1;

  typedef logic [WW-1:0] wtab_t [M];

  // Quantized weight of interval m, eq. W_m = mQ | mQ+Q/2 | (m+1)Q.
  function automatic wtab_t make_wtab();
    wtab_t t;
    for (int m = 0; m < int'(M); m++) begin
      unique case (WMODE)
        UQLE_LOW:  t[m] = WW'((longint'(m) * FULL) / M);
        UQLE_MID:  t[m] = WW'(((2 * longint'(m) + 1) * FULL) / (2 * M));
        default:   t[m] = WW'(((longint'(m) + 1) * FULL) / M);
      endcase
    end
    if (WMODE == UQLE_LOW) t[0] = WW'(2 * DELTA_CODE);
    return t;
  endfunction

  localparam wtab_t WTAB = make_wtab();

  logic [DW-1:0] bnd_q [M];
  logic [M-1:0]  c, e;
  logic [MB-1:0] m_idx;

  always_comb begin
    for (int k = 0; k < int'(M); k++) c[k] = (distance >= bnd_q[k]);
    for (int k = 0; k < int'(M) - 1; k++) e[k] = c[k] ^ c[k+1];
    e[M-1] = ~c[M-1];
    m_idx = '0;
    for (int k = 0; k < int'(M); k++)
      if (e[k]) m_idx = m_idx | MB'(k);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(M); k++) bnd_q[k] <= '0;
    end else if (bnd_we) begin
      bnd_q[bnd_idx] <= bnd_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      weight    <= '0;
      index     <= '0;
    end else begin
      res_valid <= issue;
      if (issue) begin
        if (c[0]) begin
          weight <= WW'(DELTA_CODE);
          index  <= '0;
        end else begin
          weight <= WTAB[m_idx];
          index  <= (MB+1)'(m_idx) + 1'b1;
        end
      end
    end
  end

endmodule
