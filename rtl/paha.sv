// paha: Parallel Array Histogram Architecture.
//
// A histogram engine that adds M N-bit values to a 2^N-bin histogram every
// clock with no added latency. Each input goes through an N:2^N decoder;
// each of the 2^N bin_q has an M-bit accumulator that counts the decoder
// outputs addressed to it and adds the count to its PW-bit register bin.
// The bin_q are registers rather than a memory, so there is no
// read-modify-write port limit.
//
// Interface: when `en` is high the M values in `din` update the bin_q at the
// clock edge; `din_ok[i]` low removes input i (AND gates on its decoder
// outputs; a plain PAHA drives all ones, the flexible PAHA its validation
// logic). `clear` zeroes all bin_q and wins over `en`. `rd_addr`/`rd_data` read
// one bin combinationally. PW must cover the largest count expected. The
// decoder/accumulator/register-bin structure follows the design; the read
// port, clear and per-input enable are this design's interface choices.
module paha #(
  parameter int unsigned M  = 8,   // parallel inputs
  parameter int unsigned N  = 8,   // input width, 2^N bin_q
  parameter int unsigned PW = 20   // bin width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          clear,
  input  logic [N-1:0]  din [M],
  input  logic [M-1:0]  din_ok,
  input  logic [N-1:0]  rd_addr,
  output logic [PW-1:0] rd_data
);

  localparam int unsigned NB = 1 << N;

  logic [NB-1:0] dec  [M];    // decoder outputs after the AND gates
  logic [M-1:0]  hits [NB];   // regrouped per bin
  logic [PW-1:0] bin_q [NB];
  logic [PW-1:0] nxt  [NB];

  always_comb begin
    for (int i = 0; i < int'(M); i++)
      dec[i] = din_ok[i] ? (NB'(1) << din[i]) : '0;
    for (int b = 0; b < int'(NB); b++)
      for (int i = 0; i < int'(M); i++)
        hits[b][i] = dec[i][b];
  end

  for (genvar b = 0; b < int'(NB); b++) begin : g_bin
    paha_accumulator #(.M(M), .PW(PW)) u_acc (
      .hits(hits[b]), .bin_in(bin_q[b]), .bin_out(nxt[b]));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)      bin_q[b] <= '0;
      else if (clear)  bin_q[b] <= '0;
      else if (en)     bin_q[b] <= nxt[b];
    end
  end

  assign rd_data = bin_q[rd_addr];

endmodule
