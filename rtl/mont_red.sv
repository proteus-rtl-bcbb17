// mont_red: word-level Montgomery reduction for NTT-friendly primes
// q = qH * 2^w + 1.
//
// Given d < q^2 it returns c = d * R^-1 mod q with R = 2^(w*L) and
// L = ceil(log2(q)/w). Each of the L word steps removes the low w bits of T:
//   T2  = -T mod 2^w
//   cin = T2[w-1] | T[w-1]          (1 whenever the low word is non-zero)
//   T   = qH * T2 + (T >> w) + cin
// which equals (T + T2*q) / 2^w exactly. After L steps T < 2q and one
// conditional subtraction finishes the job. The word step is the one of the
// reference algorithm; as in its DSP mapping, qH * T2 is split into
// ceil(log2(qH)/S) slices of S bits, one DSP each, whose shifted products are
// summed together with T >> w and cin. Twiddle factors are stored
// pre-multiplied by R so that the R^-1 factor cancels.
//
// Timing: one pipeline register per word step plus one for the final
// subtraction, latency mont_lat(QW, WORD) = L + 1, one result per cycle.
module mont_red
  import ntt_pkg::*;
#(
  parameter int unsigned QW   = QW_DEF,
  parameter logic [QW-1:0] Q  = Q_DEF[QW-1:0],
  parameter int unsigned WORD = WORD_DEF,
  parameter int unsigned S    = DSPA_DEF      // DSP slice width for qH
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [2*QW-1:0] d,
  output logic            out_valid,
  output logic [QW-1:0]   c
);
  localparam int unsigned L   = mont_iters(QW, WORD);
  localparam int unsigned QHW = QW - WORD;             // width of qH
  localparam int unsigned NS  = (QHW + S - 1) / S;     // DSP slices for qH
  localparam int unsigned TW  = 2*QW + 1;              // working width of T
  localparam logic [NS*S-1:0] QH = (NS*S)'(Q >> WORD);

  logic [TW-1:0] t [L+1];
  logic [L:0]    v;

  assign t[0] = TW'(d);
  assign v[0] = in_valid;

  for (genvar i = 0; i < L; i++) begin : g_step
    logic [WORD-1:0] tl, t2;
    logic            cin;
    logic [TW-1:0]   prod;
    always_comb begin
      tl  = t[i][WORD-1:0];
      t2  = -tl;
      cin = t2[WORD-1] | tl[WORD-1];
      prod = '0;
      for (int k = 0; k < NS; k++)
        prod = prod + ((TW'(QH[k*S +: S]) * TW'(t2)) << (k*S));
    end
    always_ff @(posedge clk)
      t[i+1] <= prod + (t[i] >> WORD) + TW'(cin);
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) v[i+1] <= 1'b0;
      else        v[i+1] <= v[i];
  end

  // final conditional subtraction
  always_ff @(posedge clk)
    c <= (t[L] >= TW'(Q)) ? QW'(t[L] - TW'(Q)) : QW'(t[L]);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v[L];
endmodule
