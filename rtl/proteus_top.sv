// proteus_top: the two pipelined NTT architectures of the generator, side by
// side, each followed by its bit-reverse/reorder output buffer.
//
//   SDF path : sdf_ntt (1 coefficient/cycle)  -> bitrev_buffer (1 lane)
//   MDC path : mdc_ntt (2 coefficients/cycle) -> bitrev_buffer (2 lanes)
//
// Both paths default to the same design point: n = 4096 coefficients of
// log2(q) = 64 bits, word-level Montgomery reduction, Gentleman-Sande
// (decimation-in-frequency) butterflies and the forward/inverse scheme OP8:
//   forward : NTT (normal -> bit-reversed) then bit-reverse  -> A in order
//   inverse : feed A_0, A_(n-1), ..., A_1 with tag.inv set; the same forward
//             twiddles are used, every butterfly halves its results (the
//             n^-1 scaling), and the output buffer bit-reverses again.
// Setting tag.ro on a forward transform makes the output buffer emit the
// reordered sequence directly, so a result can go straight back into an
// inverse transform (or, after a pointwise product, into one). INV =
// INV_NEGTW selects scheme OP6 instead (inverse twiddles derived by
// negation, input in normal order). DIT = 1 builds both pipelines with
// decimation-in-time (Cooley-Tukey) butterflies and per-chunk twiddles
// instead, with the same data flow and ordering: schemes OP7 (with
// INV_REORDER) and OP5 (with INV_NEGTW).
//
// Interfaces: valid-qualified streams without back-pressure. A polynomial is
// presented on consecutive cycles (n for SDF, n/2 pairs for MDC, pair i =
// (a_i, a_(i+n/2))); the output is in normal order with the same lane
// arrangement. Latency from first input to first output is
// 2n + log2(n)*LS cycles for SDF (8336 at the defaults) and
// n + log2(n)*LS for MDC (4240), where LS = bf_lat + 1 = 12 cycles. Of this,
// n-1+log2(n)*LS (SDF) or n/2-1+log2(n)*LS (MDC) is the NTT pipeline, the
// rest is the output buffer filling up one polynomial before reading.
module proteus_top
  import ntt_pkg::*;
#(
  parameter int unsigned   QW   = QW_DEF,
  parameter logic [QW-1:0] Q    = Q_DEF[QW-1:0],
  parameter logic [QW-1:0] GEN  = GEN_DEF[QW-1:0],
  parameter int unsigned   WORD = WORD_DEF,
  parameter int unsigned   LOGN = LOGN_DEF,
  parameter inv_method_e   INV  = INV_REORDER,
  parameter bit            DIT  = 1'b0
) (
  input  logic          clk,
  input  logic          rst_n,
  // SDF path
  input  logic          sdf_in_valid,
  input  tag_t          sdf_in_tag,
  input  logic [QW-1:0] sdf_in_data,
  output logic          sdf_out_valid,
  output tag_t          sdf_out_tag,
  output logic [QW-1:0] sdf_out_data,
  // MDC path
  input  logic          mdc_in_valid,
  input  tag_t          mdc_in_tag,
  input  logic [QW-1:0] mdc_in_a,
  input  logic [QW-1:0] mdc_in_b,
  output logic          mdc_out_valid,
  output tag_t          mdc_out_tag,
  output logic [QW-1:0] mdc_out_a,
  output logic [QW-1:0] mdc_out_b
);
  // ------------------------------------------------------------ SDF
  logic          sdf_v;
  tag_t          sdf_t;
  logic [QW-1:0] sdf_d;
  logic [QW-1:0] sdf_bin  [1];
  logic [QW-1:0] sdf_bout [1];

  sdf_ntt #(.QW(QW), .Q(Q), .GEN(GEN), .WORD(WORD), .LOGN(LOGN), .INV(INV), .DIT(DIT)) u_sdf (
    .clk, .rst_n,
    .in_valid (sdf_in_valid), .in_tag (sdf_in_tag), .in_data (sdf_in_data),
    .out_valid(sdf_v),        .out_tag(sdf_t),      .out_data(sdf_d)
  );

  assign sdf_bin[0] = sdf_d;

  bitrev_buffer #(.QW(QW), .LOGN(LOGN), .LANES(1)) u_sdf_br (
    .clk, .rst_n,
    .in_valid (sdf_v),         .in_tag (sdf_t),       .in_data (sdf_bin),
    .out_valid(sdf_out_valid), .out_tag(sdf_out_tag), .out_data(sdf_bout)
  );

  assign sdf_out_data = sdf_bout[0];

  // ------------------------------------------------------------ MDC
  logic          mdc_v;
  tag_t          mdc_t;
  logic [QW-1:0] mdc_bin  [2];
  logic [QW-1:0] mdc_bout [2];

  mdc_ntt #(.QW(QW), .Q(Q), .GEN(GEN), .WORD(WORD), .LOGN(LOGN), .INV(INV), .DIT(DIT)) u_mdc (
    .clk, .rst_n,
    .in_valid (mdc_in_valid), .in_tag (mdc_in_tag), .in_a (mdc_in_a), .in_b (mdc_in_b),
    .out_valid(mdc_v),        .out_tag(mdc_t),      .out_a(mdc_bin[0]), .out_b(mdc_bin[1])
  );

  bitrev_buffer #(.QW(QW), .LOGN(LOGN), .LANES(2)) u_mdc_br (
    .clk, .rst_n,
    .in_valid (mdc_v),         .in_tag (mdc_t),       .in_data (mdc_bin),
    .out_valid(mdc_out_valid), .out_tag(mdc_out_tag), .out_data(mdc_bout)
  );

  assign mdc_out_a = mdc_bout[0];
  assign mdc_out_b = mdc_bout[1];
endmodule
