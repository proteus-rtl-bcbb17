// mdc_ntt: n-point radix-2 MDC NTT pipeline, log2(n) cascaded mdc_stage
// instances.
//
// Two coefficients enter per cycle: in cycle i of a polynomial the pair
// (a_i, a_(i+n/2)), i = 0 .. n/2-1, i.e. the two halves of the polynomial
// side by side. Two coefficients leave per cycle in bit-reversed order: in
// output cycle c the pair (A_br(2c), A_br(2c+1)) = (A_br(2c), A_(br(2c)+n/2))
// of the transform A. A polynomial takes n/2 consecutive cycles, half the
// time of the SDF pipeline, at twice the I/O bandwidth.
//
// The tag bits (inverse / reorder) behave as in sdf_ntt.
//
// Timing: first output pair (n/4 + n/8 + ... + 1/2 rounded down, i.e.
// n/2 - 1) + log2(n)*LS cycles after the first input pair
// (LS = bf_lat + 1), so one transform takes about n + log2(n)*LS cycles
// from first input to last output, as in the reference analysis. Storage is
// log2(q) * (n - 2) bits of commutator FIFOs.
module mdc_ntt
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
  input  logic          in_valid,
  input  tag_t          in_tag,
  input  logic [QW-1:0] in_a,
  input  logic [QW-1:0] in_b,
  output logic          out_valid,
  output tag_t          out_tag,
  output logic [QW-1:0] out_a,
  output logic [QW-1:0] out_b
);
  logic          s_valid [LOGN+1];
  tag_t          s_tag   [LOGN+1];
  logic [QW-1:0] s_a     [LOGN+1];
  logic [QW-1:0] s_b     [LOGN+1];

  assign s_valid[0] = in_valid;
  assign s_tag[0]   = in_tag;
  assign s_a[0]     = in_a;
  assign s_b[0]     = in_b;

  for (genvar s = 0; s < LOGN; s++) begin : g_stage
    mdc_stage #(.QW(QW), .Q(Q), .GEN(GEN), .WORD(WORD), .LOGN(LOGN), .STAGE(s),
                .INV(INV), .DIT(DIT)) u_stage (
      .clk, .rst_n,
      .in_valid (s_valid[s]),   .in_tag (s_tag[s]),   .in_a (s_a[s]),   .in_b (s_b[s]),
      .out_valid(s_valid[s+1]), .out_tag(s_tag[s+1]), .out_a(s_a[s+1]), .out_b(s_b[s+1])
    );
  end

  assign out_valid = s_valid[LOGN];
  assign out_tag   = s_tag[LOGN];
  assign out_a     = s_a[LOGN];
  assign out_b     = s_b[LOGN];
endmodule
