// sdf_ntt: n-point radix-2 SDF NTT pipeline, log2(n) cascaded sdf_stage
// instances.
//
// Coefficients enter in normal order, one per cycle, and leave in
// bit-reversed order, one per cycle (output position p holds coefficient
// br(p) of the transform). A polynomial must be streamed on n consecutive
// cycles; further polynomials may follow back to back or after any gap, so
// one transform finishes every n cycles in steady state.
//
// Each coefficient carries a tag: tag.inv selects the inverse transform
// (every butterfly result halved, which folds in the final n^-1 scaling;
// with INV = INV_NEGTW the inverse twiddles w^-i = -w^(n/2-i) are used,
// with INV = INV_REORDER the forward twiddles are kept and the caller feeds
// the input in the reordered sequence a_0, a_(n-1), ..., a_1). tag.ro is
// carried through untouched for the output buffer.
//
// Timing: the first output appears sum_s (n/2^(s+1) + LS) = n - 1 +
// log2(n)*LS cycles after the first input (LS = bf_lat + 1), so a whole
// transform takes 2n - 1 + log2(n)*LS cycles from first input to last
// output, the 2n + log2(n)*l of the reference analysis. Storage is
// log2(q) * (n - 1) bits of stage FIFOs/buffers.
module sdf_ntt
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
  input  logic [QW-1:0] in_data,
  output logic          out_valid,
  output tag_t          out_tag,
  output logic [QW-1:0] out_data
);
  logic          s_valid [LOGN+1];
  tag_t          s_tag   [LOGN+1];
  logic [QW-1:0] s_data  [LOGN+1];

  assign s_valid[0] = in_valid;
  assign s_tag[0]   = in_tag;
  assign s_data[0]  = in_data;

  for (genvar s = 0; s < LOGN; s++) begin : g_stage
    sdf_stage #(.QW(QW), .Q(Q), .GEN(GEN), .WORD(WORD), .LOGN(LOGN), .STAGE(s),
                .INV(INV), .DIT(DIT)) u_stage (
      .clk, .rst_n,
      .in_valid (s_valid[s]),   .in_tag (s_tag[s]),   .in_data (s_data[s]),
      .out_valid(s_valid[s+1]), .out_tag(s_tag[s+1]), .out_data(s_data[s+1])
    );
  end

  assign out_valid = s_valid[LOGN];
  assign out_tag   = s_tag[LOGN];
  assign out_data  = s_data[LOGN];
endmodule
