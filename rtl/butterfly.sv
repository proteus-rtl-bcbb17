// butterfly: parametric Cooley-Tukey / Gentleman-Sande / unified NTT
// butterfly with optional halving of both results.
//
//   CT : u = a + b*w,      v = a - b*w        (mod q)
//   GS : u = a + b,        v = (a - b) * w    (mod q)
//   halve = 1 : u and v are additionally multiplied by 2^-1 mod q
//
// The unified flavour uses one modular multiplier and one adder/subtractor
// pair for both flavours and steers the data with multiplexers: in GS mode
// the add/subtract sits in front of the multiplier and the post stage passes
// through; in CT mode the pre stage passes a and b through and the post stage
// adds/subtracts the product. BF_TYPE fixes the mode at design time
// (BF_CT, BF_GS) or leaves it to the ct input (BF_UNIFIED). The CT/GS
// equations, the shared-multiplier unified idea and the halving formula
// x/2 = (x >> 1) + x[0]*(q+1)/2 (which replaces the final n^-1 scaling of an
// inverse transform) follow the reference design; the exact placement of the
// multiplexers and registers is this design's own.
//
// w must be in Montgomery form (w*R mod q); a, b, w must be below q.
// A side band of SIDEW bits travels with each operation for the caller.
//
// Timing: latency bf_lat(QW, WORD) = 1 (pre) + modmul_lat + 1 (post)
// + 1 (halve) cycles, 11 for the 64-bit default; one butterfly per cycle.
module butterfly
  import ntt_pkg::*;
#(
  parameter int unsigned   QW      = QW_DEF,
  parameter logic [QW-1:0] Q       = Q_DEF[QW-1:0],
  parameter int unsigned   WORD    = WORD_DEF,
  parameter bf_type_e      BF_TYPE = BF_UNIFIED,
  parameter int unsigned   SIDEW   = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             ct,        // used only by BF_UNIFIED: 1 = CT, 0 = GS
  input  logic             halve,
  input  logic [QW-1:0]    a,
  input  logic [QW-1:0]    b,
  input  logic [QW-1:0]    w,
  input  logic [SIDEW-1:0] in_side,
  output logic             out_valid,
  output logic [QW-1:0]    u,
  output logic [QW-1:0]    v,
  output logic [SIDEW-1:0] out_side
);
  localparam int unsigned LM = modmul_lat(QW, WORD);
  localparam logic [QW-1:0] HALF = QW'((QW+1)'(Q) + 1 >> 1);  // (q+1)/2

  function automatic logic [QW-1:0] add_q(logic [QW-1:0] x, logic [QW-1:0] y);
    logic [QW:0] s;
    s = (QW+1)'(x) + (QW+1)'(y);
    return (s >= (QW+1)'(Q)) ? QW'(s - (QW+1)'(Q)) : QW'(s);
  endfunction

  function automatic logic [QW-1:0] sub_q(logic [QW-1:0] x, logic [QW-1:0] y);
    return (x >= y) ? x - y : QW'((QW+1)'(x) + (QW+1)'(Q) - (QW+1)'(y));
  endfunction

  function automatic logic [QW-1:0] half_q(logic [QW-1:0] x);
    return (x >> 1) + (x[0] ? HALF : '0);
  endfunction

  logic mode_ct;
  assign mode_ct = (BF_TYPE == BF_CT) || (BF_TYPE == BF_UNIFIED && ct);

  // ------------------------------------------------------------ pre stage
  logic [QW-1:0]    p_x, p_y, p_w;
  logic             p_ct, p_halve, p_valid;
  logic [SIDEW-1:0] p_side;

  always_ff @(posedge clk) begin
    p_x     <= mode_ct ? a : add_q(a, b);
    p_y     <= mode_ct ? b : sub_q(a, b);
    p_w     <= w;
    p_ct    <= mode_ct;
    p_halve <= halve;
    p_side  <= in_side;
  end
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) p_valid <= 1'b0;
    else        p_valid <= in_valid;

  // ------------------------------------------------------------ multiplier
  logic [QW-1:0] m_p;
  logic          m_valid;

  mod_mul #(.QW(QW), .Q(Q), .WORD(WORD)) u_mul (
    .clk, .rst_n, .in_valid(p_valid), .a(p_y), .b(p_w), .out_valid(m_valid), .p(m_p)
  );

  // x, mode and side band wait for the product
  logic [QW-1:0]    d_x     [LM];
  logic             d_ct    [LM];
  logic             d_halve [LM];
  logic [SIDEW-1:0] d_side  [LM];

  always_ff @(posedge clk) begin
    d_x[0]     <= p_x;
    d_ct[0]    <= p_ct;
    d_halve[0] <= p_halve;
    d_side[0]  <= p_side;
    for (int i = 1; i < LM; i++) begin
      d_x[i]     <= d_x[i-1];
      d_ct[i]    <= d_ct[i-1];
      d_halve[i] <= d_halve[i-1];
      d_side[i]  <= d_side[i-1];
    end
  end

  // ------------------------------------------------------------ post stage
  logic [QW-1:0]    q_u, q_v;
  logic             q_halve, q_valid;
  logic [SIDEW-1:0] q_side;

  always_ff @(posedge clk) begin
    q_u     <= d_ct[LM-1] ? add_q(d_x[LM-1], m_p) : d_x[LM-1];
    q_v     <= d_ct[LM-1] ? sub_q(d_x[LM-1], m_p) : m_p;
    q_halve <= d_halve[LM-1];
    q_side  <= d_side[LM-1];
  end
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) q_valid <= 1'b0;
    else        q_valid <= m_valid;

  // ------------------------------------------------------------ halving
  always_ff @(posedge clk) begin
    u        <= q_halve ? half_q(q_u) : q_u;
    v        <= q_halve ? half_q(q_v) : q_v;
    out_side <= q_side;
  end
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= q_valid;
endmodule
