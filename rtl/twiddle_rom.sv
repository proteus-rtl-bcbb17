// twiddle_rom: read-only store of the twiddle factors of one pipeline stage,
// with on-the-fly derivation of the inverse-transform twiddles.
//
// Stage s of an n-point radix-2 DIF transform needs the H = n / 2^(s+1) powers
// w_s^k = w^(k * 2^s), k = 0 .. H-1, of the n-th root of unity w. They are
// stored in Montgomery form, w^(k*2^s) * R mod q, so that the Montgomery
// multiplier returns plain products. The root is w = GEN^((q-1)/n). The table
// is computed when the design is elaborated/loaded (initial block), the
// hardware equivalent of a constant ROM file.
//
// With INV = INV_NEGTW, an inverse transform (inv = 1) does not need a second
// table: w^-i = -w^(n/2 - i), so for k > 0 the ROM reads entry H-k and the
// result is negated (q - x) by one subtractor; k = 0 gives 1. This halves the
// twiddle storage of the forward+inverse pair, as in the reference design.
// With INV = INV_REORDER the inverse uses the forward twiddles unchanged
// (the reordering is done elsewhere) and inv is ignored.
//
// With DIT = 1 the stage belongs to a decimation-in-time (Cooley-Tukey)
// pipeline with the same normal-in, bit-reversed-out data flow. There every
// chunk c of stage s uses one twiddle, w^((n/2^(s+1)) * br_s(c)). The ROM
// then holds the E = 2^s powers w^(k * n/2^(s+1)), k = 0 .. E-1, and the
// stage supplies k = br_s(c). The negated inverse twiddles work the same
// way with E in place of H.
//
// Timing: registered read, the twiddle appears one cycle after addr.
module twiddle_rom
  import ntt_pkg::*;
#(
  parameter int unsigned   QW    = QW_DEF,
  parameter logic [QW-1:0] Q     = Q_DEF[QW-1:0],
  parameter logic [QW-1:0] GEN   = GEN_DEF[QW-1:0],
  parameter int unsigned   WORD  = WORD_DEF,
  parameter int unsigned   LOGN  = LOGN_DEF,
  parameter int unsigned   STAGE = 0,
  parameter inv_method_e   INV   = INV_REORDER,
  parameter bit            DIT   = 1'b0,
  localparam int unsigned  H     = DIT ? (1 << STAGE) : ((1 << LOGN) >> (STAGE + 1)),
  localparam int unsigned  AW    = (H > 1) ? $clog2(H) : 1
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          inv,
  output logic [QW-1:0] tw
);
  localparam int unsigned L = mont_iters(QW, WORD);

  logic [QW-1:0] rom [H];

  initial begin : fill
    logic [MAXW-1:0] q, w, step, cur;
    q    = MAXW'(Q);
    w    = powmod(MAXW'(GEN), (q - 1) >> LOGN, q);
    step = powmod(w, DIT ? (MAXW'(1) << (LOGN - STAGE - 1)) : (MAXW'(1) << STAGE), q);
    cur  = pow2mod(WORD * L, q);               // R mod q = 1 in Montgomery form
    for (int unsigned k = 0; k < H; k++) begin
      rom[k] = QW'(cur);
      cur    = mulmod(cur, step, q);
    end
  end

  logic          neg;
  logic [AW-1:0] ra;
  logic [QW-1:0] rd;

  assign neg = (INV == INV_NEGTW) && inv && (addr != '0);
  assign ra  = neg ? AW'(H - int'(addr)) : addr;

  logic neg_q;

  always_ff @(posedge clk) begin
    rd    <= rom[ra];
    neg_q <= neg;
  end

  // negation for the inverse twiddle (rd is never 0, so q - rd < q)
  assign tw = neg_q ? Q - rd : rd;
endmodule
