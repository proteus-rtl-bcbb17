// ntt_pkg: shared constants, types and elaboration-time helpers of the
// pipelined NTT generator.
//
// The default configuration is a 4096-point transform over the 64-bit
// prime q = 2^64 - 2^32 + 1 (q = qH * 2^16 + 1, so 16-bit Montgomery words
// fit), on DSP slices of 24 x 17 bits. The polynomial size, modulus size,
// the 24/17-bit DSP operand widths and the 16-bit reduction word for a
// 64-bit modulus follow the reference evaluation; the particular prime and
// its generator 7 are this design's own choice, since any prime of the form
// qH * 2^w + 1 can be used.
//
// The functions at the end (mulmod, powmod, bitrev) are only evaluated at
// elaboration or in initial blocks to fill constant tables (twiddle ROMs);
// they never become datapath logic.
package ntt_pkg;

  // ---------------------------------------------------------------- defaults
  localparam int unsigned LOGN_DEF  = 12;                       // n = 4096
  localparam int unsigned QW_DEF    = 64;                       // log2(q)
  localparam logic [63:0] Q_DEF     = 64'hFFFF_FFFF_0000_0001;  // 2^64-2^32+1
  localparam logic [63:0] GEN_DEF   = 64'd7;                    // generator of Z_q*
  localparam int unsigned WORD_DEF  = 16;                       // Montgomery word w
  localparam int unsigned DSPA_DEF  = 24;                       // DSP operand A
  localparam int unsigned DSPB_DEF  = 17;                       // DSP operand B

  // widest modulus supported by the constant-generation helpers
  localparam int unsigned MAXW = 256;

  // --------------------------------------------------------------- types
  // butterfly flavour: Cooley-Tukey, Gentleman-Sande or both (run-time select)
  typedef enum logic [1:0] {BF_CT = 2'd0, BF_GS = 2'd1, BF_UNIFIED = 2'd2} bf_type_e;

  // how the inverse transform obtains its twiddles
  //   INV_REORDER : same forward twiddles, input reordered (option OP8)
  //   INV_NEGTW   : w^-i = -w^(n/2-i) from the forward ROM (option OP6)
  typedef enum logic {INV_REORDER = 1'b0, INV_NEGTW = 1'b1} inv_method_e;

  // per-coefficient side band that travels with the data through the pipe
  typedef struct packed {
    logic inv;   // coefficient belongs to an inverse transform (halve, twiddle)
    logic ro;    // write the result in reordered (negated-index) order
  } tag_t;

  // --------------------------------------------------------------- latencies
  // number of Montgomery word iterations
  function automatic int unsigned mont_iters(int unsigned qw, int unsigned w);
    return (qw + w - 1) / w;
  endfunction

  // int_mult: input register, partial products, accumulation
  localparam int unsigned INT_MULT_LAT = 3;

  // mont_red: one register per word iteration plus the final subtraction
  function automatic int unsigned mont_lat(int unsigned qw, int unsigned w);
    return mont_iters(qw, w) + 1;
  endfunction

  function automatic int unsigned modmul_lat(int unsigned qw, int unsigned w);
    return INT_MULT_LAT + mont_lat(qw, w);
  endfunction

  // butterfly: pre add/sub, modular multiply, post add/sub, halving
  function automatic int unsigned bf_lat(int unsigned qw, int unsigned w);
    return modmul_lat(qw, w) + 3;
  endfunction

  // ---------------------------------------------------- constant helpers
  function automatic logic [MAXW-1:0] mulmod(logic [MAXW-1:0] a, logic [MAXW-1:0] b,
                                             logic [MAXW-1:0] q);
    logic [2*MAXW-1:0] p;
    p = {{MAXW{1'b0}}, a} * {{MAXW{1'b0}}, b};
    p = p % {{MAXW{1'b0}}, q};
    return p[MAXW-1:0];
  endfunction

  function automatic logic [MAXW-1:0] powmod(logic [MAXW-1:0] base, logic [MAXW-1:0] e,
                                             logic [MAXW-1:0] q);
    logic [MAXW-1:0] r, b;
    r = 1;
    b = base % q;
    for (int i = 0; i < MAXW; i++) begin
      if (e[i]) r = mulmod(r, b, q);
      b = mulmod(b, b, q);
    end
    return r;
  endfunction

  // 2^bits mod q, the Montgomery constant R for R = 2^(w*L)
  function automatic logic [MAXW-1:0] pow2mod(int unsigned bits, logic [MAXW-1:0] q);
    logic [MAXW-1:0] r;
    r = 1 % q;
    for (int unsigned i = 0; i < bits; i++) begin
      r = r << 1;
      if (r >= q) r = r - q;
    end
    return r;
  endfunction

  function automatic int unsigned bitrev(int unsigned x, int unsigned bits);
    int unsigned r;
    r = 0;
    for (int unsigned i = 0; i < bits; i++) r = (r << 1) | ((x >> i) & 1);
    return r;
  endfunction

endpackage
