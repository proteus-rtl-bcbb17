// mod_mul: pipelined Montgomery modular multiplier, p = a * b * R^-1 mod q.
//
// The tiled integer multiplier (int_mult) feeds the word-level Montgomery
// reducer (mont_red). With b held in Montgomery form (b*R mod q), as the
// twiddle ROMs store it, the result is the plain product a*b mod q.
// Both operands must be below q.
//
// Timing: latency modmul_lat(QW, WORD) = INT_MULT_LAT + L + 1 cycles
// (8 for the 64-bit default), fully pipelined.
module mod_mul
  import ntt_pkg::*;
#(
  parameter int unsigned QW   = QW_DEF,
  parameter logic [QW-1:0] Q  = Q_DEF[QW-1:0],
  parameter int unsigned WORD = WORD_DEF,
  parameter int unsigned CA   = DSPA_DEF,
  parameter int unsigned CB   = DSPB_DEF
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [QW-1:0] a,
  input  logic [QW-1:0] b,
  output logic          out_valid,
  output logic [QW-1:0] p
);
  logic            prod_valid;
  logic [2*QW-1:0] prod;

  int_mult #(.AW(QW), .BW(QW), .CA(CA), .CB(CB)) u_mult (
    .clk, .rst_n, .in_valid, .a, .b, .out_valid(prod_valid), .p(prod)
  );

  mont_red #(.QW(QW), .Q(Q), .WORD(WORD), .S(CA)) u_red (
    .clk, .rst_n, .in_valid(prod_valid), .d(prod), .out_valid, .c(p)
  );
endmodule
