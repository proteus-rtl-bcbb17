// mdc_stage: one stage of the radix-2 multi-path delay commutator (MDC)
// decimation-in-frequency NTT pipeline.
//
// Stage s takes one coefficient pair per cycle. Within a chunk of
// NS = n / 2^s coefficients the pair of cycle c (0 <= c < H = NS/2) is
// (x_c, x_(c+H)); it goes straight into a Gentleman-Sande butterfly with
// twiddle w^(c * 2^s). The outputs are then regrouped for the next stage,
// which needs pairs at offset D = H/2, by the delay commutator of the
// reference design: the v lane passes a D-deep FIFO, a switch swaps the two
// lanes during the second half of every chunk (c >= D), and a second D-deep
// FIFO delays the upper lane. The next stage then receives
// (u_c, u_(c+D)) for c < D followed by (v_c, v_(c+D)). The last stage
// (H = 1) has no commutator. Each stage therefore holds two n/2^(s+2)-word
// FIFOs.
//
// DIT = 1 builds the decimation-in-time variant: Cooley-Tukey butterflies
// and one twiddle per chunk, w^((n/2^(s+1)) * br_s(c)), selected by a chunk
// counter; the commutator is the same.
//
// Timing: LS = bf_lat + 1 cycles through the butterfly (including the
// twiddle read) plus D cycles in the commutator. Each chunk must arrive on H
// consecutive cycles; gaps between chunks are allowed.
//
// Lint note: rst_n also disables the assertions (disable iff), which lint
// reports as a reset used both asynchronously and synchronously; it does not
// affect the logic.
// In the last stage the half flag b_hi travels with the butterfly but is
// not needed (no commutator), so lint reports it as unused.
module mdc_stage
  import ntt_pkg::*;
#(
  parameter int unsigned   QW    = QW_DEF,
  parameter logic [QW-1:0] Q     = Q_DEF[QW-1:0],
  parameter logic [QW-1:0] GEN   = GEN_DEF[QW-1:0],
  parameter int unsigned   WORD  = WORD_DEF,
  parameter int unsigned   LOGN  = LOGN_DEF,
  parameter int unsigned   STAGE = 0,
  parameter inv_method_e   INV   = INV_REORDER,
  parameter bit            DIT   = 1'b0
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
  localparam int unsigned H   = (1 << LOGN) >> (STAGE + 1);
  localparam int unsigned D   = H / 2;
  localparam int unsigned AW  = (H > 1) ? $clog2(H) : 1;
  localparam int unsigned TGW = $bits(tag_t);

  // ------------------------------------------------------------ control
  logic [AW-1:0] cnt;
  if (H > 1) begin : g_cnt
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n)        cnt <= '0;
      else if (in_valid) cnt <= cnt + 1'b1;   // wraps at H
  end else begin : g_nocnt
    assign cnt = '0;                          // one pair per chunk
  end

  // chunk number within the polynomial (DIT twiddle selection)
  localparam int unsigned CC  = (STAGE > 0) ? STAGE : 1;
  localparam int unsigned TAW = DIT ? CC : AW;
  logic [CC-1:0]  chunk;
  logic [TAW-1:0] taddr;

  if (DIT && STAGE > 0) begin : g_chunk
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n)                                       chunk <= '0;
      else if (in_valid && (H == 1 || cnt == AW'(H - 1))) chunk <= chunk + 1'b1;
  end else begin : g_nochunk
    assign chunk = '0;
  end

  always_comb begin
    taddr = '0;
    if (DIT) begin
      for (int i = 0; i < int'(STAGE); i++) taddr[i] = chunk[int'(STAGE) - 1 - i];
    end else begin
      taddr = TAW'(cnt);
    end
  end

  // ------------------------------------------------------------ twiddle
  logic [QW-1:0] tw;
  twiddle_rom #(.QW(QW), .Q(Q), .GEN(GEN), .WORD(WORD), .LOGN(LOGN), .STAGE(STAGE),
                .INV(INV), .DIT(DIT)) u_rom (
    .clk, .addr(taddr), .inv(in_tag.inv), .tw
  );

  // ------------------------------------------------------------ butterfly
  logic          r_valid, r_hi;
  tag_t          r_tag;
  logic [QW-1:0] r_a, r_b;

  always_ff @(posedge clk) begin
    r_a   <= in_a;
    r_b   <= in_b;
    r_tag <= in_tag;
    r_hi  <= (H > 1) ? cnt[AW-1] : 1'b0;   // second half of the chunk
  end
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) r_valid <= 1'b0;
    else        r_valid <= in_valid;

  logic          b_valid, b_hi;
  tag_t          b_tag;
  logic [QW-1:0] b_u, b_v;

  butterfly #(.QW(QW), .Q(Q), .WORD(WORD), .BF_TYPE(DIT ? BF_CT : BF_GS),
              .SIDEW(1 + TGW)) u_bf (
    .clk, .rst_n,
    .in_valid (r_valid),
    .ct       (1'b0),
    .halve    (r_tag.inv),
    .a        (r_a),
    .b        (r_b),
    .w        (tw),
    .in_side  ({r_hi, r_tag}),
    .out_valid(b_valid),
    .u        (b_u),
    .v        (b_v),
    .out_side ({b_hi, b_tag})
  );

  // ------------------------------------------------------------ commutator
  if (H == 1) begin : g_last
    assign out_valid = b_valid;
    assign out_tag   = b_tag;
    assign out_a     = b_u;
    assign out_b     = b_v;
  end else begin : g_comm
    logic          l_valid;        // lower lane after the first FIFO
    tag_t          l_tag;
    logic [QW-1:0] l_data;

    delay_fifo #(.W(TGW + QW), .DEPTH(D)) u_fifo_lo (
      .clk, .rst_n,
      .in_valid (b_valid),
      .in_data  ({b_tag, b_v}),
      .out_valid(l_valid),
      .out_data ({l_tag, l_data})
    );

    // switch
    logic          swap;
    logic          x_valid, y_valid;
    tag_t          x_tag, y_tag;
    logic [QW-1:0] x_data, y_data;

    assign swap    = b_valid & b_hi;
    assign x_valid = swap ? l_valid : b_valid;
    assign x_tag   = swap ? l_tag   : b_tag;
    assign x_data  = swap ? l_data  : b_u;
    assign y_valid = swap ? b_valid : l_valid;
    assign y_tag   = swap ? b_tag   : l_tag;
    assign y_data  = swap ? b_u     : l_data;

    logic          xd_valid;
    tag_t          xd_tag;
    logic [QW-1:0] xd_data;

    delay_fifo #(.W(TGW + QW), .DEPTH(D)) u_fifo_hi (
      .clk, .rst_n,
      .in_valid (x_valid),
      .in_data  ({x_tag, x_data}),
      .out_valid(xd_valid),
      .out_data ({xd_tag, xd_data})
    );

    assign out_valid = xd_valid;
    assign out_tag   = xd_tag;
    assign out_a     = xd_data;
    assign out_b     = y_data;

    // both lanes of an output pair are always present together
    a_lanes_aligned: assert property (@(posedge clk) disable iff (!rst_n)
                                      xd_valid == y_valid);
    logic unused_y;
    assign unused_y = ^y_tag;
  end
endmodule
