// sdf_stage: one stage of the radix-2 single-path delay feedback (SDF)
// decimation-in-frequency NTT pipeline.
//
// Stage s works on chunks of NS = n / 2^s consecutive coefficients and pairs
// element j with element j + H (H = NS/2) in a Gentleman-Sande butterfly
// with twiddle w^((j mod H) * 2^s). One coefficient enters and one leaves per
// cycle. Each chunk must arrive on NS consecutive cycles; gaps between chunks
// are allowed.
//
// Because the butterfly is pipelined (latency LS = bf_lat + 1 cycles,
// including the twiddle-ROM read), the naive SDF data flow would write the
// delayed second butterfly output and the next chunk's first half into the
// same FIFO in the same cycle. Two collision-free data flows are generated,
// selected by the stage size at design time, as in the reference design:
//
//  * LS <= H (big stages): every coefficient goes through the butterfly. In
//    the first half of a chunk the butterfly only passes its input to the v
//    output (b = 0, twiddle = 1), so the first half arrives at the FIFO LS
//    cycles late; the FIFO is therefore only H - LS deep. In the second half
//    the FIFO output meets the new input in the butterfly, u leaves the stage
//    and v re-enters the FIFO, followed by an LS-deep register buffer that
//    holds it until the output port is free.
//  * LS > H (small stages): the first half goes into an H-deep FIFO, u leaves
//    the stage and v waits in a separate H-deep buffer.
//
// In both cases the first output of a chunk leaves H + LS cycles after its
// first input, followed by NS consecutive outputs (u values, then v values).
// For an inverse transform (tag.inv) every butterfly result is halved, and
// with INV = INV_NEGTW the inverse twiddles are derived from the forward ROM.
//
// DIT = 1 builds the decimation-in-time variant with the same data flow:
// Cooley-Tukey butterflies (u = a + w*b, v = a - w*b) and one twiddle per
// chunk, w^((n/2^(s+1)) * br_s(c)) for chunk c of the polynomial, counted by
// a chunk counter. The bypass of the first half works unchanged (b = 0).
//
// Lint note: rst_n also disables the assertions (disable iff), which lint
// reports as a reset used both asynchronously and synchronously; it does not
// affect the logic.
module sdf_stage
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
  input  logic [QW-1:0] in_data,
  output logic          out_valid,
  output tag_t          out_tag,
  output logic [QW-1:0] out_data
);
  localparam int unsigned NS = (1 << LOGN) >> STAGE;
  localparam int unsigned H  = NS / 2;
  localparam int unsigned CW = $clog2(NS);
  localparam int unsigned AW = (H > 1) ? $clog2(H) : 1;
  localparam int unsigned LS = bf_lat(QW, WORD) + 1;
  localparam bit CASE_A      = (LS <= H);
  localparam int unsigned TGW = $bits(tag_t);
  localparam int unsigned ML  = mont_iters(QW, WORD);
  localparam logic [QW-1:0] MONT_ONE = QW'(pow2mod(WORD * ML, MAXW'(Q)));

  // ------------------------------------------------------------ control
  logic [CW-1:0] cnt;
  logic          phase;       // 0: first half of the chunk, 1: second half
  logic [AW-1:0] k;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)        cnt <= '0;
    else if (in_valid) cnt <= cnt + 1'b1;   // wraps at NS

  assign phase = cnt[CW-1];
  assign k     = (H > 1) ? AW'(cnt) : '0;

  // chunk number within the polynomial (DIT twiddle selection)
  localparam int unsigned CC  = (STAGE > 0) ? STAGE : 1;
  localparam int unsigned TAW = DIT ? CC : AW;
  logic [CC-1:0]  chunk;
  logic [TAW-1:0] taddr;

  if (DIT && STAGE > 0) begin : g_chunk
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n)                                 chunk <= '0;
      else if (in_valid && cnt == CW'(NS - 1)) chunk <= chunk + 1'b1;
  end else begin : g_nochunk
    assign chunk = '0;
  end

  always_comb begin
    taddr = '0;
    if (DIT) begin
      for (int i = 0; i < int'(STAGE); i++) taddr[i] = chunk[int'(STAGE) - 1 - i];
    end else begin
      taddr = TAW'(k);
    end
  end

  // ------------------------------------------------------------ twiddle
  logic [QW-1:0] tw;
  twiddle_rom #(.QW(QW), .Q(Q), .GEN(GEN), .WORD(WORD), .LOGN(LOGN), .STAGE(STAGE),
                .INV(INV), .DIT(DIT)) u_rom (
    .clk, .addr(taddr), .inv(in_tag.inv), .tw
  );

  // ------------------------------------------------------------ butterfly
  logic          r_valid, r_bfly;
  tag_t          r_tag;
  logic [QW-1:0] r_a, r_b;

  logic          b_valid, b_bfly;
  tag_t          b_tag;
  logic [QW-1:0] b_u, b_v;

  butterfly #(.QW(QW), .Q(Q), .WORD(WORD), .BF_TYPE(DIT ? BF_CT : BF_GS),
              .SIDEW(1 + TGW)) u_bf (
    .clk, .rst_n,
    .in_valid (r_valid),
    .ct       (1'b0),
    .halve    (r_bfly & r_tag.inv),
    .a        (r_a),
    .b        (r_b),
    .w        (r_bfly ? tw : MONT_ONE),
    .in_side  ({r_bfly, r_tag}),
    .out_valid(b_valid),
    .u        (b_u),
    .v        (b_v),
    .out_side ({b_bfly, b_tag})
  );

  // v buffer in front of the output port
  logic          vb_in_valid, vb_valid;
  tag_t          vb_in_tag, vb_tag;
  logic [QW-1:0] vb_in_data, vb_data;

  if (CASE_A) begin : g_case_a
    // FIFO: butterfly v output (bypassed first halves and v results)
    logic          f_valid, f_isv;
    tag_t          f_tag;
    logic [QW-1:0] f_data;

    delay_fifo #(.W(1 + TGW + QW), .DEPTH(H - LS)) u_fifo (
      .clk, .rst_n,
      .in_valid (b_valid),
      .in_data  ({b_bfly, b_tag, b_v}),
      .out_valid(f_valid),
      .out_data ({f_isv, f_tag, f_data})
    );

    always_ff @(posedge clk) begin
      r_a    <= phase ? f_data : in_data;
      r_b    <= phase ? in_data : '0;
      r_bfly <= phase;
      r_tag  <= in_tag;
    end
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) r_valid <= 1'b0;
      else        r_valid <= in_valid;

    assign vb_in_valid = f_valid & f_isv;
    assign vb_in_tag   = f_tag;
    assign vb_in_data  = f_data;

    delay_fifo #(.W(TGW + QW), .DEPTH(LS)) u_vbuf (
      .clk, .rst_n,
      .in_valid (vb_in_valid),
      .in_data  ({vb_in_tag, vb_in_data}),
      .out_valid(vb_valid),
      .out_data ({vb_tag, vb_data})
    );
  end else begin : g_case_b
    // FIFO: first half of each chunk only
    logic          f_valid;
    tag_t          f_tag;
    logic [QW-1:0] f_data;

    delay_fifo #(.W(TGW + QW), .DEPTH(H)) u_fifo (
      .clk, .rst_n,
      .in_valid (in_valid & ~phase),
      .in_data  ({in_tag, in_data}),
      .out_valid(f_valid),
      .out_data ({f_tag, f_data})
    );

    always_ff @(posedge clk) begin
      r_a    <= f_data;
      r_b    <= in_data;
      r_bfly <= 1'b1;
      r_tag  <= in_tag;
    end
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) r_valid <= 1'b0;
      else        r_valid <= in_valid & phase;

    // the partner of every second-half input is waiting at the FIFO output
    a_partner: assert property (@(posedge clk) disable iff (!rst_n)
                                (in_valid && phase) |-> (f_valid && f_tag == in_tag));

    assign vb_in_valid = b_valid;
    assign vb_in_tag   = b_tag;
    assign vb_in_data  = b_v;

    delay_fifo #(.W(TGW + QW), .DEPTH(H)) u_vbuf (
      .clk, .rst_n,
      .in_valid (vb_in_valid),
      .in_data  ({vb_in_tag, vb_in_data}),
      .out_valid(vb_valid),
      .out_data ({vb_tag, vb_data})
    );
  end

  // ------------------------------------------------------------ output port
  logic u_valid;
  assign u_valid = b_valid & b_bfly;

  assign out_valid = u_valid | vb_valid;
  assign out_tag   = u_valid ? b_tag : vb_tag;
  assign out_data  = u_valid ? b_u   : vb_data;

  // the two sources of the output port never collide
  a_no_collision: assert property (@(posedge clk) disable iff (!rst_n)
                                   !(u_valid && vb_valid));
endmodule
