// bitrev_buffer: double-buffered output memory that returns an NTT result
// from bit-reversed to normal order, optionally applying the index
// reordering a_i -> a_(-i mod n) at the same time.
//
// The pipelines deliver output position p = coefficient br(p). Writing
// position p to address br(p), and reading the addresses in sequence,
// undoes the bit reversal at the cost of one memory write per coefficient.
// With tag.ro set the address is (n - br(p)) mod n instead, which yields the
// sequence A_0, A_(n-1), ..., A_1. That sequence is the input an inverse
// transform needs when it reuses the forward twiddle factors (option OP8):
// INTT(A) = n^-1 * NTT(A_0, A_(n-1), ..., A_1). Both reorderings follow the
// reference design; the double buffer (two banks of n words, one written
// while the other is read) is this design's own choice.
//
// LANES = 1 (SDF): one coefficient in and out per cycle.
// LANES = 2 (MDC): input pairs (pos 2c, pos 2c+1); output in cycle k the
// pair (A_k, A_(k+n/2)), the same pairing the MDC pipeline expects at its
// input. The two addresses of an input pair always fall in opposite halves
// of the address space, so each half is a separate one-write/one-read RAM.
//
// Timing: reading of a polynomial starts the cycle after its last word is
// written and takes n/LANES cycles; data appears one cycle after the read
// (registered RAM output). Each bank must be read out before the writer
// returns to it, which holds for any input rate of at most one polynomial
// per n/LANES cycles.
//
// Lint note: rst_n also disables the assertions (disable iff), which lint
// reports as a reset used both asynchronously and synchronously; it does not
// affect the logic.
module bitrev_buffer
  import ntt_pkg::*;
#(
  parameter int unsigned QW    = QW_DEF,
  parameter int unsigned LOGN  = LOGN_DEF,
  parameter int unsigned LANES = 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  tag_t          in_tag,
  input  logic [QW-1:0] in_data [LANES],
  output logic          out_valid,
  output tag_t          out_tag,
  output logic [QW-1:0] out_data [LANES]
);
  localparam int unsigned N  = 1 << LOGN;
  localparam int unsigned CW = LOGN - (LANES - 1);   // per-lane address bits
  localparam int unsigned M  = N / LANES;            // words per lane and bank

  function automatic logic [LOGN-1:0] br(logic [LOGN-1:0] x);
    for (int i = 0; i < LOGN; i++) br[i] = x[LOGN-1-i];
  endfunction

  // ------------------------------------------------------------ addresses
  logic [CW-1:0]   wcnt;
  logic [LOGN-1:0] wa [LANES];

  for (genvar l = 0; l < LANES; l++) begin : g_addr
    logic [LOGN-1:0] pos, b;
    assign pos   = (LANES == 1) ? LOGN'(wcnt) : LOGN'({wcnt, l[0]});
    assign b     = br(pos);
    assign wa[l] = in_tag.ro ? LOGN'(-b) : b;
  end

  // ------------------------------------------------------------ bank control
  logic          wbank, rbank, reading;
  logic [1:0]    full;
  tag_t          btag [2];
  logic [CW-1:0] rcnt;
  logic          last_w, last_r;

  assign last_w = in_valid && (wcnt == CW'(M - 1));
  assign last_r = reading && (rcnt == CW'(M - 1));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wcnt    <= '0;
      wbank   <= 1'b0;
      rbank   <= 1'b0;
      reading <= 1'b0;
      rcnt    <= '0;
      full    <= '0;
    end else begin
      if (in_valid) wcnt <= wcnt + 1'b1;
      if (last_w) wbank <= ~wbank;
      if (reading) rcnt <= rcnt + 1'b1;
      if (last_r) begin
        // hand over directly to the other bank if it is (becoming) full
        reading <= full[~rbank] || (last_w && wbank != rbank);
        rbank   <= ~rbank;
      end else if (!reading && (full[rbank] || (last_w && wbank == rbank))) begin
        reading <= 1'b1;
      end
      for (int i = 0; i < 2; i++) begin
        if (last_w && wbank == i[0])       full[i] <= 1'b1;
        else if (last_r && rbank == i[0])  full[i] <= 1'b0;
      end
    end

  always_ff @(posedge clk)
    if (last_w) btag[wbank] <= in_tag;

  // ------------------------------------------------------------ storage
  if (LANES == 1) begin : g_one
    logic [QW-1:0] mem [2*M];
    always_ff @(posedge clk) begin
      if (in_valid) mem[{wbank, wa[0]}] <= in_data[0];
      out_data[0] <= mem[{rbank, rcnt}];
    end
  end else begin : g_two
    // half h of the address space holds A_k (h = 0) or A_(k+n/2) (h = 1)
    for (genvar h = 0; h < 2; h++) begin : g_half
      logic [QW-1:0] mem [2*M];
      logic          sel;     // which lane writes this half
      logic [CW-1:0] a;
      assign sel = (wa[0][LOGN-1] != h[0]);
      assign a   = sel ? wa[1][CW-1:0] : wa[0][CW-1:0];
      always_ff @(posedge clk) begin
        if (in_valid) mem[{wbank, a}] <= sel ? in_data[1] : in_data[0];
        out_data[h] <= mem[{rbank, rcnt}];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= reading;
  always_ff @(posedge clk) out_tag <= btag[rbank];

  // a bank is never overwritten before it has been read out
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  (in_valid && wcnt == '0) |-> !full[wbank]);
endmodule
