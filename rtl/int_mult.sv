// int_mult: fully pipelined, parametric unsigned integer multiplier built by
// operand tiling.
//
// Operand a is cut into ceil(AW/CA) chunks of CA bits and operand b into
// ceil(BW/CB) chunks of CB bits, CA x CB being the multiplier size of one
// DSP slice (24 x 17 on Virtex-7, 26 x 17 on UltraScale+). Every chunk pair
// is multiplied in parallel, one small product per DSP, and the shifted
// partial products are then summed. At most i*j DSPs are used (i, j the
// chunk counts); the synthesis tool is free to map small products to LUTs.
// The tiling and the parallel chunk products follow the reference design;
// the reference accumulates with a carry-save tree, here the accumulation is
// written as one registered sum and the tool builds the adder tree.
//
// Timing: latency INT_MULT_LAT = 3 cycles (input register, partial product
// register, sum register), one new product per cycle. in_valid simply
// travels alongside the data.
module int_mult
  import ntt_pkg::*;
#(
  parameter int unsigned AW = QW_DEF,    // width of a
  parameter int unsigned BW = QW_DEF,    // width of b
  parameter int unsigned CA = DSPA_DEF,  // DSP chunk width for a
  parameter int unsigned CB = DSPB_DEF   // DSP chunk width for b
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [AW-1:0]    a,
  input  logic [BW-1:0]    b,
  output logic             out_valid,
  output logic [AW+BW-1:0] p
);
  localparam int unsigned NA = (AW + CA - 1) / CA;
  localparam int unsigned NB = (BW + CB - 1) / CB;

  logic [NA*CA-1:0] a_q;
  logic [NB*CB-1:0] b_q;
  logic [CA+CB-1:0] pp [NA][NB];
  logic [2:0]       v_q;

  // stage 1: input register (zero-extended to whole chunks)
  always_ff @(posedge clk) begin
    a_q <= (NA*CA)'(a);
    b_q <= (NB*CB)'(b);
  end

  // stage 2: one CA x CB product per DSP
  for (genvar i = 0; i < NA; i++) begin : g_a
    for (genvar j = 0; j < NB; j++) begin : g_b
      always_ff @(posedge clk)
        pp[i][j] <= (CA+CB)'(a_q[i*CA +: CA]) * (CA+CB)'(b_q[j*CB +: CB]);
    end
  end

  // stage 3: accumulate the shifted partial products
  always_ff @(posedge clk) begin
    logic [NA*CA+NB*CB-1:0] acc;
    acc = '0;
    for (int i = 0; i < NA; i++)
      for (int j = 0; j < NB; j++)
        acc = acc + ((NA*CA+NB*CB)'(pp[i][j]) << (i*CA + j*CB));
    p <= acc[AW+BW-1:0];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) v_q <= '0;
    else        v_q <= {v_q[1:0], in_valid};

  assign out_valid = v_q[2];
endmodule
