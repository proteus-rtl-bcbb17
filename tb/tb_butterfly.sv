// tb_butterfly: random operands through a unified butterfly (mode chosen per
// operation), a fixed CT and a fixed GS butterfly, with and without halving.
// Expected values are computed with plain modular arithmetic (the twiddle is
// converted to Montgomery form by the testbench); the side band and the
// 11-cycle latency are checked too.
module tb_butterfly;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam logic [63:0] Q = 64'hFFFF_FFFF_0000_0001;
  logic        v_in, ct, halve;
  logic [63:0] a, b, w;
  logic [7:0]  side;

  logic        vu, vc, vg;
  logic [63:0] uu, vvu, uc, vvc, ug, vvg;
  logic [7:0]  su, sc, sg;

  butterfly #(.BF_TYPE(ntt_pkg::BF_UNIFIED), .SIDEW(8)) dut_u (
    .clk, .rst_n, .in_valid(v_in), .ct, .halve, .a, .b, .w, .in_side(side),
    .out_valid(vu), .u(uu), .v(vvu), .out_side(su));
  butterfly #(.BF_TYPE(ntt_pkg::BF_CT), .SIDEW(8)) dut_c (
    .clk, .rst_n, .in_valid(v_in), .ct(1'b0), .halve, .a, .b, .w, .in_side(side),
    .out_valid(vc), .u(uc), .v(vvc), .out_side(sc));
  butterfly #(.BF_TYPE(ntt_pkg::BF_GS), .SIDEW(8)) dut_g (
    .clk, .rst_n, .in_valid(v_in), .ct(1'b1), .halve, .a, .b, .w, .in_side(side),
    .out_valid(vg), .u(ug), .v(vvg), .out_side(sg));

  typedef struct {u128 ctu, ctv, gsu, gsv; logic ct; logic [7:0] side;} exp_t;
  exp_t expq [$];
  int cyc = 0, t_in = -1, t_out = -1;
  int n_ct = 0, n_gs = 0, n_half = 0;

  initial begin
    #300000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void chk(string what, logic [63:0] got, u128 exp);
    checks++;
    if (u128'(got) != exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && vu) begin
      exp_t e;
      e = expq.pop_front();
      if (t_out < 0) t_out = cyc;
      chk("uni u", uu,  e.ct ? e.ctu : e.gsu);
      chk("uni v", vvu, e.ct ? e.ctv : e.gsv);
      chk("ct u", uc, e.ctu);
      chk("ct v", vvc, e.ctv);
      chk("gs u", ug, e.gsu);
      chk("gs v", vvg, e.gsv);
      checks++;
      if (su != e.side || sc != e.side || sg != e.side || !vc || !vg) failures++;
    end
  end

  initial begin
    u128 r, q, h;
    q = u128'(Q);
    r = rpow(2, 64, q);
    h = rinv(2, q);
    v_in = 0; a = 0; b = 0; w = 0; ct = 0; halve = 0; side = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 400; i++) begin
      u128 x, y, z, bw;
      exp_t e;
      @(negedge clk);
      v_in  = ($urandom % 4) != 0;
      ct    = $urandom % 2;
      halve = $urandom % 2;
      side  = 8'($urandom);
      x = u128'({$urandom, $urandom}) % q;
      y = u128'({$urandom, $urandom}) % q;
      z = u128'({$urandom, $urandom}) % q;
      if (i < 4) begin x = q - 1; y = (i[0]) ? q - 1 : 0; end
      a = 64'(x); b = 64'(y); w = 64'(rmul(z, r, q));
      bw    = rmul(y, z, q);
      e.ctu = (x + bw) % q;
      e.ctv = (x + q - bw) % q;
      e.gsu = (x + y) % q;
      e.gsv = rmul((x + q - y) % q, z, q);
      if (halve) begin
        e.ctu = rmul(e.ctu, h, q); e.ctv = rmul(e.ctv, h, q);
        e.gsu = rmul(e.gsu, h, q); e.gsv = rmul(e.gsv, h, q);
      end
      e.ct = ct;
      e.side = side;
      if (v_in) begin
        if (t_in < 0) t_in = cyc;
        expq.push_back(e);
        if (ct) n_ct++; else n_gs++;
        if (halve) n_half++;
      end
    end
    @(negedge clk) v_in = 0;
    repeat (20) @(posedge clk);
    checks++;
    if (t_out - t_in != 11) begin
      failures++;
      $display("FAIL latency %0d", t_out - t_in);
    end
    checks++;
    if (expq.size() != 0 || n_ct == 0 || n_gs == 0 || n_half == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
