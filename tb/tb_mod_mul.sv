// tb_mod_mul: random Montgomery products a * (b*R) * R^-1 = a*b mod q for the
// default 64-bit prime, with b converted to Montgomery form by the testbench;
// checks the 8-cycle latency.
module tb_mod_mul;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam logic [63:0] Q = 64'hFFFF_FFFF_0000_0001;
  logic        v_in, v_out;
  logic [63:0] a, b, p;
  mod_mul dut (.clk, .rst_n, .in_valid(v_in), .a, .b, .out_valid(v_out), .p);

  u128 expq [$];
  int cyc = 0, t_in = -1, t_out = -1;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && v_out) begin
      if (t_out < 0) t_out = cyc;
      checks++;
      if (u128'(p) != expq[0]) begin
        failures++;
        $display("FAIL got %h exp %h", p, expq[0]);
      end
      void'(expq.pop_front());
    end
  end

  initial begin
    u128 r;
    r = rpow(2, 64, u128'(Q));
    v_in = 0; a = 0; b = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 300; i++) begin
      u128 x, y;
      @(negedge clk);
      v_in = ($urandom % 3) != 0;
      x = u128'({$urandom, $urandom}) % u128'(Q);
      y = u128'({$urandom, $urandom}) % u128'(Q);
      if (i == 0) begin x = u128'(Q) - 1; y = x; end
      a = 64'(x);
      b = 64'(rmul(y, r, u128'(Q)));
      if (v_in) begin
        if (t_in < 0) t_in = cyc;
        expq.push_back(rmul(x, y, u128'(Q)));
      end
    end
    @(negedge clk) v_in = 0;
    repeat (15) @(posedge clk);
    checks++;
    if (t_out - t_in != 8) begin
      failures++;
      $display("FAIL latency %0d", t_out - t_in);
    end
    checks++;
    if (expq.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
