// tb_mont_red: checks c = d * R^-1 mod q for the default 64-bit prime with
// 16-bit words and for a 32-bit prime (2^32 - 2^20 + 1) with 12-bit words,
// using products of random residues and the extreme case (q-1)^2. The
// reference tests c < q and c * R == d (mod q). Also checks the L+1 latency.
module tb_mont_red;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam logic [63:0] Q64 = 64'hFFFF_FFFF_0000_0001;
  localparam logic [31:0] Q32 = 32'hFFF0_0001;

  logic         v_in;
  logic [127:0] d64;
  logic [63:0]  d32;
  logic         v64, v32;
  logic [63:0]  c64;
  logic [31:0]  c32;

  mont_red #(.QW(64), .Q(Q64), .WORD(16), .S(24)) dut64 (
    .clk, .rst_n, .in_valid(v_in), .d(d64), .out_valid(v64), .c(c64));
  mont_red #(.QW(32), .Q(Q32), .WORD(12), .S(24)) dut32 (
    .clk, .rst_n, .in_valid(v_in), .d(d32), .out_valid(v32), .c(c32));

  u128 e64 [$], e32 [$];
  int cyc = 0, t_in = -1, t_out = -1;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && v64) begin
      u128 got;
      if (t_out < 0) t_out = cyc;
      got = u128'(c64);
      checks++;
      if (got >= u128'(Q64) || rmul(got, rpow(2, 64, u128'(Q64)), u128'(Q64)) != e64[0]) begin
        failures++;
        $display("FAIL q64: c=%h", c64);
      end
      void'(e64.pop_front());
    end
    if (rst_n && v32) begin
      u128 got;
      got = u128'(c32);
      checks++;
      if (got >= u128'(Q32) || rmul(got, rpow(2, 36, u128'(Q32)), u128'(Q32)) != e32[0]) begin
        failures++;
        $display("FAIL q32: c=%h", c32);
      end
      void'(e32.pop_front());
    end
  end

  initial begin
    v_in = 0; d64 = 0; d32 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 400; i++) begin
      u128 a, b;
      @(negedge clk);
      v_in = 1;
      a = u128'({$urandom, $urandom}) % u128'(Q64);
      b = u128'({$urandom, $urandom}) % u128'(Q64);
      if (i == 0) begin a = u128'(Q64) - 1; b = a; end
      if (i == 1) begin a = 0; b = 5; end
      d64 = a * b;
      e64.push_back(d64 % u128'(Q64));
      a = u128'($urandom) % u128'(Q32);
      b = u128'($urandom) % u128'(Q32);
      if (i == 0) begin a = u128'(Q32) - 1; b = a; end
      d32 = 64'(a * b);
      e32.push_back(u128'(d32) % u128'(Q32));
      if (t_in < 0) t_in = cyc;
    end
    @(negedge clk) v_in = 0;
    repeat (12) @(posedge clk);
    checks++;
    if (t_out - t_in != 5) begin
      failures++;
      $display("FAIL latency %0d", t_out - t_in);
    end
    checks++;
    if (e64.size() != 0 || e32.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
