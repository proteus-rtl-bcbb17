// tb_int_mult: random and corner-case 64 x 64 products (24 x 17 tiles) and a
// 256 x 256 product (26 x 17 tiles) against the plain wide product; checks the
// 3-cycle latency with a valid pulse.
module tb_int_mult;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         v_in;
  logic [63:0]  a, b;
  logic         v_out;
  logic [127:0] p;
  int_mult #(.AW(64), .BW(64), .CA(24), .CB(17)) dut (
    .clk, .rst_n, .in_valid(v_in), .a, .b, .out_valid(v_out), .p);

  logic [255:0] a2, b2;
  logic [511:0] p2;
  logic         v2;
  int_mult #(.AW(256), .BW(256), .CA(26), .CB(17)) dut2 (
    .clk, .rst_n, .in_valid(v_in), .a(a2), .b(b2), .out_valid(v2), .p(p2));

  logic [127:0] exp_q [$];
  logic [511:0] exp2_q [$];
  int cyc = 0, first_in = -1, first_out = -1;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && v_out) begin
      if (first_out < 0) first_out = cyc;
      checks++;
      if (p !== exp_q[0]) begin
        failures++;
        $display("FAIL 64b: got %h exp %h", p, exp_q[0]);
      end
      void'(exp_q.pop_front());
      checks++;
      if (p2 !== exp2_q[0]) begin
        failures++;
        $display("FAIL 256b");
      end
      void'(exp2_q.pop_front());
    end
  end

  initial begin
    v_in = 0; a = 0; b = 0; a2 = 0; b2 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      v_in = ($urandom % 4) != 0;
      case (i)
        0: begin a = '1; b = '1; end
        1: begin a = 0; b = '1; end
        default: begin a = {$urandom, $urandom}; b = {$urandom, $urandom}; end
      endcase
      for (int k = 0; k < 8; k++) begin
        a2[k*32 +: 32] = $urandom;
        b2[k*32 +: 32] = $urandom;
      end
      if (i == 0) begin a2 = '1; b2 = '1; end
      if (v_in) begin
        if (first_in < 0) first_in = cyc;
        exp_q.push_back(128'(a) * 128'(b));
        exp2_q.push_back(512'(a2) * 512'(b2));
      end
    end
    @(negedge clk) v_in = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (first_out - first_in != 3) begin
      failures++;
      $display("FAIL latency %0d", first_out - first_in);
    end
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
