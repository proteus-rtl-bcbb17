// tb_bitrev_buffer: 16-word buffers with one lane (SDF) and two lanes (MDC).
// Three polynomials are written back to back, the second with tag.ro set,
// then a fourth after a gap. Input position p carries a random word X_p;
// output k must be the word written to address k, where position p goes to
// address br(p) (or -br(p) mod n with ro). Two-lane output cycle k holds
// addresses k and k + n/2. The output tag and the one-polynomial latency
// are checked as well.
module tb_bitrev_buffer;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int LOGN = 4;
  localparam int N = 1 << LOGN;

  logic          iv1, iv2;
  ntt_pkg::tag_t it;
  logic [63:0]   id1 [1], id2 [2];
  logic          ov1, ov2;
  ntt_pkg::tag_t ot1, ot2;
  logic [63:0]   od1 [1], od2 [2];

  bitrev_buffer #(.LOGN(LOGN), .LANES(1)) dut1 (
    .clk, .rst_n, .in_valid(iv1), .in_tag(it), .in_data(id1),
    .out_valid(ov1), .out_tag(ot1), .out_data(od1));
  bitrev_buffer #(.LOGN(LOGN), .LANES(2)) dut2 (
    .clk, .rst_n, .in_valid(iv2), .in_tag(it), .in_data(id2),
    .out_valid(ov2), .out_tag(ot2), .out_data(od2));

  logic [63:0] e1 [$], e2 [$];
  logic        r1 [$], r2 [$];
  int cyc = 0, t_last_in = -1, t_first_out = -1, n_ro = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && ov1) begin
      if (t_first_out < 0) t_first_out = cyc;
      checks++;
      if (e1.size() == 0 || od1[0] !== e1[0] || ot1.ro !== r1[0]) begin
        failures++;
        $display("FAIL lane1 got %h exp %h", od1[0], e1[0]);
      end
      void'(e1.pop_front());
      void'(r1.pop_front());
    end
    if (rst_n && ov2) begin
      checks++;
      if (e2.size() < 2 || od2[0] !== e2[0] || od2[1] !== e2[1] || ot2.ro !== r2[0]) begin
        failures++;
        $display("FAIL lane2 got %h %h", od2[0], od2[1]);
      end
      void'(e2.pop_front());
      void'(e2.pop_front());
      void'(r2.pop_front());
    end
  end

  initial begin
    iv1 = 0; iv2 = 0; it = '0; id1[0] = 0; id2[0] = 0; id2[1] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    for (int p = 0; p < 4; p++) begin
      logic [63:0] x [N], byaddr [N];
      logic ro;
      ro = (p == 1) || (p == 3);
      if (ro) n_ro++;
      for (int i = 0; i < N; i++) x[i] = {$urandom, $urandom};
      for (int i = 0; i < N; i++) begin
        int a;
        a = rbr(i, LOGN);
        if (ro) a = (N - a) % N;
        byaddr[a] = x[i];
      end
      for (int k = 0; k < N; k++) begin e1.push_back(byaddr[k]); r1.push_back(ro); end
      for (int k = 0; k < N / 2; k++) begin
        e2.push_back(byaddr[k]); e2.push_back(byaddr[k + N/2]); r2.push_back(ro);
      end
      if (p == 3) begin
        @(negedge clk) begin iv1 = 0; iv2 = 0; end
        repeat (11) @(negedge clk);
      end
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        iv1 = 1; it = '{inv: 1'b0, ro: ro}; id1[0] = x[i];
        iv2 = (i < N / 2);
        if (i < N / 2) begin id2[0] = x[2*i]; id2[1] = x[2*i + 1]; end
        if (p == 0 && i == N - 1) t_last_in = cyc;
      end
    end
    @(negedge clk) begin iv1 = 0; iv2 = 0; end
    repeat (3 * N) @(posedge clk);
    checks++;
    if (t_first_out - t_last_in != 2) begin
      failures++;
      $display("FAIL latency %0d", t_first_out - t_last_in);
    end
    checks++;
    if (e1.size() != 0 || e2.size() != 0 || n_ro == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
