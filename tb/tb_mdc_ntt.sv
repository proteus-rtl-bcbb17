// tb_mdc_ntt: 64-point MDC pipelines against a direct DFT, with the same
// scenarios as the SDF test: OP8 scheme (two forward transforms back to back,
// a gap, inverse of a reordered result) and OP6 scheme (inverse with negated
// twiddles), and the decimation-in-time variants of both (OP7: forward and
// reordered inverse back to back; OP5: as OP6). Input pair i is (a_i, a_(i+n/2)); output pair c must be
// (A_br(2c), A_br(2c+1)). Checks the first-output latency
// n/2 - 1 + log2(n)*LS.
module tb_mdc_ntt;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int LOGN = 6;
  localparam int N = 1 << LOGN;
  localparam int LS = ntt_pkg::bf_lat(64, 16) + 1;
  localparam logic [63:0] Q = 64'hFFFF_FFFF_0000_0001;

  localparam int ND = 4;
  logic          iv [ND];
  ntt_pkg::tag_t it [ND];
  logic [63:0]   ia [ND], ib [ND];
  logic          ov [ND];
  ntt_pkg::tag_t ot [ND];
  logic [63:0]   oa [ND], ob [ND];

  mdc_ntt #(.LOGN(LOGN), .INV(ntt_pkg::INV_REORDER)) dut_r (
    .clk, .rst_n, .in_valid(iv[0]), .in_tag(it[0]), .in_a(ia[0]), .in_b(ib[0]),
    .out_valid(ov[0]), .out_tag(ot[0]), .out_a(oa[0]), .out_b(ob[0]));
  mdc_ntt #(.LOGN(LOGN), .INV(ntt_pkg::INV_NEGTW)) dut_n (
    .clk, .rst_n, .in_valid(iv[1]), .in_tag(it[1]), .in_a(ia[1]), .in_b(ib[1]),
    .out_valid(ov[1]), .out_tag(ot[1]), .out_a(oa[1]), .out_b(ob[1]));
  mdc_ntt #(.LOGN(LOGN), .INV(ntt_pkg::INV_REORDER), .DIT(1'b1)) dut_t (
    .clk, .rst_n, .in_valid(iv[2]), .in_tag(it[2]), .in_a(ia[2]), .in_b(ib[2]),
    .out_valid(ov[2]), .out_tag(ot[2]), .out_a(oa[2]), .out_b(ob[2]));
  mdc_ntt #(.LOGN(LOGN), .INV(ntt_pkg::INV_NEGTW), .DIT(1'b1)) dut_5 (
    .clk, .rst_n, .in_valid(iv[3]), .in_tag(it[3]), .in_a(ia[3]), .in_b(ib[3]),
    .out_valid(ov[3]), .out_tag(ot[3]), .out_a(oa[3]), .out_b(ob[3]));

  u128 expq [ND][$];
  logic expinv [ND][$];
  int cyc = 0, t_in = -1, t_out = -1;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int d = 0; d < ND; d++)
      if (rst_n && ov[d]) begin
        if (d == 0 && t_out < 0) t_out = cyc;
        checks++;
        if (expq[d].size() < 2 || u128'(oa[d]) != expq[d][0] || u128'(ob[d]) != expq[d][1]
            || ot[d].inv != expinv[d][0]) begin
          failures++;
          $display("FAIL dut%0d got %h %h", d, oa[d], ob[d]);
        end
        void'(expq[d].pop_front());
        void'(expq[d].pop_front());
        void'(expinv[d].pop_front());
      end
  end

  task automatic send(int d, u128 x[], logic inv, bit hold);
    for (int i = 0; i < N / 2; i++) begin
      @(negedge clk);
      if (d == 0 && t_in < 0) t_in = cyc;
      iv[d] = 1;
      it[d] = '{inv: inv, ro: 1'b0};
      ia[d] = 64'(x[i]);
      ib[d] = 64'(x[i + N / 2]);
    end
    if (!hold) begin
      @(negedge clk);
      iv[d] = 0;
    end
  endtask

  task automatic expect_br(int d, u128 r[], logic inv);
    for (int c = 0; c < N / 2; c++) begin
      expq[d].push_back(r[rbr(2 * c, LOGN)]);
      expq[d].push_back(r[rbr(2 * c + 1, LOGN)]);
      expinv[d].push_back(inv);
    end
  endtask

  initial begin
    u128 q, w;
    u128 a0[], a1[], A0[], A1[], ro[];
    q = u128'(Q);
    w = rpow(7, (q - 1) / N, q);
    a0 = new[N]; a1 = new[N]; ro = new[N];
    for (int i = 0; i < N; i++) begin
      a0[i] = u128'({$urandom, $urandom}) % q;
      a1[i] = u128'({$urandom, $urandom}) % q;
    end
    a0[N-1] = q - 1;
    dft(a0, w, q, A0);
    dft(a1, w, q, A1);
    for (int i = 0; i < N; i++) ro[i] = A0[(N - i) % N];
    for (int d = 0; d < ND; d++) begin iv[d] = 0; it[d] = '0; ia[d] = 0; ib[d] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    expect_br(0, A0, 0); expect_br(0, A1, 0); expect_br(0, a0, 1);
    expect_br(1, A0, 0); expect_br(1, a0, 1);
    expect_br(2, A0, 0); expect_br(2, a0, 1);
    expect_br(3, A0, 0); expect_br(3, a0, 1);
    fork
      begin
        send(0, a0, 0, 1);
        send(0, a1, 0, 0);
        repeat (23) @(negedge clk);
        send(0, ro, 1, 0);
      end
      begin
        send(1, a0, 0, 0);
        repeat (3) @(negedge clk);
        send(1, A0, 1, 0);
      end
      begin
        send(2, a0, 0, 1);
        send(2, ro, 1, 0);
      end
      begin
        send(3, a0, 0, 0);
        repeat (2) @(negedge clk);
        send(3, A0, 1, 0);
      end
    join
    repeat (3 * N + LOGN * LS) @(posedge clk);
    checks++;
    if (t_out - t_in != N / 2 - 1 + LOGN * LS) begin
      failures++;
      $display("FAIL latency %0d expected %0d", t_out - t_in, N / 2 - 1 + LOGN * LS);
    end
    checks++;
    for (int d = 0; d < ND; d++) begin
      checks++;
      if (expq[d].size() != 0) begin
        failures++;
        $display("FAIL dut%0d missing outputs %0d", d, expq[d].size());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
