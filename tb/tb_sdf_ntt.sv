// tb_sdf_ntt: 64-point SDF pipelines (stages with both collision-free data
// flows) against a direct DFT.
//   dut_r (OP8 scheme): two forward transforms back to back, a gap, then the
//         inverse of the first result fed in reordered order
//         (A_0, A_63, ..., A_1) with tag.inv; must return the first input.
//   dut_n (OP6 scheme): forward, then inverse of the result in normal order
//         with negated twiddles.
//   dut_t (OP7 scheme, decimation in time): forward, a gap, then the
//         reordered inverse as for dut_r.
//   dut_5 (OP5 scheme, decimation in time): as dut_n.
// Outputs are expected in bit-reversed order. Also checks the first-output
// latency n - 1 + log2(n)*LS and that outputs come on consecutive cycles.
module tb_sdf_ntt;
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
  logic [63:0]   id [ND];
  logic          ov [ND];
  ntt_pkg::tag_t ot [ND];
  logic [63:0]   od [ND];

  sdf_ntt #(.LOGN(LOGN), .INV(ntt_pkg::INV_REORDER)) dut_r (
    .clk, .rst_n, .in_valid(iv[0]), .in_tag(it[0]), .in_data(id[0]),
    .out_valid(ov[0]), .out_tag(ot[0]), .out_data(od[0]));
  sdf_ntt #(.LOGN(LOGN), .INV(ntt_pkg::INV_NEGTW)) dut_n (
    .clk, .rst_n, .in_valid(iv[1]), .in_tag(it[1]), .in_data(id[1]),
    .out_valid(ov[1]), .out_tag(ot[1]), .out_data(od[1]));
  sdf_ntt #(.LOGN(LOGN), .INV(ntt_pkg::INV_REORDER), .DIT(1'b1)) dut_t (
    .clk, .rst_n, .in_valid(iv[2]), .in_tag(it[2]), .in_data(id[2]),
    .out_valid(ov[2]), .out_tag(ot[2]), .out_data(od[2]));
  sdf_ntt #(.LOGN(LOGN), .INV(ntt_pkg::INV_NEGTW), .DIT(1'b1)) dut_5 (
    .clk, .rst_n, .in_valid(iv[3]), .in_tag(it[3]), .in_data(id[3]),
    .out_valid(ov[3]), .out_tag(ot[3]), .out_data(od[3]));

  u128 expq [ND][$];
  logic expinv [ND][$];
  int cyc = 0, t_in = -1, t_out = -1, nout [ND] = '{default: 0}, last_out [ND] = '{default: -1};
  int runs = 0;

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
        // within one polynomial outputs are consecutive
        if (nout[d] % N != 0) begin
          checks++;
          if (last_out[d] != cyc - 1) failures++;
        end
        last_out[d] = cyc;
        nout[d]++;
        checks++;
        if (expq[d].size() == 0 || u128'(od[d]) != expq[d][0] || ot[d].inv != expinv[d][0]) begin
          failures++;
          $display("FAIL dut%0d out %0d got %h exp %h", d, nout[d], od[d], expq[d][0]);
        end
        void'(expq[d].pop_front());
        void'(expinv[d].pop_front());
      end
  end

  task automatic send(int d, u128 x[], logic inv);
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      if (d == 0 && t_in < 0) t_in = cyc;
      iv[d] = 1;
      it[d] = '{inv: inv, ro: 1'b0};
      id[d] = 64'(x[i]);
    end
    @(negedge clk);
    iv[d] = 0;
  endtask

  // expected output stream: transform result in bit-reversed order
  task automatic expect_br(int d, u128 r[], logic inv);
    for (int p = 0; p < N; p++) begin
      expq[d].push_back(r[rbr(p, LOGN)]);
      expinv[d].push_back(inv);
    end
  endtask

  initial begin
    u128 q, w, ninv;
    u128 a0[], a1[], A0[], A1[], ro[];
    q = u128'(Q);
    w = rpow(7, (q - 1) / N, q);
    a0 = new[N]; a1 = new[N]; ro = new[N];
    for (int i = 0; i < N; i++) begin
      a0[i] = u128'({$urandom, $urandom}) % q;
      a1[i] = u128'({$urandom, $urandom}) % q;
    end
    a0[0] = q - 1;
    dft(a0, w, q, A0);
    dft(a1, w, q, A1);
    for (int i = 0; i < N; i++) ro[i] = A0[(N - i) % N];
    for (int d = 0; d < ND; d++) begin iv[d] = 0; it[d] = '0; id[d] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    expect_br(0, A0, 0); expect_br(0, A1, 0); expect_br(0, a0, 1);
    expect_br(1, A0, 0); expect_br(1, a0, 1);
    expect_br(2, A0, 0); expect_br(2, a0, 1);
    expect_br(3, A0, 0); expect_br(3, a0, 1);
    fork
      begin
        send(0, a0, 0);
        iv[0] = 1; // keep streaming: second polynomial back to back
        for (int i = 0; i < N; i++) begin
          if (i > 0) @(negedge clk);
          iv[0] = 1; it[0] = '0; id[0] = 64'(a1[i]);
        end
        @(negedge clk) iv[0] = 0;
        repeat (37) @(negedge clk);
        send(0, ro, 1);
      end
      begin
        send(1, a0, 0);
        repeat (5) @(negedge clk);
        send(1, A0, 1);
      end
      begin
        send(2, a0, 0);
        repeat (11) @(negedge clk);
        send(2, ro, 1);
      end
      begin
        send(3, a0, 0);
        send(3, A0, 1);
      end
    join
    repeat (4 * N + LOGN * LS) @(posedge clk);
    checks++;
    if (t_out - t_in != N - 1 + LOGN * LS) begin
      failures++;
      $display("FAIL latency %0d expected %0d", t_out - t_in, N - 1 + LOGN * LS);
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
