// tb_workload_run: one workload for tb_workloads. It instantiates proteus_top
// at one (n, q) design point (DIF or DIT butterflies) and runs, on both the SDF and the MDC path:
//   1. a forward NTT of a random polynomial a, plain output,
//   2. back to back, a forward NTT of a with reordered output,
//   3. after a gap, result 2 fed back as an inverse transform.
// Result 1 is checked at NPTS random positions k against a direct
// evaluation sum_j a_j w^(jk) (O(n) each, so large n stays cheap); result 3
// must give back a exactly. The latency of the first polynomial is checked
// against 2n + log2(n)*LS (SDF) and n + log2(n)*LS (MDC).
//
// Ports: clk, start (pulse), done (held high at the end), checks and
// failures (valid once done is high).
module tb_workload_run
  import tb_ref_pkg::*;
#(
  parameter int unsigned   QW   = 64,
  parameter logic [QW-1:0] Q    = ntt_pkg::Q_DEF[QW-1:0],
  parameter logic [QW-1:0] GEN  = 7,
  parameter int unsigned   LOGN = 10,
  parameter int unsigned   NPTS = 24,
  parameter bit            DIT  = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int N  = 1 << LOGN;
  localparam int LS = ntt_pkg::bf_lat(QW, ntt_pkg::WORD_DEF) + 1;

  logic          s_iv = 0, m_iv = 0;
  ntt_pkg::tag_t s_it = '0, m_it = '0;
  logic [QW-1:0] s_id = '0, m_ia = '0, m_ib = '0;
  logic          s_ov, m_ov;
  ntt_pkg::tag_t s_ot, m_ot;
  logic [QW-1:0] s_od, m_oa, m_ob;

  proteus_top #(.QW(QW), .Q(Q), .GEN(GEN), .LOGN(LOGN), .DIT(DIT)) dut (
    .clk, .rst_n,
    .sdf_in_valid(s_iv), .sdf_in_tag(s_it), .sdf_in_data(s_id),
    .sdf_out_valid(s_ov), .sdf_out_tag(s_ot), .sdf_out_data(s_od),
    .mdc_in_valid(m_iv), .mdc_in_tag(m_it), .mdc_in_a(m_ia), .mdc_in_b(m_ib),
    .mdc_out_valid(m_ov), .mdc_out_tag(m_ot), .mdc_out_a(m_oa), .mdc_out_b(m_ob));

  // ------------------------------------------------------------ outputs
  u128 s_res [3][], m_res [3][];
  int  s_cnt = 0, m_cnt = 0, cyc = 0;
  int  s_t_in = -1, s_t_out = -1, m_t_in = -1, m_t_out = -1;

  initial for (int p = 0; p < 3; p++) begin s_res[p] = new[N]; m_res[p] = new[N]; end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && s_ov && s_cnt < 3 * N) begin
      if (s_t_out < 0) s_t_out = cyc;
      s_res[s_cnt / N][s_cnt % N] = u128'(s_od);
      s_cnt++;
    end
    if (rst_n && m_ov && m_cnt < 3 * N / 2) begin
      if (m_t_out < 0) m_t_out = cyc;
      m_res[m_cnt / (N / 2)][m_cnt % (N / 2)]         = u128'(m_oa);
      m_res[m_cnt / (N / 2)][m_cnt % (N / 2) + N / 2] = u128'(m_ob);
      m_cnt++;
    end
  end

  // ------------------------------------------------------------ stimulus
  task automatic send_sdf(u128 x[], logic inv, logic ro);
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      if (s_t_in < 0) s_t_in = cyc;
      s_iv = 1; s_it = '{inv: inv, ro: ro}; s_id = QW'(x[i]);
    end
  endtask

  task automatic send_mdc(u128 x[], logic inv, logic ro);
    for (int i = 0; i < N / 2; i++) begin
      @(negedge clk);
      if (m_t_in < 0) m_t_in = cyc;
      m_iv = 1; m_it = '{inv: inv, ro: ro}; m_ia = QW'(x[i]); m_ib = QW'(x[i + N / 2]);
    end
  endtask

  function automatic void chk(string what, int k, u128 got, u128 exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 8)
        $display("FAIL n=%0d q=%0d bits: %s [%0d] got %h exp %h", N, QW, what, k, got, exp);
    end
  endfunction

  initial begin
    u128 q, w, a[];
    done = 0; checks = 0; failures = 0;
    q = u128'(Q);
    w = rpow(u128'(GEN), (q - 1) / u128'(N), q);
    a = new[N];
    for (int i = 0; i < N; i++) a[i] = u128'({$urandom, $urandom, $urandom}) % q;
    a[0] = q - 1;
    wait (start);

    fork
      begin send_sdf(a, 0, 0); send_sdf(a, 0, 1); @(negedge clk) s_iv = 0; end
      begin send_mdc(a, 0, 0); send_mdc(a, 0, 1); @(negedge clk) m_iv = 0; end
    join
    wait (s_cnt == 2 * N && m_cnt == N);

    // forward results at sampled positions (k = 0 and N-1 always included)
    for (int t = 0; t < NPTS; t++) begin
      int  k;
      u128 wk, acc;
      k = (t == 0) ? 0 : (t == 1) ? N - 1 : int'($urandom % N);
      wk = rpow(w, u128'(k), q);
      acc = 0;
      for (int j = N - 1; j >= 0; j--) acc = (rmul(acc, wk, q) + a[j]) % q;
      chk("sdf A", k, s_res[0][k], acc);
      chk("mdc A", k, m_res[0][k], acc);
      chk("sdf A ro", k, s_res[1][(N - k) % N], acc);
      chk("mdc A ro", k, m_res[1][(N - k) % N], acc);
    end

    // round trip through the inverse transform
    repeat (9) @(negedge clk);
    fork
      begin send_sdf(s_res[1], 1, 0); @(negedge clk) s_iv = 0; end
      begin send_mdc(m_res[1], 1, 0); @(negedge clk) m_iv = 0; end
    join
    wait (s_cnt == 3 * N && m_cnt == 3 * N / 2);
    for (int k = 0; k < N; k++) begin
      chk("sdf INTT(NTT(a))", k, s_res[2][k], a[k]);
      chk("mdc INTT(NTT(a))", k, m_res[2][k], a[k]);
    end

    checks++;
    if (s_t_out - s_t_in != 2 * N + int'(LOGN) * LS) begin
      failures++;
      $display("FAIL n=%0d sdf latency %0d", N, s_t_out - s_t_in);
    end
    checks++;
    if (m_t_out - m_t_in != N + int'(LOGN) * LS) begin
      failures++;
      $display("FAIL n=%0d mdc latency %0d", N, m_t_out - m_t_in);
    end
    $display("workload n=2^%0d log2(q)=%0d dit=%0d: sdf latency %0d, mdc latency %0d, %0d checks, %0d failures",
             LOGN, QW, DIT, s_t_out - s_t_in, m_t_out - m_t_in, checks, failures);
    done = 1;
  end
endmodule
