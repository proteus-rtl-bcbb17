// tb_proteus_top: end-to-end test of both pipelines at the default size
// (4096 coefficients of 64 bits): a cyclic polynomial product
// c = a * b mod (x^n - 1) computed the way the hardware is meant to be used.
//
//   1. forward NTT of a, plain output            -> must equal DFT(a)
//   2. forward NTT of b, reordered output (ro)    -> B_(-k mod n)
//   3. forward NTT of a, reordered output (ro)    -> A_(-k mod n)
//      (1-3 streamed back to back)
//   4. the testbench multiplies 2 and 3 pointwise and, after a gap, feeds
//      the product as an inverse transform       -> must equal a * b
// The same sequence runs on the SDF path (one coefficient per cycle) and the
// MDC path (pairs (x_i, x_(i+n/2))). References (direct DFT, direct cyclic
// convolution) are computed by the testbench. It also checks the latency of
// the first polynomial and counts the mechanisms of the design: butterfly
// bypass in the big SDF stages, separate v buffer in the small SDF stages,
// commutator swaps in the MDC stages, halving in inverse butterflies,
// reordered writes in the output buffers, back-to-back polynomials and gaps.
module tb_proteus_top;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int LOGN = ntt_pkg::LOGN_DEF;
  localparam int N = 1 << LOGN;
  localparam int LS = ntt_pkg::bf_lat(ntt_pkg::QW_DEF, ntt_pkg::WORD_DEF) + 1;
  localparam logic [63:0] Q = ntt_pkg::Q_DEF;

  logic          s_iv, m_iv;
  ntt_pkg::tag_t s_it, m_it;
  logic [63:0]   s_id, m_ia, m_ib;
  logic          s_ov, m_ov;
  ntt_pkg::tag_t s_ot, m_ot;
  logic [63:0]   s_od, m_oa, m_ob;

  proteus_top dut (
    .clk, .rst_n,
    .sdf_in_valid(s_iv), .sdf_in_tag(s_it), .sdf_in_data(s_id),
    .sdf_out_valid(s_ov), .sdf_out_tag(s_ot), .sdf_out_data(s_od),
    .mdc_in_valid(m_iv), .mdc_in_tag(m_it), .mdc_in_a(m_ia), .mdc_in_b(m_ib),
    .mdc_out_valid(m_ov), .mdc_out_tag(m_ot), .mdc_out_a(m_oa), .mdc_out_b(m_ob));

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (12 * N + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ collect outputs
  u128 s_res [4][], m_res [4][];
  int  s_cnt = 0, m_cnt = 0, cyc = 0;
  int  s_t_in = -1, s_t_out = -1, m_t_in = -1, m_t_out = -1;
  int  n_ro_out = 0;

  initial for (int p = 0; p < 4; p++) begin s_res[p] = new[N]; m_res[p] = new[N]; end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && s_ov) begin
      if (s_t_out < 0) s_t_out = cyc;
      s_res[s_cnt / N][s_cnt % N] = u128'(s_od);
      if (s_ot.ro) n_ro_out++;
      s_cnt++;
    end
    if (rst_n && m_ov) begin
      int p, k;
      if (m_t_out < 0) m_t_out = cyc;
      p = m_cnt / (N / 2);
      k = m_cnt % (N / 2);
      m_res[p][k]         = u128'(m_oa);
      m_res[p][k + N / 2] = u128'(m_ob);
      if (m_ot.ro) n_ro_out++;
      m_cnt++;
    end
  end

  // ------------------------------------------------------------ mechanisms
  int n_bypass = 0, n_vbuf = 0, n_swap = 0, n_halve = 0, n_b2b = 0, n_gap = 0;
  logic s_iv_q = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_sdf.g_stage[0].u_stage.r_valid && !dut.u_sdf.g_stage[0].u_stage.r_bfly) n_bypass++;
    if (dut.u_sdf.g_stage[LOGN-1].u_stage.vb_in_valid) n_vbuf++;
    if (dut.u_mdc.g_stage[0].u_stage.g_comm.swap) n_swap++;
    if (dut.u_sdf.g_stage[0].u_stage.u_bf.halve && dut.u_sdf.g_stage[0].u_stage.r_valid) n_halve++;
    s_iv_q <= s_iv;
  end

  // ------------------------------------------------------------ stimulus
  task automatic send_sdf(u128 x[], logic inv, logic ro);
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      if (s_t_in < 0) s_t_in = cyc;
      s_iv = 1; s_it = '{inv: inv, ro: ro}; s_id = 64'(x[i]);
    end
  endtask

  task automatic send_mdc(u128 x[], logic inv, logic ro);
    for (int i = 0; i < N / 2; i++) begin
      @(negedge clk);
      if (m_t_in < 0) m_t_in = cyc;
      m_iv = 1; m_it = '{inv: inv, ro: ro}; m_ia = 64'(x[i]); m_ib = 64'(x[i + N / 2]);
    end
  endtask

  function automatic void chk(string what, u128 got[], u128 exp[]);
    int bad;
    bad = 0;
    for (int k = 0; k < N; k++) begin
      checks++;
      if (got[k] != exp[k]) begin
        failures++;
        if (bad++ < 4) $display("FAIL %s [%0d] got %h exp %h", what, k, got[k], exp[k]);
      end
    end
  endfunction

  initial begin
    u128 q, w;
    u128 a[], b[], A[], B[], Aro[], Bro[], c[], ps[], pm[];
    q = u128'(Q);
    w = rpow(7, (q - 1) / N, q);
    a = new[N]; b = new[N]; Aro = new[N]; Bro = new[N]; c = new[N]; ps = new[N]; pm = new[N];
    for (int i = 0; i < N; i++) begin
      a[i] = u128'({$urandom, $urandom}) % q;
      b[i] = u128'({$urandom, $urandom}) % q;
    end
    a[1] = q - 1;
    s_iv = 0; s_it = '0; s_id = 0; m_iv = 0; m_it = '0; m_ia = 0; m_ib = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // 1-3: three forward transforms back to back on both paths
    fork
      begin send_sdf(a, 0, 0); send_sdf(b, 0, 1); send_sdf(a, 0, 1); @(negedge clk) s_iv = 0; end
      begin send_mdc(a, 0, 0); send_mdc(b, 0, 1); send_mdc(a, 0, 1); @(negedge clk) m_iv = 0; end
    join
    n_b2b += 4;

    // references, computed while the pipelines drain
    dft(a, w, q, A);
    dft(b, w, q, B);
    for (int k = 0; k < N; k++) begin
      Aro[k] = A[(N - k) % N];
      Bro[k] = B[(N - k) % N];
    end
    for (int k = 0; k < N; k++) begin
      u128 acc;
      acc = 0;
      for (int j = 0; j < N; j++) acc = (acc + rmul(a[j], b[(k - j + N) % N], q)) % q;
      c[k] = acc;
    end

    wait (s_cnt == 3 * N && m_cnt == 3 * N / 2);
    chk("sdf NTT(a)", s_res[0], A);
    chk("sdf NTT(b) ro", s_res[1], Bro);
    chk("sdf NTT(a) ro", s_res[2], Aro);
    chk("mdc NTT(a)", m_res[0], A);
    chk("mdc NTT(b) ro", m_res[1], Bro);
    chk("mdc NTT(a) ro", m_res[2], Aro);

    // 4: pointwise product of the hardware results, then inverse transform
    for (int k = 0; k < N; k++) begin
      ps[k] = rmul(s_res[1][k], s_res[2][k], q);
      pm[k] = rmul(m_res[1][k], m_res[2][k], q);
    end
    repeat (17) @(negedge clk);
    n_gap++;
    fork
      begin send_sdf(ps, 1, 0); @(negedge clk) s_iv = 0; end
      begin send_mdc(pm, 1, 0); @(negedge clk) m_iv = 0; end
    join
    wait (s_cnt == 4 * N && m_cnt == 2 * N);
    chk("sdf a*b", s_res[3], c);
    chk("mdc a*b", m_res[3], c);

    // latency of the first polynomial, including the output buffer
    checks++;
    if (s_t_out - s_t_in != 2 * N + LOGN * LS) begin
      failures++;
      $display("FAIL sdf latency %0d expected %0d", s_t_out - s_t_in, 2 * N + LOGN * LS);
    end
    checks++;
    if (m_t_out - m_t_in != N + LOGN * LS) begin
      failures++;
      $display("FAIL mdc latency %0d expected %0d", m_t_out - m_t_in, N + LOGN * LS);
    end

    $display("mechanisms: bypass=%0d vbuf=%0d swap=%0d halve=%0d ro_out=%0d back_to_back=%0d gap=%0d",
             n_bypass, n_vbuf, n_swap, n_halve, n_ro_out, n_b2b, n_gap);
    $display("sdf latency %0d cycles, mdc latency %0d cycles (n=%0d)", s_t_out - s_t_in,
             m_t_out - m_t_in, N);
    checks++; if (n_bypass == 0) failures++;
    checks++; if (n_vbuf == 0) failures++;
    checks++; if (n_swap == 0) failures++;
    checks++; if (n_halve == 0) failures++;
    checks++; if (n_ro_out == 0) failures++;
    checks++; if (n_b2b == 0 || n_gap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
