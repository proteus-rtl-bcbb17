// tb_mdc_stage: single MDC stages of a 32-point transform: stage 0 (H = 16,
// commutator delay 8), stage 3 (H = 2, delay 1) and the last stage 4 (H = 1,
// no commutator), fed with random chunks, some inverse. Per chunk the stage
// computes u_j = a_j + a_(j+H) and v_j = (a_j - a_(j+H)) * w^(j*2^s) (halved
// for inverse) and must emit the pairs (u_c, u_(c+D)) for c < D, then
// (v_c, v_(c+D)), D = H/2; the last stage emits (u, v). First output pair
// must leave LS + D cycles after the first input pair.
module tb_mdc_stage;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int LOGN = 5;
  localparam int N = 1 << LOGN;
  localparam int LS = ntt_pkg::bf_lat(64, 16) + 1;
  localparam logic [63:0] Q = 64'hFFFF_FFFF_0000_0001;
  localparam int NST = 3;
  localparam int ST [NST] = '{0, 3, 4};

  logic          iv;
  ntt_pkg::tag_t it;
  logic [63:0]   ia [NST], ib [NST];
  logic          ov [NST];
  ntt_pkg::tag_t ot [NST];
  logic [63:0]   oa [NST], ob [NST];

  for (genvar g = 0; g < NST; g++) begin : g_dut
    mdc_stage #(.LOGN(LOGN), .STAGE(ST[g])) dut (
      .clk, .rst_n, .in_valid(iv), .in_tag(it), .in_a(ia[g]), .in_b(ib[g]),
      .out_valid(ov[g]), .out_tag(ot[g]), .out_a(oa[g]), .out_b(ob[g]));
  end

  u128 expq [NST][$];
  int cyc = 0, t_in = -1, t_out [NST] = '{-1, -1, -1};

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int d = 0; d < NST; d++)
      if (rst_n && ov[d]) begin
        if (t_out[d] < 0) t_out[d] = cyc;
        checks++;
        if (expq[d].size() < 2 || u128'(oa[d]) != expq[d][0] || u128'(ob[d]) != expq[d][1]) begin
          failures++;
          $display("FAIL stage %0d got %h %h", ST[d], oa[d], ob[d]);
        end
        void'(expq[d].pop_front());
        void'(expq[d].pop_front());
      end
  end

  initial begin
    u128 q, w, h;
    u128 a [NST][N];
    q = u128'(Q);
    w = rpow(7, (q - 1) / N, q);
    h = rinv(2, q);
    iv = 0; it = '0;
    for (int d = 0; d < NST; d++) begin ia[d] = 0; ib[d] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    for (int p = 0; p < 4; p++) begin
      logic inv;
      inv = p[0];
      for (int d = 0; d < NST; d++) begin
        int hh, dd;
        u128 u [N], v [N];
        hh = N >> (ST[d] + 1);
        dd = hh / 2;
        for (int i = 0; i < N; i++) a[d][i] = u128'({$urandom, $urandom}) % q;
        for (int c = 0; c < N / (2 * hh); c++) begin
          for (int j = 0; j < hh; j++) begin
            u128 x, y;
            x = a[d][c*2*hh + j];
            y = a[d][c*2*hh + j + hh];
            u[j] = (x + y) % q;
            v[j] = rmul((x + q - y) % q, rpow(w, u128'(j << ST[d]), q), q);
            if (inv) begin u[j] = rmul(u[j], h, q); v[j] = rmul(v[j], h, q); end
          end
          if (hh == 1) begin
            expq[d].push_back(u[0]); expq[d].push_back(v[0]);
          end else begin
            for (int k = 0; k < dd; k++) begin expq[d].push_back(u[k]); expq[d].push_back(u[k+dd]); end
            for (int k = 0; k < dd; k++) begin expq[d].push_back(v[k]); expq[d].push_back(v[k+dd]); end
          end
        end
      end
      // stream: chunk c, pair j = (a[c*2H + j], a[c*2H + j + H])
      for (int i = 0; i < N / 2; i++) begin
        @(negedge clk);
        if (t_in < 0) t_in = cyc;
        iv = 1; it = '{inv: inv, ro: 1'b0};
        for (int d = 0; d < NST; d++) begin
          int hh, c, j;
          hh = N >> (ST[d] + 1);
          c = i / hh;
          j = i % hh;
          ia[d] = 64'(a[d][c*2*hh + j]);
          ib[d] = 64'(a[d][c*2*hh + j + hh]);
        end
      end
      if (p == 2) begin
        @(negedge clk) iv = 0;
        repeat (7) @(negedge clk);
      end
    end
    @(negedge clk) iv = 0;
    repeat (N + LS) @(posedge clk);
    for (int d = 0; d < NST; d++) begin
      checks++;
      if (t_out[d] - t_in != LS + (N >> (ST[d] + 2))) begin
        failures++;
        $display("FAIL latency stage %0d: %0d", ST[d], t_out[d] - t_in);
      end
      checks++;
      if (expq[d].size() != 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
