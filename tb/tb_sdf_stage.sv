// tb_sdf_stage: single SDF stages of a 32-point transform, stage 0 (H = 16,
// butterfly-bypass data flow, LS <= H) and stage 2 (H = 4, separate-buffer
// data flow, LS > H), fed with random chunks, some of them inverse. Per
// chunk the stage must emit u_j = a_j + a_(j+H) for j < H followed by
// v_j = (a_j - a_(j+H)) * w^(j*2^s), both halved for an inverse chunk, with
// the first output H + LS cycles after the first input.
module tb_sdf_stage;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int LOGN = 5;
  localparam int N = 1 << LOGN;
  localparam int LS = ntt_pkg::bf_lat(64, 16) + 1;
  localparam logic [63:0] Q = 64'hFFFF_FFFF_0000_0001;
  localparam int ST [2] = '{0, 2};

  logic          iv;
  ntt_pkg::tag_t it;
  logic [63:0]   id;
  logic          ov [2];
  ntt_pkg::tag_t ot [2];
  logic [63:0]   od [2];

  sdf_stage #(.LOGN(LOGN), .STAGE(0)) dut0 (
    .clk, .rst_n, .in_valid(iv), .in_tag(it), .in_data(id),
    .out_valid(ov[0]), .out_tag(ot[0]), .out_data(od[0]));
  sdf_stage #(.LOGN(LOGN), .STAGE(2)) dut2 (
    .clk, .rst_n, .in_valid(iv), .in_tag(it), .in_data(id),
    .out_valid(ov[1]), .out_tag(ot[1]), .out_data(od[1]));

  u128 expq [2][$];
  int cyc = 0, t_in = -1, t_out [2] = '{-1, -1};

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int d = 0; d < 2; d++)
      if (rst_n && ov[d]) begin
        if (t_out[d] < 0) t_out[d] = cyc;
        checks++;
        if (expq[d].size() == 0 || u128'(od[d]) != expq[d][0]) begin
          failures++;
          $display("FAIL stage %0d got %h exp %h", ST[d], od[d], expq[d][0]);
        end
        void'(expq[d].pop_front());
      end
  end

  initial begin
    u128 q, w, h;
    q = u128'(Q);
    w = rpow(7, (q - 1) / N, q);
    h = rinv(2, q);
    iv = 0; it = '0; id = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    for (int p = 0; p < 4; p++) begin
      u128 a[N];
      logic inv;
      inv = (p >= 2);
      for (int i = 0; i < N; i++) a[i] = u128'({$urandom, $urandom}) % q;
      // expected output per stage
      for (int d = 0; d < 2; d++) begin
        int ns, hh;
        ns = N >> ST[d];
        hh = ns / 2;
        for (int c = 0; c < N / ns; c++) begin
          for (int j = 0; j < hh; j++) begin
            u128 u;
            u = (a[c*ns+j] + a[c*ns+j+hh]) % q;
            expq[d].push_back(inv ? rmul(u, h, q) : u);
          end
          for (int j = 0; j < hh; j++) begin
            u128 v;
            v = rmul((a[c*ns+j] + q - a[c*ns+j+hh]) % q, rpow(w, u128'(j << ST[d]), q), q);
            expq[d].push_back(inv ? rmul(v, h, q) : v);
          end
        end
      end
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        if (t_in < 0) t_in = cyc;
        iv = 1; it = '{inv: inv, ro: 1'b0}; id = 64'(a[i]);
      end
      if (p == 1) begin
        @(negedge clk) iv = 0;
        repeat (9) @(negedge clk);
      end
    end
    @(negedge clk) iv = 0;
    repeat (2 * N + LS) @(posedge clk);
    for (int d = 0; d < 2; d++) begin
      checks++;
      if (t_out[d] - t_in != (N >> (ST[d] + 1)) + LS) begin
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
