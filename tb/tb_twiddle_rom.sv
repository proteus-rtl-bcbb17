// tb_twiddle_rom: reads every entry of the stage-0 and stage-2 ROMs of a
// 64-point transform and random entries of the default 4096-point stage-0
// ROM. Each value, taken out of Montgomery form, must equal w^(k*2^s) for
// the forward direction and w^-(k*2^s) for the inverse direction of a ROM
// built with the negation scheme. w = 7^((q-1)/n) is computed here. A
// decimation-in-time ROM (stage 3, 64 points) must hold w^(k*n/2^(s+1)),
// k < 2^s, and its negated inverses.
module tb_twiddle_rom;
  import tb_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam logic [63:0] Q = 64'hFFFF_FFFF_0000_0001;

  logic [4:0]  a0;
  logic [2:0]  a2;
  logic [10:0] ab;
  logic        inv;
  logic [63:0] t0, t2, tb0, tr0, td3;

  twiddle_rom #(.LOGN(6), .STAGE(0), .INV(ntt_pkg::INV_NEGTW)) r0 (.clk, .addr(a0), .inv, .tw(t0));
  twiddle_rom #(.LOGN(6), .STAGE(2), .INV(ntt_pkg::INV_NEGTW)) r2 (.clk, .addr(a2), .inv, .tw(t2));
  twiddle_rom #(.LOGN(6), .STAGE(0), .INV(ntt_pkg::INV_REORDER)) rr (.clk, .addr(a0), .inv, .tw(tr0));
  twiddle_rom #(.LOGN(6), .STAGE(3), .INV(ntt_pkg::INV_NEGTW), .DIT(1'b1)) rd3 (
    .clk, .addr(a2), .inv, .tw(td3));
  twiddle_rom dflt (.clk, .addr(ab), .inv(1'b0), .tw(tb0));

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [63:0] got, u128 exp);
    u128 q, rinvv;
    q = u128'(Q);
    rinvv = rinv(rpow(2, 64, q), q);
    checks++;
    if (rmul(u128'(got), rinvv, q) != exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    u128 q, w64, w4k, wi;
    q   = u128'(Q);
    w64 = rpow(7, (q - 1) / 64, q);
    w4k = rpow(7, (q - 1) / 4096, q);
    wi  = rinv(w64, q);
    // sanity of the reference root: order exactly n
    checks++;
    if (rpow(w64, 64, q) != 1 || rpow(w64, 32, q) != q - 1) failures++;
    for (int dir = 0; dir < 2; dir++) begin
      for (int k = 0; k < 32; k++) begin
        @(negedge clk);
        inv = dir[0];
        a0 = 5'(k);
        a2 = 3'(k % 8);
        @(negedge clk);
        chk("s0", t0, rpow(dir ? wi : w64, u128'(k), q));
        chk("rr", tr0, rpow(w64, u128'(k), q));
        if (k < 8) chk("s2", t2, rpow(dir ? wi : w64, u128'(4 * k), q));
        if (k < 8) chk("dit s3", td3, rpow(dir ? wi : w64, u128'(4 * k), q));
      end
    end
    for (int i = 0; i < 64; i++) begin
      int k;
      k = (i == 0) ? 2047 : int'($urandom % 2048);
      @(negedge clk);
      ab = 11'(k);
      @(negedge clk);
      chk("n4096", tb0, rpow(w4k, u128'(k), q));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
