// tb_workloads: the evaluated (n, log2 q) design points, each built as its
// own instance of the top and run through tb_workload_run (forward NTT
// checked at sampled points, forward+inverse round trip checked in full,
// latency checked) on both pipelines. All points run in parallel. The
// decimation-in-frequency build runs at every point; the decimation-in-time
// build (DIT = 1) at n = 2^10 with 28 bits and n = 2^12 with 64 bits.
//
//   log2(q) = 28 : q = 2^28 - 2^16 + 1 (qH = 2^12 - 1, w = 16), generator 23
//   log2(q) = 64 : q = 2^64 - 2^32 + 1 (the default modulus), generator 7
// Neither modulus is prescribed by the architecture; any prime
// q = qH * 2^w + 1 with 2n | q - 1 works.
module tb_workloads;
  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;

  localparam int NW = 10;
  localparam logic [27:0] Q28 = 28'd268369921;
  logic done [NW];
  int   chk  [NW], bad [NW];

  tb_workload_run #(.QW(28), .Q(Q28), .GEN(23), .LOGN(10)) w0 (
    .clk, .rst_n, .start, .done(done[0]), .checks(chk[0]), .failures(bad[0]));
  tb_workload_run #(.QW(28), .Q(Q28), .GEN(23), .LOGN(12)) w1 (
    .clk, .rst_n, .start, .done(done[1]), .checks(chk[1]), .failures(bad[1]));
  tb_workload_run #(.QW(28), .Q(Q28), .GEN(23), .LOGN(14)) w2 (
    .clk, .rst_n, .start, .done(done[2]), .checks(chk[2]), .failures(bad[2]));
  tb_workload_run #(.QW(28), .Q(Q28), .GEN(23), .LOGN(16)) w3 (
    .clk, .rst_n, .start, .done(done[3]), .checks(chk[3]), .failures(bad[3]));
  tb_workload_run #(.QW(64), .LOGN(10)) w4 (
    .clk, .rst_n, .start, .done(done[4]), .checks(chk[4]), .failures(bad[4]));
  tb_workload_run #(.QW(64), .LOGN(12)) w5 (
    .clk, .rst_n, .start, .done(done[5]), .checks(chk[5]), .failures(bad[5]));
  tb_workload_run #(.QW(64), .LOGN(14)) w6 (
    .clk, .rst_n, .start, .done(done[6]), .checks(chk[6]), .failures(bad[6]));
  tb_workload_run #(.QW(64), .LOGN(16)) w7 (
    .clk, .rst_n, .start, .done(done[7]), .checks(chk[7]), .failures(bad[7]));
  tb_workload_run #(.QW(28), .Q(Q28), .GEN(23), .LOGN(10), .DIT(1'b1)) w8 (
    .clk, .rst_n, .start, .done(done[8]), .checks(chk[8]), .failures(bad[8]));
  tb_workload_run #(.QW(64), .LOGN(12), .DIT(1'b1)) w9 (
    .clk, .rst_n, .start, .done(done[9]), .checks(chk[9]), .failures(bad[9]));

  int checks = 0, failures = 0;

  function automatic void total();
    checks = 0; failures = 0;
    for (int i = 0; i < NW; i++) begin checks += chk[i]; failures += bad[i]; end
  endfunction

  initial begin
    repeat (8 * (1 << 16) + 5000) @(posedge clk);
    total();
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    start = 1;
    for (int i = 0; i < NW; i++) wait (done[i]);
    total();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
