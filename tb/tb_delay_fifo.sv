// tb_delay_fifo: random valid/data streams through FIFOs of depth 0, 1, 2, 5
// and 64; every word must appear exactly DEPTH cycles later with its valid
// flag, and no valid flag may appear that was not written.
module tb_delay_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int ND = 5;
  localparam int DEP [ND] = '{0, 1, 2, 5, 64};

  logic        iv;
  logic [15:0] id;
  logic        ov [ND];
  logic [15:0] od [ND];

  for (genvar g = 0; g < ND; g++) begin : g_dut
    delay_fifo #(.W(16), .DEPTH(DEP[g])) dut (
      .clk, .rst_n, .in_valid(iv), .in_data(id), .out_valid(ov[g]), .out_data(od[g]));
  end

  // history of inputs, indexed by cycle
  logic        hv [0:1023];
  logic [15:0] hd [0:1023];
  int cyc = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    iv = 0; id = 0;
    for (int i = 0; i < 1024; i++) hv[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      // depth 0 is combinational: check it before the edge
      checks++;
      if (ov[0] !== iv || (iv && od[0] !== id)) failures++;
      for (int g = 1; g < ND; g++) begin
        int t;
        t = cyc - DEP[g];
        if (t >= 0) begin
          checks++;
          if (ov[g] !== hv[t] || (hv[t] && od[g] !== hd[t])) begin
            failures++;
            $display("FAIL depth %0d at %0d", DEP[g], cyc);
          end
        end else begin
          checks++;
          if (ov[g]) failures++;
        end
      end
      iv = ($urandom % 3) != 0;
      id = 16'($urandom);
      hv[cyc] = iv;
      hd[cyc] = id;
      @(posedge clk);
      cyc++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
