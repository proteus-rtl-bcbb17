// delay_fifo: free-running delay FIFO of a pipeline stage.
//
// Every word written at cycle t appears at the output at cycle t + DEPTH,
// whether or not later words are valid, so the stage control only has to
// know when a word enters. A valid flag travels with every word and is reset,
// so the data storage itself needs no reset and can be a block RAM: the
// payload sits in a circular buffer of DEPTH-1 words read one cycle before
// it is overwritten, followed by an output register. DEPTH = 1 is a single
// register and DEPTH = 0 a plain wire (used when a stage needs no delay).
// The stage FIFOs of the reference design are delay lines of exactly this
// kind; the circular-buffer organisation is this design's own.
//
// Timing: latency DEPTH, one word per cycle, never stalls.
module delay_fifo #(
  parameter int unsigned W     = 64,
  parameter int unsigned DEPTH = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  output logic [W-1:0] out_data
);
  if (DEPTH == 0) begin : g_wire
    assign out_valid = in_valid;
    assign out_data  = in_data;
  end else begin : g_delay
    // valid flags: reset shift register
    logic [DEPTH-1:0] vsr;
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) vsr <= '0;
      else        vsr <= (vsr << 1) | DEPTH'(in_valid);
    assign out_valid = vsr[DEPTH-1];

    if (DEPTH == 1) begin : g_reg
      always_ff @(posedge clk) out_data <= in_data;
    end else begin : g_ram
      localparam int unsigned M  = DEPTH - 1;
      localparam int unsigned PW = (M > 1) ? $clog2(M) : 1;
      logic [W-1:0]  mem [M];
      logic [PW-1:0] ptr;

      always_ff @(posedge clk) begin
        out_data <= mem[ptr];
        mem[ptr] <= in_data;
      end
      always_ff @(posedge clk or negedge rst_n)
        if (!rst_n)                 ptr <= '0;
        else if (ptr == PW'(M - 1)) ptr <= '0;
        else                        ptr <= ptr + 1'b1;
    end
  end
endmodule
