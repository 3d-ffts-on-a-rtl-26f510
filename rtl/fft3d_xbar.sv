// fft3d_xbar: registered NUM_IN x NUM_OUT word crossbar.
//
// The engine has two of these: the RAM-to-FFT crossbar, which hands every 1D FFT
// pipeline the word it needs from whichever RAM holds it, and the FFT-to-RAM
// crossbar, which returns each transformed word to its home RAM. Together with
// the RAM addressing they perform the transpose and untranspose that the D3
// pass needs; in the D1 and D2 passes both are set to the identity.
//
// Each output o has its own select sel[o], the index of the input it copies.
// The output is registered, so a word presented on din with its select appears
// on dout one cycle later. Valid flags travel separately, through the
// controller. NUM_IN should be a power of two (the selects are log2 wide). The output register is this
// design's choice (a pipeline stage on the wide multiplexers); the text gives the
// crossbars' function and their select inputs, not their structure.
module fft3d_xbar #(
  parameter int unsigned NUM_IN  = 32,
  parameter int unsigned NUM_OUT = 32,
  parameter int unsigned DATA_W  = 64,
  localparam int unsigned SW     = (NUM_IN > 1) ? $clog2(NUM_IN) : 1
) (
  input  logic              clk,
  input  logic [DATA_W-1:0] din  [NUM_IN],
  input  logic [SW-1:0]     sel  [NUM_OUT],
  output logic [DATA_W-1:0] dout [NUM_OUT]
);

  for (genvar o = 0; o < NUM_OUT; o++) begin : g_out
    always_ff @(posedge clk) begin
      dout[o] <= din[sel[o]];
    end
  end

endmodule
