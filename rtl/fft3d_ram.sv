// fft3d_ram: one slab RAM of the 3D FFT engine.
//
// Each 1D FFT pipeline owns one of these RAMs. It is the permanent home of the
// N^3/P points of the slabs mapped onto it; points are read out for a pass and
// written back to the same address once transformed. The controller drives the
// four controls shown for every RAM in the block diagram: read enable, read
// address, write enable and write address. The memory is a plain array so a
// synthesis tool can map it onto block RAM (several blocks ganged where one is
// too small).
//
// Timing: simple dual port, one read and one write per cycle. A read returns
// its word on rdata in the cycle after re was high and holds it until the next
// read. A read and a write to the same address in the same cycle return the
// old word (read-first); the controller never relies on that case.
// The read latency of one cycle and the read-first rule are this design's
// choices; the text only says the RAMs store the data throughout the run.
module fft3d_ram #(
  parameter int unsigned DEPTH  = 1024,   // N^3/P words (32^3 / 32)
  parameter int unsigned DATA_W = 64,     // one complex binary32 point
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              re,
  input  logic [AW-1:0]     raddr,
  output logic [DATA_W-1:0] rdata,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [DATA_W-1:0] wdata
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
    if (we) mem[waddr] <= wdata;
  end

endmodule
