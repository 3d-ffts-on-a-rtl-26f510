// tb_fft3d_xbar: self-checking test of the registered crossbar at its default
// size (32 x 32, 64-bit words).
//
// Each cycle drives random words and random selects, including the identity
// and a rotation (the patterns the engine uses), and checks one cycle later
// that every output holds the word of the input its select named.
module tb_fft3d_xbar;
  localparam int unsigned NI = 32;
  localparam int unsigned NO = 32;
  localparam int unsigned DW = 64;
  localparam int unsigned SW = $clog2(NI);

  logic          clk = 1'b0;
  logic [DW-1:0] din  [NI];
  logic [SW-1:0] sel  [NO];
  logic [DW-1:0] dout [NO];

  fft3d_xbar dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DW-1:0] exp_q [NO];
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      for (int j = 0; j < NI; j++) din[j] = {$urandom, $urandom};
      for (int o = 0; o < NO; o++) begin
        case (i % 3)
          0:       sel[o] = SW'(o);              // identity
          1:       sel[o] = SW'(o + i);          // rotation
          default: sel[o] = SW'($urandom);       // arbitrary, repeats allowed
        endcase
        exp_q[o] = din[sel[o]];
      end
      @(posedge clk);
      #1;
      for (int o = 0; o < NO; o++) begin
        checks++;
        if (dout[o] !== exp_q[o]) begin
          failures++;
          if (failures < 10) $display("FAIL: step %0d output %0d", i, o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
