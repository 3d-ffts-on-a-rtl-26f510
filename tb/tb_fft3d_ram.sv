// tb_fft3d_ram: self-checking test of the slab RAM at its default size
// (1024 words of 64 bits).
//
// Random mixes of reads and writes on both ports are compared with a reference
// array: a read returns its word in the next cycle, rdata holds while re is
// low, and a read of the address being written in the same cycle returns the
// old word. Every address is written first so that nothing uninitialised is
// read.
module tb_fft3d_ram;
  localparam int unsigned DEPTH  = 1024;
  localparam int unsigned DATA_W = 64;
  localparam int unsigned AW     = $clog2(DEPTH);

  logic              clk = 1'b0;
  logic              re = 1'b0, we = 1'b0;
  logic [AW-1:0]     raddr = '0, waddr = '0;
  logic [DATA_W-1:0] rdata, wdata = '0;

  fft3d_ram dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [DATA_W-1:0] ref_mem [DEPTH];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DATA_W-1:0] expect_q, held;
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      ref_mem[a] = {$urandom, $urandom};
      @(negedge clk);
      we    = 1'b1;
      waddr = AW'(a);
      wdata = ref_mem[a];
    end
    @(negedge clk);
    we = 1'b0;
    // random traffic
    for (int i = 0; i < 6000; i++) begin
      logic          do_re, do_we;
      logic [AW-1:0] ra, wa;
      logic [DATA_W-1:0] wd;
      do_re = ($urandom_range(0, 3) != 0);
      do_we = ($urandom_range(0, 1) != 0);
      ra    = AW'($urandom);
      wa    = ($urandom_range(0, 7) == 0) ? ra : AW'($urandom);   // same-address cases
      wd    = {$urandom, $urandom};
      held  = rdata;
      re    = do_re;
      raddr = ra;
      we    = do_we;
      waddr = wa;
      wdata = wd;
      expect_q = do_re ? ref_mem[ra] : held;   // read-first
      @(posedge clk);
      if (do_we) ref_mem[wa] = wd;
      @(negedge clk);
      checks++;
      if (rdata !== expect_q) begin
        failures++;
        if (failures < 10)
          $display("FAIL: step %0d re=%0b raddr=%0d got %h expected %h", i, do_re, ra, rdata, expect_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
