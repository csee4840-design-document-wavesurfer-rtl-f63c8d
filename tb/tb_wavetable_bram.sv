// tb_wavetable_bram: self-checking test of the dual-port wavetable memory.
//
// Fills the whole memory through port A with a pseudo-random pattern, then
// runs random mixed traffic: port-A writes and reads and port-B reads in the
// same cycles, comparing every read with a reference array one cycle after
// the address was presented (the read latency). Also checks that a port-A
// read of a word written in the same cycle returns the old contents.
module tb_wavetable_bram;
  import wavesurfer_pkg::*;

  localparam int unsigned DEPTH = NUM_TABLES * TABLE_DEPTH;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic          clk = 1'b0;
  logic          a_we;
  logic [AW-1:0] a_addr, b_addr;
  logic [15:0]   a_wdata, a_rdata, b_rdata;
  logic [15:0]   ref_mem [DEPTH];
  int            checks = 0, failures = 0;

  always #5 clk = ~clk;

  wavetable_bram dut (.*);

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] exp_a, exp_b;
    a_we = 0; a_addr = '0; b_addr = '0; a_wdata = '0;
    @(negedge clk);
    // fill
    for (int i = 0; i < DEPTH; i++) begin
      a_we = 1; a_addr = AW'(i); a_wdata = 16'(i * 40503 + 7);
      ref_mem[i] = a_wdata;
      @(negedge clk);
    end
    a_we = 0;
    // random traffic
    for (int n = 0; n < 20000; n++) begin
      a_addr  = AW'($urandom_range(DEPTH - 1));
      b_addr  = AW'($urandom_range(DEPTH - 1));
      if (n % 4 == 0) b_addr = a_addr;
      a_we    = ($urandom_range(1) == 1);
      a_wdata = 16'($urandom);
      exp_a   = ref_mem[a_addr];     // read-first on port A
      @(posedge clk);
      exp_b   = ref_mem[b_addr];     // port B sees the word before this edge's write
      if (a_we) ref_mem[a_addr] = a_wdata;
      #1;
      check("port A read", a_rdata, exp_a);
      check("port B read", b_rdata, exp_b);
      @(negedge clk);
    end
    // every word once more through port B
    a_we = 0;
    for (int i = 0; i < DEPTH; i += 37) begin
      b_addr = AW'(i);
      @(posedge clk); #1;
      check("sweep read", b_rdata, ref_mem[i]);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
