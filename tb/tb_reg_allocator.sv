// Testbench for reg_allocator: a block that fits is placed first-fit, a
// block that does not fit is shrunk to what the largest free run holds, a
// freed block is reused, a create that cannot get even one thread fails, and
// each allocation finishes within NREGS/GRAN + B + 2 cycles.
module tb_reg_allocator;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic req = 0, busy, done, ok, free_valid = 0;
  logic [10:0] req_fixed = 0, req_per_thread = 0, size, free_size = 0;
  logic [8:0] req_block = 0, block;
  logic [9:0] base, free_base = 0;
  logic [7:0] free_granules;

  reg_allocator #(.NREGS(1024), .GRAN(8)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic alloc(input int f, input int p, input int b, output int cyc);
    @(negedge clk);
    req = 1; req_fixed = 11'(f); req_per_thread = 11'(p); req_block = 9'(b);
    @(negedge clk); req = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
  endtask

  int cyc;
  initial begin
    repeat (2) @(posedge clk); rst_n <= 1;
    @(negedge clk);
    chk(free_granules == 128, "all 128 granules free");
    // F=4, P=10, B=8 -> 84 registers -> 11 granules at 0
    alloc(4, 10, 8, cyc);
    chk(ok && base == 0 && block == 8 && size == 88, "first block placed at 0");
    chk(cyc <= 128 + 8 + 2, "latency bound 1");
    // F=0, P=100, B=20 needs 2000: shrinks to 9 threads (900 -> 113 granules)
    alloc(0, 100, 20, cyc);
    chk(ok && base == 88 && block == 9 && size == 904, "block shrunk to 9 threads");
    chk(cyc <= 128 + 20 + 2, "latency bound 2");
    @(negedge clk);
    chk(free_granules == 4, "4 granules left");
    // free the first block and reuse it first-fit
    free_valid = 1; free_base = 0; free_size = 88;
    @(negedge clk); free_valid = 0;
    chk(free_granules == 15, "15 granules free after release");
    alloc(8, 8, 10, cyc);
    chk(ok && base == 0 && block == 10 && size == 88, "freed block reused");
    // no room for a single thread of 200 registers
    alloc(0, 200, 1, cyc);
    chk(!ok, "create fails when no thread fits");
    // the remaining 4 granules at the top hold 32 registers: 3 threads of 10
    alloc(0, 10, 5, cyc);
    chk(ok && base == 992 && block == 3 && size == 32, "shrunk into the top run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
