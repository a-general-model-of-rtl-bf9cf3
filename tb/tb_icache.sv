// Testbench for icache: a miss sends one tagged line read and starts the
// line's waiting list; a second thread on the same line joins the list
// (link to the tail); the line's arrival appends the whole list to the ready
// list at once; a hit goes straight to the ready list; instruction fetch
// returns the right word; lines whose counter is not zero are never
// replaced, and a decrement frees a line for replacement.
module tb_icache;
  import drisc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic lk_valid = 0, lk_ready, lk_hit; logic [7:0] lk_tid = 0; logic [31:0] lk_pc = 0;
  logic link_valid, app_valid; logic [7:0] link_tid, link_next, app_head, app_tail;
  logic dec_valid = 0; logic [31:0] dec_pc = 0;
  logic [31:0] f_pc = 0, f_instr; logic f_hit;
  logic req_valid, req_ready = 1; mtag_t req_tag; logic [31:0] req_addr;
  logic rsp_valid = 0; logic [5:0] rsp_idx = 0; logic [511:0] rsp_data = 0;
  logic [15:0] n_misses;

  icache #(.CACHE_BYTES(1024), .LINE_BYTES(64), .NTHREADS(256)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [511:0] line_of(input logic [31:0] a);
    logic [511:0] d;
    for (int w = 0; w < 16; w++) d[w*32 +: 32] = a + 32'(w * 4) ^ 32'hA5A5_0000;
    return d;
  endfunction

  logic [5:0] l1;
  initial begin
    repeat (2) @(posedge clk); rst_n <= 1;
    @(negedge clk);
    // thread 5 misses on 0x1000
    lk_valid = 1; lk_tid = 5; lk_pc = 32'h1008; #1;
    chk(lk_ready && !lk_hit && !app_valid && !link_valid, "miss accepted");
    @(negedge clk);
    chk(req_valid && req_tag.mtype == MT_IREAD && req_addr == 32'h1000, "tagged line read");
    l1 = req_tag.idx;
    // thread 6 on the same line: joins the list behind thread 5
    lk_tid = 6; lk_pc = 32'h1010; #1;
    chk(lk_hit && link_valid && link_tid == 5 && link_next == 6 && !app_valid, "join waiting list");
    @(negedge clk);
    lk_tid = 9; lk_pc = 32'h1020; @(negedge clk);   // and thread 9
    lk_valid = 0;
    chk(n_misses == 1, "one miss only");
    // line arrives: whole list 5..9 to the ready list
    rsp_valid = 1; rsp_idx = l1; rsp_data = line_of(32'h1000); #1;
    chk(app_valid && app_head == 5 && app_tail == 9, "whole list appended");
    @(negedge clk); rsp_valid = 0;
    // a hit goes straight to the ready list
    lk_valid = 1; lk_tid = 8; lk_pc = 32'h1004; #1;
    chk(lk_hit && app_valid && app_head == 8 && app_tail == 8, "hit bypasses waiting");
    @(negedge clk); lk_valid = 0;
    f_pc = 32'h1024; #1 chk(f_hit && f_instr == (32'h1024 ^ 32'hA5A5_0000), "fetch word");
    f_pc = 32'h2000; #1 chk(!f_hit, "fetch miss");
    // fill the other 15 lines, each with one thread needing it
    for (int i = 1; i < 16; i++) begin
      lk_valid = 1; lk_tid = 8'(20 + i); lk_pc = 32'h1000 + 32'(i * 64);
      @(negedge clk); lk_valid = 0;
      rsp_valid = 1; rsp_idx = req_tag.idx; rsp_data = line_of(lk_pc & ~32'h3f);
      @(negedge clk); rsp_valid = 0;
    end
    chk(n_misses == 16, "sixteen lines fetched");
    // every line has a non-zero counter: a new line cannot be placed
    lk_valid = 1; lk_tid = 50; lk_pc = 32'h8000; #1;
    chk(!lk_ready, "no replaceable line");
    @(negedge clk);
    // 4 threads of line 0x1000 leave the ready list: the line becomes free
    lk_valid = 0;
    for (int i = 0; i < 4; i++) begin
      dec_valid = 1; dec_pc = 32'h1000; @(negedge clk);
    end
    dec_valid = 0;
    lk_valid = 1; #1;
    chk(lk_ready && !lk_hit, "line with zero counter replaceable");
    @(negedge clk); lk_valid = 0;
    chk(req_valid && req_addr == 32'h8000 && req_tag.idx == l1, "victim is the freed line");
    lk_valid = 1; lk_tid = 51; lk_pc = 32'h1000; #1;
    chk(!lk_ready, "old line gone, still no free victim");
    lk_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
