// Testbench for thread_table: allocation order from the empty list,
// membership-list linking, context and state writes, single and whole-list
// appends to the ready list with pops in FIFO order (including a pop and an
// append in the same cycle), and the release walk that returns a family's
// threads to the tail of the empty list.
module tb_thread_table;
  import drisc_pkg::*;
  localparam int NT = 256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic alloc_valid = 0, alloc_ok, alloc_fam_has_tail = 0;
  logic [7:0] alloc_tid, alloc_fam_tail = 0;
  logic [5:0] alloc_fid = 0;
  logic ctx_valid = 0; logic [7:0] ctx_tid = 0; logic [31:0] ctx_pc = 0, ctx_index = 0;
  logic [9:0] ctx_loc = 0, ctx_shr = 0, ctx_dep = 0;
  logic st_valid [2] = '{0, 0}; logic [7:0] st_tid [2] = '{0, 0};
  tstate_e st_state [2] = '{TS_EMPTY, TS_EMPTY};
  logic st_pc_valid [2] = '{0, 0}; logic [31:0] st_pc [2] = '{0, 0};
  logic link_valid = 0; logic [7:0] link_tid = 0, link_next = 0;
  logic app_valid = 0; logic [7:0] app_head = 0, app_tail = 0;
  logic pop_ok, pop_en = 0; logic [7:0] pop_tid;
  logic rel_valid = 0, rel_busy; logic [7:0] rel_head = 0;
  logic [7:0] q_tid [1] = '{0};
  logic [31:0] q_pc [1], q_index [1]; logic [5:0] q_fid [1];
  logic [9:0] q_loc [1], q_shr [1], q_dep [1]; tstate_e q_state [1];
  logic [8:0] n_empty; logic [1:0] n_ready;

  thread_table #(.NTHREADS(NT), .NQ(1), .NS(2)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] t [3];
  initial begin
    repeat (2) @(posedge clk); rst_n <= 1;
    @(negedge clk);
    chk(n_empty == NT && alloc_ok && alloc_tid == 0, "empty list full after reset");
    // allocate three threads of family 5, chained in its membership list
    for (int i = 0; i < 3; i++) begin
      alloc_valid = 1; alloc_fid = 5; alloc_fam_has_tail = (i > 0);
      alloc_fam_tail = (i > 0) ? t[i-1] : 8'd0;
      t[i] = alloc_tid;
      ctx_valid = 1; ctx_tid = alloc_tid; ctx_pc = 32'h100 + 32'(i); ctx_index = 32'(i * 3);
      ctx_loc = 10'(40 + i); ctx_shr = 10'(20 + i); ctx_dep = 10'(10 + i);
      @(negedge clk);
    end
    alloc_valid = 0; ctx_valid = 0;
    chk(t[0] == 0 && t[1] == 1 && t[2] == 2, "threads taken from empty head in order");
    chk(n_empty == NT - 3, "three entries used");
    q_tid[0] = 1; #1;
    chk(q_pc[0] == 32'h101 && q_index[0] == 3 && q_fid[0] == 5 && q_loc[0] == 41 &&
        q_shr[0] == 21 && q_dep[0] == 11 && q_state[0] == TS_WAITING, "context of thread 1");
    // thread 0 alone to ready; threads 1,2 as a linked list
    app_valid = 1; app_head = 0; app_tail = 0;
    @(negedge clk);
    q_tid[0] = 0; #1 chk(q_state[0] == TS_READY, "single append marks ready");
    link_valid = 1; link_tid = 1; link_next = 2;
    app_valid = 0;
    @(negedge clk); link_valid = 0;
    app_valid = 1; app_head = 1; app_tail = 2;
    @(negedge clk); app_valid = 0;
    chk(pop_ok && pop_tid == 0 && n_ready == 2, "ready head is thread 0");
    pop_en = 1; @(negedge clk);
    chk(pop_tid == 1, "then thread 1");
    // pop thread 1 and append thread 0 again in the same cycle
    app_valid = 1; app_head = 0; app_tail = 0;
    @(negedge clk); app_valid = 0;
    chk(pop_tid == 2, "then thread 2");
    @(negedge clk);
    chk(pop_tid == 0 && n_ready == 1, "re-appended thread 0 last");
    @(negedge clk); pop_en = 0;
    chk(!pop_ok && n_ready == 0, "ready list empty");
    q_tid[0] = 2; #1 chk(q_state[0] == TS_RUNNING, "popped thread is running");
    // state port: thread 2 ends
    st_valid[0] = 1; st_tid[0] = 2; st_state[0] = TS_UNUSED;
    st_valid[1] = 1; st_tid[1] = 1; st_state[1] = TS_SUSPENDED;
    @(negedge clk); st_valid[0] = 0; st_valid[1] = 0;
    #1 chk(q_state[0] == TS_UNUSED, "thread 2 unused");
    // release family 5 from its membership head
    rel_valid = 1; rel_head = 0;
    @(negedge clk); rel_valid = 0;
    chk(rel_busy && !alloc_ok, "release walk blocks allocation");
    while (rel_busy) @(negedge clk);
    chk(n_empty == NT, "all entries back on the empty list");
    q_tid[0] = 1; #1 chk(q_state[0] == TS_EMPTY, "released entry empty");
    // the released entries are at the tail: 3..255 come first, then 0,1,2
    alloc_valid = 1; alloc_fam_has_tail = 0;
    for (int i = 3; i < NT; i++) begin
      if (alloc_tid != 8'(i)) begin chk(0, "allocation order after release"); break; end
      @(negedge clk);
    end
    chk(alloc_tid == 0, "released thread 0 follows thread 255");
    @(negedge clk); chk(alloc_tid == 1, "then 1");
    @(negedge clk); chk(alloc_tid == 2, "then 2");
    @(negedge clk); alloc_valid = 0;
    chk(!alloc_ok && n_empty == 0, "table full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
