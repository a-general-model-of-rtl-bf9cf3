// End-to-end testbench for drisc_node at its default sizes (1024 registers,
// 256 threads, 64 families, 1 KB caches). The testbench plays the pipeline:
// it takes one thread at a time from the ready list and runs a small program
// for it, one action per cycle, leaving the pipeline whenever the thread
// suspends on a register, switches, or ends. Memory is a behavioural model
// with random latency and out-of-order answers.
//
// Family A (independent loop, like a data-parallel kernel): 64 threads,
// index 3, 5, 7, ..., 28 locals each, so only 36 fit in the register file
// and the block is shrunk and thread slots are reused. Each thread reads its
// index, loads x[i], waits for it, stores y[i] = 3*x[i] + i, and some threads
// switch to a second code line before they end.
// Family B (dependent reduction): 24 threads with one shared register; each
// thread loads x2[i], reads the shared of its predecessor (suspending until
// it is written) and writes sum + x2[i]. B is created while A still holds
// most of the registers, so B's block is shrunk as well; its slots are
// reused only once a thread's successor has read its shared.
// Checks: indices, stored results, the reduction, the return codes in the
// creators' registers, fetch hits for every issued thread, a message through
// the router, and that every mechanism occurred at least once.
module tb_drisc_node;
  import drisc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- DUT ----------------
  logic fc_valid = 0; fcop_e fc_op = FC_ALLOC; logic [5:0] fc_fid = 0; fparam_e fc_sel = FP_PC;
  logic [31:0] fc_data = 0; logic fc_ready, fc_alloc_ok; logic [5:0] fc_alloc_fid;
  logic iss_valid, iss_en = 0; logic [7:0] iss_tid; logic [31:0] iss_pc, iss_index;
  logic [5:0] iss_fid; logic [9:0] iss_loc, iss_shr, iss_dep, iss_glob;
  logic [31:0] if_pc = 0, if_instr; logic if_hit;
  logic ev_valid = 0; evop_e ev_op = EV_END; logic [7:0] ev_tid = 0; logic [31:0] ev_pc = 0;
  logic rr_valid = 0, rr_full; logic [9:0] rr_addr = 0; logic [7:0] rr_tid = 0; logic [63:0] rr_data;
  logic rw_valid = 0; logic [9:0] rw_addr = 0; logic [63:0] rw_data = 0;
  logic ld_valid = 0, ld_ready; logic [9:0] ld_reg = 0; logic [31:0] ld_addr = 0; logic [1:0] ld_size = 0;
  logic st_valid = 0, st_ready; logic [31:0] st_addr = 0; logic [63:0] st_data = 0; logic [1:0] st_size = 0;
  logic m_req_valid, m_req_ready; mtag_t m_req_tag; logic [31:0] m_req_addr;
  logic [63:0] m_req_wdata; logic [1:0] m_req_wsize;
  logic m_rsp_valid; mtag_t m_rsp_tag; logic [511:0] m_rsp_data;
  logic fdone_valid; logic [5:0] fdone_fid;
  logic [3:0] rt_my_x = 1, rt_my_y = 1;
  logic [4:0] rt_in_valid = 0, rt_in_ready, rt_out_valid, rt_out_ready = '1;
  logic [8:0] rt_in_flit [5], rt_out_flit [5];
  logic [15:0] n_created, n_reused, n_suspends, n_wakes, n_terminated, n_shrunk, n_ijoin;
  logic [15:0] n_imiss, n_dmiss, n_parked, n_routed;
  initial for (int p = 0; p < 5; p++) rt_in_flit[p] = 0;

  drisc_node dut (.*);

  int n_reordered;
  tagged_mem_model mem (.clk, .rst_n, .req_valid(m_req_valid), .req_ready(m_req_ready),
    .req_tag(m_req_tag), .req_addr(m_req_addr), .req_wdata(m_req_wdata), .req_wsize(m_req_wsize),
    .rsp_valid(m_rsp_valid), .rsp_tag(m_rsp_tag), .rsp_data(m_rsp_data), .n_reordered);

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- workload constants ----------------
  localparam logic [31:0] PC_A = 32'h0000_1000, PC_A2 = 32'h0000_1040, PC_B = 32'h0000_2000;
  localparam logic [31:0] X_A = 32'h0001_0000, Y_A = 32'h0002_0000, X_B = 32'h0003_0000;
  localparam int NA = 64, NB = 24, A_START = 3, A_STEP = 2;
  localparam logic [9:0] PAR_A = 10'd1016, PAR_B = 10'd1017;

  function automatic logic [63:0] mem_init(input logic [31:0] a);
    logic [63:0] v;
    for (int b = 0; b < 8; b++) v[b*8 +: 8] = 8'((a + 32'(b)) * 13 + 7);
    return v;
  endfunction

  // ---------------- the pipeline model ----------------
  int   step [256];
  logic [63:0] xv [256], sumin [256];
  logic [31:0] tidx [256];
  bit   switched [256];
  int   seen_a [NA];
  int   n_switch = 0, n_issue = 0, n_fetch_miss = 0, b_done = 0;
  logic [63:0] b_last_sum;
  int   fid_a = -1, fid_b = -1;

  bit cur = 0;
  logic [7:0] ct; logic [5:0] cf; logic [9:0] cl, cs, cd; logic [31:0] cpc;

  initial begin
    for (int i = 0; i < 256; i++) begin step[i] = 0; switched[i] = 0; end
    for (int i = 0; i < NA; i++) seen_a[i] = 0;
  end

  always @(negedge clk) begin
    iss_en = 0; rr_valid = 0; rw_valid = 0; ld_valid = 0; st_valid = 0; ev_valid = 0;
    if (rst_n) begin
      if (!cur) begin
        #1;
        if (iss_valid) begin
          iss_en = 1; ct = iss_tid; cf = iss_fid; cl = iss_loc; cs = iss_shr; cd = iss_dep;
          cpc = iss_pc; n_issue++;
          if_pc = iss_pc; #1;
          if (!if_hit) n_fetch_miss++;
          cur = 1;
        end
      end else if (int'(cf) == fid_a) begin
        unique case (step[ct])
          0: begin rr_valid = 1; rr_addr = cl; rr_tid = ct; #1;
               if (rr_full) begin tidx[ct] = rr_data[31:0]; step[ct] = 1; end
               else begin $display("FAIL: index register empty"); failures++; cur = 0; end
             end
          1: begin ld_valid = 1; ld_reg = cl + 1; ld_addr = X_A + tidx[ct] * 8; ld_size = 3; #1;
               if (ld_ready) step[ct] = 2; end
          2: begin rr_valid = 1; rr_addr = cl + 1; rr_tid = ct; #1;
               if (rr_full) begin xv[ct] = rr_data; step[ct] = 3; end
               else cur = 0;                       // suspended until the load returns
             end
          3: begin st_valid = 1; st_addr = Y_A + tidx[ct] * 8; st_size = 3;
               st_data = 3 * xv[ct] + 64'(tidx[ct]); #1;
               if (st_ready) step[ct] = 4; end
          4: begin
               if (tidx[ct] % 8 == 1 && !switched[ct]) begin
                 ev_valid = 1; ev_op = EV_SWITCH; ev_tid = ct; ev_pc = PC_A2;
                 switched[ct] = 1; n_switch++; cur = 0;
               end
               step[ct] = 5;
             end
          default: begin
               ev_valid = 1; ev_op = EV_END; ev_tid = ct;
               chk(int'(tidx[ct]) >= A_START && (int'(tidx[ct]) - A_START) % A_STEP == 0 &&
                   (int'(tidx[ct]) - A_START) / A_STEP < NA, "A index in range");
               seen_a[(int'(tidx[ct]) - A_START) / A_STEP]++;
               step[ct] = 0; switched[ct] = 0; cur = 0;
             end
        endcase
      end else begin
        unique case (step[ct])
          0: begin rr_valid = 1; rr_addr = cl; rr_tid = ct; #1;
               if (rr_full) begin tidx[ct] = rr_data[31:0]; step[ct] = 1; end
               else begin $display("FAIL: index register empty"); failures++; cur = 0; end
             end
          1: begin ld_valid = 1; ld_reg = cl + 1; ld_addr = X_B + tidx[ct] * 8; ld_size = 3; #1;
               if (ld_ready) step[ct] = 2; end
          2: begin rr_valid = 1; rr_addr = cl + 1; rr_tid = ct; #1;
               if (rr_full) begin xv[ct] = rr_data; step[ct] = 3; end
               else cur = 0;
             end
          3: begin
               if (tidx[ct] == 0) begin sumin[ct] = 0; step[ct] = 4; end
               else begin
                 rr_valid = 1; rr_addr = cd; rr_tid = ct; #1;
                 if (rr_full) begin sumin[ct] = rr_data; step[ct] = 4; end
                 else cur = 0;                     // waits for its predecessor
               end
             end
          4: begin rw_valid = 1; rw_addr = cs; rw_data = sumin[ct] + xv[ct]; step[ct] = 5;
               if (tidx[ct] == NB - 1) b_last_sum = sumin[ct] + xv[ct];
             end
          default: begin
               ev_valid = 1; ev_op = EV_END; ev_tid = ct; b_done++;
               step[ct] = 0; cur = 0;
             end
        endcase
      end
    end
  end

  // ---------------- family commands ----------------
  task automatic cmd(input fcop_e op, input logic [5:0] fid, input fparam_e sel, input logic [31:0] d);
    @(negedge clk);
    fc_valid = 1; fc_op = op; fc_fid = fid; fc_sel = sel; fc_data = d; #1;
    while (!fc_ready) begin @(negedge clk); #1; end
    @(negedge clk); fc_valid = 0;
  endtask

  task automatic make_family(output int fid, input logic [31:0] pc, input int start, input int step_,
                             input int count, input int nshr, input int nloc, input logic [9:0] par);
    @(negedge clk); #1;
    chk(fc_alloc_ok, "family entry available");
    fid = int'(fc_alloc_fid);
    cmd(FC_ALLOC, 0, FP_PC, 0);
    cmd(FC_SET, 6'(fid), FP_PC, pc);
    cmd(FC_SET, 6'(fid), FP_START, 32'(start));
    cmd(FC_SET, 6'(fid), FP_STEP, 32'(step_));
    cmd(FC_SET, 6'(fid), FP_COUNT, 32'(count));
    cmd(FC_SET, 6'(fid), FP_REGS, {16'd0, 6'd0, 5'(nshr), 5'(nloc)});
    cmd(FC_SET, 6'(fid), FP_PARENT, 32'(par));
  endtask

  int done_a = 0, done_b = 0;
  always @(posedge clk) if (rst_n && fdone_valid) begin
    if (int'(fdone_fid) == fid_a) done_a++;
    if (int'(fdone_fid) == fid_b) done_b++;
  end

  // creation rate: cycles between the first and the 36th creation
  longint t_first = 0, t_36 = 0;
  always @(posedge clk) begin
    if (n_created == 1 && t_first == 0) t_first = cyc;
    if (n_created == 36 && t_36 == 0) t_36 = cyc;
  end

  // ---------------- main sequence ----------------
  int rt_got;
  initial begin
    repeat (3) @(posedge clk); rst_n <= 1;
    repeat (2) @(negedge clk);
    make_family(fid_a, PC_A, A_START, A_STEP, NA, 0, 28, PAR_A);
    cmd(FC_CREATE, 6'(fid_a), FP_PC, 0);
    make_family(fid_b, PC_B, 0, 1, NB, 1, 2, PAR_B);
    cmd(FC_CREATE, 6'(fid_b), FP_PC, 0);   // accepted once A's creation is complete
    // router: one message from the local port to node (3,1) leaves east
    fork
      for (int f = 0; f < 10; f++) begin
        @(negedge clk);
        rt_in_valid[0] = 1; rt_in_flit[0] = (f == 0) ? {1'b0, 4'd1, 4'd3} : 9'(f); #1;
        while (!rt_in_ready[0]) begin @(negedge clk); #1; end
        @(negedge clk); rt_in_valid[0] = 0;
      end
    join_none
    wait (done_a > 0 && done_b > 0);
    repeat (5) @(negedge clk);
    // ---- results ----
    for (int i = 0; i < NA; i++) begin
      int idx;
      idx = A_START + i * A_STEP;
      chk(seen_a[i] == 1, $sformatf("A index %0d ran once (%0d)", idx, seen_a[i]));
    end
    begin
      int bad = 0;
      for (int i = 0; i < NA; i++) begin
        int idx; logic [63:0] got, x;
        idx = A_START + i * A_STEP;
        x = mem_init(X_A + 32'(idx * 8));
        for (int b = 0; b < 8; b++) got[b*8 +: 8] = mem.mem[int'(Y_A) + idx * 8 + b];
        if (got != 3 * x + 64'(idx)) bad++;
      end
      chk(bad == 0, $sformatf("A results in memory (%0d wrong)", bad));
    end
    begin
      logic [63:0] s = 0;
      for (int i = 0; i < NB; i++) s += mem_init(X_B + 32'(i * 8));
      chk(b_done == NB, "all B threads ended");
      chk(b_last_sum == s, "B reduction result");
    end
    chk(done_a == 1 && done_b == 1, "each family terminated once");
    rr_addr = PAR_A; #1 chk(rr_full && rr_data == 0, "A return code in creator register");
    rr_addr = PAR_B; #1 chk(rr_full && rr_data == 0, "B return code in creator register");
    chk(n_fetch_miss == 0, "every issued thread finds its I-cache line");
    chk(t_36 - t_first <= 2 * 36, $sformatf("creation about one thread per cycle (%0d)", t_36 - t_first));
    chk(n_created + n_reused == NA + NB, $sformatf("every index created once (%0d+%0d)", n_created, n_reused));
    chk(n_reused > 0, "slots reused for later indices");
    // ---- mechanisms seen ----
    chk(n_shrunk > 0, "block size shrunk");
    chk(n_suspends > 0, "threads suspended on registers");
    chk(n_wakes > 0, "threads woken by writes");
    chk(n_terminated == 2, "families terminated");
    chk(n_ijoin > 0, "threads joined an I-cache line being fetched");
    chk(n_imiss > 0, "I-cache misses");
    chk(n_dmiss > 0, "D-cache misses");
    chk(n_parked > 0, "parked reads served");
    chk(n_switch > 0, "thread switches");
    chk(n_reordered > 0, "out-of-order memory answers");
    chk(n_routed == 1, "delegation message routed");
    $display("INFO created=%0d reused=%0d susp=%0d wakes=%0d term=%0d shrunk=%0d ijoin=%0d imiss=%0d dmiss=%0d parked=%0d switch=%0d reord=%0d issue=%0d cycles=%0d",
             n_created, n_reused, n_suspends, n_wakes, n_terminated, n_shrunk, n_ijoin, n_imiss,
             n_dmiss, n_parked, n_switch, n_reordered, n_issue, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the message leaves on the east output
  always @(posedge clk) if (rst_n && rt_out_valid[2] && rt_out_ready[2]) rt_got <= rt_got + 1;
  initial rt_got = 0;
endmodule
