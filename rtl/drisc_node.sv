// drisc_node: one microthreaded DRISC core's thread and family machinery
// together with its node of the delegation network.
//
// The core runs families of identical threads. A family is allocated in the
// family table, given its parameters (code address, index start/step/count,
// block size, register counts, the creator's register for the return code)
// and then created. Creation allocates one contiguous block of registers
// (remote shareds, globals, then one slot of shareds and locals per thread),
// shrinking the block size if fewer registers are free, and then creates one
// thread per cycle until the block is full, the thread table is empty or all
// indices exist. Each new thread has its registers set empty and its index
// written to its first local. When a thread ends and indices remain, its
// table entry and registers are reused for the next index; in a family with
// shared registers this waits until the thread's successor has ended too, so
// that the successor has read the shareds before they are cleared. When the
// last thread has ended and no writes of the core are outstanding, the
// creator's return-code register, which the create had set empty, is written
// (code 0, normal termination; this wakes a creator suspended on it), the
// registers and thread entries are released and the family entry is freed.
//
// Threads that become runnable (created, woken by a register write, or
// switched) go through a recheck queue to the I-cache, which puts them on the
// ready list or on the waiting list of a line being fetched. The pipeline is
// outside this module: it takes threads from the ready list (iss_*), fetches
// instructions (if_*), reads registers with suspension (rr_*), writes them
// (rw_*), issues loads and stores (ld_*, st_*) and reports thread ends and
// switches (ev_*). The caches share one tagged memory port (m_*) whose
// responses may come in any order. The router of the delegation network is
// brought out on its own ports (rt_*).
//
// The mechanisms are the document's. Its instruction set and pipeline, the
// break, squeeze and kill actions, the shared FPU, the L2/COMA memory, the
// protocol ring and inter-core register sharing are not part of this module.
// The command and event interfaces, the recheck queue, the single family in
// creation at a time and the return code 0 are this design's own choices.
// A thread's dependents point at the shareds of the previously created
// thread (at the remote shareds for the first one). The top eight registers
// are kept out of allocation for the root context outside any family, so
// its parent and shared registers can never be taken by a family.
module drisc_node
  import drisc_pkg::*;
#(
  parameter int unsigned NREGS        = 1024,
  parameter int unsigned NTHREADS     = 256,
  parameter int unsigned NFAMILIES    = 64,
  parameter int unsigned ICACHE_BYTES = 1024,
  parameter int unsigned DCACHE_BYTES = 1024,
  parameter int unsigned LINE_BYTES   = 64,
  localparam int unsigned RW = $clog2(NREGS),
  localparam int unsigned TW = $clog2(NTHREADS),
  localparam int unsigned FW = $clog2(NFAMILIES),
  localparam int unsigned LB = LINE_BYTES * 8
) (
  input  logic          clk,
  input  logic          rst_n,
  // family commands
  input  logic          fc_valid,
  input  fcop_e         fc_op,
  input  logic [FW-1:0] fc_fid,
  input  fparam_e       fc_sel,
  input  logic [31:0]   fc_data,
  output logic          fc_ready,
  output logic          fc_alloc_ok,
  output logic [FW-1:0] fc_alloc_fid,
  // issue of the ready-list head to the pipeline
  output logic          iss_valid,
  input  logic          iss_en,
  output logic [TW-1:0] iss_tid,
  output logic [31:0]   iss_pc,
  output logic [FW-1:0] iss_fid,
  output logic [31:0]   iss_index,
  output logic [RW-1:0] iss_loc,
  output logic [RW-1:0] iss_shr,
  output logic [RW-1:0] iss_dep,
  output logic [RW-1:0] iss_glob,
  // instruction fetch
  input  logic [31:0]   if_pc,
  output logic          if_hit,
  output logic [31:0]   if_instr,
  // thread events
  input  logic          ev_valid,
  input  evop_e         ev_op,
  input  logic [TW-1:0] ev_tid,
  input  logic [31:0]   ev_pc,
  // register read (suspending) and write
  input  logic          rr_valid,
  input  logic [RW-1:0] rr_addr,
  input  logic [TW-1:0] rr_tid,
  output logic          rr_full,
  output logic [63:0]   rr_data,
  input  logic          rw_valid,
  input  logic [RW-1:0] rw_addr,
  input  logic [63:0]   rw_data,
  // loads and stores
  input  logic          ld_valid,
  input  logic [RW-1:0] ld_reg,
  input  logic [31:0]   ld_addr,
  input  logic [1:0]    ld_size,
  output logic          ld_ready,
  input  logic          st_valid,
  input  logic [31:0]   st_addr,
  input  logic [63:0]   st_data,
  input  logic [1:0]    st_size,
  output logic          st_ready,
  // tagged memory port
  output logic          m_req_valid,
  input  logic          m_req_ready,
  output mtag_t         m_req_tag,
  output logic [31:0]   m_req_addr,
  output logic [63:0]   m_req_wdata,
  output logic [1:0]    m_req_wsize,
  input  logic          m_rsp_valid,
  input  mtag_t         m_rsp_tag,
  input  logic [LB-1:0] m_rsp_data,
  // family termination
  output logic          fdone_valid,
  output logic [FW-1:0] fdone_fid,
  // delegation network router
  input  logic [3:0]    rt_my_x,
  input  logic [3:0]    rt_my_y,
  input  logic [4:0]    rt_in_valid,
  input  logic [8:0]    rt_in_flit  [5],
  output logic [4:0]    rt_in_ready,
  output logic [4:0]    rt_out_valid,
  output logic [8:0]    rt_out_flit [5],
  input  logic [4:0]    rt_out_ready,
  // event counters
  output logic [15:0]   n_created,
  output logic [15:0]   n_reused,
  output logic [15:0]   n_suspends,
  output logic [15:0]   n_wakes,
  output logic [15:0]   n_terminated,
  output logic [15:0]   n_shrunk,
  output logic [15:0]   n_ijoin,
  output logic [15:0]   n_imiss,
  output logic [15:0]   n_dmiss,
  output logic [15:0]   n_parked,
  output logic [15:0]   n_routed
);

  // ------------------------------------------------------------------
  // sub-blocks and their connecting signals
  // ------------------------------------------------------------------
  // thread table
  logic          tt_alloc_valid, tt_alloc_ok, tt_fam_has_tail;
  logic [TW-1:0] tt_alloc_tid, tt_fam_tail;
  logic [FW-1:0] tt_alloc_fid;
  logic          tt_ctx_valid;
  logic [TW-1:0] tt_ctx_tid;
  logic [31:0]   tt_ctx_pc, tt_ctx_index;
  logic [RW-1:0] tt_ctx_loc, tt_ctx_shr, tt_ctx_dep;
  logic          tt_st_valid [2];
  logic [TW-1:0] tt_st_tid   [2];
  tstate_e       tt_st_state [2];
  logic          tt_st_pcv   [2];
  logic [31:0]   tt_st_pc    [2];
  logic          tt_link_valid, tt_app_valid, tt_pop_ok, tt_pop_en;
  logic [TW-1:0] tt_link_tid, tt_link_next, tt_app_head, tt_app_tail, tt_pop_tid;
  logic          tt_rel_valid, tt_rel_busy;
  logic [TW-1:0] tt_rel_head;
  logic [TW-1:0] tt_q_tid   [3];
  logic [31:0]   tt_q_pc    [3];
  logic [31:0]   tt_q_index [3];
  logic [FW-1:0] tt_q_fid   [3];
  logic [RW-1:0] tt_q_loc   [3];
  logic [RW-1:0] tt_q_shr   [3];
  logic [RW-1:0] tt_q_dep   [3];
  tstate_e       tt_q_state [3];
  logic [TW:0]   tt_n_empty;
  logic [1:0]    tt_n_ready;

  // family table
  logic          ft_alloc_valid, ft_par_valid, ft_wr_valid, ft_free_valid;
  logic [FW-1:0] ft_rd_fid, ft_rd2_fid, ft_wr_fid, ft_free_fid;
  fam_t          ft_rd, ft_rd2, ft_wr, ft_rd_iss;
  logic          ft_alloc_valid_ok;
  logic [FW-1:0] ft_alloc_fid;
  logic [FW:0]   ft_n_free;

  // register file and allocator
  logic          rf_init_valid;
  logic [RW-1:0] rf_init_base;
  logic [RW:0]   rf_init_cnt;
  logic          rf_suspend;
  logic          rf_wake_a, rf_wake_b, rf_wake_c;
  logic [TW-1:0] rf_wake_a_tid, rf_wake_b_tid, rf_wake_c_tid;
  logic          rf_wc_valid;
  logic [RW-1:0] rf_wc_addr;
  logic [63:0]   rf_wc_data;
  logic          dc_wr_valid, dc_park_valid, dc_link_valid;
  logic [RW-1:0] dc_wr_addr, dc_park_addr, dc_link_addr, dc_link_next, dc_raw_addr;
  logic [63:0]   dc_wr_data, rf_raw_data;
  logic [5:0]    dc_park_off;
  logic [1:0]    dc_park_size;
  rstate_e       rf_raw_state;

  logic          ra_req, ra_busy, ra_done, ra_ok, ra_free_valid;
  logic [RW:0]   ra_fixed, ra_per, ra_size, ra_free_size;
  logic [8:0]    ra_blk_req, ra_blk;
  logic [RW-1:0] ra_base, ra_free_base;
  logic [$clog2(NREGS/8):0] ra_free_gran;

  // caches and memory
  logic          ic_lk_valid, ic_lk_ready, ic_lk_hit;
  logic [TW-1:0] ic_lk_tid;
  logic [31:0]   ic_lk_pc;
  logic          ic_req_valid, ic_req_ready, dc_req_valid, dc_req_ready;
  mtag_t         ic_req_tag, dc_req_tag, rsp_tag;
  logic [31:0]   ic_req_addr, dc_req_addr;
  logic [63:0]   dc_req_wdata;
  logic [1:0]    dc_req_wsize;
  logic          ic_rsp_valid, dc_rsp_valid;
  logic [LB-1:0] rsp_data;
  logic [15:0]   dc_wr_pending;

  // ------------------------------------------------------------------
  // recheck queue: threads that must consult the I-cache
  // ------------------------------------------------------------------
  localparam int unsigned NPUSH = 5;
  logic [TW-1:0] rq_q [NTHREADS];
  logic [TW-1:0] rq_rd_q, rq_wr_q;
  logic [TW:0]   rq_cnt_q;
  logic          push_v [NPUSH];
  logic [TW-1:0] push_t [NPUSH];
  logic          eng_push;
  logic [TW-1:0] eng_push_tid;
  logic          rq_pop;

  assign push_v[0] = rf_wake_a;  assign push_t[0] = rf_wake_a_tid;
  assign push_v[1] = rf_wake_b;  assign push_t[1] = rf_wake_b_tid;
  assign push_v[2] = rf_wake_c;  assign push_t[2] = rf_wake_c_tid;
  assign push_v[3] = ev_valid && ev_op == EV_SWITCH;
  assign push_t[3] = ev_tid;
  assign push_v[4] = eng_push;   assign push_t[4] = eng_push_tid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rq_rd_q <= '0; rq_wr_q <= '0; rq_cnt_q <= '0;
      for (int i = 0; i < NTHREADS; i++) rq_q[i] <= '0;
    end else begin
      logic [TW-1:0] w;
      logic [TW:0]   c;
      w = rq_wr_q;
      c = rq_cnt_q;
      for (int k = 0; k < NPUSH; k++) begin
        if (push_v[k]) begin
          rq_q[w] <= push_t[k];
          w = w + 1'b1;
          c = c + 1'b1;
        end
      end
      if (rq_pop) begin
        rq_rd_q <= rq_rd_q + 1'b1;
        c = c - 1'b1;
      end
      rq_wr_q  <= w;
      rq_cnt_q <= c;
    end
  end

  assign tt_q_tid[0]  = rq_q[rq_rd_q];
  assign ic_lk_valid  = (rq_cnt_q != '0);
  assign ic_lk_tid    = rq_q[rq_rd_q];
  assign ic_lk_pc     = tt_q_pc[0];
  assign rq_pop       = ic_lk_valid && ic_lk_ready;

  // ------------------------------------------------------------------
  // issue to the pipeline
  // ------------------------------------------------------------------
  assign tt_q_tid[2] = tt_pop_tid;
  assign iss_valid   = tt_pop_ok;
  assign iss_tid     = tt_pop_tid;
  assign iss_pc      = tt_q_pc[2];
  assign iss_fid     = tt_q_fid[2];
  assign iss_index   = tt_q_index[2];
  assign iss_loc     = tt_q_loc[2];
  assign iss_shr     = tt_q_shr[2];
  assign iss_dep     = tt_q_dep[2];
  assign tt_pop_en   = iss_en && tt_pop_ok;
  // globals follow the remote shareds at the start of the family's block
  assign iss_glob    = RW'(ft_rd_iss.reg_base + 16'(ft_rd_iss.nshr));

  // ------------------------------------------------------------------
  // family commands and creation
  // ------------------------------------------------------------------
  typedef enum logic [2:0] {CR_IDLE, CR_REQ, CR_WAIT, CR_SETUP, CR_RUN} cr_e;
  cr_e           cr_q;
  logic [FW-1:0] cr_fid_q;
  logic [RW-1:0] cr_base_q;
  logic [RW:0]   cr_size_q;
  logic [8:0]    cr_blk_q;

  typedef enum logic [1:0] {T_SCAN, T_WRITE, T_WAIT, T_WALK} term_e;
  term_e         term_q;
  logic [FW-1:0] tscan_q, tfid_q;
  assign ft_rd2_fid = tscan_q;

  assign fc_alloc_ok  = ft_alloc_valid_ok;
  assign fc_alloc_fid = ft_alloc_fid;
  always_comb begin
    unique case (fc_op)
      FC_ALLOC:  fc_ready = ft_alloc_valid_ok;
      FC_SET:    fc_ready = 1'b1;
      FC_CREATE: fc_ready = (cr_q == CR_IDLE);
      default:   fc_ready = 1'b1;
    endcase
  end
  assign ft_alloc_valid = fc_valid && fc_op == FC_ALLOC;
  assign ft_par_valid   = fc_valid && fc_op == FC_SET;

  // requested block: 0 means as many as fit; never more than the count
  logic [31:0] req_blk32;
  always_comb begin
    req_blk32 = (ft_rd.block == '0) ? 32'(NTHREADS) : 32'(ft_rd.block);
    if (req_blk32 > 32'(NTHREADS)) req_blk32 = 32'(NTHREADS);
    if (ft_rd.count != '0 && ft_rd.count < req_blk32) req_blk32 = ft_rd.count;
  end

  // ------------------------------------------------------------------
  // engine: thread end / reuse, creation of new threads, entry updates
  // ------------------------------------------------------------------
  // A thread's slot (entry and registers) may only be reused for a new
  // index once nothing can still read it: in a family with shareds, that is
  // when its successor has ended too. Ended threads whose slot is free to go
  // are queued as "retired"; the engine takes one retired thread per cycle
  // and either reuses it for the next index or, if no index is left, drops
  // it from the family's live count.
  logic          ev_end;
  logic          ended_q  [NTHREADS];
  logic          queued_q [NTHREADS];   // already in the retire queue
  logic          succe_q  [NTHREADS];   // successor has ended
  logic          predv_q  [NTHREADS];
  logic [TW-1:0] pred_q   [NTHREADS];
  logic [TW-1:0] retq_q   [NTHREADS];
  logic [TW-1:0] ret_rd_q, ret_wr_q;
  logic [TW:0]   ret_cnt_q;
  logic          ret_act;
  logic [TW-1:0] ret_tid;
  logic          eng_busy;
  assign ev_end   = ev_valid && ev_op == EV_END;
  assign ret_act  = !ev_end && (ret_cnt_q != '0);
  assign ret_tid  = retq_q[ret_rd_q];
  assign eng_busy = ev_end || ret_act;
  assign tt_q_tid[1] = ev_end ? ev_tid : ret_tid;
  assign ft_rd_fid   = eng_busy ? tt_q_fid[1] : cr_fid_q;

  logic [31:0] next_index;
  assign next_index = ft_rd.start + ft_rd.created * ft_rd.step;
  logic more;
  assign more = (ft_rd.count == '0) || (ft_rd.created < ft_rd.count);

  logic [RW-1:0] new_shr, new_loc, new_dep;
  logic [RW:0]   per_thread;
  assign per_thread = (RW+1)'(ft_rd.nshr) + (RW+1)'(ft_rd.nloc);
  assign new_shr = RW'(ft_rd.reg_base + 16'(ft_rd.nshr) + 16'(ft_rd.nglob)
                   + ft_rd.nalloc * 16'(per_thread));
  assign new_loc = new_shr + RW'(ft_rd.nshr);
  assign new_dep = ft_rd.has_prev ? RW'(ft_rd.prev_shr) : RW'(ft_rd.reg_base);

  logic term_wants_c;
  assign term_wants_c = (term_q == T_WRITE);
  logic cr_can_alloc;
  assign cr_can_alloc = (cr_q == CR_RUN) && !eng_busy && !term_wants_c && more &&
                        (ft_rd.nalloc < 16'(cr_blk_q)) && tt_alloc_ok;
  logic cr_finished;
  assign cr_finished = (cr_q == CR_RUN) && !eng_busy &&
                       (!more || ft_rd.nalloc >= 16'(cr_blk_q));

  always_comb begin
    fam_t nf;
    nf = ft_rd;
    ft_wr_valid = 1'b0;
    ft_wr       = ft_rd;
    ft_wr_fid   = ft_rd_fid;
    tt_alloc_valid = 1'b0; tt_alloc_fid = cr_fid_q;
    tt_fam_has_tail = ft_rd.mem_valid; tt_fam_tail = TW'(ft_rd.mem_tail);
    tt_ctx_valid = 1'b0; tt_ctx_tid = tt_alloc_tid;
    tt_ctx_pc = ft_rd.pc; tt_ctx_index = next_index;
    tt_ctx_loc = new_loc; tt_ctx_shr = new_shr; tt_ctx_dep = new_dep;
    rf_init_valid = 1'b0; rf_init_base = new_shr; rf_init_cnt = per_thread;
    rf_wc_valid = 1'b0; rf_wc_addr = new_loc; rf_wc_data = 64'(next_index);
    eng_push = 1'b0; eng_push_tid = tt_alloc_tid;
    tt_st_valid[0] = 1'b0; tt_st_tid[0] = ev_tid; tt_st_state[0] = TS_UNUSED;
    tt_st_pcv[0] = 1'b0; tt_st_pc[0] = ev_pc;
    if (ev_end) begin
      // the thread leaves the pipeline for good; retirement is queued below
      tt_st_valid[0] = 1'b1;
    end else if (ret_act) begin
      ft_wr_valid = 1'b1;
      if (more && ft_rd.state == FS_CREATING) begin
        // reuse the retired thread's entry and registers for the next index
        tt_ctx_valid  = 1'b1;
        tt_ctx_tid    = ret_tid;
        tt_ctx_shr    = tt_q_shr[1];
        tt_ctx_loc    = tt_q_loc[1];
        tt_ctx_dep    = new_dep;
        rf_init_valid = 1'b1;
        rf_init_base  = tt_q_shr[1];
        rf_wc_valid   = 1'b1;
        rf_wc_addr    = tt_q_loc[1];
        eng_push      = 1'b1;
        eng_push_tid  = ret_tid;
        nf.created    = ft_rd.created + 1'b1;
        nf.has_prev   = 1'b1;
        nf.prev_shr   = 16'(tt_q_shr[1]);
        nf.prev_tid   = 16'(ret_tid);
      end else begin
        nf.live = ft_rd.live - 1'b1;
        if (ft_rd.live == 16'd1 && !more) nf.state = FS_DONE;
      end
      ft_wr = nf;
    end else if (cr_q == CR_REQ) begin
      // the create empties the creator's return-code register
      rf_init_valid = 1'b1;
      rf_init_base  = RW'(ft_rd.parent_reg);
      rf_init_cnt   = (RW+1)'(1);
    end else if (cr_q == CR_SETUP && !term_wants_c) begin
      ft_wr_valid = 1'b1;
      nf.state    = FS_CREATING;
      nf.reg_base = 16'(cr_base_q);
      nf.reg_size = 16'(cr_size_q);
      nf.block    = 16'(cr_blk_q);
      ft_wr = nf;
    end else if (cr_can_alloc) begin
      tt_alloc_valid = 1'b1;
      tt_ctx_valid   = 1'b1;
      rf_init_valid  = 1'b1;
      rf_wc_valid    = 1'b1;
      eng_push       = 1'b1;
      ft_wr_valid    = 1'b1;
      nf.created   = ft_rd.created + 1'b1;
      nf.live      = ft_rd.live + 1'b1;
      nf.nalloc    = ft_rd.nalloc + 1'b1;
      nf.has_prev  = 1'b1;
      nf.prev_shr  = 16'(new_shr);
      nf.prev_tid  = 16'(tt_alloc_tid);
      nf.mem_valid = 1'b1;
      nf.mem_tail  = 16'(tt_alloc_tid);
      if (!ft_rd.mem_valid) nf.mem_head = 16'(tt_alloc_tid);
      ft_wr = nf;
    end else if (cr_finished && ft_rd.live == '0) begin
      // every thread ended before creation could go on (count reached)
      ft_wr_valid = 1'b1;
      nf.state    = FS_DONE;
      ft_wr = nf;
    end
    if (term_wants_c && !eng_busy) begin
      rf_wc_valid = 1'b1;
      rf_wc_addr  = RW'(ft_rd2.parent_reg);
      rf_wc_data  = 64'd0;
    end
    // a register read that suspends its thread
    if (!tt_st_valid[0] && rf_suspend) begin
      tt_st_valid[0] = 1'b1;
      tt_st_tid[0]   = rr_tid;
      tt_st_state[0] = TS_SUSPENDED;
    end else if (!tt_st_valid[0] && ev_valid && ev_op == EV_SWITCH) begin
      tt_st_valid[0] = 1'b1;
      tt_st_state[0] = TS_WAITING;
      tt_st_pcv[0]   = 1'b1;
    end
  end

  // a thread switched to a new PC must look up the I-cache with that PC:
  // the PC is written by st port 0 in the same cycle it is queued.
  // Lookups that wait on a line being fetched record the waiting state.
  assign tt_st_valid[1] = rq_pop && !tt_app_valid;
  assign tt_st_tid[1]   = ic_lk_tid;
  assign tt_st_state[1] = TS_WAITING;
  assign tt_st_pcv[1]   = 1'b0;
  assign tt_st_pc[1]    = '0;

  assign ra_req     = (cr_q == CR_REQ) && !ra_busy && !eng_busy;

  // ---- end-of-thread bookkeeping and the retire queue ----
  logic          dep_fam;
  logic [TW-1:0] ev_pred;
  logic          ret_self, ret_pred;
  assign dep_fam  = (ft_rd.nshr != '0);
  assign ev_pred  = pred_q[ev_tid];
  assign ret_self = !dep_fam || succe_q[ev_tid] || !more;
  assign ret_pred = dep_fam && predv_q[ev_tid] && ended_q[ev_pred] && !queued_q[ev_pred];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NTHREADS; i++) begin
        ended_q[i] <= 1'b0; queued_q[i] <= 1'b0; succe_q[i] <= 1'b0;
        predv_q[i] <= 1'b0; pred_q[i] <= '0; retq_q[i] <= '0;
      end
      ret_rd_q <= '0; ret_wr_q <= '0; ret_cnt_q <= '0;
    end else begin
      logic [TW-1:0] w;
      logic [TW:0]   c;
      w = ret_wr_q;
      c = ret_cnt_q;
      if (ev_end) begin
        ended_q[ev_tid]  <= 1'b1;
        queued_q[ev_tid] <= ret_self;
        if (predv_q[ev_tid]) succe_q[ev_pred] <= 1'b1;
        if (ret_self) begin retq_q[w] <= ev_tid; w = w + 1'b1; c = c + 1'b1; end
        if (ret_pred) begin
          queued_q[ev_pred] <= 1'b1;
          retq_q[w] <= ev_pred; w = w + 1'b1; c = c + 1'b1;
        end
      end
      if (ret_act) begin
        ret_rd_q <= ret_rd_q + 1'b1;
        c = c - 1'b1;
      end
      // a thread (re)created for a new index starts with fresh links
      if (tt_ctx_valid) begin
        ended_q[tt_ctx_tid]  <= 1'b0;
        queued_q[tt_ctx_tid] <= 1'b0;
        succe_q[tt_ctx_tid]  <= 1'b0;
        predv_q[tt_ctx_tid]  <= ft_rd.has_prev;
        pred_q[tt_ctx_tid]   <= TW'(ft_rd.prev_tid);
      end
      ret_wr_q  <= w;
      ret_cnt_q <= c;
    end
  end
  assign ra_fixed   = (RW+1)'(ft_rd.nshr) + (RW+1)'(ft_rd.nglob);
  assign ra_per     = per_thread;
  assign ra_blk_req = 9'(req_blk32);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cr_q <= CR_IDLE; cr_fid_q <= '0; cr_base_q <= '0; cr_size_q <= '0; cr_blk_q <= '0;
      n_created <= '0; n_reused <= '0; n_suspends <= '0; n_wakes <= '0;
      n_shrunk <= '0; n_ijoin <= '0;
    end else begin
      unique case (cr_q)
        CR_IDLE: if (fc_valid && fc_op == FC_CREATE) begin
          cr_fid_q <= fc_fid;
          cr_q     <= CR_REQ;
        end
        CR_REQ:  if (!eng_busy && ra_req) cr_q <= CR_WAIT;
        CR_WAIT: if (ra_done) begin
          if (ra_ok) begin
            cr_base_q <= ra_base; cr_size_q <= ra_size; cr_blk_q <= ra_blk;
            if (ra_blk != ra_blk_req) n_shrunk <= n_shrunk + 1'b1;
            cr_q <= CR_SETUP;
          end else begin
            cr_q <= CR_REQ;   // no registers free: try again
          end
        end
        CR_SETUP: if (!eng_busy && !term_wants_c) cr_q <= CR_RUN;
        CR_RUN:   if (cr_finished) cr_q <= CR_IDLE;
        default:  cr_q <= CR_IDLE;
      endcase
      if (cr_can_alloc) n_created <= n_created + 1'b1;
      if (ret_act && tt_ctx_valid) n_reused <= n_reused + 1'b1;
      if (rf_suspend) n_suspends <= n_suspends + 1'b1;
      n_wakes <= n_wakes + 16'(rf_wake_a) + 16'(rf_wake_b) + 16'(rf_wake_c);
      if (rq_pop && tt_link_valid) n_ijoin <= n_ijoin + 1'b1;
    end
  end

  // ------------------------------------------------------------------
  // termination: write the return code, release threads and registers
  // ------------------------------------------------------------------
  assign tt_rel_valid  = (term_q == T_WRITE) && !eng_busy && ft_rd2.mem_valid;
  assign tt_rel_head   = TW'(ft_rd2.mem_head);
  assign ra_free_valid = (term_q == T_WRITE) && !eng_busy;
  assign ra_free_base  = RW'(ft_rd2.reg_base);
  assign ra_free_size  = (RW+1)'(ft_rd2.reg_size);
  assign ft_free_valid = (term_q == T_WALK) && !tt_rel_busy;
  assign ft_free_fid   = tfid_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      term_q <= T_SCAN; tscan_q <= '0; tfid_q <= '0;
      fdone_valid <= 1'b0; fdone_fid <= '0; n_terminated <= '0;
    end else begin
      fdone_valid <= 1'b0;
      unique case (term_q)
        T_SCAN: begin
          if (ft_rd2.state == FS_DONE && dc_wr_pending == '0) begin
            term_q <= T_WRITE;
            tfid_q <= tscan_q;
          end else begin
            tscan_q <= (tscan_q == FW'(NFAMILIES - 1)) ? '0 : tscan_q + 1'b1;
          end
        end
        T_WRITE: if (!eng_busy) begin
          fdone_valid  <= 1'b1;
          fdone_fid    <= tfid_q;
          n_terminated <= n_terminated + 1'b1;
          term_q       <= T_WAIT;
        end
        T_WAIT: term_q <= T_WALK;
        T_WALK: if (!tt_rel_busy) term_q <= T_SCAN;
        default: term_q <= T_SCAN;
      endcase
    end
  end

  // ------------------------------------------------------------------
  // instances
  // ------------------------------------------------------------------
  family_table #(.NFAMILIES(NFAMILIES)) u_ft (
    .clk, .rst_n,
    .alloc_valid(ft_alloc_valid), .alloc_ok(ft_alloc_valid_ok), .alloc_fid(ft_alloc_fid),
    .par_valid(ft_par_valid), .par_fid(fc_fid), .par_sel(fc_sel), .par_data(fc_data),
    .rd_fid(ft_rd_fid), .rd_entry(ft_rd), .rd2_fid(ft_rd2_fid), .rd2_entry(ft_rd2),
    .rd3_fid(tt_q_fid[2]), .rd3_entry(ft_rd_iss),
    .wr_valid(ft_wr_valid), .wr_fid(ft_wr_fid), .wr_entry(ft_wr),
    .free_valid(ft_free_valid), .free_fid(ft_free_fid), .n_free(ft_n_free)
  );

  thread_table #(.NTHREADS(NTHREADS), .NFAMILIES(NFAMILIES), .NREGS(NREGS), .NQ(3), .NS(2)) u_tt (
    .clk, .rst_n,
    .alloc_valid(tt_alloc_valid), .alloc_ok(tt_alloc_ok), .alloc_tid(tt_alloc_tid),
    .alloc_fid(tt_alloc_fid), .alloc_fam_has_tail(tt_fam_has_tail), .alloc_fam_tail(tt_fam_tail),
    .ctx_valid(tt_ctx_valid), .ctx_tid(tt_ctx_tid), .ctx_pc(tt_ctx_pc), .ctx_index(tt_ctx_index),
    .ctx_loc(tt_ctx_loc), .ctx_shr(tt_ctx_shr), .ctx_dep(tt_ctx_dep),
    .st_valid(tt_st_valid), .st_tid(tt_st_tid), .st_state(tt_st_state),
    .st_pc_valid(tt_st_pcv), .st_pc(tt_st_pc),
    .link_valid(tt_link_valid), .link_tid(tt_link_tid), .link_next(tt_link_next),
    .app_valid(tt_app_valid), .app_head(tt_app_head), .app_tail(tt_app_tail),
    .pop_ok(tt_pop_ok), .pop_en(tt_pop_en), .pop_tid(tt_pop_tid),
    .rel_valid(tt_rel_valid), .rel_head(tt_rel_head), .rel_busy(tt_rel_busy),
    .q_tid(tt_q_tid), .q_pc(tt_q_pc), .q_index(tt_q_index), .q_fid(tt_q_fid),
    .q_loc(tt_q_loc), .q_shr(tt_q_shr), .q_dep(tt_q_dep), .q_state(tt_q_state),
    .n_empty(tt_n_empty), .n_ready(tt_n_ready)
  );

  sync_regfile #(.NREGS(NREGS), .DW(64), .TID_W(TW)) u_rf (
    .clk, .rst_n,
    .init_valid(rf_init_valid), .init_base(rf_init_base), .init_cnt(rf_init_cnt),
    .rd_valid(rr_valid), .rd_addr(rr_addr), .rd_tid(rr_tid),
    .rd_full(rr_full), .rd_data(rr_data), .rd_suspend(rf_suspend),
    .wa_valid(rw_valid), .wa_addr(rw_addr), .wa_data(rw_data),
    .wb_valid(dc_wr_valid), .wb_addr(dc_wr_addr), .wb_data(dc_wr_data),
    .wake_a_valid(rf_wake_a), .wake_a_tid(rf_wake_a_tid),
    .wake_b_valid(rf_wake_b), .wake_b_tid(rf_wake_b_tid),
    .wc_valid(rf_wc_valid), .wc_addr(rf_wc_addr), .wc_data(rf_wc_data),
    .wake_c_valid(rf_wake_c), .wake_c_tid(rf_wake_c_tid),
    .park_valid(dc_park_valid), .park_addr(dc_park_addr), .park_off(dc_park_off),
    .park_size(dc_park_size),
    .link_valid(dc_link_valid), .link_addr(dc_link_addr), .link_next(dc_link_next),
    .raw_addr(dc_raw_addr), .raw_data(rf_raw_data), .raw_state(rf_raw_state)
  );

  // the last granule of eight registers is never handed to a family: it holds
  // the registers of the root context that issues the first creates
  reg_allocator #(.NREGS(NREGS - 8), .GRAN(8), .BW(9)) u_ra (
    .clk, .rst_n,
    .req(ra_req), .req_fixed(ra_fixed), .req_per_thread(ra_per), .req_block(ra_blk_req),
    .busy(ra_busy), .done(ra_done), .ok(ra_ok), .base(ra_base), .block(ra_blk), .size(ra_size),
    .free_valid(ra_free_valid), .free_base(ra_free_base), .free_size(ra_free_size),
    .free_granules(ra_free_gran)
  );

  icache #(.CACHE_BYTES(ICACHE_BYTES), .LINE_BYTES(LINE_BYTES), .NTHREADS(NTHREADS)) u_ic (
    .clk, .rst_n,
    .lk_valid(ic_lk_valid), .lk_tid(ic_lk_tid), .lk_pc(ic_lk_pc),
    .lk_ready(ic_lk_ready), .lk_hit(ic_lk_hit),
    .link_valid(tt_link_valid), .link_tid(tt_link_tid), .link_next(tt_link_next),
    .app_valid(tt_app_valid), .app_head(tt_app_head), .app_tail(tt_app_tail),
    .dec_valid(tt_pop_en), .dec_pc(iss_pc),
    .f_pc(if_pc), .f_hit(if_hit), .f_instr(if_instr),
    .req_valid(ic_req_valid), .req_ready(ic_req_ready), .req_tag(ic_req_tag), .req_addr(ic_req_addr),
    .rsp_valid(ic_rsp_valid), .rsp_idx(rsp_tag.idx), .rsp_data(rsp_data),
    .n_misses(n_imiss)
  );

  dcache #(.CACHE_BYTES(DCACHE_BYTES), .LINE_BYTES(LINE_BYTES), .NREGS(NREGS)) u_dc (
    .clk, .rst_n,
    .ld_valid, .ld_reg, .ld_addr, .ld_size, .ld_ready,
    .st_valid, .st_addr, .st_data, .st_size, .st_ready,
    .rf_wr_valid(dc_wr_valid), .rf_wr_addr(dc_wr_addr), .rf_wr_data(dc_wr_data),
    .rf_park_valid(dc_park_valid), .rf_park_addr(dc_park_addr), .rf_park_off(dc_park_off),
    .rf_park_size(dc_park_size),
    .rf_link_valid(dc_link_valid), .rf_link_addr(dc_link_addr), .rf_link_next(dc_link_next),
    .rf_raw_addr(dc_raw_addr), .rf_raw_data(rf_raw_data),
    .req_valid(dc_req_valid), .req_ready(dc_req_ready), .req_tag(dc_req_tag),
    .req_addr(dc_req_addr), .req_wdata(dc_req_wdata), .req_wsize(dc_req_wsize),
    .rsp_valid(dc_rsp_valid), .rsp_tag(rsp_tag), .rsp_data(rsp_data),
    .wr_pending(dc_wr_pending), .n_misses(n_dmiss), .n_parked_served(n_parked)
  );

  mem_arbiter #(.LINE_BYTES(LINE_BYTES)) u_arb (
    .clk, .rst_n,
    .i_req_valid(ic_req_valid), .i_req_ready(ic_req_ready), .i_req_tag(ic_req_tag),
    .i_req_addr(ic_req_addr),
    .d_req_valid(dc_req_valid), .d_req_ready(dc_req_ready), .d_req_tag(dc_req_tag),
    .d_req_addr(dc_req_addr), .d_req_wdata(dc_req_wdata), .d_req_wsize(dc_req_wsize),
    .m_req_valid, .m_req_ready, .m_req_tag, .m_req_addr, .m_req_wdata, .m_req_wsize,
    .m_rsp_valid, .m_rsp_tag, .m_rsp_data,
    .i_rsp_valid(ic_rsp_valid), .d_rsp_valid(dc_rsp_valid), .rsp_tag(rsp_tag), .rsp_data(rsp_data)
  );

  deleg_router #(.FLIT_W(9), .MSG_BITS(90), .BUF_BITS(180)) u_rt (
    .clk, .rst_n, .my_x(rt_my_x), .my_y(rt_my_y),
    .in_valid(rt_in_valid), .in_flit(rt_in_flit), .in_ready(rt_in_ready),
    .out_valid(rt_out_valid), .out_flit(rt_out_flit), .out_ready(rt_out_ready),
    .n_forwarded(n_routed)
  );

endmodule
