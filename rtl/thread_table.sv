// thread_table: the core's fixed-size table of thread contexts and the
// linked lists that schedule them.
//
// Each entry holds a thread's program counter, index in its family, family
// number, register-file bases (locals, shareds, dependents), state and two
// link fields: "next", used by the empty list, the ready list and the
// per-I-cache-line waiting lists, and "fnext", used by the per-family
// membership list. The empty and ready lists are processor-global and kept
// here as head/tail pairs; waiting lists live in the I-cache lines, which
// only need the link port to chain threads.
//
// Operations (all may occur in the same cycle unless noted):
//   alloc   - pop the empty list, write a new context, state waiting, and
//             append the thread to its family's membership list (the caller
//             gives the family's current membership tail). Not possible while
//             a release walk is running.
//   ctx     - rewrite the context of an existing thread (reuse for the next
//             index of the same family), state waiting.
//   st      - NS ports that set a thread's state (and optionally its PC): thread end,
//             suspend, switch, or wake.
//   link    - next[link_tid] = link_next (I-cache waiting lists).
//   append  - append a whole list (head..tail) to the ready list in one cycle.
//   pop     - take the ready-list head into the pipeline (state running).
//   query   - NQ read ports for the contexts of any threads.
//   release - walk a family's membership list, one thread per cycle, putting
//             each entry back on the empty list (forced or normal release).
// The entry fields, the six states and the lists follow the document. The
// ready state is only written for single-thread appends: a whole list
// appended at once keeps its recorded state until it is popped, as list
// membership already defines it. Everything updates at the clock edge;
// the list heads and the query port read combinationally.
module thread_table
  import drisc_pkg::*;
#(
  parameter int unsigned NTHREADS  = 256,
  parameter int unsigned NFAMILIES = 64,
  parameter int unsigned NREGS     = 1024,
  parameter int unsigned NQ        = 3,
  parameter int unsigned NS        = 2,
  localparam int unsigned TW = $clog2(NTHREADS),
  localparam int unsigned FW = $clog2(NFAMILIES),
  localparam int unsigned RW = $clog2(NREGS)
) (
  input  logic          clk,
  input  logic          rst_n,
  // alloc
  input  logic          alloc_valid,
  output logic          alloc_ok,
  output logic [TW-1:0] alloc_tid,
  input  logic [FW-1:0] alloc_fid,
  input  logic          alloc_fam_has_tail,
  input  logic [TW-1:0] alloc_fam_tail,
  // context written by alloc or ctx
  input  logic          ctx_valid,
  input  logic [TW-1:0] ctx_tid,
  input  logic [31:0]   ctx_pc,
  input  logic [31:0]   ctx_index,
  input  logic [RW-1:0] ctx_loc,
  input  logic [RW-1:0] ctx_shr,
  input  logic [RW-1:0] ctx_dep,
  // state change
  input  logic          st_valid    [NS],
  input  logic [TW-1:0] st_tid      [NS],
  input  tstate_e       st_state    [NS],
  input  logic          st_pc_valid [NS],
  input  logic [31:0]   st_pc       [NS],
  // link for waiting lists
  input  logic          link_valid,
  input  logic [TW-1:0] link_tid,
  input  logic [TW-1:0] link_next,
  // ready list
  input  logic          app_valid,
  input  logic [TW-1:0] app_head,
  input  logic [TW-1:0] app_tail,
  output logic          pop_ok,
  input  logic          pop_en,
  output logic [TW-1:0] pop_tid,
  // release walk
  input  logic          rel_valid,
  input  logic [TW-1:0] rel_head,
  output logic          rel_busy,
  // query ports
  input  logic [TW-1:0] q_tid   [NQ],
  output logic [31:0]   q_pc    [NQ],
  output logic [31:0]   q_index [NQ],
  output logic [FW-1:0] q_fid   [NQ],
  output logic [RW-1:0] q_loc   [NQ],
  output logic [RW-1:0] q_shr   [NQ],
  output logic [RW-1:0] q_dep   [NQ],
  output tstate_e       q_state [NQ],
  output logic [TW:0]   n_empty,
  output logic [1:0]    n_ready   // 0, 1, or 2 meaning two or more
);

  logic [31:0]   pc_q    [NTHREADS];
  logic [31:0]   idx_q   [NTHREADS];
  logic [FW-1:0] fid_q   [NTHREADS];
  logic [RW-1:0] loc_q   [NTHREADS];
  logic [RW-1:0] shr_q   [NTHREADS];
  logic [RW-1:0] dep_q   [NTHREADS];
  tstate_e       st_q    [NTHREADS];
  logic [TW-1:0] next_q  [NTHREADS];
  logic [TW-1:0] fnext_q [NTHREADS];
  logic          fnv_q   [NTHREADS];

  logic [TW-1:0] e_head_q, e_tail_q, r_head_q, r_tail_q;
  logic [TW:0]   e_cnt_q;
  logic [1:0]    r_cnt_q;
  logic          rel_busy_q;
  logic [TW-1:0] rel_cur_q;

  assign alloc_ok  = (e_cnt_q != '0) && !rel_busy_q;
  assign alloc_tid = e_head_q;
  assign pop_ok    = (r_cnt_q != '0);
  assign pop_tid   = r_head_q;
  assign rel_busy  = rel_busy_q;
  assign n_empty   = e_cnt_q;
  assign n_ready   = r_cnt_q;

  always_comb begin
    for (int k = 0; k < NQ; k++) begin
      q_pc[k]    = pc_q[q_tid[k]];
      q_index[k] = idx_q[q_tid[k]];
      q_fid[k]   = fid_q[q_tid[k]];
      q_loc[k]   = loc_q[q_tid[k]];
      q_shr[k]   = shr_q[q_tid[k]];
      q_dep[k]   = dep_q[q_tid[k]];
      q_state[k] = st_q[q_tid[k]];
    end
  end

  logic do_alloc, do_pop, do_app, rel_step;
  assign do_alloc = alloc_valid && alloc_ok;
  assign do_pop   = pop_en && pop_ok;
  assign do_app   = app_valid;
  assign rel_step = rel_busy_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NTHREADS; i++) begin
        pc_q[i] <= '0; idx_q[i] <= '0; fid_q[i] <= '0;
        loc_q[i] <= '0; shr_q[i] <= '0; dep_q[i] <= '0;
        st_q[i] <= TS_EMPTY;
        next_q[i] <= TW'(i + 1);
        fnext_q[i] <= '0; fnv_q[i] <= 1'b0;
      end
      e_head_q <= '0; e_tail_q <= TW'(NTHREADS - 1); e_cnt_q <= (TW+1)'(NTHREADS);
      r_head_q <= '0; r_tail_q <= '0; r_cnt_q <= '0;
      rel_busy_q <= 1'b0; rel_cur_q <= '0;
    end else begin
      // ---- alloc / release on the empty list (mutually exclusive) ----
      if (do_alloc) begin
        e_head_q <= next_q[e_head_q];
        e_cnt_q  <= e_cnt_q - 1'b1;
        st_q[e_head_q]  <= TS_WAITING;
        fid_q[e_head_q] <= alloc_fid;
        fnv_q[e_head_q] <= 1'b0;
        if (alloc_fam_has_tail) begin
          fnext_q[alloc_fam_tail] <= e_head_q;
          fnv_q[alloc_fam_tail]   <= 1'b1;
        end
      end else if (rel_step) begin
        if (e_cnt_q == '0) e_head_q <= rel_cur_q;
        else next_q[e_tail_q] <= rel_cur_q;
        e_tail_q <= rel_cur_q;
        e_cnt_q  <= e_cnt_q + 1'b1;
        st_q[rel_cur_q] <= TS_EMPTY;
        rel_cur_q <= fnext_q[rel_cur_q];
        if (!fnv_q[rel_cur_q]) rel_busy_q <= 1'b0;
      end
      if (rel_valid && !rel_busy_q) begin
        rel_busy_q <= 1'b1;
        rel_cur_q  <= rel_head;
      end
      // ---- context (for alloc, ctx_tid must equal alloc_tid) ----
      if (ctx_valid) begin
        pc_q[ctx_tid]  <= ctx_pc;
        idx_q[ctx_tid] <= ctx_index;
        loc_q[ctx_tid] <= ctx_loc;
        shr_q[ctx_tid] <= ctx_shr;
        dep_q[ctx_tid] <= ctx_dep;
        st_q[ctx_tid]  <= TS_WAITING;
      end
      for (int k = 0; k < NS; k++) begin
        if (st_valid[k]) begin
          st_q[st_tid[k]] <= st_state[k];
          if (st_pc_valid[k]) pc_q[st_tid[k]] <= st_pc[k];
        end
      end
      if (link_valid) next_q[link_tid] <= link_next;
      // ---- ready list: pop head, append list at tail ----
      if (do_pop) st_q[r_head_q] <= TS_RUNNING;
      if (do_app && app_head == app_tail) st_q[app_head] <= TS_READY;
      begin
        logic empty_after_pop;
        empty_after_pop = (r_cnt_q == '0) || (do_pop && r_head_q == r_tail_q);
        if (do_pop) r_head_q <= next_q[r_head_q];
        if (do_app) begin
          if (empty_after_pop) r_head_q <= app_head;
          else next_q[r_tail_q] <= app_head;
          r_tail_q <= app_tail;
        end
        // the ready list's length is only needed as empty / one / more
        if (do_app) r_cnt_q <= empty_after_pop ? (app_head == app_tail ? 2'd1 : 2'd2) : 2'd2;
        else if (do_pop) r_cnt_q <= (r_head_q == r_tail_q) ? 2'd0 :
                                    (next_q[r_head_q] == r_tail_q ? 2'd1 : 2'd2);
      end
    end
  end

endmodule
