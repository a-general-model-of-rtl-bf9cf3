// icache: instruction cache that schedules the threads waiting for its lines.
//
// Each line holds, besides tag and data, a list of threads waiting for it
// (head and tail pointers into the thread table, chained through the thread
// table's next field) and a counter of threads on the ready list or waiting
// that still need the line. A lookup for a thread about to run:
//   - hits a present line: the thread goes straight to the ready list
//     (append output) and the counter is incremented;
//   - hits a line still being fetched: the thread joins that line's list;
//   - misses: a line whose counter is zero and which is not being fetched is
//     chosen (least recently used among those), cleared, given the thread as
//     its list and a tagged line read is sent to memory. If no line can be
//     replaced or the request register is occupied, lk_ready is low.
// When the line arrives, its whole waiting list is appended to the ready list
// in one cycle. A thread leaving the ready list for the pipeline decrements
// its line's counter (dec port). The fetch port reads one 32-bit instruction.
// All of this is the document's mechanism; the organisation (fully
// associative, 64-byte lines, timestamp LRU) is this design's own choice.
//
// Timing: lookup, link and append outputs are combinational from the inputs
// and take effect in the thread table at the same clock edge; a response
// blocks lookups in its cycle. Memory requests are held until accepted.
module icache
  import drisc_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 1024,
  parameter int unsigned LINE_BYTES  = 64,
  parameter int unsigned NTHREADS    = 256,
  localparam int unsigned NL = CACHE_BYTES / LINE_BYTES,
  localparam int unsigned LW = $clog2(NL),
  localparam int unsigned OW = $clog2(LINE_BYTES),
  localparam int unsigned TW = $clog2(NTHREADS)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // lookup
  input  logic                    lk_valid,
  input  logic [TW-1:0]           lk_tid,
  input  logic [31:0]             lk_pc,
  output logic                    lk_ready,
  output logic                    lk_hit,
  // to thread table
  output logic                    link_valid,
  output logic [TW-1:0]           link_tid,
  output logic [TW-1:0]           link_next,
  output logic                    app_valid,
  output logic [TW-1:0]           app_head,
  output logic [TW-1:0]           app_tail,
  // ready-list departure
  input  logic                    dec_valid,
  input  logic [31:0]             dec_pc,
  // instruction fetch
  input  logic [31:0]             f_pc,
  output logic                    f_hit,
  output logic [31:0]             f_instr,
  // memory
  output logic                    req_valid,
  input  logic                    req_ready,
  output mtag_t                   req_tag,
  output logic [31:0]             req_addr,
  input  logic                    rsp_valid,
  input  logic [MTAG_IDX_W-1:0]   rsp_idx,
  input  logic [LINE_BYTES*8-1:0] rsp_data,
  output logic [15:0]             n_misses
);

  localparam int unsigned TAGW = 32 - OW;

  logic [TAGW-1:0]         tag_q   [NL];
  logic                    val_q   [NL];
  logic                    busy_q  [NL];
  logic [LINE_BYTES*8-1:0] data_q  [NL];
  logic                    lv_q    [NL];   // waiting list non-empty
  logic [TW-1:0]           lh_q    [NL];
  logic [TW-1:0]           lt_q    [NL];
  logic [TW:0]             cnt_q   [NL];
  logic [15:0]             age_q   [NL];
  logic [15:0]             clk_q;

  // ---- associative search ----
  logic          hit;
  logic [LW-1:0] hit_l;
  logic          vic_ok;
  logic [LW-1:0] vic_l;
  always_comb begin
    hit = 1'b0; hit_l = '0;
    for (int i = 0; i < NL; i++)
      if (val_q[i] && tag_q[i] == lk_pc[31:OW]) begin hit = 1'b1; hit_l = LW'(i); end
  end
  // victim: a free (invalid) line first, else the least recently used line
  // among those with a zero counter that are not being fetched
  always_comb begin
    logic [15:0] best;
    logic        inv;
    vic_ok = 1'b0; vic_l = '0; best = '1; inv = 1'b0;
    for (int i = 0; i < NL; i++) begin
      if (!busy_q[i] && cnt_q[i] == '0) begin
        if (!val_q[i]) begin
          if (!inv) begin inv = 1'b1; vic_ok = 1'b1; vic_l = LW'(i); end
        end else if (!inv && (!vic_ok || age_q[i] < best)) begin
          vic_ok = 1'b1; vic_l = LW'(i); best = age_q[i];
        end
      end
    end
  end

  logic          dhit;
  logic [LW-1:0] dhit_l;
  always_comb begin
    dhit = 1'b0; dhit_l = '0;
    for (int i = 0; i < NL; i++)
      if (val_q[i] && tag_q[i] == dec_pc[31:OW]) begin dhit = 1'b1; dhit_l = LW'(i); end
  end

  always_comb begin
    logic [LW-1:0] fl;
    f_hit = 1'b0; fl = '0;
    for (int i = 0; i < NL; i++)
      if (val_q[i] && !busy_q[i] && tag_q[i] == f_pc[31:OW]) begin f_hit = 1'b1; fl = LW'(i); end
    f_instr = data_q[fl][{f_pc[OW-1:2], 5'b0} +: 32];
  end

  logic [LW-1:0] rl;
  assign rl = LW'(rsp_idx);

  assign lk_hit   = hit;
  assign lk_ready = !rsp_valid && (hit || (vic_ok && !req_valid));

  logic do_lk;
  assign do_lk = lk_valid && lk_ready;

  always_comb begin
    link_valid = 1'b0; link_tid = '0; link_next = lk_tid;
    app_valid  = 1'b0; app_head = lk_tid; app_tail = lk_tid;
    if (rsp_valid) begin
      app_valid = lv_q[rl];
      app_head  = lh_q[rl];
      app_tail  = lt_q[rl];
    end else if (do_lk && hit && !busy_q[hit_l]) begin
      app_valid = 1'b1;
    end else if (do_lk && hit && busy_q[hit_l] && lv_q[hit_l]) begin
      link_valid = 1'b1;
      link_tid   = lt_q[hit_l];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NL; i++) begin
        tag_q[i] <= '0; val_q[i] <= 1'b0; busy_q[i] <= 1'b0; data_q[i] <= '0;
        lv_q[i] <= 1'b0; lh_q[i] <= '0; lt_q[i] <= '0; cnt_q[i] <= '0; age_q[i] <= '0;
      end
      clk_q <= '0; req_valid <= 1'b0; req_tag <= '{MT_IREAD, '0}; req_addr <= '0;
      n_misses <= '0;
    end else begin
      clk_q <= clk_q + 1'b1;
      if (req_valid && req_ready) req_valid <= 1'b0;
      if (dec_valid && dhit && cnt_q[dhit_l] != '0) cnt_q[dhit_l] <= cnt_q[dhit_l] - 1'b1;
      if (rsp_valid) begin
        busy_q[rl] <= 1'b0;
        data_q[rl] <= rsp_data;
        lv_q[rl]   <= 1'b0;
        age_q[rl]  <= clk_q;
      end else if (do_lk) begin
        if (hit) begin
          age_q[hit_l] <= clk_q;
          cnt_q[hit_l] <= cnt_q[hit_l] + 1'b1 - TW'(dec_valid && dhit && dhit_l == hit_l && cnt_q[dhit_l] != '0);
          if (busy_q[hit_l]) begin
            lt_q[hit_l] <= lk_tid;
            if (!lv_q[hit_l]) begin lv_q[hit_l] <= 1'b1; lh_q[hit_l] <= lk_tid; end
          end
        end else begin
          tag_q[vic_l]  <= lk_pc[31:OW];
          val_q[vic_l]  <= 1'b1;
          busy_q[vic_l] <= 1'b1;
          lv_q[vic_l]   <= 1'b1;
          lh_q[vic_l]   <= lk_tid;
          lt_q[vic_l]   <= lk_tid;
          cnt_q[vic_l]  <= 1;
          age_q[vic_l]  <= clk_q;
          req_valid     <= 1'b1;
          req_tag       <= '{MT_IREAD, MTAG_IDX_W'(vic_l)};
          req_addr      <= {lk_pc[31:OW], {OW{1'b0}}};
          n_misses      <= n_misses + 1'b1;
        end
      end
    end
  end

endmodule
