// dcache: data cache with decoupled loads whose read buffer is the register
// file itself.
//
// A load that hits a present line writes its target register at once. A
// load that misses, or hits a line still being fetched, "parks" the read in
// its (now empty) target register: the byte offset and size are stored in the
// register's data field and the register is appended to the line's list of
// registers (head and tail kept in the line, links kept in the registers).
// On a miss a victim line (not being fetched, no pending reads; least
// recently used) is cleared and a tagged line read is sent. When the line
// arrives it is appended to the processing list, a linked list of lines whose
// parked reads must be served; every cycle one parked read is served: the
// register's payload is read, the bytes are taken from the line and written
// to the register, which wakes any thread suspended on it.
// Stores are write-through without allocation: they update a present line
// and send a tagged write; write acknowledgements are counted so that a
// family can wait until all its writes have completed.
// The register-list mechanism, the processing list, one read served per
// cycle and the tags are the document's. The organisation (fully
// associative, 64-byte lines, write-through, zero-extended loads of 1, 2, 4
// or 8 bytes, stalling a load that would hit a line on the processing list or
// a store to a line being fetched) is this design's own choice.
//
// Timing: the register-file write, park and link outputs are combinational
// and take effect at the same clock edge; memory requests are held until
// accepted.
module dcache
  import drisc_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 1024,
  parameter int unsigned LINE_BYTES  = 64,
  parameter int unsigned NREGS       = 1024,
  localparam int unsigned NL = CACHE_BYTES / LINE_BYTES,
  localparam int unsigned LW = $clog2(NL),
  localparam int unsigned OW = $clog2(LINE_BYTES),
  localparam int unsigned RW = $clog2(NREGS)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // load
  input  logic                    ld_valid,
  input  logic [RW-1:0]           ld_reg,
  input  logic [31:0]             ld_addr,
  input  logic [1:0]              ld_size,     // log2 of bytes
  output logic                    ld_ready,
  // store
  input  logic                    st_valid,
  input  logic [31:0]             st_addr,
  input  logic [63:0]             st_data,
  input  logic [1:0]              st_size,
  output logic                    st_ready,
  // register file
  output logic                    rf_wr_valid,
  output logic [RW-1:0]           rf_wr_addr,
  output logic [63:0]             rf_wr_data,
  output logic                    rf_park_valid,
  output logic [RW-1:0]           rf_park_addr,
  output logic [5:0]              rf_park_off,
  output logic [1:0]              rf_park_size,
  output logic                    rf_link_valid,
  output logic [RW-1:0]           rf_link_addr,
  output logic [RW-1:0]           rf_link_next,
  output logic [RW-1:0]           rf_raw_addr,
  input  logic [63:0]             rf_raw_data,
  // memory
  output logic                    req_valid,
  input  logic                    req_ready,
  output mtag_t                   req_tag,
  output logic [31:0]             req_addr,
  output logic [63:0]             req_wdata,
  output logic [1:0]              req_wsize,
  input  logic                    rsp_valid,
  input  mtag_t                   rsp_tag,
  input  logic [LINE_BYTES*8-1:0] rsp_data,
  output logic [15:0]             wr_pending,
  output logic [15:0]             n_misses,
  output logic [15:0]             n_parked_served
);

  localparam int unsigned TAGW = 32 - OW;

  logic [TAGW-1:0]         tag_q  [NL];
  logic                    val_q  [NL];
  logic                    busy_q [NL];
  logic                    pend_q [NL];   // on the processing list
  logic [LINE_BYTES*8-1:0] data_q [NL];
  logic                    lv_q   [NL];
  logic [RW-1:0]           lh_q   [NL];
  logic [RW-1:0]           lt_q   [NL];
  logic [LW-1:0]           pn_q   [NL];   // processing-list link
  logic [15:0]             age_q  [NL];
  logic [15:0]             clk_q;
  logic                    p_v_q;
  logic [LW-1:0]           p_head_q, p_tail_q;

  function automatic logic [63:0] extract(input logic [LINE_BYTES*8-1:0] line,
                                          input logic [OW-1:0] off,
                                          input logic [1:0] size);
    logic [63:0] w;
    w = 64'(line >> ({3'b0, off} * 8));
    unique case (size)
      2'd0: extract = {56'b0, w[7:0]};
      2'd1: extract = {48'b0, w[15:0]};
      2'd2: extract = {32'b0, w[31:0]};
      default: extract = w;
    endcase
  endfunction

  // ---- associative search ----
  logic          lhit, shit;
  logic [LW-1:0] lhit_l, shit_l;
  always_comb begin
    lhit = 1'b0; lhit_l = '0; shit = 1'b0; shit_l = '0;
    for (int i = 0; i < NL; i++) begin
      if (val_q[i] && tag_q[i] == ld_addr[31:OW]) begin lhit = 1'b1; lhit_l = LW'(i); end
      if (val_q[i] && tag_q[i] == st_addr[31:OW]) begin shit = 1'b1; shit_l = LW'(i); end
    end
  end
  logic          vic_ok;
  logic [LW-1:0] vic_l;
  always_comb begin
    logic [15:0] best;
    logic        inv;
    vic_ok = 1'b0; vic_l = '0; best = '1; inv = 1'b0;
    for (int i = 0; i < NL; i++) begin
      if (!busy_q[i] && !pend_q[i]) begin
        if (!val_q[i]) begin
          if (!inv) begin inv = 1'b1; vic_ok = 1'b1; vic_l = LW'(i); end
        end else if (!inv && (!vic_ok || age_q[i] < best)) begin
          vic_ok = 1'b1; vic_l = LW'(i); best = age_q[i];
        end
      end
    end
  end

  // ---- service of one parked read per cycle ----
  logic          svc;
  logic [RW-1:0] svc_reg;
  logic [OW-1:0] svc_off;
  logic [1:0]    svc_size;
  logic          svc_nv;
  logic [RW-1:0] svc_next;
  assign svc      = p_v_q;
  assign svc_reg  = lh_q[p_head_q];
  assign rf_raw_addr = svc_reg;
  assign svc_off  = OW'(rf_raw_data[PL_OFF_LSB +: 6]);
  assign svc_size = rf_raw_data[PL_SIZE_LSB +: 2];
  assign svc_nv   = rf_raw_data[PL_NEXT_LSB + 15];
  assign svc_next = rf_raw_data[PL_NEXT_LSB +: RW];

  logic rsp_is_read;
  assign rsp_is_read = rsp_valid && rsp_tag.mtype == MT_DREAD;
  logic [LW-1:0] rl;
  assign rl = LW'(rsp_tag.idx);

  // loads: a hit needs the register write port (free when nothing is served);
  // a line on the processing list or the response line cannot take a new
  // parked read; a miss needs a victim and the request register.
  logic ld_hit_now;
  assign ld_hit_now = lhit && !busy_q[lhit_l] && !pend_q[lhit_l];
  always_comb begin
    if (lhit && (pend_q[lhit_l] || (rsp_is_read && rl == lhit_l))) ld_ready = 1'b0;
    else if (ld_hit_now) ld_ready = !svc;
    else if (lhit) ld_ready = 1'b1;            // line being fetched: park
    else ld_ready = vic_ok && !req_valid && !(rsp_is_read && rl == vic_l);
  end
  assign st_ready = !req_valid && !(ld_valid && !lhit) &&
                    !(shit && (busy_q[shit_l] || pend_q[shit_l]));

  logic do_ld, do_st;
  assign do_ld = ld_valid && ld_ready;
  assign do_st = st_valid && st_ready;

  always_comb begin
    rf_wr_valid = 1'b0; rf_wr_addr = ld_reg; rf_wr_data = '0;
    rf_park_valid = 1'b0; rf_park_addr = ld_reg;
    rf_park_off = 6'(ld_addr[OW-1:0]); rf_park_size = ld_size;
    rf_link_valid = 1'b0; rf_link_addr = lt_q[lhit_l]; rf_link_next = ld_reg;
    if (svc) begin
      rf_wr_valid = 1'b1;
      rf_wr_addr  = svc_reg;
      rf_wr_data  = extract(data_q[p_head_q], svc_off, svc_size);
    end else if (do_ld && ld_hit_now) begin
      rf_wr_valid = 1'b1;
      rf_wr_data  = extract(data_q[lhit_l], ld_addr[OW-1:0], ld_size);
    end
    if (do_ld && !ld_hit_now) begin
      rf_park_valid = 1'b1;
      rf_link_valid = lhit && lv_q[lhit_l];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NL; i++) begin
        tag_q[i] <= '0; val_q[i] <= 1'b0; busy_q[i] <= 1'b0; pend_q[i] <= 1'b0;
        data_q[i] <= '0; lv_q[i] <= 1'b0; lh_q[i] <= '0; lt_q[i] <= '0;
        pn_q[i] <= '0; age_q[i] <= '0;
      end
      clk_q <= '0; p_v_q <= 1'b0; p_head_q <= '0; p_tail_q <= '0;
      req_valid <= 1'b0; req_tag <= '{MT_DREAD, '0}; req_addr <= '0;
      req_wdata <= '0; req_wsize <= '0;
      wr_pending <= '0; n_misses <= '0; n_parked_served <= '0;
    end else begin
      logic p_empty_after;
      clk_q <= clk_q + 1'b1;
      if (req_valid && req_ready) req_valid <= 1'b0;
      // -- serve one parked read --
      p_empty_after = !p_v_q;
      if (svc) begin
        n_parked_served <= n_parked_served + 1'b1;
        if (svc_nv) begin
          lh_q[p_head_q] <= svc_next;
        end else begin
          lv_q[p_head_q]   <= 1'b0;
          pend_q[p_head_q] <= 1'b0;
          if (p_head_q == p_tail_q) begin p_v_q <= 1'b0; p_empty_after = 1'b1; end
          else p_head_q <= pn_q[p_head_q];
        end
      end
      // -- responses --
      if (rsp_valid && rsp_tag.mtype == MT_DWRITE) wr_pending <= wr_pending - 1'b1 + 16'(do_st);
      else if (do_st) wr_pending <= wr_pending + 1'b1;
      if (rsp_is_read) begin
        busy_q[rl] <= 1'b0;
        data_q[rl] <= rsp_data;
        if (lv_q[rl]) begin
          pend_q[rl] <= 1'b1;
          if (p_empty_after) begin p_head_q <= rl; p_v_q <= 1'b1; end
          else pn_q[p_tail_q] <= rl;
          p_tail_q <= rl;
        end
      end
      // -- loads --
      if (do_ld) begin
        if (lhit) begin
          age_q[lhit_l] <= clk_q;
          if (!ld_hit_now) begin
            lt_q[lhit_l] <= ld_reg;
            if (!lv_q[lhit_l]) begin lv_q[lhit_l] <= 1'b1; lh_q[lhit_l] <= ld_reg; end
          end
        end else begin
          tag_q[vic_l]  <= ld_addr[31:OW];
          val_q[vic_l]  <= 1'b1;
          busy_q[vic_l] <= 1'b1;
          lv_q[vic_l]   <= 1'b1;
          lh_q[vic_l]   <= ld_reg;
          lt_q[vic_l]   <= ld_reg;
          age_q[vic_l]  <= clk_q;
          req_valid <= 1'b1;
          req_tag   <= '{MT_DREAD, MTAG_IDX_W'(vic_l)};
          req_addr  <= {ld_addr[31:OW], {OW{1'b0}}};
          n_misses  <= n_misses + 1'b1;
        end
      end
      // -- stores: update a present line, write through --
      if (do_st) begin
        if (shit) begin
          for (int b = 0; b < 8; b++) begin
            if (b < (1 << st_size) && int'(st_addr[OW-1:0]) + b < LINE_BYTES)
              data_q[shit_l][(int'(st_addr[OW-1:0]) + b) * 8 +: 8] <= st_data[b*8 +: 8];
          end
        end
        req_valid <= 1'b1;
        req_tag   <= '{MT_DWRITE, MTAG_IDX_W'(shit_l)};
        req_addr  <= st_addr;
        req_wdata <= st_data;
        req_wsize <= st_size;
      end
    end
  end

endmodule
