// sync_regfile: the core's register file of synchronising registers.
//
// Every register holds a data word and a two-bit state: empty, full or
// waiting. A read of a full register returns its data. A read of a register
// that is not full suspends the reading thread: the register becomes waiting
// and stores the reference of that thread (only one continuation is allowed).
// A write makes the register full and, if it was waiting, reports the stored
// thread on a wake output so it can be rescheduled. A range of registers can
// be set empty in one cycle, as done when a thread context is allocated.
//
// While a register is not full its data word is free, and the D-cache uses it
// as an entry of a memory read buffer: the "park" port records the size and
// line offset of a missed load, the "link" port chains registers into a
// per-line list, and the raw port reads that payload back. The payload layout
// (drisc_pkg PL_*) keeps the waiting thread reference apart from the read
// info, so a thread may suspend on a register that has a parked read.
//
// Timing: reads are combinational; all updates take effect at the next clock
// edge; wake outputs are registered (valid one cycle after the write).
// Three write ports exist (a: pipeline, b: D-cache completions, c: family
// controller: thread index and family return code); for the same register
// c has priority over b, and b over a, and only one wake is reported. The register
// states, the suspend-on-empty and the wake-on-write follow the document;
// port counts, widths and the payload layout are this design's own choices.
module sync_regfile
  import drisc_pkg::*;
#(
  parameter int unsigned NREGS = 1024,
  parameter int unsigned DW    = 64,
  parameter int unsigned TID_W = 8,
  localparam int unsigned RW   = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             rst_n,
  // set [init_base, init_base+init_cnt) empty
  input  logic             init_valid,
  input  logic [RW-1:0]    init_base,
  input  logic [RW:0]      init_cnt,
  // synchronising read
  input  logic             rd_valid,
  input  logic [RW-1:0]    rd_addr,
  input  logic [TID_W-1:0] rd_tid,
  output logic             rd_full,
  output logic [DW-1:0]    rd_data,
  output logic             rd_suspend,
  // write ports
  input  logic             wa_valid,
  input  logic [RW-1:0]    wa_addr,
  input  logic [DW-1:0]    wa_data,
  input  logic             wb_valid,
  input  logic [RW-1:0]    wb_addr,
  input  logic [DW-1:0]    wb_data,
  output logic             wake_a_valid,
  output logic [TID_W-1:0] wake_a_tid,
  output logic             wake_b_valid,
  output logic [TID_W-1:0] wake_b_tid,
  input  logic             wc_valid,
  input  logic [RW-1:0]    wc_addr,
  input  logic [DW-1:0]    wc_data,
  output logic             wake_c_valid,
  output logic [TID_W-1:0] wake_c_tid,
  // parked-read payload ports (D-cache)
  input  logic             park_valid,
  input  logic [RW-1:0]    park_addr,
  input  logic [5:0]       park_off,
  input  logic [1:0]       park_size,
  input  logic             link_valid,
  input  logic [RW-1:0]    link_addr,
  input  logic [RW-1:0]    link_next,
  input  logic [RW-1:0]    raw_addr,
  output logic [DW-1:0]    raw_data,
  output rstate_e          raw_state
);

  logic [DW-1:0] data_q  [NREGS];
  rstate_e       state_q [NREGS];

  assign rd_full    = (state_q[rd_addr] == RS_FULL);
  assign rd_data    = data_q[rd_addr];
  assign rd_suspend = rd_valid && !rd_full;
  assign raw_data   = data_q[raw_addr];
  assign raw_state  = state_q[raw_addr];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) begin
        state_q[i] <= RS_FULL;
        data_q[i]  <= '0;
      end
      wake_a_valid <= 1'b0;
      wake_b_valid <= 1'b0;
      wake_a_tid   <= '0;
      wake_b_tid   <= '0;
      wake_c_valid <= 1'b0;
      wake_c_tid   <= '0;
    end else begin
      wake_a_valid <= 1'b0;
      wake_b_valid <= 1'b0;
      wake_c_valid <= 1'b0;
      if (init_valid) begin
        for (int i = 0; i < NREGS; i++) begin
          if ((i >= int'(init_base)) && (i < int'(init_base) + int'(init_cnt))) begin
            state_q[i] <= RS_EMPTY;
            data_q[i]  <= '0;
          end
        end
      end
      if (park_valid) begin
        if (state_q[park_addr] == RS_FULL) state_q[park_addr] <= RS_EMPTY;
        data_q[park_addr][PL_SIZE_LSB +: 4]  <= {2'b00, park_size};
        data_q[park_addr][PL_OFF_LSB +: 6]   <= park_off;
        data_q[park_addr][PL_NEXT_LSB +: 16] <= '0;
      end
      if (link_valid) begin
        data_q[link_addr][PL_NEXT_LSB +: 16] <= 16'(1 << 15) | 16'(link_next);
      end
      if (rd_suspend) begin
        state_q[rd_addr] <= RS_WAITING;
        data_q[rd_addr][PL_TID_LSB +: 16] <= 16'(rd_tid);
      end
      if (wa_valid) begin
        state_q[wa_addr] <= RS_FULL;
        data_q[wa_addr]  <= wa_data;
        if (state_q[wa_addr] == RS_WAITING) begin
          wake_a_valid <= 1'b1;
          wake_a_tid   <= TID_W'(data_q[wa_addr][PL_TID_LSB +: 16]);
        end
      end
      if (wb_valid) begin
        state_q[wb_addr] <= RS_FULL;
        data_q[wb_addr]  <= wb_data;
        if (state_q[wb_addr] == RS_WAITING && !(wa_valid && wa_addr == wb_addr)) begin
          wake_b_valid <= 1'b1;
          wake_b_tid   <= TID_W'(data_q[wb_addr][PL_TID_LSB +: 16]);
        end
      end
      if (wc_valid) begin
        state_q[wc_addr] <= RS_FULL;
        data_q[wc_addr]  <= wc_data;
        if (state_q[wc_addr] == RS_WAITING && !(wa_valid && wa_addr == wc_addr)
            && !(wb_valid && wb_addr == wc_addr)) begin
          wake_c_valid <= 1'b1;
          wake_c_tid   <= TID_W'(data_q[wc_addr][PL_TID_LSB +: 16]);
        end
      end
    end
  end

  // Only a single continuation per register: no read may suspend on a
  // register that already holds a waiting thread.
  a_single_continuation: assert property (@(posedge clk) disable iff (!rst_n)
    rd_suspend |-> state_q[rd_addr] != RS_WAITING);

endmodule
