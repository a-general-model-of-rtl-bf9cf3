// reg_allocator: allocates a family's registers as one contiguous block.
//
// A create asks for a fixed part (remote shareds plus globals, F registers)
// and a per-thread part (P registers) for a requested block of B threads.
// The allocator scans a free map of the register file, one granule of GRAN
// registers per cycle, and stops at the first free run that holds F + P*B
// registers. If none does, it keeps the largest run and lowers the block
// size one step per cycle until the block fits; a block size of zero means
// the create must wait. This "shrink the block to what is free" behaviour is
// the document's; the granule size, the first-fit scan and the timing are
// this design's own choices.
//
// Interface: pulse req with F, P, B while !busy; done pulses with ok, base
// (register address), granted block size and allocated size in registers.
// free_valid returns a block (base, size) to the free map in one cycle.
// Latency: up to NREGS/GRAN + B + 2 cycles.
module reg_allocator #(
  parameter int unsigned NREGS = 1024,
  parameter int unsigned GRAN  = 8,
  parameter int unsigned BW    = 9,
  localparam int unsigned RW   = $clog2(NREGS),
  localparam int unsigned NG   = NREGS / GRAN,
  localparam int unsigned GW   = $clog2(NG)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req,
  input  logic [RW:0]   req_fixed,
  input  logic [RW:0]   req_per_thread,
  input  logic [BW-1:0] req_block,
  output logic          busy,
  output logic          done,
  output logic          ok,
  output logic [RW-1:0] base,
  output logic [BW-1:0] block,
  output logic [RW:0]   size,
  input  logic          free_valid,
  input  logic [RW-1:0] free_base,
  input  logic [RW:0]   free_size,
  output logic [GW:0]   free_granules
);

  typedef enum logic [1:0] {S_IDLE, S_SCAN, S_FIT} st_e;
  st_e st_q;

  logic [NG-1:0] used_q;
  logic [RW:0]   fixed_q, per_q;
  logic [BW-1:0] blk_q;
  logic [GW:0]   g_q;                  // granule being scanned
  logic [GW:0]   run_start_q, run_len_q, best_start_q, best_len_q;

  // granules needed for the current block size
  logic [RW+BW+1:0] need_regs;
  logic [RW+BW+1:0] need_gran;
  assign need_regs = (RW+BW+2)'(fixed_q) + (RW+BW+2)'(per_q) * (RW+BW+2)'(blk_q);
  assign need_gran = (need_regs + (RW+BW+2)'(GRAN - 1)) / (RW+BW+2)'(GRAN);

  assign busy = (st_q != S_IDLE);

  always_comb begin
    free_granules = '0;
    for (int i = 0; i < NG; i++) free_granules = free_granules + (GW+1)'(!used_q[i]);
  end

  logic [GW:0] nlen;
  logic        gfree;
  assign gfree = (g_q < (GW+1)'(NG)) && !used_q[g_q[GW-1:0]];
  assign nlen  = gfree ? run_len_q + 1'b1 : '0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st_q <= S_IDLE; used_q <= '0; done <= 1'b0; ok <= 1'b0;
      base <= '0; block <= '0; size <= '0;
      fixed_q <= '0; per_q <= '0; blk_q <= '0; g_q <= '0;
      run_start_q <= '0; run_len_q <= '0; best_start_q <= '0; best_len_q <= '0;
    end else begin
      done <= 1'b0;
      if (free_valid) begin
        for (int i = 0; i < NG; i++) begin
          if ((i * GRAN >= int'(free_base)) && (i * GRAN < int'(free_base) + int'(free_size)))
            used_q[i] <= 1'b0;
        end
      end
      unique case (st_q)
        S_IDLE: if (req) begin
          fixed_q <= req_fixed; per_q <= req_per_thread; blk_q <= req_block;
          g_q <= '0; run_start_q <= '0; run_len_q <= '0;
          best_start_q <= '0; best_len_q <= '0;
          st_q <= S_SCAN;
        end
        S_SCAN: begin
          run_len_q <= nlen;
          if (!gfree) run_start_q <= g_q + 1'b1;
          if (nlen > best_len_q) begin
            best_len_q   <= nlen;
            best_start_q <= run_start_q;
          end
          if ((RW+BW+2)'(nlen) >= need_gran || g_q >= (GW+1)'(NG - 1)) st_q <= S_FIT;
          else g_q <= g_q + 1'b1;
        end
        S_FIT: begin
          if (blk_q == '0) begin
            done <= 1'b1; ok <= 1'b0; st_q <= S_IDLE;
          end else if (need_gran <= (RW+BW+2)'(best_len_q)) begin
            done  <= 1'b1; ok <= 1'b1; st_q <= S_IDLE;
            base  <= RW'(best_start_q * GRAN);
            block <= blk_q;
            size  <= (RW+1)'(need_gran * GRAN);
            for (int i = 0; i < NG; i++) begin
              if ((i >= int'(best_start_q)) && (i < int'(best_start_q) + int'(need_gran)))
                used_q[i] <= 1'b1;
            end
          end else begin
            blk_q <= blk_q - 1'b1;
          end
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end

endmodule
