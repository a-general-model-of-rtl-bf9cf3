// family_table: the core's fixed-size table of thread families.
//
// An allocate request finds a free entry (lowest number first) and fills it
// with defaults: one thread, index start 0 and step 1, a block size of 0
// (meaning "as many threads as the resources allow"), one local register and
// no globals or shareds. Parameter writes then overwrite single fields, and
// the family controller reads and rewrites whole entries while it creates,
// runs and terminates the family; free returns the entry to the pool.
// The table, its allocate-with-defaults and its contents (thread count,
// creation parameters, code pointer, membership list pointers) are the
// document's; the default values and field widths are this design's own.
//
// Timing: alloc_ok/alloc_fid and the read port are combinational; allocate,
// parameter write, entry write and free take effect at the clock edge. An
// entry write wins over a parameter write to the same entry.
module family_table
  import drisc_pkg::*;
#(
  parameter int unsigned NFAMILIES = 64,
  localparam int unsigned FW = $clog2(NFAMILIES)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          alloc_valid,
  output logic          alloc_ok,
  output logic [FW-1:0] alloc_fid,
  input  logic          par_valid,
  input  logic [FW-1:0] par_fid,
  input  fparam_e       par_sel,
  input  logic [31:0]   par_data,
  input  logic [FW-1:0] rd_fid,
  output fam_t          rd_entry,
  input  logic [FW-1:0] rd2_fid,
  output fam_t          rd2_entry,
  input  logic [FW-1:0] rd3_fid,
  output fam_t          rd3_entry,
  input  logic          wr_valid,
  input  logic [FW-1:0] wr_fid,
  input  fam_t          wr_entry,
  input  logic          free_valid,
  input  logic [FW-1:0] free_fid,
  output logic [FW:0]   n_free
);

  fam_t tab_q [NFAMILIES];

  always_comb begin
    alloc_ok  = 1'b0;
    alloc_fid = '0;
    n_free    = '0;
    for (int i = NFAMILIES - 1; i >= 0; i--) begin
      if (tab_q[i].state == FS_FREE) begin
        alloc_ok  = 1'b1;
        alloc_fid = FW'(i);
        n_free    = n_free + 1'b1;
      end
    end
  end

  assign rd_entry  = tab_q[rd_fid];
  assign rd2_entry = tab_q[rd2_fid];
  assign rd3_entry = tab_q[rd3_fid];

  function automatic fam_t defaults();
    fam_t f;
    f = '0;
    f.state = FS_ALLOC;
    f.step  = 32'd1;
    f.count = 32'd1;
    f.nloc  = 5'd1;
    return f;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NFAMILIES; i++) tab_q[i] <= '0;
    end else begin
      if (alloc_valid && alloc_ok) tab_q[alloc_fid] <= defaults();
      if (par_valid) begin
        unique case (par_sel)
          FP_PC:     tab_q[par_fid].pc    <= par_data;
          FP_START:  tab_q[par_fid].start <= par_data;
          FP_STEP:   tab_q[par_fid].step  <= par_data;
          FP_COUNT:  tab_q[par_fid].count <= par_data;
          FP_BLOCK:  tab_q[par_fid].block <= par_data[15:0];
          FP_REGS: begin
            tab_q[par_fid].nglob <= par_data[15:10];
            tab_q[par_fid].nshr  <= par_data[9:5];
            tab_q[par_fid].nloc  <= par_data[4:0];
          end
          FP_PARENT: tab_q[par_fid].parent_reg <= par_data[15:0];
          default: ;
        endcase
      end
      if (wr_valid) tab_q[wr_fid] <= wr_entry;
      if (free_valid) tab_q[free_fid].state <= FS_FREE;
    end
  end

endmodule
