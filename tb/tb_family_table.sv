// Testbench for family_table: allocation of the lowest free entry with its
// defaults, parameter writes, whole-entry writes, the three read ports, the
// free count, exhaustion of the table and reuse of a freed entry.
module tb_family_table;
  import drisc_pkg::*;
  localparam int NF = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic alloc_valid = 0, alloc_ok; logic [5:0] alloc_fid;
  logic par_valid = 0; logic [5:0] par_fid = 0; fparam_e par_sel = FP_PC; logic [31:0] par_data = 0;
  logic [5:0] rd_fid = 0, rd2_fid = 0, rd3_fid = 0; fam_t rd_entry, rd2_entry, rd3_entry;
  logic wr_valid = 0; logic [5:0] wr_fid = 0; fam_t wr_entry = '0;
  logic free_valid = 0; logic [5:0] free_fid = 0; logic [6:0] n_free;

  family_table #(.NFAMILIES(NF)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk); rst_n <= 1;
    @(negedge clk);
    chk(alloc_ok && alloc_fid == 0 && n_free == NF, "all free");
    alloc_valid = 1; @(negedge clk); alloc_valid = 0;
    rd_fid = 0; #1;
    chk(rd_entry.state == FS_ALLOC && rd_entry.count == 1 && rd_entry.step == 1 &&
        rd_entry.start == 0 && rd_entry.block == 0 && rd_entry.nloc == 1 &&
        rd_entry.created == 0 && !rd_entry.mem_valid, "defaults");
    chk(alloc_fid == 1 && n_free == NF - 1, "next free is 1");
    par_valid = 1; par_fid = 0;
    par_sel = FP_PC;    par_data = 32'h4000; @(negedge clk);
    par_sel = FP_START; par_data = 5;        @(negedge clk);
    par_sel = FP_STEP;  par_data = 2;        @(negedge clk);
    par_sel = FP_COUNT; par_data = 100;      @(negedge clk);
    par_sel = FP_BLOCK; par_data = 12;       @(negedge clk);
    par_sel = FP_REGS;  par_data = {16'd0, 6'd3, 5'd2, 5'd7}; @(negedge clk);
    par_sel = FP_PARENT; par_data = 321;     @(negedge clk);
    par_valid = 0;
    rd2_fid = 0; rd3_fid = 0; #1;
    chk(rd2_entry.pc == 32'h4000 && rd2_entry.start == 5 && rd2_entry.step == 2 &&
        rd2_entry.count == 100 && rd2_entry.block == 12, "parameters set");
    chk(rd3_entry.nglob == 3 && rd3_entry.nshr == 2 && rd3_entry.nloc == 7 &&
        rd3_entry.parent_reg == 321, "register counts and parent register");
    // whole-entry write
    wr_entry = rd_entry; wr_entry.created = 17; wr_entry.state = FS_CREATING;
    wr_valid = 1; wr_fid = 0; @(negedge clk); wr_valid = 0;
    #1 chk(rd_entry.created == 17 && rd_entry.state == FS_CREATING && rd_entry.pc == 32'h4000,
           "entry write");
    // exhaust the table
    alloc_valid = 1;
    for (int i = 1; i < NF; i++) begin
      if (alloc_fid != 6'(i)) begin chk(0, "allocation order"); break; end
      @(negedge clk);
    end
    alloc_valid = 0;
    chk(!alloc_ok && n_free == 0, "table exhausted");
    free_valid = 1; free_fid = 37; @(negedge clk); free_valid = 0;
    chk(alloc_ok && alloc_fid == 37 && n_free == 1, "freed entry offered");
    rd_fid = 37; #1 chk(rd_entry.state == FS_FREE, "freed entry state");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
