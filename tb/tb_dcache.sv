// Testbench for dcache, run against the register file it parks reads in.
// Checks: a miss sends a tagged line read and parks the read in the empty
// target register; further loads to the line being fetched are linked
// behind it; after the line arrives the parked reads are served one per
// cycle in list order with the right bytes; a thread suspended on a parked
// register is woken; a hit writes its register at once; stores update the
// line, go out as tagged writes and are counted until acknowledged.
module tb_dcache;
  import drisc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic ld_valid = 0, ld_ready; logic [9:0] ld_reg = 0; logic [31:0] ld_addr = 0; logic [1:0] ld_size = 0;
  logic st_valid = 0, st_ready; logic [31:0] st_addr = 0; logic [63:0] st_data = 0; logic [1:0] st_size = 0;
  logic rf_wr_valid, rf_park_valid, rf_link_valid;
  logic [9:0] rf_wr_addr, rf_park_addr, rf_link_addr, rf_link_next, rf_raw_addr;
  logic [63:0] rf_wr_data, rf_raw_data; logic [5:0] rf_park_off; logic [1:0] rf_park_size;
  logic req_valid, req_ready = 1; mtag_t req_tag; logic [31:0] req_addr; logic [63:0] req_wdata;
  logic [1:0] req_wsize;
  logic rsp_valid = 0; mtag_t rsp_tag = '{MT_DREAD, '0}; logic [511:0] rsp_data = 0;
  logic [15:0] wr_pending, n_misses, n_parked_served;

  dcache #(.CACHE_BYTES(1024), .LINE_BYTES(64), .NREGS(1024)) dut (.*);

  // register file with the pipeline's read port used to suspend a thread
  logic rd_valid = 0, rd_full, rd_susp; logic [9:0] rd_addr = 0; logic [63:0] rd_data;
  logic wka, wkb, wkc; logic [7:0] wka_t, wkb_t, wkc_t;
  rstate_e raw_state;
  sync_regfile #(.NREGS(1024)) rf (
    .clk, .rst_n, .init_valid(1'b0), .init_base('0), .init_cnt('0),
    .rd_valid, .rd_addr, .rd_tid(8'd42), .rd_full, .rd_data, .rd_suspend(rd_susp),
    .wa_valid(1'b0), .wa_addr('0), .wa_data('0),
    .wb_valid(rf_wr_valid), .wb_addr(rf_wr_addr), .wb_data(rf_wr_data),
    .wake_a_valid(wka), .wake_a_tid(wka_t), .wake_b_valid(wkb), .wake_b_tid(wkb_t),
    .wc_valid(1'b0), .wc_addr('0), .wc_data('0), .wake_c_valid(wkc), .wake_c_tid(wkc_t),
    .park_valid(rf_park_valid), .park_addr(rf_park_addr), .park_off(rf_park_off),
    .park_size(rf_park_size), .link_valid(rf_link_valid), .link_addr(rf_link_addr),
    .link_next(rf_link_next), .raw_addr(rf_raw_addr), .raw_data(rf_raw_data), .raw_state(raw_state));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] mbyte(input logic [31:0] a);
    return 8'(a * 13 + 7);
  endfunction
  function automatic logic [511:0] line_of(input logic [31:0] a);
    logic [511:0] d;
    for (int b = 0; b < 64; b++) d[b*8 +: 8] = mbyte(a + 32'(b));
    return d;
  endfunction
  function automatic logic [63:0] val(input logic [31:0] a, input int nbytes);
    logic [63:0] v = 0;
    for (int b = 0; b < nbytes; b++) v[b*8 +: 8] = mbyte(a + 32'(b));
    return v;
  endfunction

  task automatic check_reg(input logic [9:0] r, input logic [63:0] v, input string what);
    rd_addr = r; #1;
    chk(rd_full && rd_data == v, what);
  endtask

  logic [5:0] li;
  int order [3];
  int n;
  initial begin
    repeat (2) @(posedge clk); rst_n <= 1;
    @(negedge clk);
    // three loads to line 0x200 while it is fetched: regs 100, 101, 102
    ld_valid = 1; ld_reg = 100; ld_addr = 32'h208; ld_size = 3; #1;
    chk(ld_ready && rf_park_valid && !rf_link_valid, "miss parks first read");
    @(negedge clk);
    chk(req_valid && req_tag.mtype == MT_DREAD && req_addr == 32'h200, "tagged line read");
    li = req_tag.idx;
    ld_reg = 101; ld_addr = 32'h211; ld_size = 0; #1;
    chk(rf_park_valid && rf_link_valid && rf_link_addr == 100 && rf_link_next == 101, "linked behind");
    @(negedge clk);
    ld_reg = 102; ld_addr = 32'h23c; ld_size = 2;
    @(negedge clk); ld_valid = 0;
    chk(n_misses == 1, "one line read for three loads");
    // thread 42 reads register 102 and suspends
    rd_valid = 1; rd_addr = 102; #1 chk(rd_susp, "thread suspends on parked register");
    @(negedge clk); rd_valid = 0;
    // line arrives
    rsp_valid = 1; rsp_tag = '{MT_DREAD, li}; rsp_data = line_of(32'h200);
    @(negedge clk); rsp_valid = 0;
    n = 0;
    for (int c = 0; c < 3; c++) begin
      chk(rf_wr_valid, "one parked read per cycle");
      order[c] = int'(rf_wr_addr);
      @(negedge clk);
    end
    chk(!rf_wr_valid && n_parked_served == 3, "three served");
    chk(order[0] == 100 && order[1] == 101 && order[2] == 102, "list order");
    chk(wkb && wkb_t == 42, "suspended thread woken by its load");
    check_reg(100, val(32'h208, 8), "8-byte load");
    check_reg(101, val(32'h211, 1), "1-byte load");
    check_reg(102, val(32'h23c, 4), "4-byte load");
    // a hit writes at once
    ld_valid = 1; ld_reg = 103; ld_addr = 32'h21a; ld_size = 1; #1;
    chk(ld_ready && rf_wr_valid && rf_wr_addr == 103, "hit written directly");
    @(negedge clk); ld_valid = 0;
    check_reg(103, val(32'h21a, 2), "2-byte hit");
    // store to the present line, then load it back
    st_valid = 1; st_addr = 32'h220; st_data = 64'h1122_3344_5566_7788; st_size = 3;
    @(negedge clk); st_valid = 0;
    chk(req_valid && req_tag.mtype == MT_DWRITE && req_addr == 32'h220 &&
        req_wdata == 64'h1122_3344_5566_7788 && wr_pending == 1, "tagged write sent");
    ld_valid = 1; ld_reg = 104; ld_addr = 32'h220; ld_size = 3;
    @(negedge clk); ld_valid = 0;
    check_reg(104, 64'h1122_3344_5566_7788, "store updated the line");
    rsp_valid = 1; rsp_tag = '{MT_DWRITE, '0};
    @(negedge clk); rsp_valid = 0;
    chk(wr_pending == 0, "write acknowledged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
