// Testbench for sync_regfile: checks reset to full, range set-empty,
// suspension of a reader on an empty register, wake on each write port,
// the parked-read payload (park, link, raw read) kept apart from the waiting
// thread reference, and a random write/read pass against a reference array.
module tb_sync_regfile;
  import drisc_pkg::*;
  localparam int NREGS = 1024;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic init_valid = 0; logic [9:0] init_base = 0; logic [10:0] init_cnt = 0;
  logic rd_valid = 0; logic [9:0] rd_addr = 0; logic [7:0] rd_tid = 0;
  logic rd_full, rd_suspend; logic [63:0] rd_data;
  logic wa_valid = 0, wb_valid = 0, wc_valid = 0;
  logic [9:0] wa_addr = 0, wb_addr = 0, wc_addr = 0;
  logic [63:0] wa_data = 0, wb_data = 0, wc_data = 0;
  logic wka, wkb, wkc; logic [7:0] wka_t, wkb_t, wkc_t;
  logic park_valid = 0; logic [9:0] park_addr = 0; logic [5:0] park_off = 0; logic [1:0] park_size = 0;
  logic link_valid = 0; logic [9:0] link_addr = 0, link_next = 0, raw_addr = 0;
  logic [63:0] raw_data; rstate_e raw_state;

  sync_regfile #(.NREGS(NREGS)) dut (.*, .wake_a_valid(wka), .wake_a_tid(wka_t),
    .wake_b_valid(wkb), .wake_b_tid(wkb_t), .wake_c_valid(wkc), .wake_c_tid(wkc_t));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] ref_d [64];
  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    rd_addr = 15; #1;
    chk(rd_full && rd_data == 0, "reset state full, data 0");
    // range [10,20) empty
    @(negedge clk); init_valid = 1; init_base = 10; init_cnt = 10;
    @(negedge clk); init_valid = 0;
    rd_addr = 9;  #1 chk(rd_full, "reg 9 outside range stays full");
    rd_addr = 20; #1 chk(rd_full, "reg 20 outside range stays full");
    rd_addr = 10; #1 chk(!rd_full, "reg 10 empty");
    rd_addr = 19; #1 chk(!rd_full, "reg 19 empty");
    // thread 7 reads empty reg 15: suspends
    rd_addr = 15; rd_tid = 7; rd_valid = 1; #1;
    chk(rd_suspend, "read of empty register suspends");
    @(negedge clk); rd_valid = 0;
    raw_addr = 15; #1 chk(raw_state == RS_WAITING, "register now waiting");
    // write port a wakes thread 7
    wa_valid = 1; wa_addr = 15; wa_data = 64'hDEAD_BEEF_0123_4567;
    @(negedge clk); wa_valid = 0;
    chk(wka && wka_t == 7 && !wkb && !wkc, "write a wakes thread 7");
    rd_addr = 15; #1 chk(rd_full && rd_data == 64'hDEAD_BEEF_0123_4567, "data after write");
    @(negedge clk);
    chk(!wka, "wake is a single pulse");
    // write b to an empty, non-waiting register: no wake
    wb_valid = 1; wb_addr = 12; wb_data = 5;
    @(negedge clk); wb_valid = 0;
    chk(!wkb, "no wake without waiting thread");
    // park a read in reg 30, link it to 31, suspend thread 3 on it
    park_valid = 1; park_addr = 30; park_off = 6'd37; park_size = 2'd2;
    @(negedge clk); park_valid = 0;
    link_valid = 1; link_addr = 30; link_next = 31;
    @(negedge clk); link_valid = 0;
    rd_addr = 30; rd_tid = 3; rd_valid = 1; #1 chk(rd_suspend, "suspend on parked register");
    @(negedge clk); rd_valid = 0;
    raw_addr = 30; #1;
    chk(raw_state == RS_WAITING, "parked register waiting");
    chk(raw_data[PL_OFF_LSB +: 6] == 37 && raw_data[PL_SIZE_LSB +: 2] == 2, "park info kept");
    chk(raw_data[PL_NEXT_LSB + 15] && raw_data[PL_NEXT_LSB +: 10] == 31, "link kept");
    chk(raw_data[PL_TID_LSB +: 8] == 3, "waiting thread kept");
    wc_valid = 1; wc_addr = 30; wc_data = 99;
    @(negedge clk); wc_valid = 0;
    chk(wkc && wkc_t == 3, "write c wakes thread 3");
    // b and c on waiting registers in the same cycle
    init_valid = 1; init_base = 100; init_cnt = 2;
    @(negedge clk); init_valid = 0;
    rd_valid = 1; rd_addr = 100; rd_tid = 11; @(negedge clk);
    rd_addr = 101; rd_tid = 12; @(negedge clk); rd_valid = 0;
    wb_valid = 1; wb_addr = 100; wb_data = 1; wc_valid = 1; wc_addr = 101; wc_data = 2;
    @(negedge clk); wb_valid = 0; wc_valid = 0;
    chk(wkb && wkb_t == 11 && wkc && wkc_t == 12, "two wakes in one cycle");
    // random writes and reads on registers 200..263
    for (int i = 0; i < 64; i++) begin
      ref_d[i] = {$urandom, $urandom};
      wa_valid = 1; wa_addr = 10'(200 + i); wa_data = ref_d[i];
      @(negedge clk);
    end
    wa_valid = 0;
    for (int i = 0; i < 64; i++) begin
      rd_addr = 10'(200 + i); #1;
      chk(rd_full && rd_data == ref_d[i], "random data");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
