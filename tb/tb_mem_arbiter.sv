// Testbench for mem_arbiter: single requests pass through, simultaneous
// requests are granted alternately, a stalled memory holds both off, and
// responses are steered by the type in their tag.
module tb_mem_arbiter;
  import drisc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic i_req_valid = 0, i_req_ready, d_req_valid = 0, d_req_ready;
  mtag_t i_req_tag = '{MT_IREAD, 6'd3}, d_req_tag = '{MT_DREAD, 6'd5};
  logic [31:0] i_req_addr = 32'h100, d_req_addr = 32'h200;
  logic [63:0] d_req_wdata = 64'h55; logic [1:0] d_req_wsize = 2;
  logic m_req_valid, m_req_ready = 1; mtag_t m_req_tag; logic [31:0] m_req_addr;
  logic [63:0] m_req_wdata; logic [1:0] m_req_wsize;
  logic m_rsp_valid = 0; mtag_t m_rsp_tag = '{MT_IREAD, '0}; logic [511:0] m_rsp_data = 0;
  logic i_rsp_valid, d_rsp_valid; mtag_t rsp_tag; logic [511:0] rsp_data;

  mem_arbiter #(.LINE_BYTES(64)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int gi, gd;
  initial begin
    repeat (2) @(posedge clk); rst_n <= 1;
    @(negedge clk);
    i_req_valid = 1; #1;
    chk(m_req_valid && i_req_ready && m_req_addr == 32'h100 && m_req_tag == i_req_tag, "I alone");
    i_req_valid = 0; d_req_valid = 1; #1;
    chk(d_req_ready && m_req_addr == 32'h200 && m_req_wdata == 64'h55 && m_req_wsize == 2, "D alone");
    i_req_valid = 1;
    gi = 0; gd = 0;
    for (int c = 0; c < 10; c++) begin
      #1;
      chk(i_req_ready != d_req_ready, "one grant per cycle");
      if (i_req_ready) gi++;
      if (d_req_ready) gd++;
      @(negedge clk);
    end
    chk(gi == 5 && gd == 5, "alternating grants");
    m_req_ready = 0; #1;
    chk(m_req_valid && !i_req_ready && !d_req_ready, "memory stall holds both");
    i_req_valid = 0; d_req_valid = 0; m_req_ready = 1;
    m_rsp_valid = 1; m_rsp_tag = '{MT_IREAD, 6'd3}; m_rsp_data = 512'hABC; #1;
    chk(i_rsp_valid && !d_rsp_valid && rsp_tag.idx == 3 && rsp_data == 512'hABC, "I response");
    m_rsp_tag = '{MT_DREAD, 6'd5}; #1;
    chk(!i_rsp_valid && d_rsp_valid, "D read response");
    m_rsp_tag = '{MT_DWRITE, 6'd0}; #1;
    chk(!i_rsp_valid && d_rsp_valid, "write acknowledgement");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
