// mem_arbiter: joins the I-cache and D-cache request streams onto the core's
// single tagged memory port and routes responses back by their tag.
//
// Requests are valid/ready handshakes; the arbiter grants round-robin when
// both caches request in the same cycle and passes the winner through
// combinationally. Responses carry the tag of their request: I-cache line
// reads go to the I-cache, D-cache line reads and write acknowledgements to
// the D-cache, in whatever order memory returns them. The tag format (type
// plus line index) and out-of-order responses are the document's; the
// round-robin policy is this design's own choice.
module mem_arbiter
  import drisc_pkg::*;
#(
  parameter int unsigned LINE_BYTES = 64
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    i_req_valid,
  output logic                    i_req_ready,
  input  mtag_t                   i_req_tag,
  input  logic [31:0]             i_req_addr,
  input  logic                    d_req_valid,
  output logic                    d_req_ready,
  input  mtag_t                   d_req_tag,
  input  logic [31:0]             d_req_addr,
  input  logic [63:0]             d_req_wdata,
  input  logic [1:0]              d_req_wsize,
  output logic                    m_req_valid,
  input  logic                    m_req_ready,
  output mtag_t                   m_req_tag,
  output logic [31:0]             m_req_addr,
  output logic [63:0]             m_req_wdata,
  output logic [1:0]              m_req_wsize,
  input  logic                    m_rsp_valid,
  input  mtag_t                   m_rsp_tag,
  input  logic [LINE_BYTES*8-1:0] m_rsp_data,
  output logic                    i_rsp_valid,
  output logic                    d_rsp_valid,
  output mtag_t                   rsp_tag,
  output logic [LINE_BYTES*8-1:0] rsp_data
);

  logic last_d_q;   // the D-cache won the last contested grant
  logic pick_d;
  assign pick_d = d_req_valid && (!i_req_valid || !last_d_q);

  assign m_req_valid = i_req_valid || d_req_valid;
  assign m_req_tag   = pick_d ? d_req_tag  : i_req_tag;
  assign m_req_addr  = pick_d ? d_req_addr : i_req_addr;
  assign m_req_wdata = pick_d ? d_req_wdata : '0;
  assign m_req_wsize = pick_d ? d_req_wsize : '0;
  assign i_req_ready = m_req_ready && !pick_d;
  assign d_req_ready = m_req_ready && pick_d;

  assign i_rsp_valid = m_rsp_valid && m_rsp_tag.mtype == MT_IREAD;
  assign d_rsp_valid = m_rsp_valid && m_rsp_tag.mtype != MT_IREAD;
  assign rsp_tag     = m_rsp_tag;
  assign rsp_data    = m_rsp_data;

  always_ff @(posedge clk) begin
    if (!rst_n) last_d_q <= 1'b0;
    else if (m_req_valid && m_req_ready && i_req_valid && d_req_valid) last_d_q <= pick_d;
  end

  a_req_hold_tag: assert property (@(posedge clk) disable iff (!rst_n)
    m_req_valid && !m_req_ready |=> m_req_valid);

endmodule
