// tagged_mem_model: behavioural model of the memory behind a core's tagged
// memory port, for simulation only. Every request is accepted (ready may be
// withdrawn at random), answered after a random latency between LAT_MIN and
// LAT_MAX cycles, and answers that are due are returned in random order, one
// per cycle, with the tag of their request. Line reads return 64 bytes;
// bytes never written read as (address * 13 + 7) mod 256. Writes are applied
// at acceptance and acknowledged later.
module tagged_mem_model
  import drisc_pkg::*;
#(
  parameter int LAT_MIN = 5,
  parameter int LAT_MAX = 40
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req_valid,
  output logic          req_ready,
  input  mtag_t         req_tag,
  input  logic [31:0]   req_addr,
  input  logic [63:0]   req_wdata,
  input  logic [1:0]    req_wsize,
  output logic          rsp_valid,
  output mtag_t         rsp_tag,
  output logic [511:0]  rsp_data,
  output int            n_reordered
);
  logic [7:0] mem [int];
  typedef struct { mtag_t tag; logic [31:0] addr; longint due; int seq; } pend_t;
  pend_t pend [$];
  longint now;
  int seq_in, last_seq;

  function automatic logic [7:0] rd_byte(input logic [31:0] a);
    if (mem.exists(int'(a))) return mem[int'(a)];
    return 8'(a * 13 + 7);
  endfunction

  initial begin
    req_ready = 1; rsp_valid = 0; rsp_tag = '{MT_IREAD, '0}; rsp_data = '0;
    now = 0; seq_in = 0; last_seq = -1; n_reordered = 0;
  end

  always @(posedge clk) begin
    now <= now + 1;
    rsp_valid <= 1'b0;
    if (rst_n) begin
      if (req_valid && req_ready) begin
        pend_t p;
        p.tag = req_tag; p.addr = req_addr; p.seq = seq_in;
        p.due = now + longint'(LAT_MIN + ($urandom % (LAT_MAX - LAT_MIN + 1)));
        seq_in++;
        if (req_tag.mtype == MT_DWRITE)
          for (int b = 0; b < (1 << req_wsize); b++)
            mem[int'(req_addr) + b] = req_wdata[b*8 +: 8];
        pend.push_back(p);
      end
      begin
        int due_idx [$];
        due_idx.delete();
        for (int i = 0; i < pend.size(); i++) if (pend[i].due <= now) due_idx.push_back(i);
        if (due_idx.size() > 0) begin
          int k;
          logic [511:0] d;
          k = due_idx[$urandom % due_idx.size()];
          for (int b = 0; b < 64; b++) d[b*8 +: 8] = rd_byte({pend[k].addr[31:6], 6'b0} + 32'(b));
          rsp_valid <= 1'b1;
          rsp_tag   <= pend[k].tag;
          rsp_data  <= d;
          if (pend[k].seq < last_seq) n_reordered <= n_reordered + 1;
          last_seq = pend[k].seq;
          pend.delete(k);
        end
      end
      req_ready <= ($urandom % 8) != 0;
    end
  end
endmodule
