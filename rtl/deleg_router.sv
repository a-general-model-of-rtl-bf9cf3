// deleg_router: one node of the chip-wide delegation network, the low
// bandwidth mesh that carries family-creation requests to a place.
//
// Messages are MSG_BITS = 90 bits long and travel as 9-bit flits, ten per
// message. The first flit is the header and holds the destination
// coordinates {1'b0, y[3:0], x[3:0]}. Routing is dimension order (X first,
// then Y) and switching is virtual cut-through: a message enters the node
// only when a whole message fits in its buffer, and leaves it flit by flit
// as soon as its header is in and its output is free, without waiting for
// the tail. The node's buffer is BUF_BITS = 180 bits, i.e. two message slots
// shared by the five inputs (local, north, east, south, west).
// Flit width, message size, buffer size, dimension-order routing and cut-
// through are the document's; the header format, the shared two-slot buffer,
// round-robin slot allocation and the valid/ready links are this design's
// own choices. North is +y, east is +x.
//
// Timing: a flit is accepted on an input when valid and ready are high at a
// clock edge and can leave the node on the next cycle at the earliest.
module deleg_router #(
  parameter int unsigned FLIT_W   = 9,
  parameter int unsigned MSG_BITS = 90,
  parameter int unsigned BUF_BITS = 180,
  localparam int unsigned NP    = 5,
  localparam int unsigned FLITS = MSG_BITS / FLIT_W,
  localparam int unsigned SLOTS = BUF_BITS / MSG_BITS,
  localparam int unsigned CW    = $clog2(FLITS + 1),
  localparam int unsigned SW    = (SLOTS > 1) ? $clog2(SLOTS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [3:0]        my_x,
  input  logic [3:0]        my_y,
  input  logic [NP-1:0]     in_valid,
  input  logic [FLIT_W-1:0] in_flit  [NP],
  output logic [NP-1:0]     in_ready,
  output logic [NP-1:0]     out_valid,
  output logic [FLIT_W-1:0] out_flit [NP],
  input  logic [NP-1:0]     out_ready,
  output logic [15:0]       n_forwarded
);

  localparam int unsigned P_LOCAL = 0, P_N = 1, P_E = 2, P_S = 3, P_W = 4;

  logic [FLIT_W-1:0] buf_q [SLOTS][FLITS];
  logic              busy_q [SLOTS];       // slot holds (part of) a message
  logic [CW-1:0]     wcnt_q [SLOTS];       // flits received
  logic [CW-1:0]     rcnt_q [SLOTS];       // flits sent
  logic              own_q  [SLOTS];       // slot owns its output
  logic [2:0]        outp_q [SLOTS];
  // input binding: which slot an input is filling
  logic              bound_q [NP];
  logic [SW-1:0]     bslot_q [NP];
  logic [2:0]        rr_q;

  function automatic logic [2:0] route(input logic [FLIT_W-1:0] h,
                                       input logic [3:0] x, input logic [3:0] y);
    if (h[3:0] > x)      route = 3'(P_E);
    else if (h[3:0] < x) route = 3'(P_W);
    else if (h[7:4] > y) route = 3'(P_N);
    else if (h[7:4] < y) route = 3'(P_S);
    else                 route = 3'(P_LOCAL);
  endfunction

  // ---- slot allocation: one new message per cycle, rotating priority ----
  logic          free_ok;
  logic [SW-1:0] free_slot;
  always_comb begin
    free_ok = 1'b0; free_slot = '0;
    for (int s = SLOTS - 1; s >= 0; s--)
      if (!busy_q[s]) begin free_ok = 1'b1; free_slot = SW'(s); end
  end
  logic          grant_ok;
  logic [2:0]    grant_p;
  always_comb begin
    grant_ok = 1'b0; grant_p = '0;
    for (int k = NP - 1; k >= 0; k--) begin
      int p;
      p = (int'(rr_q) + k) % NP;
      if (in_valid[p] && !bound_q[p] && free_ok) begin grant_ok = 1'b1; grant_p = 3'(p); end
    end
  end
  always_comb begin
    for (int p = 0; p < NP; p++)
      in_ready[p] = bound_q[p] || (grant_ok && grant_p == 3'(p));
  end

  // ---- output side: a slot whose header is in claims its output ----
  logic [SLOTS-1:0] want;
  logic [2:0]       want_p [SLOTS];
  logic [NP-1:0]    out_taken;
  always_comb begin
    for (int s = 0; s < SLOTS; s++) begin
      want_p[s] = route(buf_q[s][0], my_x, my_y);
      want[s]   = busy_q[s] && !own_q[s] && wcnt_q[s] != '0;
    end
    out_taken = '0;
    for (int s = 0; s < SLOTS; s++) if (own_q[s]) out_taken[outp_q[s]] = 1'b1;
  end
  logic [SLOTS-1:0] claim;
  always_comb begin
    logic [NP-1:0] t;
    t = out_taken;
    claim = '0;
    for (int s = 0; s < SLOTS; s++)
      if (want[s] && !t[want_p[s]]) begin claim[s] = 1'b1; t[want_p[s]] = 1'b1; end
  end
  // sending: a slot owning its output sends the next received flit
  logic [SLOTS-1:0] send;
  always_comb begin
    out_valid = '0;
    for (int p = 0; p < NP; p++) out_flit[p] = '0;
    send = '0;
    for (int s = 0; s < SLOTS; s++) begin
      if (own_q[s] && rcnt_q[s] < wcnt_q[s]) begin
        out_valid[outp_q[s]] = 1'b1;
        out_flit[outp_q[s]]  = buf_q[s][rcnt_q[s]];
        send[s] = out_ready[outp_q[s]];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < SLOTS; s++) begin
        busy_q[s] <= 1'b0; wcnt_q[s] <= '0; rcnt_q[s] <= '0;
        own_q[s] <= 1'b0; outp_q[s] <= '0;
        for (int f = 0; f < FLITS; f++) buf_q[s][f] <= '0;
      end
      for (int p = 0; p < NP; p++) begin bound_q[p] <= 1'b0; bslot_q[p] <= '0; end
      rr_q <= '0; n_forwarded <= '0;
    end else begin
      // receive
      for (int p = 0; p < NP; p++) begin
        if (in_valid[p] && in_ready[p]) begin
          logic [SW-1:0] s;
          s = bound_q[p] ? bslot_q[p] : free_slot;
          buf_q[s][wcnt_q[s]] <= in_flit[p];
          wcnt_q[s] <= wcnt_q[s] + 1'b1;
          if (!bound_q[p]) begin
            busy_q[s] <= 1'b1; rcnt_q[s] <= '0; own_q[s] <= 1'b0;
          end
          bound_q[p] <= (wcnt_q[s] != CW'(FLITS - 1));
          bslot_q[p] <= s;
        end
      end
      if (grant_ok) rr_q <= (rr_q == 3'(NP - 1)) ? '0 : rr_q + 1'b1;
      // claim outputs and send
      for (int s = 0; s < SLOTS; s++) begin
        if (claim[s]) begin own_q[s] <= 1'b1; outp_q[s] <= want_p[s]; end
        if (send[s]) begin
          rcnt_q[s] <= rcnt_q[s] + 1'b1;
          if (rcnt_q[s] == CW'(FLITS - 1)) begin
            busy_q[s] <= 1'b0; own_q[s] <= 1'b0; wcnt_q[s] <= '0; rcnt_q[s] <= '0;
            n_forwarded <= n_forwarded + 1'b1;
          end
        end
      end
    end
  end

endmodule
