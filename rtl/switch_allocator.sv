// switch_allocator: multi-resource allocator of one output port.
//
// NREQ input VCs may request this port (req = their rt_r bit for it) and the
// port has VN output VCs.  A tile cfg[i][v] connects input VC i to output
// VC v.  Each eclk the allocator
//   * clears every tile whose request has dropped (path released), and
//   * if some request is pending (req & no tile) and some output VC is
//     ready (vc_rdy & not busy), sets one tile: the pending request found
//     first from a round-robin pointer gets the lowest-numbered ready VC.
// gnt[i] (the rt_ack contribution of this port) is the OR of row i and
// vc_busy[v] the OR of column v.  An output VC whose vc_rdy is held low
// (blocked after a confirmed fault) is never granted.
//
// The tile array, the row/column ORs and the vc_rdy/vc_busy handshake are
// the design's; choosing round-robin and one grant per eclk in place of the
// two mutex arbiters is this design's choice.
module switch_allocator #(
  parameter int NREQ = 10,
  parameter int VN   = 2
) (
  input  logic                      eclk,
  input  logic                      rst_n,
  input  logic [NREQ-1:0]           req,
  input  logic [VN-1:0]             vc_rdy,
  output logic [NREQ-1:0][VN-1:0]   cfg,
  output logic [NREQ-1:0]           gnt,
  output logic [VN-1:0]             vc_busy
);

  localparam int PW = (NREQ > 1) ? $clog2(NREQ) : 1;

  logic [PW-1:0] ptr_q;
  logic          found_r, found_v;
  logic [PW-1:0] sel_r;
  localparam int VW = (VN > 1) ? $clog2(VN) : 1;
  logic [VW-1:0] sel_v;
  logic [NREQ-1:0] pending;
  logic [VN-1:0]   freevc;

  always_comb begin
    for (int i = 0; i < NREQ; i++) gnt[i] = |cfg[i];
    for (int v = 0; v < VN; v++) begin
      vc_busy[v] = 1'b0;
      for (int i = 0; i < NREQ; i++) vc_busy[v] |= cfg[i][v];
    end
    pending = req & ~gnt;
    freevc  = vc_rdy & ~vc_busy;

    found_r = 1'b0;
    sel_r   = '0;
    for (int n = 0; n < NREQ; n++) begin
      logic [PW-1:0] idx;
      idx = PW'((int'(ptr_q) + n) % NREQ);
      if (!found_r && pending[idx]) begin
        found_r = 1'b1;
        sel_r   = idx;
      end
    end
    found_v = 1'b0;
    sel_v   = '0;
    for (int v = VN-1; v >= 0; v--) begin
      if (freevc[v]) begin
        found_v = 1'b1;
        sel_v   = VW'(v);
      end
    end
  end

  always_ff @(posedge eclk or negedge rst_n) begin
    if (!rst_n) begin
      cfg   <= '0;
      ptr_q <= '0;
    end else begin
      for (int i = 0; i < NREQ; i++)
        if (!req[i]) cfg[i] <= '0;
      if (found_r && found_v) begin
        cfg[sel_r][sel_v] <= 1'b1;
        ptr_q <= (int'(sel_r) == NREQ-1) ? '0 : sel_r + 1'b1;
      end
    end
  end

endmodule
