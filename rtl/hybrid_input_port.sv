// hybrid_input_port: one input port of the hybrid router.
//
// A flit arriving on the link (the upstream output register acts as this
// port's input register) goes one of two ways in the router's first stage:
//   * a TDM flit is written into the bypass register, skipping the buffers;
//   * a packet-switched flit is written into the buffer of its virtual
//     channel (two VCs, VC_BUF_DEPTH flits each).
// If a VC buffer is empty, the arriving packet-switched flit is offered to
// switch allocation in the same cycle and, when granted, never enters the
// buffer; this keeps the router at two stages for packet-switched traffic.
//
// Per VC the port offers its front flit (`cand_*`) to the switch allocator,
// with the requested output: the lookahead port carried by a head flit, or
// the port remembered from the packet's head for body and tail flits.
// A granted flit leaves its buffer at the end of the first stage and waits in
// the stage register; one credit for that VC is returned upstream in the same
// cycle.
//
// Second stage: `xbar_flit` feeds the crossbar. A multiplexer picks the
// bypass register when the router has reserved this input for TDM in this
// cycle (`use_bypass`, decided one cycle earlier from the context memory and
// the arriving flit's valid and type bits), and the stage register otherwise.
//
// From the document: buffers per VC, bypass register, multiplexer before the
// crossbar, one VC per packet for the whole path, lookahead routing. The
// empty-buffer fall-through, the stage register and credit return are this
// design's own choices.
module hybrid_input_port
  import hnoc_pkg::*;
#(
  parameter int unsigned VC_BUF_DEPTH = 10
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // link side
  input  flit_t                    flit_in,
  output logic [NUM_VCS-1:0]       credit_out,
  // to / from the switch allocator (stage 1)
  output logic [NUM_VCS-1:0]       cand_valid,
  output logic [NUM_VCS-1:0]       cand_head,
  output logic [NUM_VCS-1:0]       cand_tail,
  output logic [NUM_VCS-1:0][PW-1:0] cand_port,
  input  logic [NUM_VCS-1:0]       grant_vc,     // at most one bit set
  input  logic                     use_bypass_next,
  // to the crossbar (stage 2)
  output flit_t                    xbar_flit
);

  localparam int unsigned CW = $clog2(VC_BUF_DEPTH + 1);

  flit_t                  buf_head [NUM_VCS];
  flit_t                  cand     [NUM_VCS];
  logic [NUM_VCS-1:0]     buf_empty, buf_full, push, pop;
  logic [CW-1:0]          buf_count [NUM_VCS];
  logic [NUM_VCS-1:0][PW-1:0] route_q;
  logic [NUM_VCS-1:0]     in_ps;

  flit_t ps_q, bypass_q;
  logic  use_bypass_q;

  for (genvar v = 0; v < NUM_VCS; v++) begin : g_vc
    assign in_ps[v] = flit_in.valid && !flit_in.tdm && (flit_in.vc == VC_W'(v));

    vc_buffer #(.DEPTH(VC_BUF_DEPTH), .W(FLIT_W)) u_buf (
      .clk, .rst_n,
      .push (push[v]),
      .din  (flit_in),
      .pop  (pop[v]),
      .head (buf_head[v]),
      .empty(buf_empty[v]),
      .full (buf_full[v]),
      .count(buf_count[v])
    );

    always_comb begin
      cand[v]       = buf_empty[v] ? (in_ps[v] ? flit_in : '0) : buf_head[v];
      cand_valid[v] = buf_empty[v] ? in_ps[v] : 1'b1;
      cand_head[v]  = cand[v].head;
      cand_tail[v]  = cand[v].tail;
      cand_port[v]  = cand[v].head ? cand[v].la_port : route_q[v];
      push[v]       = in_ps[v] && !(buf_empty[v] && grant_vc[v]);
      pop[v]        = grant_vc[v] && !buf_empty[v];
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                                   route_q[v] <= '0;
      else if (grant_vc[v] && cand[v].head)         route_q[v] <= cand[v].la_port;
    end

    assign credit_out[v] = grant_vc[v] && cand_valid[v];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ps_q         <= '0;
      bypass_q     <= '0;
      use_bypass_q <= 1'b0;
    end else begin
      ps_q <= '0;
      for (int v = 0; v < NUM_VCS; v++) if (grant_vc[v] && cand_valid[v]) ps_q <= cand[v];
      bypass_q     <= (flit_in.valid && flit_in.tdm) ? flit_in : '0;
      use_bypass_q <= use_bypass_next;
    end
  end

  assign xbar_flit = use_bypass_q ? bypass_q : ps_q;

  a_grant_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant_vc));
  a_grant_valid:  assert property (@(posedge clk) disable iff (!rst_n)
                                   (grant_vc != '0) |-> ((grant_vc & cand_valid) != '0));

endmodule
