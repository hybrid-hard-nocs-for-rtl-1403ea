// hybrid_router: two-stage mesh router for packet-switched and TDM traffic.
//
// Five ports (N, E, S, W, local), two virtual channels per input with
// VC_BUF_DEPTH-flit buffers, and a context memory of NUM_SLOTS entries that
// reserves crossbar connections for time-multiplexed (TDM) traffic slot by
// slot. All routers share one slot numbering (see tdm_context).
//
// Pipeline, for a flit that is in the upstream output register during cycle
// t (this router's first stage):
//   stage 1 (t): the context-memory entry of the slot of cycle t+1 is read.
//     For every output that entry reserves, the named input's arriving flit
//     is checked: if it is valid and marked TDM, the connection is made in
//     t+1 and both the input and the output are masked from packet-switched
//     allocation; otherwise the output is free for packet switching. The
//     TDM flit goes to the input's bypass register, packet-switched flits go
//     to their VC buffer, and round-robin switch allocation runs.
//   stage 2 (t+1): the crossbar moves bypass-register or buffer data into
//     the output registers, which drive the links in t+2.
// A TDM flit therefore crosses the next router's crossbar two slots after
// this one's: a router delay d = 2 slots for the schedule. A context entry
// may name the same input for several outputs (multicast).
//
// Ports: `flit_in`/`credit_out` per input link, `flit_out`/`credit_in` per
// output link (credits are per VC, one pulse per freed buffer entry),
// `cfg_*` writes one context entry (ctx_entry_t: per output an enable and a
// 3-bit source), `slot` is the current slot, `tdm_unrouted` pulses when a
// TDM flit arrives that the context memory does not route (it is dropped).
//
// The structure follows the document (Fig. 1 and 2 and Section III-A); the
// credit protocol, the drop of unscheduled TDM flits and the coordinates as
// parameters are this design's choices.
module hybrid_router
  import hnoc_pkg::*;
#(
  parameter int unsigned MY_X          = 0,
  parameter int unsigned MY_Y          = 0,
  parameter int unsigned NUM_SLOTS     = 8,
  parameter int unsigned VC_BUF_DEPTH  = 10,
  parameter int unsigned LOCAL_CREDITS = 8,
  localparam int unsigned SLOT_W       = (NUM_SLOTS > 1) ? $clog2(NUM_SLOTS) : 1
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  flit_t                             flit_in    [NUM_PORTS],
  output logic [NUM_PORTS-1:0][NUM_VCS-1:0] credit_out,
  output flit_t                             flit_out   [NUM_PORTS],
  input  logic [NUM_PORTS-1:0][NUM_VCS-1:0] credit_in,
  input  logic                              cfg_we,
  input  logic [SLOT_W-1:0]                 cfg_slot,
  input  ctx_entry_t                        cfg_data,
  output logic [SLOT_W-1:0]                 slot,
  output logic [NUM_PORTS-1:0]              tdm_unrouted
);

  ctx_entry_t ctx_next, ctx_cur;
  logic [SLOT_W-1:0] next_slot;

  tdm_context #(.NUM_SLOTS(NUM_SLOTS), .WIDTH(CTX_W)) u_ctx (
    .clk, .rst_n,
    .cfg_we, .cfg_slot, .cfg_data,
    .slot, .next_slot,
    .cur_entry (ctx_cur),
    .next_entry(ctx_next)
  );

  // ---- stage 1: TDM reservation for the next cycle ----
  logic [NUM_PORTS-1:0] tdm_out_take, tdm_in_busy, tdm_in_arrive;

  always_comb begin
    tdm_in_busy = '0;
    for (int i = 0; i < NUM_PORTS; i++) tdm_in_arrive[i] = flit_in[i].valid && flit_in[i].tdm;
    for (int o = 0; o < NUM_PORTS; o++) begin
      tdm_out_take[o] = 1'b0;
      if (ctx_next[o].en && int'(ctx_next[o].src) < NUM_PORTS)
        tdm_out_take[o] = tdm_in_arrive[ctx_next[o].src];
      if (tdm_out_take[o]) tdm_in_busy[ctx_next[o].src] = 1'b1;
    end
    tdm_unrouted = tdm_in_arrive & ~tdm_in_busy;
  end

  // ---- input ports ----
  logic [NUM_PORTS-1:0][NUM_VCS-1:0]             cand_valid, cand_head, cand_tail, grant_vc;
  logic [NUM_PORTS-1:0][NUM_VCS-1:0][PW-1:0] cand_port;
  flit_t xbar_in [NUM_PORTS];

  for (genvar i = 0; i < NUM_PORTS; i++) begin : g_in
    hybrid_input_port #(.VC_BUF_DEPTH(VC_BUF_DEPTH)) u_in (
      .clk, .rst_n,
      .flit_in        (flit_in[i]),
      .credit_out     (credit_out[i]),
      .cand_valid     (cand_valid[i]),
      .cand_head      (cand_head[i]),
      .cand_tail      (cand_tail[i]),
      .cand_port      (cand_port[i]),
      .grant_vc       (grant_vc[i]),
      .use_bypass_next(tdm_in_busy[i]),
      .xbar_flit      (xbar_in[i])
    );
  end

  // ---- switch allocation ----
  logic [NUM_PORTS-1:0]             out_ps_valid;
  logic [NUM_PORTS-1:0][PW-1:0] out_ps_src;

  switch_allocator #(.VC_BUF_DEPTH(VC_BUF_DEPTH), .LOCAL_CREDITS(LOCAL_CREDITS)) u_sa (
    .clk, .rst_n,
    .cand_valid, .cand_head, .cand_tail, .cand_port,
    .tdm_in_busy,
    .tdm_out_busy(tdm_out_take),
    .credit_in,
    .grant_vc, .out_ps_valid, .out_ps_src
  );

  // ---- stage register: crossbar configuration for the next cycle ----
  logic [NUM_PORTS-1:0]             sel_valid_q;
  logic [NUM_PORTS-1:0][PW-1:0] sel_src_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_valid_q <= '0;
      sel_src_q   <= '0;
    end else begin
      for (int o = 0; o < NUM_PORTS; o++) begin
        sel_valid_q[o] <= tdm_out_take[o] || out_ps_valid[o];
        sel_src_q[o]   <= tdm_out_take[o] ? ctx_next[o].src : out_ps_src[o];
      end
    end
  end

  // ---- stage 2: crossbar and output registers ----
  flit_t xbar_out [NUM_PORTS];

  crossbar u_xbar (
    .xbar_in,
    .sel_valid(sel_valid_q),
    .sel_src  (sel_src_q),
    .xbar_out
  );

  output_module #(.MY_X(MY_X), .MY_Y(MY_Y)) u_out (
    .clk, .rst_n,
    .xbar_out,
    .flit_out
  );

  // A TDM flit may only cross the crossbar on a connection the entry of the
  // current slot reserves.
  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_chk
    a_tdm_on_schedule: assert property (@(posedge clk) disable iff (!rst_n)
      (xbar_out[o].valid && xbar_out[o].tdm) |-> (ctx_cur[o].en && sel_src_q[o] == ctx_cur[o].src));
  end

endmodule
