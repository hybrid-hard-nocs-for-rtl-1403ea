// rx_port: hybrid read core port, between a router's local output and an
// FPGA core that runs on its own clock.
//
// Two lanes, one for packet-switched and one for TDM traffic. A slot table
// (one bit per slot, same slot numbering as the routers) marks the slots in
// which TDM flits arrive. In each cycle the flit on the link from the router
// goes to
//   * the TDM lane if the current slot is marked and the flit is a TDM flit;
//   * the packet-switched lane if it is a packet-switched flit (also in a
//     marked slot that its TDM stream left unused);
//   * nowhere if it is a TDM flit in an unmarked slot: it is dropped and
//     `sched_err` pulses.
// Each lane has a dual-clock FIFO and, on the core side, collects flits into
// one wide packet word. The packet-switched lane keeps one collector per VC,
// because the router may interleave flits of two VCs.
//
// Flow control: the TDM lane has none (there is no backpressure on TDM
// traffic); the core must take packets (`tdm_pkt_ready`, the document's
// "Ready in") at the scheduled rate. A TDM flit that finds its FIFO full is
// lost and sets the sticky `tdm_overflow`. The packet-switched lane returns
// one credit per VC to the router (`credit_out`, NoC clock) each time the
// core side frees a FIFO entry; the router starts with PS_FIFO_DEPTH/2
// credits per VC for this port.
//
// Timing: slot table entry k refers to the flit that is on the link during
// slot k, i.e. one that crossed the router's crossbar in slot k-1.
//
// The document gives the two lanes, the synchronizing FIFO per lane, the
// collecting buffer, the slot table with 0 = packet-switched and 1 = TDM and
// the Ready-in signal. FIFO depths, the use of the flit's type bit next to
// the table, credits and the overflow flag are this design's choices.
module rx_port
  import hnoc_pkg::*;
#(
  parameter int unsigned NUM_SLOTS      = 8,
  parameter int unsigned PKT_FLITS      = 4,
  parameter int unsigned PS_FIFO_DEPTH  = 16,
  parameter int unsigned TDM_FIFO_DEPTH = 8,
  localparam int unsigned SLOT_W        = (NUM_SLOTS > 1) ? $clog2(NUM_SLOTS) : 1,
  localparam int unsigned LW            = $clog2(PKT_FLITS + 1),
  localparam int unsigned PKT_W         = PKT_FLITS * FLIT_DATA_W
) (
  // NoC clock domain
  input  logic                clk_noc,
  input  logic                rst_noc_n,
  input  flit_t               flit_in,
  output logic [NUM_VCS-1:0]  credit_out,
  input  logic                cfg_we,
  input  logic [SLOT_W-1:0]   cfg_slot,
  input  logic                cfg_data,
  output logic                tdm_overflow,
  output logic                sched_err,
  // core clock domain
  input  logic                clk_core,
  input  logic                rst_core_n,
  output logic                ps_pkt_valid,
  input  logic                ps_pkt_ready,
  output logic [PKT_W-1:0]    ps_pkt_data,
  output logic [LW-1:0]       ps_pkt_len,
  output logic [VC_W-1:0]     ps_pkt_vc,
  output logic                tdm_pkt_valid,
  input  logic                tdm_pkt_ready,
  output logic [PKT_W-1:0]    tdm_pkt_data,
  output logic [LW-1:0]       tdm_pkt_len
);

  localparam int unsigned PAW = $clog2(PS_FIFO_DEPTH);
  localparam int unsigned TAW = $clog2(TDM_FIFO_DEPTH);

  // ---------------- NoC side ----------------
  logic [SLOT_W-1:0] slot, next_slot;
  logic              tdm_slot, next_tdm_slot;

  tdm_context #(.NUM_SLOTS(NUM_SLOTS), .WIDTH(1)) u_table (
    .clk(clk_noc), .rst_n(rst_noc_n),
    .cfg_we, .cfg_slot, .cfg_data,
    .slot, .next_slot,
    .cur_entry (tdm_slot),
    .next_entry(next_tdm_slot)
  );

  logic to_tdm, to_ps;
  assign to_tdm    = flit_in.valid && flit_in.tdm && tdm_slot;
  assign to_ps     = flit_in.valid && !flit_in.tdm;
  assign sched_err = flit_in.valid && flit_in.tdm && !tdm_slot;

  // packet-switched lane
  logic           ps_full, ps_empty, ps_rd;
  logic [PAW:0]   ps_freed_ptr, ps_returned;
  flit_t          ps_head;
  logic           vc_head, vc_empty;

  async_fifo #(.W(FLIT_W), .DEPTH(PS_FIFO_DEPTH)) u_ps_fifo (
    .wclk(clk_noc), .wrst_n(rst_noc_n),
    .wr_en(to_ps), .wr_data(flit_in), .wr_full(ps_full), .wr_rd_ptr(ps_freed_ptr),
    .rclk(clk_core), .rrst_n(rst_core_n),
    .rd_en(ps_rd), .rd_data(ps_head), .rd_empty(ps_empty)
  );

  // VC of each flit in the FIFO, kept on the NoC side to return credits.
  logic credit_go;
  assign credit_go = (ps_returned != ps_freed_ptr) && !vc_empty;

  vc_buffer #(.DEPTH(PS_FIFO_DEPTH), .W(1)) u_vc_shadow (
    .clk(clk_noc), .rst_n(rst_noc_n),
    .push (to_ps),
    .din  (flit_in.vc),
    .pop  (credit_go),
    .head (vc_head),
    .empty(vc_empty),
    .full (),
    .count()
  );

  always_ff @(posedge clk_noc or negedge rst_noc_n) begin
    if (!rst_noc_n) ps_returned <= '0;
    else if (credit_go) ps_returned <= ps_returned + 1'b1;
  end

  always_comb begin
    credit_out = '0;
    if (credit_go) credit_out[vc_head] = 1'b1;
  end

  // TDM lane
  logic         tdm_full, tdm_empty, tdm_rd;
  logic [TAW:0] tdm_rptr_unused;
  flit_t        tdm_head;

  async_fifo #(.W(FLIT_W), .DEPTH(TDM_FIFO_DEPTH)) u_tdm_fifo (
    .wclk(clk_noc), .wrst_n(rst_noc_n),
    .wr_en(to_tdm), .wr_data(flit_in), .wr_full(tdm_full), .wr_rd_ptr(tdm_rptr_unused),
    .rclk(clk_core), .rrst_n(rst_core_n),
    .rd_en(tdm_rd), .rd_data(tdm_head), .rd_empty(tdm_empty)
  );

  always_ff @(posedge clk_noc or negedge rst_noc_n) begin
    if (!rst_noc_n)               tdm_overflow <= 1'b0;
    else if (to_tdm && tdm_full)  tdm_overflow <= 1'b1;
  end

  // ---------------- core side ----------------
  logic [NUM_VCS-1:0]             c_ready, c_valid, c_sel;
  logic [NUM_VCS-1:0][PKT_W-1:0]  c_data;
  logic [NUM_VCS-1:0][LW-1:0]     c_len;

  for (genvar v = 0; v < NUM_VCS; v++) begin : g_coll
    flit_collector #(.PKT_FLITS(PKT_FLITS)) u_coll (
      .clk(clk_core), .rst_n(rst_core_n),
      .in_valid (!ps_empty && ps_head.vc == VC_W'(v)),
      .in_data  (ps_head.data),
      .in_tail  (ps_head.tail),
      .in_ready (c_ready[v]),
      .pkt_valid(c_valid[v]),
      .pkt_ready(ps_pkt_ready && c_sel[v]),
      .pkt_data (c_data[v]),
      .pkt_len  (c_len[v])
    );
  end

  assign ps_rd = !ps_empty && c_ready[ps_head.vc];

  rr_arbiter #(.N(NUM_VCS)) u_vc_arb (
    .clk(clk_core), .rst_n(rst_core_n),
    .req(c_valid), .advance(ps_pkt_ready), .grant(c_sel)
  );

  always_comb begin
    ps_pkt_valid = |c_sel;
    ps_pkt_data  = '0;
    ps_pkt_len   = '0;
    ps_pkt_vc    = '0;
    for (int v = 0; v < NUM_VCS; v++) begin
      if (c_sel[v]) begin
        ps_pkt_data = c_data[v];
        ps_pkt_len  = c_len[v];
        ps_pkt_vc   = VC_W'(v);
      end
    end
  end

  logic t_ready;

  flit_collector #(.PKT_FLITS(PKT_FLITS)) u_tdm_coll (
    .clk(clk_core), .rst_n(rst_core_n),
    .in_valid (!tdm_empty),
    .in_data  (tdm_head.data),
    .in_tail  (tdm_head.tail),
    .in_ready (t_ready),
    .pkt_valid(tdm_pkt_valid),
    .pkt_ready(tdm_pkt_ready),
    .pkt_data (tdm_pkt_data),
    .pkt_len  (tdm_pkt_len)
  );

  assign tdm_rd = !tdm_empty && t_ready;

endmodule
