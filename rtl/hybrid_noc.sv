// hybrid_noc: a hard network-on-chip for an FPGA that carries both
// packet-switched and prescheduled time-multiplexed (TDM) traffic.
//
// MESH_X x MESH_Y routers (8 x 8 by default) in a 2D mesh, each with a write
// core port (tx_port) feeding its local input and a read core port (rx_port)
// fed by its local output. Neighbouring routers are joined by one flit link
// and one per-VC credit line in each direction. Node (x, y) has index
// y*MESH_X + x; x grows to the east, y to the north. Links that would leave
// the mesh are tied off.
//
// Packet-switched packets use X-then-Y routing with lookahead, two virtual
// channels and credit flow control. TDM streams follow paths and slots
// fixed when the FPGA design is compiled: the schedule lives in the routers'
// context memories and the ports' slot tables, all indexed by one slot
// counter value that every node computes from the common reset. A TDM flit
// moves one router every two slots and is never buffered inside the
// network; a slot that a TDM stream leaves empty is used by packet
// switching. Empty context memories (the reset state) give a purely
// packet-switched network; filling every slot with reservations gives a
// TDM-only one.
//
// Configuration: `cfg_we` writes `cfg_data` into slot `cfg_slot` of the
// context memory chosen by `cfg_node` and `cfg_target` (router: all 20 bits;
// port tables: bit 0). Load the schedule before sending TDM traffic.
//
// Core side (clk_core, one clock for all cores here): per node, a wide
// packet write interface per lane and a wide packet read interface per lane,
// valid/ready each. Status per node: TDM lane overflow (sticky), TDM flit in
// an unscheduled slot at a read port, TDM flit not routed by a router.
module hybrid_noc
  import hnoc_pkg::*;
#(
  parameter int unsigned MESH_X           = 8,
  parameter int unsigned MESH_Y           = 8,
  parameter int unsigned NUM_SLOTS        = 8,
  parameter int unsigned VC_BUF_DEPTH     = 10,
  parameter int unsigned PKT_FLITS        = 4,
  parameter int unsigned RX_PS_FIFO_DEPTH = 16,
  parameter int unsigned FIFO_DEPTH       = 8,
  localparam int unsigned NODES           = MESH_X * MESH_Y,
  localparam int unsigned NODE_W          = (NODES > 1) ? $clog2(NODES) : 1,
  localparam int unsigned SLOT_W          = (NUM_SLOTS > 1) ? $clog2(NUM_SLOTS) : 1,
  localparam int unsigned LW              = $clog2(PKT_FLITS + 1),
  localparam int unsigned PKT_W           = PKT_FLITS * FLIT_DATA_W
) (
  input  logic                              clk_noc,
  input  logic                              rst_noc_n,
  input  logic                              clk_core,
  input  logic                              rst_core_n,
  // configuration
  input  logic                              cfg_we,
  input  logic [NODE_W-1:0]                 cfg_node,
  input  cfg_target_e                       cfg_target,
  input  logic [SLOT_W-1:0]                 cfg_slot,
  input  ctx_entry_t                        cfg_data,
  // write core ports
  input  logic [NODES-1:0]                  ps_wr_valid,
  output logic [NODES-1:0]                  ps_wr_ready,
  input  logic [NODES-1:0][PKT_W-1:0]       ps_wr_data,
  input  logic [NODES-1:0][LW-1:0]          ps_wr_len,
  input  logic [NODES-1:0][COORD_W-1:0]     ps_wr_dst_x,
  input  logic [NODES-1:0][COORD_W-1:0]     ps_wr_dst_y,
  input  logic [NODES-1:0][VC_W-1:0]        ps_wr_vc,
  input  logic [NODES-1:0]                  tdm_wr_valid,
  output logic [NODES-1:0]                  tdm_wr_ready,
  input  logic [NODES-1:0][PKT_W-1:0]       tdm_wr_data,
  input  logic [NODES-1:0][LW-1:0]          tdm_wr_len,
  // read core ports
  output logic [NODES-1:0]                  ps_rd_valid,
  input  logic [NODES-1:0]                  ps_rd_ready,
  output logic [NODES-1:0][PKT_W-1:0]       ps_rd_data,
  output logic [NODES-1:0][LW-1:0]          ps_rd_len,
  output logic [NODES-1:0][VC_W-1:0]        ps_rd_vc,
  output logic [NODES-1:0]                  tdm_rd_valid,
  input  logic [NODES-1:0]                  tdm_rd_ready,
  output logic [NODES-1:0][PKT_W-1:0]       tdm_rd_data,
  output logic [NODES-1:0][LW-1:0]          tdm_rd_len,
  // status
  output logic [NODES-1:0]                  tdm_overflow,
  output logic [NODES-1:0]                  rx_sched_err,
  output logic [NODES-1:0][NUM_PORTS-1:0]   tdm_unrouted
);

  // Link from a router output (or tx port) and the credits back to it.
  flit_t                             r_in   [NODES][NUM_PORTS];
  flit_t                             r_out  [NODES][NUM_PORTS];
  logic [NODES-1:0][NUM_PORTS-1:0][NUM_VCS-1:0] r_cr_in, r_cr_out;

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned N = y * MESH_X + x;
      logic [SLOT_W-1:0] slot_unused;
      logic cfg_here;
      assign cfg_here = cfg_we && (cfg_node == NODE_W'(N));

      // ---- neighbour wiring: inputs and returned credits ----
      if (y < MESH_Y - 1) begin : g_n
        assign r_in[N][PORT_N]    = r_out[N + MESH_X][PORT_S];
        assign r_cr_in[N][PORT_N] = r_cr_out[N + MESH_X][PORT_S];
      end else begin : g_n_edge
        assign r_in[N][PORT_N]    = '0;
        assign r_cr_in[N][PORT_N] = '0;
      end
      if (y > 0) begin : g_s
        assign r_in[N][PORT_S]    = r_out[N - MESH_X][PORT_N];
        assign r_cr_in[N][PORT_S] = r_cr_out[N - MESH_X][PORT_N];
      end else begin : g_s_edge
        assign r_in[N][PORT_S]    = '0;
        assign r_cr_in[N][PORT_S] = '0;
      end
      if (x < MESH_X - 1) begin : g_e
        assign r_in[N][PORT_E]    = r_out[N + 1][PORT_W];
        assign r_cr_in[N][PORT_E] = r_cr_out[N + 1][PORT_W];
      end else begin : g_e_edge
        assign r_in[N][PORT_E]    = '0;
        assign r_cr_in[N][PORT_E] = '0;
      end
      if (x > 0) begin : g_w
        assign r_in[N][PORT_W]    = r_out[N - 1][PORT_E];
        assign r_cr_in[N][PORT_W] = r_cr_out[N - 1][PORT_E];
      end else begin : g_w_edge
        assign r_in[N][PORT_W]    = '0;
        assign r_cr_in[N][PORT_W] = '0;
      end

      flit_t             r_in_v  [NUM_PORTS];
      flit_t             r_out_v [NUM_PORTS];
      for (genvar p = 0; p < NUM_PORTS; p++) begin : g_p
        assign r_in_v[p]   = r_in[N][p];
        assign r_out[N][p] = r_out_v[p];
      end

      hybrid_router #(
        .MY_X(x), .MY_Y(y), .NUM_SLOTS(NUM_SLOTS), .VC_BUF_DEPTH(VC_BUF_DEPTH),
        .LOCAL_CREDITS(RX_PS_FIFO_DEPTH / NUM_VCS)
      ) u_router (
        .clk(clk_noc), .rst_n(rst_noc_n),
        .flit_in     (r_in_v),
        .credit_out  (r_cr_out[N]),
        .flit_out    (r_out_v),
        .credit_in   (r_cr_in[N]),
        .cfg_we      (cfg_here && cfg_target == CFG_ROUTER),
        .cfg_slot,
        .cfg_data,
        .slot        (slot_unused),
        .tdm_unrouted(tdm_unrouted[N])
      );

      tx_port #(
        .MY_X(x), .MY_Y(y), .NUM_SLOTS(NUM_SLOTS), .PKT_FLITS(PKT_FLITS),
        .VC_BUF_DEPTH(VC_BUF_DEPTH), .PS_FIFO_DEPTH(FIFO_DEPTH), .TDM_FIFO_DEPTH(FIFO_DEPTH)
      ) u_tx (
        .clk_core, .rst_core_n,
        .ps_wr_valid (ps_wr_valid[N]),  .ps_wr_ready(ps_wr_ready[N]),
        .ps_wr_data  (ps_wr_data[N]),   .ps_wr_len  (ps_wr_len[N]),
        .ps_wr_dst_x (ps_wr_dst_x[N]),  .ps_wr_dst_y(ps_wr_dst_y[N]),
        .ps_wr_vc    (ps_wr_vc[N]),
        .tdm_wr_valid(tdm_wr_valid[N]), .tdm_wr_ready(tdm_wr_ready[N]),
        .tdm_wr_data (tdm_wr_data[N]),  .tdm_wr_len (tdm_wr_len[N]),
        .clk_noc, .rst_noc_n,
        .flit_out    (r_in[N][PORT_L]),
        .credit_in   (r_cr_out[N][PORT_L]),
        .cfg_we      (cfg_here && cfg_target == CFG_TX),
        .cfg_slot,
        .cfg_data    (cfg_data[0].src[0])
      );

      rx_port #(
        .NUM_SLOTS(NUM_SLOTS), .PKT_FLITS(PKT_FLITS),
        .PS_FIFO_DEPTH(RX_PS_FIFO_DEPTH), .TDM_FIFO_DEPTH(FIFO_DEPTH)
      ) u_rx (
        .clk_noc, .rst_noc_n,
        .flit_in     (r_out[N][PORT_L]),
        .credit_out  (r_cr_in[N][PORT_L]),
        .cfg_we      (cfg_here && cfg_target == CFG_RX),
        .cfg_slot,
        .cfg_data    (cfg_data[0].src[0]),
        .tdm_overflow(tdm_overflow[N]),
        .sched_err   (rx_sched_err[N]),
        .clk_core, .rst_core_n,
        .ps_pkt_valid (ps_rd_valid[N]),  .ps_pkt_ready (ps_rd_ready[N]),
        .ps_pkt_data  (ps_rd_data[N]),   .ps_pkt_len   (ps_rd_len[N]),
        .ps_pkt_vc    (ps_rd_vc[N]),
        .tdm_pkt_valid(tdm_rd_valid[N]), .tdm_pkt_ready(tdm_rd_ready[N]),
        .tdm_pkt_data (tdm_rd_data[N]),  .tdm_pkt_len  (tdm_rd_len[N])
      );
    end
  end

endmodule
