// tx_port: hybrid write core port, between an FPGA core running on its own
// clock and a router's local input.
//
// Two lanes, one for packet-switched and one for TDM traffic. On the core
// side each lane has a write buffer: the core writes a whole packet (up to
// PKT_FLITS flits as one wide word) and the buffer passes it to the lane's
// dual-clock FIFO one flit per core cycle. On the NoC side a slot table (one
// bit per slot, same slot numbering as the routers) marks the slots that the
// schedule gives this source. In a marked slot a waiting TDM flit is sent
// first; in any other slot, or in a marked slot with no TDM flit waiting, the
// next packet-switched flit is sent if the router's buffer for its VC has
// room (credits, VC_BUF_DEPTH per VC at reset). For a packet-switched head
// flit the port also fills in the lookahead route for its own router.
//
// Timing: the flit sent is registered; slot table entry k marks the slot in
// which a TDM flit is on the link to the router, so the local router's
// context memory must take it from the local input in slot k+1.
//
// The document gives the two lanes, the write buffer, the FIFO per lane, the
// per-slot table and TDM priority in its slots. FIFO depths, credit flow
// control and the reuse of unfilled TDM slots at the port are this design's
// choices; the reuse matches what the document allows in the routers.
module tx_port
  import hnoc_pkg::*;
#(
  parameter int unsigned MY_X           = 0,
  parameter int unsigned MY_Y           = 0,
  parameter int unsigned NUM_SLOTS      = 8,
  parameter int unsigned PKT_FLITS      = 4,
  parameter int unsigned VC_BUF_DEPTH   = 10,
  parameter int unsigned PS_FIFO_DEPTH  = 8,
  parameter int unsigned TDM_FIFO_DEPTH = 8,
  localparam int unsigned SLOT_W        = (NUM_SLOTS > 1) ? $clog2(NUM_SLOTS) : 1,
  localparam int unsigned LW            = $clog2(PKT_FLITS + 1),
  localparam int unsigned PKT_W         = PKT_FLITS * FLIT_DATA_W
) (
  // core clock domain
  input  logic                clk_core,
  input  logic                rst_core_n,
  input  logic                ps_wr_valid,
  output logic                ps_wr_ready,
  input  logic [PKT_W-1:0]    ps_wr_data,
  input  logic [LW-1:0]       ps_wr_len,
  input  logic [COORD_W-1:0]  ps_wr_dst_x,
  input  logic [COORD_W-1:0]  ps_wr_dst_y,
  input  logic [VC_W-1:0]     ps_wr_vc,
  input  logic                tdm_wr_valid,
  output logic                tdm_wr_ready,
  input  logic [PKT_W-1:0]    tdm_wr_data,
  input  logic [LW-1:0]       tdm_wr_len,
  // NoC clock domain
  input  logic                clk_noc,
  input  logic                rst_noc_n,
  output flit_t               flit_out,
  input  logic [NUM_VCS-1:0]  credit_in,
  input  logic                cfg_we,
  input  logic [SLOT_W-1:0]   cfg_slot,
  input  logic                cfg_data
);

  localparam int unsigned PAW = $clog2(PS_FIFO_DEPTH);
  localparam int unsigned TAW = $clog2(TDM_FIFO_DEPTH);
  localparam int unsigned CW  = $clog2(VC_BUF_DEPTH + 1);

  // ---------------- core side: write buffers ----------------
  logic  ps_s_valid, tdm_s_valid, ps_full, tdm_full;
  flit_t ps_s_flit, tdm_s_flit;

  flit_serializer #(.PKT_FLITS(PKT_FLITS), .TDM(1'b0)) u_ps_ser (
    .clk(clk_core), .rst_n(rst_core_n),
    .pkt_valid(ps_wr_valid), .pkt_ready(ps_wr_ready), .pkt_data(ps_wr_data),
    .pkt_len(ps_wr_len), .pkt_dst_x(ps_wr_dst_x), .pkt_dst_y(ps_wr_dst_y), .pkt_vc(ps_wr_vc),
    .out_valid(ps_s_valid), .out_flit(ps_s_flit), .out_full(ps_full)
  );

  flit_serializer #(.PKT_FLITS(PKT_FLITS), .TDM(1'b1)) u_tdm_ser (
    .clk(clk_core), .rst_n(rst_core_n),
    .pkt_valid(tdm_wr_valid), .pkt_ready(tdm_wr_ready), .pkt_data(tdm_wr_data),
    .pkt_len(tdm_wr_len), .pkt_dst_x('0), .pkt_dst_y('0), .pkt_vc('0),
    .out_valid(tdm_s_valid), .out_flit(tdm_s_flit), .out_full(tdm_full)
  );

  // ---------------- lane FIFOs ----------------
  logic         ps_empty, tdm_empty, ps_rd, tdm_rd;
  logic [PAW:0] ps_rptr_unused;
  logic [TAW:0] tdm_rptr_unused;
  flit_t        ps_head, tdm_head;

  async_fifo #(.W(FLIT_W), .DEPTH(PS_FIFO_DEPTH)) u_ps_fifo (
    .wclk(clk_core), .wrst_n(rst_core_n),
    .wr_en(ps_s_valid), .wr_data(ps_s_flit), .wr_full(ps_full), .wr_rd_ptr(ps_rptr_unused),
    .rclk(clk_noc), .rrst_n(rst_noc_n),
    .rd_en(ps_rd), .rd_data(ps_head), .rd_empty(ps_empty)
  );

  async_fifo #(.W(FLIT_W), .DEPTH(TDM_FIFO_DEPTH)) u_tdm_fifo (
    .wclk(clk_core), .wrst_n(rst_core_n),
    .wr_en(tdm_s_valid), .wr_data(tdm_s_flit), .wr_full(tdm_full), .wr_rd_ptr(tdm_rptr_unused),
    .rclk(clk_noc), .rrst_n(rst_noc_n),
    .rd_en(tdm_rd), .rd_data(tdm_head), .rd_empty(tdm_empty)
  );

  // ---------------- NoC side: slot table and lane select ----------------
  logic [SLOT_W-1:0] slot, next_slot;
  logic              tdm_slot, next_tdm_slot;

  tdm_context #(.NUM_SLOTS(NUM_SLOTS), .WIDTH(1)) u_table (
    .clk(clk_noc), .rst_n(rst_noc_n),
    .cfg_we, .cfg_slot, .cfg_data,
    .slot, .next_slot,
    .cur_entry (tdm_slot),
    .next_entry(next_tdm_slot)
  );

  logic [CW-1:0] credits [NUM_VCS];
  logic          ps_ok;

  assign ps_ok  = !ps_empty && (credits[ps_head.vc] != '0);
  assign tdm_rd = next_tdm_slot && !tdm_empty;
  assign ps_rd  = !tdm_rd && ps_ok;

  always_ff @(posedge clk_noc or negedge rst_noc_n) begin
    if (!rst_noc_n) begin
      flit_out <= '0;
      for (int v = 0; v < NUM_VCS; v++) credits[v] <= CW'(VC_BUF_DEPTH);
    end else begin
      flit_out <= '0;
      if (tdm_rd) begin
        flit_out <= tdm_head;
      end else if (ps_rd) begin
        flit_out         <= ps_head;
        flit_out.la_port <= xy_route(COORD_W'(MY_X), COORD_W'(MY_Y), ps_head.dst_x, ps_head.dst_y);
      end
      for (int v = 0; v < NUM_VCS; v++)
        credits[v] <= credits[v] + CW'(credit_in[v]) - CW'(ps_rd && ps_head.vc == VC_W'(v));
    end
  end

  a_credit_bound: assert property (@(posedge clk_noc) disable iff (!rst_noc_n)
                                   credits[0] <= CW'(VC_BUF_DEPTH));

endmodule
