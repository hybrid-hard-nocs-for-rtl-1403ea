// flit_serializer: write-port buffer. The FPGA core writes one wide packet
// (`pkt_*`, up to PKT_FLITS flits, flit 0 in the low 128 bits); the buffer
// then hands it to the lane's synchronizer FIFO one flit per cycle, marking
// the first flit head and the last tail and stamping destination, VC and the
// TDM/packet-switched type. `pkt_ready` is high while the buffer is empty.
// A packet of length 0 is treated as length 1.
module flit_serializer
  import hnoc_pkg::*;
#(
  parameter int unsigned PKT_FLITS = 4,
  parameter bit          TDM       = 1'b0,
  localparam int unsigned LW       = $clog2(PKT_FLITS + 1)
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             pkt_valid,
  output logic                             pkt_ready,
  input  logic [PKT_FLITS*FLIT_DATA_W-1:0] pkt_data,
  input  logic [LW-1:0]                    pkt_len,
  input  logic [COORD_W-1:0]               pkt_dst_x,
  input  logic [COORD_W-1:0]               pkt_dst_y,
  input  logic [VC_W-1:0]                  pkt_vc,
  output logic                             out_valid,
  output flit_t                            out_flit,
  input  logic                             out_full
);

  logic [PKT_FLITS*FLIT_DATA_W-1:0] data_q;
  logic [LW-1:0]                    len_q, idx_q;
  logic [COORD_W-1:0]               dx_q, dy_q;
  logic [VC_W-1:0]                  vc_q;
  logic                             busy;

  assign pkt_ready = !busy;
  assign out_valid = busy;

  always_comb begin
    out_flit         = '0;
    out_flit.valid   = busy;
    out_flit.tdm     = TDM;
    out_flit.vc      = vc_q;
    out_flit.head    = (idx_q == '0);
    out_flit.tail    = (idx_q == len_q - 1'b1);
    out_flit.dst_x   = dx_q;
    out_flit.dst_y   = dy_q;
    out_flit.data    = data_q[int'(idx_q)*FLIT_DATA_W +: FLIT_DATA_W];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      data_q <= '0;
      len_q  <= '0;
      idx_q  <= '0;
      dx_q   <= '0;
      dy_q   <= '0;
      vc_q   <= '0;
    end else if (!busy) begin
      if (pkt_valid) begin
        busy   <= 1'b1;
        data_q <= pkt_data;
        len_q  <= (pkt_len == '0) ? LW'(1) : ((int'(pkt_len) > PKT_FLITS) ? LW'(PKT_FLITS) : pkt_len);
        idx_q  <= '0;
        dx_q   <= pkt_dst_x;
        dy_q   <= pkt_dst_y;
        vc_q   <= pkt_vc;
      end
    end else if (!out_full) begin
      if (out_flit.tail) busy <= 1'b0;
      idx_q <= idx_q + 1'b1;
    end
  end

endmodule
