// output_module: output registers of a hybrid router.
//
// The flit leaving the crossbar in the second stage is registered here and
// drives the link for the following cycle; this register is also the input
// register of the downstream router (or of the read core port on the local
// output). For a packet-switched head flit leaving on a mesh direction, the
// module computes the lookahead route: the output port the flit will take at
// the next router under X-then-Y routing, stored in the flit's `la_port`.
// TDM flits and body flits pass unchanged.
//
// The document keeps output buffering to one pipeline register and uses
// lookahead routing; where the route is computed is this design's choice.
module output_module
  import hnoc_pkg::*;
#(
  parameter int unsigned MY_X = 0,
  parameter int unsigned MY_Y = 0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  flit_t xbar_out [NUM_PORTS],
  output flit_t flit_out [NUM_PORTS]
);

  flit_t nxt [NUM_PORTS];

  always_comb begin
    for (int o = 0; o < NUM_PORTS; o++) begin
      logic [2*COORD_W-1:0] nb;
      nxt[o] = xbar_out[o];
      nb     = neighbour(COORD_W'(MY_X), COORD_W'(MY_Y), PW'(o));
      if (xbar_out[o].valid && !xbar_out[o].tdm && xbar_out[o].head && o != int'(PORT_L))
        nxt[o].la_port = xy_route(nb[2*COORD_W-1:COORD_W], nb[COORD_W-1:0],
                                  xbar_out[o].dst_x, xbar_out[o].dst_y);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < NUM_PORTS; o++) flit_out[o] <= '0;
    end else begin
      for (int o = 0; o < NUM_PORTS; o++) flit_out[o] <= nxt[o];
    end
  end

endmodule
