// crossbar: the router's 5x5 switch, second pipeline stage.
//
// Each output selects one input (`sel_src`) when `sel_valid` is set and
// carries an empty flit otherwise. Any number of outputs may select the same
// input in one cycle, which is how a TDM flit is multicast: the context
// memory names the same source for several outputs and no extra multicast
// hardware is needed. Purely combinational; the selects come from registers
// set in the first stage.
module crossbar
  import hnoc_pkg::*;
(
  input  flit_t                            xbar_in   [NUM_PORTS],
  input  logic [NUM_PORTS-1:0]             sel_valid,
  input  logic [NUM_PORTS-1:0][PW-1:0] sel_src,
  output flit_t                            xbar_out  [NUM_PORTS]
);

  always_comb begin
    for (int o = 0; o < NUM_PORTS; o++) begin
      xbar_out[o] = '0;
      if (sel_valid[o]) begin
        for (int i = 0; i < NUM_PORTS; i++) begin
          if (sel_src[o] == PW'(i)) xbar_out[o] = xbar_in[i];
        end
      end
    end
  end

endmodule
