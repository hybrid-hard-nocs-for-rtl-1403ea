// switch_allocator: packet-switched switch allocation of the hybrid router.
//
// Separable input-first round-robin allocation, done in the router's first
// stage. Each input port first picks one of its virtual channels among those
// that may go (round robin), then each output port picks one of the inputs
// that asked for it (round robin). A VC may ask for an output only if
//   * neither its input nor the output is reserved for TDM in the next cycle
//     (`tdm_in_busy`, `tdm_out_busy`): TDM always has priority;
//   * the downstream buffer of the same VC has a free entry (a credit);
//   * for a head flit, the output's VC is not held by another packet, and
//     for a body or tail flit, the output's VC is held by this input. The
//     VC of a packet never changes along its path, so holding the output VC
//     from head to tail keeps the flits of two packets from mixing in the
//     downstream buffer.
// Outputs: `grant_vc` (per input, one-hot VC that won), and per output the
// winning input (`out_ps_valid`, `out_ps_src`), all combinational. Credit
// counters and VC holds update on the clock edge.
//
// Credit counters start at VC_BUF_DEPTH for the four router-facing outputs
// and at LOCAL_CREDITS for the local output (the read core port's buffer).
//
// The document gives round-robin allocation, TDM masking and per-packet
// fixed VCs; it refers to earlier work for the allocator itself, so the
// separable structure, credit flow control and VC holding are this design's.
module switch_allocator
  import hnoc_pkg::*;
#(
  parameter int unsigned VC_BUF_DEPTH  = 10,
  parameter int unsigned LOCAL_CREDITS = 8
) (
  input  logic                                    clk,
  input  logic                                    rst_n,
  input  logic [NUM_PORTS-1:0][NUM_VCS-1:0]       cand_valid,
  input  logic [NUM_PORTS-1:0][NUM_VCS-1:0]       cand_head,
  input  logic [NUM_PORTS-1:0][NUM_VCS-1:0]       cand_tail,
  input  logic [NUM_PORTS-1:0][NUM_VCS-1:0][PW-1:0] cand_port,
  input  logic [NUM_PORTS-1:0]                    tdm_in_busy,
  input  logic [NUM_PORTS-1:0]                    tdm_out_busy,
  input  logic [NUM_PORTS-1:0][NUM_VCS-1:0]       credit_in,
  output logic [NUM_PORTS-1:0][NUM_VCS-1:0]       grant_vc,
  output logic [NUM_PORTS-1:0]                    out_ps_valid,
  output logic [NUM_PORTS-1:0][PW-1:0]        out_ps_src
);

  localparam int unsigned MAXC = (VC_BUF_DEPTH > LOCAL_CREDITS) ? VC_BUF_DEPTH : LOCAL_CREDITS;
  localparam int unsigned CW   = $clog2(MAXC + 1);

  logic [CW-1:0]     credits [NUM_PORTS][NUM_VCS];
  logic              held    [NUM_PORTS][NUM_VCS];
  logic [PW-1:0] owner   [NUM_PORTS][NUM_VCS];

  logic [NUM_PORTS-1:0][NUM_VCS-1:0]   eligible, sel_vc;
  logic [NUM_PORTS-1:0][PW-1:0]    sel_port;
  logic [NUM_PORTS-1:0][NUM_PORTS-1:0] out_req, out_grant;   // [output][input]
  logic [NUM_PORTS-1:0]                in_won;

  always_comb begin
    for (int i = 0; i < NUM_PORTS; i++) begin
      for (int v = 0; v < NUM_VCS; v++) begin
        automatic int o = int'(cand_port[i][v]);
        eligible[i][v] = 1'b0;
        if (cand_valid[i][v] && !tdm_in_busy[i] && o < NUM_PORTS) begin
          if (!tdm_out_busy[o] && credits[o][v] != '0) begin
            if (cand_head[i][v]) eligible[i][v] = !held[o][v];
            else                 eligible[i][v] = held[o][v] && (owner[o][v] == PW'(i));
          end
        end
      end
    end
  end

  for (genvar i = 0; i < NUM_PORTS; i++) begin : g_in_arb
    rr_arbiter #(.N(NUM_VCS)) u_arb (
      .clk, .rst_n,
      .req    (eligible[i]),
      .advance(in_won[i]),
      .grant  (sel_vc[i])
    );
  end

  always_comb begin
    out_req = '0;
    for (int i = 0; i < NUM_PORTS; i++) begin
      sel_port[i] = '0;
      for (int v = 0; v < NUM_VCS; v++) if (sel_vc[i][v]) sel_port[i] = cand_port[i][v];
      if (sel_vc[i] != '0) out_req[sel_port[i]][i] = 1'b1;
    end
  end

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_out_arb
    rr_arbiter #(.N(NUM_PORTS)) u_arb (
      .clk, .rst_n,
      .req    (out_req[o]),
      .advance(1'b1),
      .grant  (out_grant[o])
    );
  end

  always_comb begin
    in_won       = '0;
    out_ps_valid = '0;
    out_ps_src   = '0;
    for (int o = 0; o < NUM_PORTS; o++) begin
      for (int i = 0; i < NUM_PORTS; i++) begin
        if (out_grant[o][i]) begin
          in_won[i]       = 1'b1;
          out_ps_valid[o] = 1'b1;
          out_ps_src[o]   = PW'(i);
        end
      end
    end
    for (int i = 0; i < NUM_PORTS; i++) grant_vc[i] = in_won[i] ? sel_vc[i] : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < NUM_PORTS; o++) begin
        for (int v = 0; v < NUM_VCS; v++) begin
          credits[o][v] <= (o == int'(PORT_L)) ? CW'(LOCAL_CREDITS) : CW'(VC_BUF_DEPTH);
          held[o][v]    <= 1'b0;
          owner[o][v]   <= '0;
        end
      end
    end else begin
      for (int o = 0; o < NUM_PORTS; o++) begin
        for (int v = 0; v < NUM_VCS; v++) begin
          automatic logic used = 1'b0;
          for (int i = 0; i < NUM_PORTS; i++) begin
            if (grant_vc[i][v] && sel_port[i] == PW'(o)) begin
              used = 1'b1;
              if (cand_head[i][v] && !cand_tail[i][v]) begin
                held[o][v]  <= 1'b1;
                owner[o][v] <= PW'(i);
              end else if (cand_tail[i][v]) begin
                held[o][v]  <= 1'b0;
              end
            end
          end
          credits[o][v] <= credits[o][v] + CW'(credit_in[o][v]) - CW'(used);
        end
      end
    end
  end

endmodule
