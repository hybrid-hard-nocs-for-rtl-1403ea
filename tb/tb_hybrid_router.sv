// tb_hybrid_router: the router at (2, 2) with the default sizes (8 slots,
// 10-flit VC buffers).
//   1. A 4-flit packet-switched packet W -> E: each flit leaves two cycles
//      after it arrives, with the lookahead port for the next router, and
//      one credit per flit goes back upstream.
//   2. TDM multicast: the context memory connects S to N and E in slot k;
//      one TDM flit arriving in slot k-1 leaves on both outputs in slot k+1.
//   3. TDM priority: a packet-switched flit competing for E in that slot is
//      delayed by one cycle.
//   4. Unused TDM slot: with no TDM flit present, a packet-switched flit
//      uses the reserved output without delay.
//   5. A TDM flit the context memory does not route is reported and dropped.
//   6. Credit stall: with no credits returned, only 10 flits leave on E; two
//      returned credits release two more.
module tb_hybrid_router;
  import hnoc_pkg::*;
  logic clk = 0, rst_n = 0;
  flit_t flit_in [NUM_PORTS];
  flit_t flit_out [NUM_PORTS];
  logic [NUM_PORTS-1:0][NUM_VCS-1:0] credit_out, credit_in;
  logic cfg_we;
  logic [2:0] cfg_slot, slot;
  ctx_entry_t cfg_data;
  logic [NUM_PORTS-1:0] tdm_unrouted;
  int checks = 0, failures = 0;
  int cycle = 0;
  int eout [NUM_PORTS];         // valid flits seen per output
  int credits_w = 0, unrouted_w = 0;

  hybrid_router #(.MY_X(2), .MY_Y(2)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    for (int o = 0; o < NUM_PORTS; o++) if (flit_out[o].valid) eout[o] <= eout[o] + 1;
    credits_w  <= credits_w + int'(credit_out[PORT_W][0]) + int'(credit_out[PORT_W][1]);
    unrouted_w <= unrouted_w + int'(tdm_unrouted[PORT_W]);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cycle);
    end
  endtask

  function automatic flit_t mk(bit tdm, int vc, bit h, bit t, int dx, int dy, int la, logic [127:0] d);
    flit_t f = '0;
    f.valid = 1; f.tdm = tdm; f.vc = VC_W'(vc); f.head = h; f.tail = t;
    f.dst_x = COORD_W'(dx); f.dst_y = COORD_W'(dy); f.la_port = PW'(la); f.data = d;
    return f;
  endfunction

  task automatic idle();
    for (int p = 0; p < NUM_PORTS; p++) flit_in[p] = '0;
  endtask

  task automatic wait_slot(input int s);
    do @(negedge clk); while (slot != 3'(s));
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flit_t pk [4];
    flit_t tf, pf;
    int n0;
    idle(); credit_in = '0; cfg_we = 0; cfg_slot = '0; cfg_data = '0;
    for (int o = 0; o < NUM_PORTS; o++) eout[o] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // 1. packet W -> E, destination (5,2)
    for (int k = 0; k < 4; k++) pk[k] = mk(0, 1, k == 0, k == 3, 5, 2, (k == 0) ? 1 : 0, 128'(k + 16'hC0));
    for (int c = 0; c < 6; c++) begin
      @(negedge clk);
      flit_in[PORT_W] = (c < 4) ? pk[c] : '0;
      if (c >= 2) begin
        automatic flit_t e = pk[c-2];
        if (c == 2) e.la_port = 3'(PORT_E);   // at (3,2) the route is still east
        check(flit_out[PORT_E] == e, $sformatf("flit %0d on E two cycles after arrival", c - 2));
      end
    end
    @(negedge clk);
    check(credits_w == 4, $sformatf("4 credits returned on W, saw %0d", credits_w));
    credit_in[PORT_E][1] = 1; repeat (4) @(negedge clk); credit_in = '0;

    // 2 and 3. TDM multicast S -> {N, E} in slot 5, with a competing PS flit W -> E
    @(negedge clk);
    cfg_we = 1; cfg_slot = 3'd5; cfg_data = '0;
    cfg_data[PORT_N] = '{en: 1'b1, src: 3'(PORT_S)};
    cfg_data[PORT_E] = '{en: 1'b1, src: 3'(PORT_S)};
    @(negedge clk) cfg_we = 0;
    wait_slot(4);
    tf = mk(1, 0, 1, 1, 0, 0, 0, 128'hFACE);
    pf = mk(0, 0, 1, 1, 7, 2, 1, 128'hD00D);
    flit_in[PORT_S] = tf;
    flit_in[PORT_W] = pf;
    @(negedge clk) idle();
    check(slot == 3'd5, "slot 5 is the crossbar cycle");
    @(negedge clk); #1;
    check(flit_out[PORT_N] == tf && flit_out[PORT_E] == tf, "TDM flit multicast to N and E in slot 6 links");
    @(negedge clk); #1;
    pf.la_port = 3'(PORT_E);
    check(flit_out[PORT_E] == pf, "packet-switched flit delayed one cycle by TDM priority");
    @(negedge clk);

    // 4. slot 5 reserved but unused: PS flit W -> E goes through undelayed
    wait_slot(4);
    flit_in[PORT_W] = pf;
    @(negedge clk) idle();
    @(negedge clk); #1;
    check(flit_out[PORT_E] == pf, "unused TDM slot carries packet-switched flit");
    check(!flit_out[PORT_N].valid, "nothing on N");

    // 5. unrouted TDM flit on W (no entry names W)
    n0 = unrouted_w;
    @(negedge clk) flit_in[PORT_W] = tf;
    @(negedge clk) idle();
    @(negedge clk);
    @(negedge clk);
    check(unrouted_w == n0 + 1, "unrouted TDM flit reported");

    // 6. credit stall on E vc0: 3 credits used so far by tests 1-4 on vc1/vc0
    //    (vc0 used twice), so 8 credits remain for vc0.
    n0 = eout[PORT_E];
    for (int k = 0; k < 12; k++) begin
      @(negedge clk) flit_in[PORT_W] = mk(0, 0, 1, 1, 7, 2, 1, 128'(k));
    end
    @(negedge clk) idle();
    repeat (10) @(negedge clk);
    check(eout[PORT_E] - n0 == 8, $sformatf("stall: %0d flits left before credits ran out", eout[PORT_E] - n0));
    credit_in[PORT_E][0] = 1;
    repeat (4) @(negedge clk);
    credit_in = '0;
    repeat (4) @(negedge clk);
    check(eout[PORT_E] - n0 == 12, $sformatf("after 4 credits: %0d flits", eout[PORT_E] - n0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
