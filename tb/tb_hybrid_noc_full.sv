// tb_hybrid_noc_full: end-to-end test of the whole 8x8 hybrid network at its
// default sizes, with mixed packet-switched and TDM traffic.
//
// The testbench computes a TDM schedule itself (X-then-Y paths, one router
// every two slots, source slot s0: the source router crosses in slot s0+1,
// hop j in slot s0+1+2j, the read port takes the flit in the slot after the
// last crossing) and loads it through the configuration bus:
//   stream A: unicast (0,0) -> (5,3), source slot 0
//   stream B: multicast (2,6) -> (4,6), (6,6), (6,2), source slot 2; the
//             copies split at (4,6) and (6,6) inside the network
//   stream C: unicast (7,7) -> (0,0), source slot 5
// Twelve cores send random packet-switched packets (1-4 flits, random VC,
// random destination), many across the TDM paths, while the TDM streams run;
// read ports drop their ready at random, and one more core sends 30 packets to
// a hot-spot node whose core does not read for the first 600 core cycles.
// Checks: every packet-switched packet arrives once and intact; every TDM
// packet arrives intact and in order at each of its destinations; no TDM
// flit is ever unrouted or out of schedule. Finally one TDM destination stops
// reading and its TDM lane must overflow.
// Mechanisms counted (each must occur): packet-switched delivery, TDM
// unicast delivery, TDM multicast delivery, a packet-switched request held
// back by a TDM reservation, a reserved TDM slot reused by packet switching,
// a packet-switched request stalled for lack of credits, read-port
// backpressure, TDM lane overflow.
module tb_hybrid_noc_full;
  import hnoc_pkg::*;
  localparam int MX = 8, MY = 8, NN = MX * MY, NS = 8;
  localparam int PKT_W = 4 * FLIT_DATA_W;

  logic clk_noc = 0, rst_noc_n = 0, clk_core = 0, rst_core_n = 0;
  logic cfg_we = 0;
  logic [5:0] cfg_node = '0;
  cfg_target_e cfg_target = CFG_ROUTER;
  logic [2:0] cfg_slot = '0;
  ctx_entry_t cfg_data = '0;
  logic [NN-1:0] ps_wr_valid = '0, ps_wr_ready, tdm_wr_valid = '0, tdm_wr_ready;
  logic [NN-1:0][PKT_W-1:0] ps_wr_data = '0, tdm_wr_data = '0, ps_rd_data, tdm_rd_data;
  logic [NN-1:0][2:0] ps_wr_len = '0, tdm_wr_len = '0, ps_rd_len, tdm_rd_len;
  logic [NN-1:0][COORD_W-1:0] ps_wr_dst_x = '0, ps_wr_dst_y = '0;
  logic [NN-1:0][VC_W-1:0] ps_wr_vc = '0, ps_rd_vc;
  logic [NN-1:0] ps_rd_valid, ps_rd_ready, tdm_rd_valid, tdm_rd_ready;
  logic [NN-1:0] tdm_overflow, rx_sched_err;
  logic [NN-1:0][NUM_PORTS-1:0] tdm_unrouted;

  hybrid_noc dut (.*);

  always #5 clk_noc = ~clk_noc;
  always #7 clk_core = ~clk_core;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  // ------------------------------------------------------------ schedule
  ctx_entry_t r_ctx [NN][NS];
  logic       tx_tab [NN][NS];
  logic       rx_tab [NN][NS];
  int         sched_conflicts = 0;

  function automatic int nid(int x, int y);
    return y * MX + x;
  endfunction

  function automatic void add_path(int sx, int sy, int dx, int dy, int s0);
    int x = sx, y = sy, in_p = int'(PORT_L), t = (s0 + 1) % NS;
    tx_tab[nid(sx, sy)][s0 % NS] = 1'b1;
    forever begin
      int out_p, n;
      if (dx > x)      out_p = int'(PORT_E);
      else if (dx < x) out_p = int'(PORT_W);
      else if (dy > y) out_p = int'(PORT_N);
      else if (dy < y) out_p = int'(PORT_S);
      else             out_p = int'(PORT_L);
      n = nid(x, y);
      if (r_ctx[n][t][out_p].en && r_ctx[n][t][out_p].src != 3'(in_p)) sched_conflicts++;
      r_ctx[n][t][out_p].en  = 1'b1;
      r_ctx[n][t][out_p].src = 3'(in_p);
      if (out_p == int'(PORT_L)) begin
        rx_tab[n][(t + 1) % NS] = 1'b1;
        break;
      end
      case (out_p)
        int'(PORT_E): begin x++; in_p = int'(PORT_W); end
        int'(PORT_W): begin x--; in_p = int'(PORT_E); end
        int'(PORT_N): begin y++; in_p = int'(PORT_S); end
        default:      begin y--; in_p = int'(PORT_N); end
      endcase
      t = (t + 2) % NS;
    end
  endfunction

  // streams: source, destinations
  localparam int NSTR = 3;
  int str_src [NSTR];
  int str_dst [NSTR][$];

  // ------------------------------------------------------------ scoreboards
  typedef struct { logic [PKT_W-1:0] d; int len; int dst; int vc; } ps_exp_s;
  ps_exp_s ps_exp [int];            // key: src*65536 + seq
  typedef struct { logic [PKT_W-1:0] d; } tdm_exp_s;
  tdm_exp_s tdm_exp [NN][$];        // per destination, in order
  bit tdm_track [NN];               // destinations being checked

  int n_ps_sent = 0, n_ps_got = 0, n_tdm_uni = 0, n_tdm_multi = 0;
  int n_tdm_block = 0, n_slot_reuse = 0, n_credit_stall = 0, n_backpressure = 0;
  int n_unrouted = 0, n_sched_err = 0, cycle = 0;
  bit in_overflow_phase = 0;

  function automatic bit is_multi_dst(int n);
    foreach (str_dst[1][k]) if (str_dst[1][k] == n) return 1;
    return 0;
  endfunction

  always @(posedge clk_core) begin
    if (rst_core_n) begin
      for (int n = 0; n < NN; n++) begin
        if (ps_rd_valid[n] && !ps_rd_ready[n]) n_backpressure++;
        if (ps_rd_valid[n] && ps_rd_ready[n]) begin
          automatic int key = int'(ps_rd_data[n][31:0]);
          n_ps_got++;
          check(ps_exp.exists(key), $sformatf("unexpected PS packet %h at node %0d", key, n));
          if (ps_exp.exists(key)) begin
            automatic ps_exp_s e = ps_exp[key];
            automatic logic [PKT_W-1:0] mask = '0;
            for (int k = 0; k < e.len; k++) mask[k*128 +: 128] = '1;
            check(e.dst == n && e.len == int'(ps_rd_len[n]) && e.vc == int'(ps_rd_vc[n]) &&
                  ((ps_rd_data[n] & mask) == (e.d & mask)),
                  $sformatf("PS packet %h contents at node %0d", key, n));
            ps_exp.delete(key);
          end
        end
        if (tdm_rd_valid[n] && tdm_rd_ready[n] && tdm_track[n]) begin
          check(tdm_exp[n].size() > 0, $sformatf("unexpected TDM packet at node %0d", n));
          if (tdm_exp[n].size() > 0) begin
            automatic tdm_exp_s e = tdm_exp[n].pop_front();
            check(tdm_rd_data[n] == e.d && tdm_rd_len[n] == 3'd4,
                  $sformatf("TDM packet contents/order at node %0d", n));
            if (is_multi_dst(n)) n_tdm_multi++;
            else                 n_tdm_uni++;
          end
        end
      end
    end
  end

  // read-port ready: random backpressure on the packet-switched lane
  // and a hot spot whose core stops reading for a while, so that credits
  // run out in the routers on the way to it
  bit hold_hot = 1;
  always @(negedge clk_core) begin
    for (int n = 0; n < NN; n++) ps_rd_ready[n] <= ($urandom % 4 != 0) && !(hold_hot && n == nid(3, 4));
  end

  // network-side mechanism counters
  always @(posedge clk_noc) begin
    if (rst_noc_n) begin
      cycle <= cycle + 1;
      for (int n = 0; n < NN; n++) begin
        if (tdm_unrouted[n] != '0) n_unrouted++;
        if (rx_sched_err[n]) n_sched_err++;
      end
    end
  end

  for (genvar gy = 0; gy < MY; gy++) begin : g_mon_y
    for (genvar gx = 0; gx < MX; gx++) begin : g_mon_x
      always @(posedge clk_noc) begin
        if (rst_noc_n) begin
          for (int i = 0; i < NUM_PORTS; i++) begin
            for (int v = 0; v < NUM_VCS; v++) begin
              if (dut.g_y[gy].g_x[gx].u_router.u_sa.cand_valid[i][v]) begin
                automatic int o = int'(dut.g_y[gy].g_x[gx].u_router.u_sa.cand_port[i][v]);
                if (dut.g_y[gy].g_x[gx].u_router.u_sa.tdm_out_busy[o]) n_tdm_block++;
                if (dut.g_y[gy].g_x[gx].u_router.u_sa.credits[o][v] == 0) n_credit_stall++;
              end
            end
          end
          for (int o = 0; o < NUM_PORTS; o++) begin
            if (dut.g_y[gy].g_x[gx].u_router.ctx_cur[o].en &&
                dut.g_y[gy].g_x[gx].u_router.xbar_out[o].valid &&
                !dut.g_y[gy].g_x[gx].u_router.xbar_out[o].tdm) n_slot_reuse++;
          end
        end
      end
    end
  end

  // ------------------------------------------------------------ drivers
  task automatic send_ps(input int src, input int npkt, input int hot);
    for (int s = 0; s < npkt; s++) begin
      automatic int dst, len, vc, key;
      automatic logic [PKT_W-1:0] d;
      if (hot >= 0) dst = hot;
      else do dst = $urandom % NN; while (dst == src);
      len = 1 + $urandom % 4;
      vc  = $urandom % 2;
      for (int k = 0; k < 16; k++) d[k*32 +: 32] = $urandom;
      key = src * 65536 + s;
      d[31:0] = 32'(key);
      ps_exp[key] = '{d, len, dst, vc};
      n_ps_sent++;
      @(negedge clk_core);
      ps_wr_valid[src] = 1; ps_wr_data[src] = d; ps_wr_len[src] = 3'(len);
      ps_wr_dst_x[src] = COORD_W'(dst % MX); ps_wr_dst_y[src] = COORD_W'(dst / MX);
      ps_wr_vc[src] = VC_W'(vc);
      do @(posedge clk_core); while (!ps_wr_ready[src]);
      @(negedge clk_core) ps_wr_valid[src] = 0;
      repeat ($urandom % 6) @(negedge clk_core);
    end
  endtask

  task automatic send_tdm(input int st, input int npkt, input bit track);
    for (int s = 0; s < npkt; s++) begin
      automatic logic [PKT_W-1:0] d;
      for (int k = 0; k < 16; k++) d[k*32 +: 32] = $urandom;
      if (track) foreach (str_dst[st][k]) tdm_exp[str_dst[st][k]].push_back('{d});
      @(negedge clk_core);
      tdm_wr_valid[str_src[st]] = 1; tdm_wr_data[str_src[st]] = d; tdm_wr_len[str_src[st]] = 3'd4;
      do @(posedge clk_core); while (!tdm_wr_ready[str_src[st]]);
      @(negedge clk_core) tdm_wr_valid[str_src[st]] = 0;
    end
  endtask

  task automatic cfg_write(input int node, input cfg_target_e tgt, input int slot, input ctx_entry_t data);
    @(negedge clk_noc);
    cfg_we = 1; cfg_node = 6'(node); cfg_target = tgt; cfg_slot = 3'(slot); cfg_data = data;
    @(negedge clk_noc) cfg_we = 0;
  endtask

  initial begin
    repeat (60000) @(posedge clk_noc);
    failures++;
    $display("FAIL: watchdog (PS left %0d)", ps_exp.num());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int ps_src [12] = '{1, 8, 9, 17, 20, 27, 34, 40, 45, 52, 58, 62};
    ctx_entry_t one;
    tdm_rd_ready = '1;
    for (int n = 0; n < NN; n++) begin
      tdm_track[n] = 0;
      for (int s = 0; s < NS; s++) begin
        r_ctx[n][s] = '0; tx_tab[n][s] = 0; rx_tab[n][s] = 0;
      end
    end
    str_src[0] = nid(0, 0); str_dst[0].push_back(nid(5, 3));
    str_src[1] = nid(2, 6); str_dst[1].push_back(nid(4, 6));
    str_dst[1].push_back(nid(6, 6)); str_dst[1].push_back(nid(6, 2));
    str_src[2] = nid(7, 7); str_dst[2].push_back(nid(0, 0));
    add_path(0, 0, 5, 3, 0);
    add_path(2, 6, 4, 6, 2); add_path(2, 6, 6, 6, 2); add_path(2, 6, 6, 2, 2);
    add_path(7, 7, 0, 0, 5);
    check(sched_conflicts == 0, "TDM schedule free of conflicts");
    for (int st = 0; st < NSTR; st++) foreach (str_dst[st][k]) tdm_track[str_dst[st][k]] = 1;

    #33 rst_noc_n = 1; rst_core_n = 1;
    one = '0;
    one[0].src = 3'd1;
    for (int n = 0; n < NN; n++) begin
      for (int s = 0; s < NS; s++) begin
        if (r_ctx[n][s] != '0) cfg_write(n, CFG_ROUTER, s, r_ctx[n][s]);
        if (tx_tab[n][s]) cfg_write(n, CFG_TX, s, one);
        if (rx_tab[n][s]) cfg_write(n, CFG_RX, s, one);
      end
    end

    // mixed traffic
    fork
      send_tdm(0, 6, 1);
      send_tdm(1, 6, 1);
      send_tdm(2, 6, 1);
      send_ps(3, 30, nid(3, 4));
      begin
        repeat (600) @(negedge clk_core);
        hold_hot = 0;
      end
      for (int k = 0; k < 12; k++) begin
        automatic int kk = k;
        fork send_ps(ps_src[kk], 25, -1); join_none
      end
    join
    wait fork;
    // drain
    for (int c = 0; c < 4000 && (ps_exp.num() > 0 || tdm_exp[nid(5,3)].size() > 0 ||
         tdm_exp[nid(6,2)].size() > 0 || tdm_exp[nid(0,0)].size() > 0); c++) @(negedge clk_noc);
    check(ps_exp.num() == 0, $sformatf("all PS packets delivered (%0d missing of %0d)", ps_exp.num(), n_ps_sent));
    for (int n = 0; n < NN; n++) check(tdm_exp[n].size() == 0, $sformatf("TDM packets missing at %0d", n));
    check(n_unrouted == 0, $sformatf("no unrouted TDM flits (%0d)", n_unrouted));
    check(n_sched_err == 0, $sformatf("no TDM flit outside its slot (%0d)", n_sched_err));
    check(tdm_overflow == '0, "no overflow during normal operation");

    // overflow phase: destination of stream A stops reading TDM packets
    tdm_track[nid(5, 3)] = 0;
    tdm_rd_ready[nid(5, 3)] = 0;
    send_tdm(0, 5, 0);
    repeat (300) @(negedge clk_noc);
    check(tdm_overflow[nid(5, 3)], "TDM lane overflow at (5,3)");

    $display("mechanisms: ps_delivered=%0d tdm_unicast=%0d tdm_multicast=%0d ps_held_by_tdm=%0d tdm_slot_reused=%0d credit_stall=%0d rx_backpressure=%0d overflow=%0d cycles=%0d",
             n_ps_got, n_tdm_uni, n_tdm_multi, n_tdm_block, n_slot_reuse, n_credit_stall,
             n_backpressure, $countones(tdm_overflow), cycle);
    check(n_ps_got == n_ps_sent && n_ps_got > 0, "PS delivery happened");
    check(n_tdm_uni == 12, $sformatf("TDM unicast packets %0d of 12", n_tdm_uni));
    check(n_tdm_multi == 18, $sformatf("TDM multicast packet copies %0d of 18", n_tdm_multi));
    check(n_tdm_block > 0, "PS request held back by TDM");
    check(n_slot_reuse > 0, "reserved TDM slot reused by PS");
    check(n_credit_stall > 0, "credit stall");
    check(n_backpressure > 0, "read-port backpressure");
    check($countones(tdm_overflow) > 0, "overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
