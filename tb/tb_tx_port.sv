// tb_tx_port: write core port at (1, 1), core clock ~71 MHz, NoC 100 MHz,
// router buffers of 3 flits per VC, slot 5 marked for TDM.
//   1. A 4-flit packet-switched packet to (4, 1) on VC1 leaves as head, body,
//      body, tail with the lookahead port E; only 3 flits leave until a credit
//      returns.
//   2. A 2-flit TDM packet leaves one flit per round, each in slot 5 only.
//   3. With both lanes loaded, slot 5 carries TDM and the other slots carry
//      packet-switched flits.
module tb_tx_port;
  import hnoc_pkg::*;
  localparam int PKT_W = 4 * FLIT_DATA_W;
  logic clk_noc = 0, rst_noc_n = 0, clk_core = 0, rst_core_n = 0;
  logic ps_wr_valid = 0, ps_wr_ready, tdm_wr_valid = 0, tdm_wr_ready;
  logic [PKT_W-1:0] ps_wr_data = '0, tdm_wr_data = '0;
  logic [2:0] ps_wr_len = '0, tdm_wr_len = '0;
  logic [COORD_W-1:0] ps_wr_dst_x = '0, ps_wr_dst_y = '0;
  logic [VC_W-1:0] ps_wr_vc = '0;
  flit_t flit_out;
  logic [NUM_VCS-1:0] credit_in = '0;
  logic cfg_we = 0, cfg_data = 0;
  logic [2:0] cfg_slot = '0;
  int checks = 0, failures = 0;

  typedef struct { flit_t f; int slot; } obs_s;
  obs_s seen [$];

  tx_port #(.MY_X(1), .MY_Y(1), .VC_BUF_DEPTH(3)) dut (.*);
  always #5 clk_noc = ~clk_noc;
  always #7 clk_core = ~clk_core;

  always @(negedge clk_noc) if (rst_noc_n && flit_out.valid) seen.push_back('{flit_out, int'(dut.slot)});

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  task automatic write_ps(input logic [PKT_W-1:0] d, input int len, input int dx, input int dy, input int vc);
    @(negedge clk_core);
    ps_wr_valid = 1; ps_wr_data = d; ps_wr_len = 3'(len);
    ps_wr_dst_x = COORD_W'(dx); ps_wr_dst_y = COORD_W'(dy); ps_wr_vc = VC_W'(vc);
    do @(posedge clk_core); while (!ps_wr_ready);
    @(negedge clk_core) ps_wr_valid = 0;
  endtask

  task automatic write_tdm(input logic [PKT_W-1:0] d, input int len);
    @(negedge clk_core);
    tdm_wr_valid = 1; tdm_wr_data = d; tdm_wr_len = 3'(len);
    do @(posedge clk_core); while (!tdm_wr_ready);
    @(negedge clk_core) tdm_wr_valid = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk_noc);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [PKT_W-1:0] d1, d2;
    int n_tdm, n_ps;
    d1 = {16{$urandom}};
    d2 = {16{$urandom}};
    #23 rst_noc_n = 1; rst_core_n = 1;
    @(negedge clk_noc) cfg_we = 1; cfg_slot = 5; cfg_data = 1;
    @(negedge clk_noc) cfg_we = 0;

    // 1. packet-switched packet, credit-limited
    write_ps(d1, 4, 4, 1, 1);
    repeat (40) @(negedge clk_noc);
    check(seen.size() == 3, $sformatf("3 flits sent on 3 credits (%0d)", seen.size()));
    @(negedge clk_noc) credit_in = 2'b10;
    @(negedge clk_noc) credit_in = '0;
    repeat (5) @(negedge clk_noc);
    check(seen.size() == 4, "4th flit after a credit");
    for (int k = 0; k < seen.size() && k < 4; k++) begin
      automatic flit_t f = seen[k].f;
      check(!f.tdm && f.vc == 1 && f.head == (k == 0) && f.tail == (k == 3) &&
            f.dst_x == 4 && f.dst_y == 1 && f.data == d1[k*128 +: 128], $sformatf("PS flit %0d", k));
      if (k == 0) check(f.la_port == 3'(PORT_E), "lookahead port east");
    end
    seen.delete();
    credit_in = 2'b10; repeat (3) @(negedge clk_noc); credit_in = '0;

    // 2. TDM packet, slot 5 only
    write_tdm(d2, 2);
    repeat (40) @(negedge clk_noc);
    check(seen.size() == 2, $sformatf("2 TDM flits sent (%0d)", seen.size()));
    for (int k = 0; k < seen.size(); k++) begin
      check(seen[k].f.tdm && seen[k].slot == 5 && seen[k].f.data == d2[k*128 +: 128],
            $sformatf("TDM flit %0d in slot %0d", k, seen[k].slot));
    end
    seen.delete();

    // 3. both lanes loaded: 4 PS flits on VC0 (3 credits, then returned) and 2 TDM flits
    fork
      write_ps(d1, 4, 1, 3, 0);
      write_tdm(d2, 2);
    join
    for (int c = 0; c < 60; c++) begin
      @(negedge clk_noc);
      credit_in = (seen.size() > 0 && !seen[seen.size()-1].f.tdm) ? 2'b01 : 2'b00;
    end
    credit_in = '0;
    n_tdm = 0; n_ps = 0;
    foreach (seen[k]) begin
      if (seen[k].f.tdm) begin
        n_tdm++;
        check(seen[k].slot == 5, "TDM only in its slot");
      end else begin
        n_ps++;
        check(seen[k].slot != 5 || n_tdm == 2, "PS flit not in a slot with TDM waiting");
        if (n_ps == 1) check(seen[k].f.la_port == 3'(PORT_N), "lookahead port north");
      end
    end
    check(n_tdm == 2 && n_ps == 4, $sformatf("mixed: %0d TDM, %0d PS", n_tdm, n_ps));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
