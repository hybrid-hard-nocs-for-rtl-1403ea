// tb_rx_port: read core port with the NoC at 100 MHz and the core at ~71 MHz.
// The slot table marks slot 3 for TDM.
//   1. Two packet-switched packets, VC0 (4 flits) and VC1 (2 flits), arrive
//      interleaved flit by flit; the core receives each whole, with its VC and
//      length, and one credit per flit returns on the right VC.
//   2. A packet-switched flit arriving in the TDM slot goes to the
//      packet-switched lane.
//   3. Four TDM flits, one per round in slot 3, form one TDM packet.
//   4. A TDM flit in an unmarked slot is reported and dropped.
//   5. With the core not taking TDM packets, the TDM lane overflows and the
//      sticky flag rises.
module tb_rx_port;
  import hnoc_pkg::*;
  localparam int PKT_W = 4 * FLIT_DATA_W;
  logic clk_noc = 0, rst_noc_n = 0, clk_core = 0, rst_core_n = 0;
  flit_t flit_in;
  logic [NUM_VCS-1:0] credit_out;
  logic cfg_we = 0, cfg_data = 0;
  logic [2:0] cfg_slot = '0;
  logic tdm_overflow, sched_err;
  logic ps_pkt_valid, ps_pkt_ready, tdm_pkt_valid, tdm_pkt_ready;
  logic [PKT_W-1:0] ps_pkt_data, tdm_pkt_data;
  logic [2:0] ps_pkt_len, tdm_pkt_len;
  logic [VC_W-1:0] ps_pkt_vc;
  int checks = 0, failures = 0;
  int cred [NUM_VCS];
  int sched_errs = 0;

  rx_port #(.TDM_FIFO_DEPTH(4)) dut (.*);
  always #5 clk_noc = ~clk_noc;
  always #7 clk_core = ~clk_core;

  always @(posedge clk_noc) begin
    if (rst_noc_n) for (int v = 0; v < NUM_VCS; v++) if (credit_out[v]) cred[v] <= cred[v] + 1;
    if (rst_noc_n && sched_err) sched_errs <= sched_errs + 1;
  end

  // core side: collect delivered packets
  typedef struct { logic [PKT_W-1:0] d; int len; int vc; } pkt_s;
  pkt_s ps_got [$];
  pkt_s tdm_got [$];
  always @(posedge clk_core) begin
    if (rst_core_n && ps_pkt_valid && ps_pkt_ready) ps_got.push_back('{ps_pkt_data, int'(ps_pkt_len), int'(ps_pkt_vc)});
    if (rst_core_n && tdm_pkt_valid && tdm_pkt_ready) tdm_got.push_back('{tdm_pkt_data, int'(tdm_pkt_len), 0});
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  function automatic flit_t mk(bit tdm, int vc, bit h, bit t, logic [127:0] d);
    flit_t f = '0;
    f.valid = 1; f.tdm = tdm; f.vc = VC_W'(vc); f.head = h; f.tail = t; f.data = d;
    return f;
  endfunction

  task automatic wait_slot(input int s);
    do @(negedge clk_noc); while (dut.slot != 3'(s));
  endtask

  initial begin
    repeat (20000) @(posedge clk_noc);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] a [4], b [2], t [4];
    flit_in = '0; ps_pkt_ready = 1; tdm_pkt_ready = 1;
    cred[0] = 0; cred[1] = 0;
    #23 rst_noc_n = 1; rst_core_n = 1;
    @(negedge clk_noc) cfg_we = 1; cfg_slot = 3; cfg_data = 1;
    @(negedge clk_noc) cfg_we = 0;

    // 1. interleaved packets, sent outside slot 3
    for (int k = 0; k < 4; k++) a[k] = {$urandom, $urandom, $urandom, $urandom};
    for (int k = 0; k < 2; k++) b[k] = {$urandom, $urandom, $urandom, $urandom};
    wait_slot(4);
    flit_in = mk(0, 0, 1, 0, a[0]); @(negedge clk_noc);
    flit_in = mk(0, 1, 1, 0, b[0]); @(negedge clk_noc);
    flit_in = mk(0, 0, 0, 0, a[1]); @(negedge clk_noc);
    flit_in = mk(0, 1, 0, 1, b[1]); @(negedge clk_noc);
    flit_in = mk(0, 0, 0, 0, a[2]); @(negedge clk_noc);
    flit_in = mk(0, 0, 0, 1, a[3]); @(negedge clk_noc);
    flit_in = '0;
    repeat (30) @(negedge clk_noc);
    check(ps_got.size() == 2, $sformatf("two packet-switched packets delivered (%0d)", ps_got.size()));
    if (ps_got.size() == 2) begin
      check(ps_got[0].vc == 1 && ps_got[0].len == 2 && ps_got[0].d[255:0] == {b[1], b[0]}, "VC1 packet");
      check(ps_got[1].vc == 0 && ps_got[1].len == 4 && ps_got[1].d == {a[3], a[2], a[1], a[0]}, "VC0 packet");
    end
    check(cred[0] == 4 && cred[1] == 2, $sformatf("credits returned %0d/%0d", cred[0], cred[1]));

    // 2. packet-switched single-flit packet in the TDM slot
    wait_slot(3);
    flit_in = mk(0, 1, 1, 1, 128'h5A5A); @(negedge clk_noc); flit_in = '0;
    repeat (20) @(negedge clk_noc);
    check(ps_got.size() == 3 && ps_got[2].d[127:0] == 128'h5A5A, "PS flit in TDM slot uses PS lane");
    check(tdm_got.size() == 0, "TDM lane untouched");

    // 3. TDM packet, one flit per round
    for (int k = 0; k < 4; k++) begin
      t[k] = {$urandom, $urandom, $urandom, $urandom};
      wait_slot(3);
      flit_in = mk(1, 0, k == 0, k == 3, t[k]);
      @(negedge clk_noc) flit_in = '0;
    end
    repeat (20) @(negedge clk_noc);
    check(tdm_got.size() == 1 && tdm_got[0].len == 4 && tdm_got[0].d == {t[3], t[2], t[1], t[0]},
          "TDM packet assembled");

    // 4. TDM flit in slot 2
    wait_slot(2);
    flit_in = mk(1, 0, 1, 1, 128'hBAD); @(negedge clk_noc); flit_in = '0;
    repeat (20) @(negedge clk_noc);
    check(sched_errs == 1 && tdm_got.size() == 1, "TDM flit in unmarked slot dropped and reported");
    check(!tdm_overflow, "no overflow yet");

    // 5. overflow: core stops reading the TDM lane
    tdm_pkt_ready = 0;
    for (int k = 0; k < 8; k++) begin
      wait_slot(3);
      flit_in = mk(1, 0, 1, 1, 128'(k));
      @(negedge clk_noc) flit_in = '0;
    end
    repeat (10) @(negedge clk_noc);
    check(tdm_overflow, "TDM lane overflow flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
