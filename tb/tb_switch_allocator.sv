// tb_switch_allocator: directed and random checks of packet-switched switch
// allocation.
//   1. A lone request is granted at once.
//   2. Two inputs competing for one output alternate (round robin).
//   3. An output or input reserved for TDM grants nothing.
//   4. Credits: with 3 credits per VC, a fourth flit waits until a credit
//      returns.
//   5. VC hold: while a packet holds an output VC, another head flit for that
//      VC is refused but the other VC of the same output is granted.
//   6. Random traffic: every output and every input granted at most once per
//      cycle, only to eligible requests.
module tb_switch_allocator;
  import hnoc_pkg::*;
  localparam int unsigned DEPTH = 3;

  logic clk = 0, rst_n = 0;
  logic [NUM_PORTS-1:0][NUM_VCS-1:0] cand_valid, cand_head, cand_tail, credit_in, grant_vc;
  logic [NUM_PORTS-1:0][NUM_VCS-1:0][PW-1:0] cand_port;
  logic [NUM_PORTS-1:0] tdm_in_busy, tdm_out_busy, out_ps_valid;
  logic [NUM_PORTS-1:0][PW-1:0] out_ps_src;
  int checks = 0, failures = 0;

  switch_allocator #(.VC_BUF_DEPTH(DEPTH), .LOCAL_CREDITS(2)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  task automatic clear();
    cand_valid = '0; cand_head = '0; cand_tail = '0; cand_port = '0;
    tdm_in_busy = '0; tdm_out_busy = '0; credit_in = '0;
  endtask

  task automatic req(input int i, input int v, input int p, input bit h, input bit t);
    cand_valid[i][v] = 1; cand_head[i][v] = h; cand_tail[i][v] = t; cand_port[i][v] = PW'(p);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wins [NUM_PORTS];
    clear();
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // 1. lone single-flit packet W(3) vc0 -> E(1)
    clear(); req(3, 0, 1, 1, 1); #1;
    check(grant_vc[3] == 2'b01, "lone request granted");
    check(out_ps_valid[1] && out_ps_src[1] == 3, "output E takes input W");
    check(out_ps_valid == 5'b00010, "no other output used");
    @(negedge clk); credit_in[1][0] = 1; #1; // give the credit back
    @(negedge clk);

    // 2. N(0) and S(2), single-flit packets on vc1, both to L(4): alternate
    wins[0] = 0; wins[2] = 0;
    for (int c = 0; c < 6; c++) begin
      clear(); req(0, 1, 4, 1, 1); req(2, 1, 4, 1, 1); #1;
      check($countones(grant_vc) == 1, "one winner for one output");
      if (grant_vc[0][1]) wins[0]++;
      if (grant_vc[2][1]) wins[2]++;
      @(negedge clk);
      clear(); credit_in[4][1] = 1; #1;      // return the local credit
      @(negedge clk);
    end
    check(wins[0] == 3 && wins[2] == 3, $sformatf("round robin split %0d/%0d", wins[0], wins[2]));

    // 3. TDM masking
    clear(); req(1, 0, 3, 1, 1); tdm_out_busy[3] = 1; #1;
    check(grant_vc == '0 && out_ps_valid == '0, "output reserved by TDM not granted");
    tdm_out_busy = '0; tdm_in_busy[1] = 1; #1;
    check(grant_vc == '0, "input reserved by TDM not granted");
    tdm_in_busy = '0; #1;
    check(grant_vc[1] == 2'b01, "granted once TDM releases");
    @(negedge clk);               // uses 1 credit of output W vc0 (2 left)

    // 4. credits on output W(3) vc0: 2 left, then stall
    for (int c = 0; c < 2; c++) begin
      clear(); req(1, 0, 3, 1, 1); #1;
      check(grant_vc[1] == 2'b01, "granted while credits remain");
      @(negedge clk);
    end
    clear(); req(1, 0, 3, 1, 1); #1;
    check(grant_vc == '0, "no grant without credit");
    @(negedge clk);
    clear(); req(1, 0, 3, 1, 1); credit_in[3][0] = 1; #1;
    check(grant_vc == '0, "credit arriving this cycle counts from the next");
    @(negedge clk);
    clear(); req(1, 0, 3, 1, 1); #1;
    check(grant_vc[1] == 2'b01, "granted after a credit returned");
    @(negedge clk);
    clear(); credit_in[3][0] = 1; @(negedge clk);
    clear(); credit_in[3][0] = 1; @(negedge clk);
    clear(); credit_in[3][0] = 1; @(negedge clk);
    clear();

    // 5. VC hold on output N(0) vc0: input E(1) sends a head (not tail)
    req(1, 0, 0, 1, 0); #1;
    check(grant_vc[1] == 2'b01, "head granted");
    @(negedge clk);
    clear(); req(2, 0, 0, 1, 0); req(2, 1, 0, 1, 0); #1;
    check(grant_vc[2] == 2'b10, "other packet gets only the free VC");
    @(negedge clk);
    clear(); req(1, 0, 0, 0, 1); #1;
    check(grant_vc[1] == 2'b01, "tail of holding packet granted");
    @(negedge clk);
    clear(); req(2, 0, 0, 1, 1); #1;
    check(grant_vc[2] == 2'b01, "VC free again after tail");
    @(negedge clk);
    clear(); credit_in[0] = 2'b11; @(negedge clk);
    clear(); credit_in[0] = 2'b01; @(negedge clk);
    clear(); credit_in[0] = 2'b01; @(negedge clk);

    // 6. random single-flit traffic, credits returned immediately
    for (int c = 0; c < 400; c++) begin
      logic [NUM_PORTS-1:0][NUM_VCS-1:0] g;
      clear();
      for (int i = 0; i < NUM_PORTS; i++)
        for (int v = 0; v < NUM_VCS; v++)
          if ($urandom % 2) req(i, v, $urandom % NUM_PORTS, 1, 1);
      tdm_out_busy = NUM_PORTS'($urandom) & NUM_PORTS'($urandom);
      tdm_in_busy  = NUM_PORTS'($urandom) & NUM_PORTS'($urandom);
      #1;
      g = grant_vc;
      for (int i = 0; i < NUM_PORTS; i++) begin
        check($countones(g[i]) <= 1, "at most one VC per input");
        for (int v = 0; v < NUM_VCS; v++) if (g[i][v]) begin
          check(cand_valid[i][v] && !tdm_in_busy[i] && !tdm_out_busy[cand_port[i][v]],
                "grant only to an eligible request");
          check(out_ps_valid[cand_port[i][v]] && out_ps_src[cand_port[i][v]] == PW'(i),
                "output select matches grant");
        end
      end
      for (int o = 0; o < NUM_PORTS; o++) begin
        automatic int n = 0;
        for (int i = 0; i < NUM_PORTS; i++)
          for (int v = 0; v < NUM_VCS; v++) if (g[i][v] && cand_port[i][v] == PW'(o)) n++;
        check(n <= 1, "at most one grant per output");
      end
      @(negedge clk);
      clear();
      for (int i = 0; i < NUM_PORTS; i++)
        for (int v = 0; v < NUM_VCS; v++) if (g[i][v]) credit_in[cand_port[i][v]][v] = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
