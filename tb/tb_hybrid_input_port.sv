// tb_hybrid_input_port: one router input port with 4-flit VC buffers.
//   1. A packet-switched flit arriving at an empty VC is offered at once and,
//      granted, reaches the crossbar input one cycle later without entering
//      the buffer; a credit is returned in the grant cycle.
//   2. A 3-flit packet on VC1 waits in the buffer while not granted; it
//      leaves in order, and body/tail flits ask for the head's port.
//   3. A TDM flit with the bypass selected reaches the crossbar input from
//      the bypass register one cycle later; the buffers are untouched.
//   4. Random traffic on both VCs with random grants: every flit reaches the
//      crossbar exactly once, in order per VC, and credits equal flits.
module tb_hybrid_input_port;
  import hnoc_pkg::*;
  logic clk = 0, rst_n = 0;
  flit_t flit_in, xbar_flit;
  logic [NUM_VCS-1:0] credit_out, cand_valid, cand_head, cand_tail, grant_vc;
  logic [NUM_VCS-1:0][PW-1:0] cand_port;
  logic use_bypass_next;
  int checks = 0, failures = 0;

  hybrid_input_port #(.VC_BUF_DEPTH(4)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  function automatic flit_t mk(bit tdm, int vc, bit h, bit t, int la, logic [127:0] d);
    flit_t f = '0;
    f.valid = 1; f.tdm = tdm; f.vc = VC_W'(vc); f.head = h; f.tail = t;
    f.la_port = PW'(la); f.data = d;
    return f;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flit_t f, pk[3];
    flit_in = '0; grant_vc = '0; use_bypass_next = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // 1. fall-through
    f = mk(0, 0, 1, 1, 1, 128'h1111);
    flit_in = f; #1;
    check(cand_valid == 2'b01 && cand_port[0] == 1 && cand_head[0], "arriving flit offered at once");
    grant_vc = 2'b01; #1;
    check(credit_out == 2'b01, "credit returned on grant");
    @(negedge clk); flit_in = '0; grant_vc = '0; #1;
    check(xbar_flit == f, "granted flit at crossbar input next cycle");
    check(cand_valid == 2'b00, "buffer stayed empty");

    // 2. buffered packet on VC1
    pk[0] = mk(0, 1, 1, 0, 0, 128'hA0);
    pk[1] = mk(0, 1, 0, 0, 3, 128'hA1);  // la_port of body flits is ignored
    pk[2] = mk(0, 1, 0, 1, 3, 128'hA2);
    for (int k = 0; k < 3; k++) begin
      @(negedge clk) flit_in = pk[k];
    end
    @(negedge clk) flit_in = '0; #1;
    check(cand_valid == 2'b10 && cand_port[1] == 0, "head waits, asks for N");
    for (int k = 0; k < 3; k++) begin
      #1;
      check(cand_valid[1] && cand_port[1] == 0, $sformatf("flit %0d asks for head's port", k));
      grant_vc = 2'b10;
      @(negedge clk); grant_vc = '0; #1;
      check(xbar_flit == pk[k], $sformatf("flit %0d leaves in order", k));
    end
    check(cand_valid == 2'b00, "buffer empty after packet");

    // 3. TDM bypass
    f = mk(1, 0, 1, 1, 0, 128'hBEEF);
    @(negedge clk) flit_in = f; use_bypass_next = 1; #1;
    check(cand_valid == 2'b00, "TDM flit not offered to switch allocation");
    @(negedge clk) flit_in = '0; use_bypass_next = 0; #1;
    check(xbar_flit == f, "TDM flit taken from the bypass register");
    @(negedge clk); #1;
    check(!xbar_flit.valid, "bypass register cleared after use");

    // 4. random traffic with a reference queue per VC
    begin
      flit_t q [NUM_VCS][$];
      int credits_seen = 0, sent = 0, got = 0, inflight = 0;
      int space [NUM_VCS];
      flit_t exp_next;
      bit exp_valid;
      space[0] = 4; space[1] = 4;
      exp_valid = 0;
      for (int c = 0; c < 600; c++) begin
        @(negedge clk);
        // check what the previous grant delivered
        #1;
        if (exp_valid) begin
          check(xbar_flit == exp_next, "random: delivered flit");
          got++;
        end
        exp_valid = 0;
        flit_in = '0; grant_vc = '0;
        if (c < 500 && ($urandom % 2)) begin
          automatic int v = $urandom % 2;
          if (space[v] > 0) begin
            flit_in = mk(0, v, 1, 1, $urandom % 5, {$urandom, $urandom, $urandom, $urandom});
            q[v].push_back(flit_in);
            space[v]--;
            sent++;
          end
        end
        #1;
        if ($urandom % 3 != 0) begin
          automatic int v = $urandom % 2;
          if (cand_valid[v]) begin
            check(q[v].size() > 0 && cand_port[v] == q[v][0].la_port, "random: candidate port");
            grant_vc[v] = 1'b1;
            exp_next = q[v].pop_front();
            exp_valid = 1;
            #1;
            if (credit_out[v]) begin
              credits_seen++;
              space[v]++;
            end
          end
        end
      end
      check(sent == got && credits_seen == sent && sent > 100,
            $sformatf("random: sent %0d delivered %0d credits %0d", sent, got, credits_seen));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
