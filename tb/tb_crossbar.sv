// tb_crossbar: random input flits and random selections, including several
// outputs taking the same input (multicast) and unselected outputs, compared
// with a reference selection written out in the testbench.
module tb_crossbar;
  import hnoc_pkg::*;
  flit_t xbar_in [NUM_PORTS];
  flit_t xbar_out [NUM_PORTS];
  logic [NUM_PORTS-1:0] sel_valid;
  logic [NUM_PORTS-1:0][PW-1:0] sel_src;
  int checks = 0, failures = 0, multicast = 0;

  crossbar dut (.*);

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      int uses [NUM_PORTS];
      for (int i = 0; i < NUM_PORTS; i++) begin
        xbar_in[i] = flit_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
        uses[i] = 0;
      end
      for (int o = 0; o < NUM_PORTS; o++) begin
        sel_valid[o] = ($urandom % 5 != 0);
        sel_src[o]   = PW'($urandom % NUM_PORTS);
        if (t % 7 == 0) sel_src[o] = 3'd2;   // broadcast-like pattern
      end
      #1;
      for (int o = 0; o < NUM_PORTS; o++) begin
        flit_t expect_f;
        expect_f = sel_valid[o] ? xbar_in[sel_src[o]] : '0;
        if (sel_valid[o]) uses[sel_src[o]]++;
        checks++;
        if (xbar_out[o] !== expect_f) begin
          failures++;
          $display("FAIL: t=%0d output %0d", t, o);
        end
      end
      for (int i = 0; i < NUM_PORTS; i++) if (uses[i] > 1) multicast++;
    end
    checks++;
    if (multicast == 0) begin
      failures++;
      $display("FAIL: no multicast case exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
