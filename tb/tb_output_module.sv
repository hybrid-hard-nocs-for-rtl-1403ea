// tb_output_module: the output registers of the router at (3, 4). Random
// flits enter on all five outputs; one cycle later each must appear on the
// link, with the lookahead port of a packet-switched head flit replaced by
// the X-then-Y route from the neighbour router, which the testbench works
// out itself. TDM and body flits must pass unchanged.
module tb_output_module;
  import hnoc_pkg::*;
  localparam int MX = 3, MY = 4;
  logic clk = 0, rst_n = 0;
  flit_t xbar_out [NUM_PORTS];
  flit_t flit_out [NUM_PORTS];
  flit_t expect_q [NUM_PORTS];
  int checks = 0, failures = 0, recomputed = 0;

  output_module #(.MY_X(MX), .MY_Y(MY)) dut (.*);
  always #5 clk = ~clk;

  function automatic int ref_route(int cx, int cy, int dx, int dy);
    if (dx > cx) return 1;       // east
    if (dx < cx) return 3;       // west
    if (dy > cy) return 0;       // north
    if (dy < cy) return 2;       // south
    return 4;                    // local
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < NUM_PORTS; o++) xbar_out[o] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int o = 0; o < NUM_PORTS; o++) check_f(o, flit_out[o] == '0, "reset value");
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      for (int o = 0; o < NUM_PORTS; o++) begin
        flit_t f;
        int nx, ny;
        f = flit_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
        f.valid = ($urandom % 4 != 0);
        f.tdm   = ($urandom % 3 == 0);
        xbar_out[o] = f;
        nx = MX + ((o == 1) ? 1 : (o == 3) ? -1 : 0);
        ny = MY + ((o == 0) ? 1 : (o == 2) ? -1 : 0);
        expect_q[o] = f;
        if (f.valid && !f.tdm && f.head && o != 4) begin
          expect_q[o].la_port = PW'(ref_route(nx, ny, int'(f.dst_x), int'(f.dst_y)));
          recomputed++;
        end
      end
      @(posedge clk);
      #1;
      for (int o = 0; o < NUM_PORTS; o++) check_f(o, flit_out[o] == expect_q[o], "registered flit");
    end
    check_f(0, recomputed > 50, "lookahead recomputed often enough");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_f(input int o, input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: output %0d: %s", o, what);
    end
  endtask
endmodule
