// tb_tdm_context: checks the slot counter and the context memory.
// Writes random entries, then follows the counter for several rounds and
// compares the current and next entries with a reference copy; checks that
// the counter wraps every NUM_SLOTS cycles and that writes take effect on the
// next edge.
module tb_tdm_context;
  localparam int unsigned NS = 8;
  localparam int unsigned W  = 20;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [2:0] cfg_slot = '0;
  logic [W-1:0] cfg_data = '0;
  logic [2:0] slot, next_slot;
  logic [W-1:0] cur_entry, next_entry;
  logic [W-1:0] ref_mem [NS];
  int checks = 0, failures = 0;

  tdm_context #(.NUM_SLOTS(NS), .WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expect_slot, wraps, cycles;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // After reset: slot 0, all entries cleared.
    check(slot == 0, "slot 0 after reset");
    check(cur_entry == 0 && next_entry == 0, "entries cleared by reset");
    for (int i = 0; i < NS; i++) ref_mem[i] = W'($urandom);
    for (int i = 0; i < NS; i++) begin
      @(negedge clk);
      cfg_we = 1; cfg_slot = 3'(i); cfg_data = ref_mem[i];
    end
    @(negedge clk) cfg_we = 0;
    expect_slot = slot;
    wraps = 0;
    cycles = 0;
    for (int c = 0; c < 5 * NS; c++) begin
      @(negedge clk);
      cycles++;
      expect_slot = (expect_slot + 1) % NS;
      if (expect_slot == 0) wraps++;
      check(slot == 3'(expect_slot), $sformatf("slot %0d expected %0d", slot, expect_slot));
      check(next_slot == 3'((expect_slot + 1) % NS), "next_slot");
      check(cur_entry == ref_mem[expect_slot], $sformatf("cur_entry slot %0d", expect_slot));
      check(next_entry == ref_mem[(expect_slot + 1) % NS], $sformatf("next_entry slot %0d", expect_slot));
    end
    check(wraps == 5, $sformatf("counter wrapped %0d times in %0d cycles", wraps, cycles));
    // A write during operation is visible after the next edge.
    @(negedge clk);
    cfg_we = 1; cfg_slot = 3'((slot + 2) % NS); cfg_data = 20'hABCDE;
    ref_mem[(slot + 2) % NS] = 20'hABCDE;
    @(negedge clk) cfg_we = 0;
    check(next_entry == 20'hABCDE, "live write visible in next_entry");
    @(negedge clk);
    check(cur_entry == 20'hABCDE, "live write visible in cur_entry");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
