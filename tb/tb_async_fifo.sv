// tb_async_fifo: dual-clock FIFO between a 100 MHz writer and a ~59 MHz
// reader. 300 random words go through with random read stalls; every word
// must come out once, in order. Checks that the FIFO fills up (wr_full) when
// the reader pauses, that nothing is written while full, and that the
// write-side copy of the read pointer catches up with the number of reads.
module tb_async_fifo;
  localparam int unsigned W = 16, DEPTH = 8, NWORDS = 300;

  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic wr_en = 0, rd_en;
  logic [W-1:0] wr_data = '0, rd_data;
  logic wr_full, rd_empty;
  logic [3:0] wr_rd_ptr;
  logic [W-1:0] q[$];
  int checks = 0, failures = 0, reads = 0, full_seen = 0;
  bit stall;

  async_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 wclk = ~wclk;
  always #8.5 rclk = ~rclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge wclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  initial begin
    int sent = 0;
    #30 wrst_n = 1; rrst_n = 1;
    while (sent < NWORDS) begin
      @(negedge wclk);
      if (!wr_full && ($urandom % 4 != 0)) begin
        wr_en = 1; wr_data = W'($urandom);
        q.push_back(wr_data);
        sent++;
      end else begin
        wr_en = 0;
      end
      if (wr_full) full_seen++;
    end
    @(negedge wclk) wr_en = 0;
  end

  // reader: pauses for a long stretch early on to fill the FIFO
  assign rd_en = !rd_empty && !stall;
  initial begin
    stall = 1;
    #600 stall = 0;
    forever begin
      @(negedge rclk) stall = ($urandom % 3 == 0);
    end
  end

  always @(posedge rclk) begin
    if (rrst_n && rd_en) begin
      check(q.size() > 0, "read from a FIFO the model says is empty");
      if (q.size() > 0) check(rd_data == q.pop_front(), "data order");
      reads++;
    end
  end

  initial begin
    wait (reads == NWORDS);
    repeat (10) @(posedge wclk);
    check(full_seen > 0, "FIFO reached full while the reader paused");
    check(rd_empty, "empty at the end");
    check(int'(wr_rd_ptr) == NWORDS % 16, $sformatf("write-side read pointer %0d", wr_rd_ptr));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
