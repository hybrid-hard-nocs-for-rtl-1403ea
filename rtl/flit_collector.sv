// flit_collector: read-port buffer that gathers the flits of one packet into
// a single wide word for the FPGA core.
//
// Flits are accepted one per cycle (`in_valid`/`in_ready`) and stored at
// increasing positions, flit 0 in the low 128 bits. The flit marked `in_tail`
// completes the packet, which is then offered to the core with
// `pkt_valid`, `pkt_data` and `pkt_len` (number of flits) until `pkt_ready`;
// no further flit is accepted meanwhile. A packet longer than PKT_FLITS keeps
// only its first PKT_FLITS flits (an assertion flags it).
module flit_collector
  import hnoc_pkg::*;
#(
  parameter int unsigned PKT_FLITS = 4,
  localparam int unsigned LW       = $clog2(PKT_FLITS + 1)
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             in_valid,
  input  logic [FLIT_DATA_W-1:0]           in_data,
  input  logic                             in_tail,
  output logic                             in_ready,
  output logic                             pkt_valid,
  input  logic                             pkt_ready,
  output logic [PKT_FLITS*FLIT_DATA_W-1:0] pkt_data,
  output logic [LW-1:0]                    pkt_len
);

  logic [LW-1:0] cnt;
  logic          done;

  assign in_ready  = !done;
  assign pkt_valid = done;
  assign pkt_len   = cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      done     <= 1'b0;
      pkt_data <= '0;
    end else if (done) begin
      if (pkt_ready) begin
        done <= 1'b0;
        cnt  <= '0;
      end
    end else if (in_valid) begin
      if (int'(cnt) < PKT_FLITS) begin
        pkt_data[int'(cnt)*FLIT_DATA_W +: FLIT_DATA_W] <= in_data;
        cnt <= cnt + 1'b1;
      end
      if (in_tail) done <= 1'b1;
    end
  end

  a_fits: assert property (@(posedge clk) disable iff (!rst_n)
                           (in_valid && in_ready) |-> (int'(cnt) < PKT_FLITS));

endmodule
