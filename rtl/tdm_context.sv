// tdm_context: the TDM context memory and the slot counter that walks it.
//
// Time is divided into NUM_SLOTS slots that repeat for ever. A free-running
// counter gives the current slot; it restarts at 0 on reset, so every router
// and core port of the network, reset together on the same clock, agree on the
// slot number. The memory holds one WIDTH-bit entry per slot and is written
// through a configuration port (the schedule is computed when the FPGA design
// is compiled and loaded before use; it cannot change traffic at run time).
//
// Interface and timing:
//   slot      current slot number.
//   cur_entry entry of the current slot (combinational read).
//   next_entry entry of the following slot (combinational read), which a
//             two-stage router fetches one cycle ahead of its use.
//   cfg_we/cfg_slot/cfg_data write one entry; the write takes effect on the
//             next clock edge.
// Reset clears all entries, which leaves every slot free for packet switching.
//
// The document gives the function (one entry per slot, a counter cycling
// through the slots) and the sizes: 8 entries, 20 bits in a router and a
// 1-bit slot table per lane direction in a core port. The reset value and
// configuration port are this design's choices.
module tdm_context #(
  parameter int unsigned NUM_SLOTS = 8,
  parameter int unsigned WIDTH     = 20,
  localparam int unsigned SLOT_W   = (NUM_SLOTS > 1) ? $clog2(NUM_SLOTS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_we,
  input  logic [SLOT_W-1:0] cfg_slot,
  input  logic [WIDTH-1:0]  cfg_data,
  output logic [SLOT_W-1:0] slot,
  output logic [SLOT_W-1:0] next_slot,
  output logic [WIDTH-1:0]  cur_entry,
  output logic [WIDTH-1:0]  next_entry
);

  logic [WIDTH-1:0] mem [NUM_SLOTS];

  always_comb begin
    if (slot == SLOT_W'(NUM_SLOTS - 1)) next_slot = '0;
    else                                next_slot = slot + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) slot <= '0;
    else        slot <= next_slot;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_SLOTS; i++) mem[i] <= '0;
    end else if (cfg_we && (int'(cfg_slot) < NUM_SLOTS)) begin
      mem[cfg_slot] <= cfg_data;
    end
  end

  assign cur_entry  = mem[slot];
  assign next_entry = mem[next_slot];

endmodule
