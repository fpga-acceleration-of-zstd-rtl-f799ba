// hash_table - one hash table of a hash match engine.
//
// A simple dual-port RAM of ENTRIES words, each the absolute input position
// of the most recent string whose 4-byte hash equals the word's address. One
// insert (write) and one lookup (read) can be made every cycle. The lookup is
// synchronous: rd_pos is valid the cycle after rd_en, and holds while rd_en is
// low. A lookup and an insert to the same entry in the same cycle return the
// entry's old contents (read first), so a string is never reported as a match
// of itself. Entries are not cleared at reset: a stale entry is harmless
// because every candidate is verified against the history buffer.
// The table size (4096 entries) is the one chosen for the kernel; storing a
// bare position, the read-first rule and the latency are this design's choices.
module hash_table #(
  parameter int unsigned ENTRIES = 4096,
  parameter int unsigned POS_W   = 32,
  localparam int unsigned AW     = $clog2(ENTRIES)
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [POS_W-1:0] wr_pos,
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr,
  output logic [POS_W-1:0] rd_pos
);

  logic [POS_W-1:0] mem [ENTRIES];

  always_ff @(posedge clk) begin
    if (rd_en) rd_pos <= mem[rd_addr];
    if (wr_en) mem[wr_addr] <= wr_pos;
  end

endmodule
