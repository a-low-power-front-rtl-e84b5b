// bb_cache: basic block descriptor cache (the BLISS replacement for a BTB).
//
// A set-associative cache with one descriptor per entry, looked up with the
// descriptor PC every cycle. Lookup is combinational: the registered PC goes
// in and hit / entry come out in the same cycle, so the front-end can form
// the next PC and look it up in the following cycle (one block per cycle).
// On a miss the front-end stalls and refills the entry from L2 through the
// fill port; the refill writes at the clock edge and the next lookup hits.
//
// Interface:
//   lookup_pc  descriptor word address (byte address bits [31:2])
//   hit, entry, hit_way   result of the lookup in the same cycle
//   fill_*     write a descriptor fetched from L2 into its set
// The default 16 sets x 2 ways is the small BB-cache of the evaluated
// configuration. At refill the PC-relative target is computed once and stored
// with the entry, so the entry carries a full 30-bit target like the
// document's BB-cache entry format. Replacement is this design's choice: a
// per-set victim pointer that moves past the way that was last used (exact
// LRU for two ways, not-recently-used for more).
module bb_cache
  import bliss_pkg::*;
#(
  parameter int unsigned SETS = 16,
  parameter int unsigned WAYS = 2
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // lookup
  input  logic [29:0]               lookup_pc,
  output logic                      hit,
  output bbc_entry_t                entry,
  output logic [$clog2(WAYS)-1:0]   hit_way,
  // refill from L2
  input  logic                      fill_valid,
  input  logic [29:0]               fill_pc,
  input  bbd_t                      fill_bbd
);
  localparam int unsigned IDX_W = $clog2(SETS);
  localparam int unsigned TAG_W = 30 - IDX_W;
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;

  logic [TAG_W-1:0]  tag_q   [SETS][WAYS];
  logic              valid_q [SETS][WAYS];
  bbc_entry_t        data_q  [SETS][WAYS];
  logic [WAY_W-1:0]  victim_q[SETS];

  logic [IDX_W-1:0]  l_idx, f_idx;
  logic [TAG_W-1:0]  l_tag, f_tag;
  assign l_idx = lookup_pc[IDX_W-1:0];
  assign l_tag = lookup_pc[29:IDX_W];
  assign f_idx = fill_pc[IDX_W-1:0];
  assign f_tag = fill_pc[29:IDX_W];

  // Tag compare across all ways, then select the hitting way's data.
  always_comb begin
    hit     = 1'b0;
    hit_way = '0;
    entry   = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (valid_q[l_idx][w] && tag_q[l_idx][w] == l_tag) begin
        hit     = 1'b1;
        hit_way = w[$clog2(WAYS)-1:0];
        entry   = data_q[l_idx][w];
      end
    end
  end

  function automatic logic [WAY_W-1:0] next_way(input logic [WAY_W-1:0] w);
    return (w == WAY_W'(WAYS - 1)) ? '0 : w + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        victim_q[s] <= '0;
        for (int w = 0; w < WAYS; w++) valid_q[s][w] <= 1'b0;
      end
    end else begin
      if (fill_valid) begin
        valid_q[f_idx][victim_q[f_idx]] <= 1'b1;
        tag_q  [f_idx][victim_q[f_idx]] <= f_tag;
        data_q [f_idx][victim_q[f_idx]] <= bbd_to_entry(fill_pc, fill_bbd);
        victim_q[f_idx] <= next_way(victim_q[f_idx]);
      end else if (hit && WAY_W'(hit_way) == victim_q[l_idx]) begin
        victim_q[l_idx] <= next_way(victim_q[l_idx]);
      end
    end
  end

endmodule
