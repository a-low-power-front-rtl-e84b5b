// bimod_predictor: bimodal branch direction predictor.
//
// A table of 2-bit saturating counters indexed by the low bits of the
// descriptor PC. Because a BLISS PC always names a block descriptor, the
// table is only read and trained for blocks that end in a conditional
// branch, so it sees no interference from non-branch instructions.
// Read is combinational (predict in the same cycle as the BB-cache lookup);
// training from the back-end writes at the clock edge. Counter values 2 and 3
// predict taken. The 256-entry size is the document's; reset to weakly
// not-taken (1) is this design's choice.
module bimod_predictor #(
  parameter int unsigned ENTRIES = 256
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [29:0]  pred_pc,
  output logic         pred_taken,
  input  logic         upd_valid,
  input  logic [29:0]  upd_pc,
  input  logic         upd_taken
);
  localparam int unsigned IDX_W = $clog2(ENTRIES);

  logic [1:0] ctr_q [ENTRIES];

  logic [IDX_W-1:0] p_idx, u_idx;
  assign p_idx = pred_pc[IDX_W-1:0];
  assign u_idx = upd_pc[IDX_W-1:0];

  assign pred_taken = ctr_q[p_idx][1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) ctr_q[i] <= 2'd1;
    end else if (upd_valid) begin
      if (upd_taken && ctr_q[u_idx] != 2'd3)
        ctr_q[u_idx] <= ctr_q[u_idx] + 2'd1;
      else if (!upd_taken && ctr_q[u_idx] != 2'd0)
        ctr_q[u_idx] <= ctr_q[u_idx] - 2'd1;
    end
  end

endmodule
