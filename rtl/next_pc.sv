// next_pc: next-descriptor-address selection of the BLISS front-end.
//
// This is the multiplexer in front of the BB-cache. Its inputs are the
// back-end's corrected target after a misprediction, the block target stored
// in the BB-cache entry, the return target on top of the RAS, the
// fall-through address (the next descriptor) and the current PC (hold). The
// block type read from the BB-cache selects among them:
//   FT                 fall-through
//   B, LOOP            target if the predictor says taken, else fall-through
//   J, JAL             target
//   JR, JALR           target stored in the entry (a guess; the back-end
//                      redirects if it is wrong)
//   RET                RAS top
// JAL and JALR push the fall-through address on the RAS, RET pops it.
// A redirect from the back-end overrides everything. When the lookup misses
// or the BBQ cannot take the block, the PC holds and nothing is pushed.
// Purely combinational. The set of sources follows the front-end block
// diagram; the handling of indirect jumps is this design's choice.
module next_pc
  import bliss_pkg::*;
(
  input  logic [29:0]  pc,
  input  logic         bbc_hit,
  input  bbc_entry_t   bbc_entry,
  input  logic         bp_taken,       // bimodal predictor output for pc
  input  logic [29:0]  ras_top,
  input  logic         bbq_ready,      // BBQ can accept a block this cycle
  input  logic         redirect_valid,
  input  logic [29:0]  redirect_pc,
  output logic [29:0]  npc,
  output logic         advance,        // a block was predicted and enqueued
  output bbq_entry_t   bbq_entry,
  output logic         ras_push,
  output logic [29:0]  ras_push_addr,
  output logic         ras_pop
);
  logic [29:0] fall_through;
  logic        taken;
  logic [29:0] predicted;

  assign fall_through = pc + 30'd1;

  always_comb begin
    taken     = 1'b0;
    predicted = fall_through;
    unique case (bbc_entry.btype)
      BT_FT:              begin taken = 1'b0;     predicted = fall_through; end
      BT_B, BT_LOOP:      begin taken = bp_taken; predicted = bp_taken ? bbc_entry.target : fall_through; end
      BT_J, BT_JAL,
      BT_JR, BT_JALR:     begin taken = 1'b1;     predicted = bbc_entry.target; end
      BT_RET:             begin taken = 1'b1;     predicted = ras_top; end
      default:            begin taken = 1'b0;     predicted = fall_through; end
    endcase
  end

  assign advance = !redirect_valid && bbc_hit && bbq_ready;

  always_comb begin
    if (redirect_valid) npc = redirect_pc;
    else if (advance)   npc = predicted;
    else                npc = pc;
  end

  assign bbq_entry = '{pc:         pc,
                       btype:      bbc_entry.btype,
                       iaddr:      instr_addr(pc, bbc_entry.iptr),
                       len:        bbc_entry.len,
                       hints:      bbc_entry.hints,
                       pred_taken: taken,
                       pred_next:  predicted};

  assign ras_push      = advance && is_call(bbc_entry.btype);
  assign ras_push_addr = fall_through;
  assign ras_pop       = advance && (bbc_entry.btype == BT_RET);

endmodule
