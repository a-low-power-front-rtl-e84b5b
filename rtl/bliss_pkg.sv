// bliss_pkg: types and constants shared by the BLISS front-end.
//
// A BLISS program has two code sections: 32-bit basic block descriptors
// (BBDs) and the plain instructions they point at. The program counter only
// ever addresses descriptors. The descriptor fields and their widths
// (type 4, offset 8, length 4, instruction pointer 13, hints 3) and the eight
// block types follow the BLISS descriptor format. The bit order inside the
// word (type in the top bits, hints in the bottom bits), the numeric type
// codes and the address arithmetic below are this design's choices.
package bliss_pkg;

  // Block types: kind of control-flow operation ending the block.
  typedef enum logic [3:0] {
    BT_FT   = 4'd0,  // fall-through, no branch
    BT_B    = 4'd1,  // conditional PC-relative branch
    BT_J    = 4'd2,  // PC-relative jump
    BT_JAL  = 4'd3,  // PC-relative call
    BT_JR   = 4'd4,  // register-indirect jump
    BT_JALR = 4'd5,  // register-indirect call
    BT_RET  = 4'd6,  // return
    BT_LOOP = 4'd7   // loop-closing conditional branch
  } bb_type_e;

  localparam int unsigned TYPE_W   = 4;
  localparam int unsigned OFFSET_W = 8;
  localparam int unsigned LEN_W    = 4;
  localparam int unsigned IPTR_W   = 13;
  localparam int unsigned HINT_W   = 3;

  // Instruction words per L1 line (32-byte lines, 32-bit instructions).
  localparam int unsigned LINE_WORDS = 8;
  localparam int unsigned LINE_BITS  = LINE_WORDS * 32;
  localparam int unsigned LINE_OFF_W = 3;   // word offset inside a line

  typedef logic [LINE_BITS-1:0] line_t;

  // Descriptor as it sits in memory, most significant field first.
  typedef struct packed {
    bb_type_e              btype;
    logic [OFFSET_W-1:0]   offset;   // signed displacement, in descriptors
    logic [LEN_W-1:0]      len;      // instructions in the block, 0..15
    logic [IPTR_W-1:0]     iptr;     // instruction word address bits [14:2]
    logic [HINT_W-1:0]     hints;    // compiler hints
  } bbd_t;

  // Descriptor as held in the BB-cache: the target is pre-computed at refill.
  typedef struct packed {
    bb_type_e              btype;
    logic [29:0]           target;   // target descriptor word address
    logic [LEN_W-1:0]      len;
    logic [IPTR_W-1:0]     iptr;
    logic [HINT_W-1:0]     hints;
  } bbc_entry_t;

  // One basic block queue entry: what instruction fetch and the back-end
  // need about one predicted block.
  typedef struct packed {
    logic [29:0]           pc;          // descriptor word address
    bb_type_e              btype;
    logic [29:0]           iaddr;       // first instruction, word address
    logic [LEN_W-1:0]      len;
    logic [HINT_W-1:0]     hints;
    logic                  pred_taken;
    logic [29:0]           pred_next;   // predicted next descriptor address
  } bbq_entry_t;

  // One packet of instructions handed to the back-end: the words of one
  // block that lie in one I-cache line.
  typedef struct packed {
    logic [29:0]           pc;          // descriptor the words belong to
    logic [29:0]           iaddr;       // word address of word 0
    logic [3:0]            count;       // valid words, 0..8
    logic                  last;        // last packet of the block
    logic [29:0]           pred_next;   // predicted next descriptor address
    logic [LINE_BITS-1:0]  words;       // word i in bits [32*i +: 32]
  } fetch_pkt_t;

  // Hint usage for the L1 instruction cache.
  typedef enum logic [1:0] {
    HINTS_OFF        = 2'd0,
    HINTS_EXCLUDE    = 2'd1,  // hints[0]=1: do not allocate the block in L1
    HINTS_REDISTRIBUTE = 2'd2 // hints fold into the I-cache set index
  } hint_mode_e;

  // L2 requesters.
  typedef enum logic [1:0] {
    L2_SRC_FETCH = 2'd0,
    L2_SRC_BBC   = 2'd1,
    L2_SRC_PF    = 2'd2
  } l2_src_e;

  // One-cycle event strobes brought out of the front-end for counting.
  typedef struct packed {
    logic bbc_hit;       // a block was predicted (descriptor found)
    logic bbc_miss;      // descriptor lookup missed, refill started
    logic bbc_refill;    // descriptor(s) written from L2
    logic bbq_full;      // BBQ full, prediction waits
    logic redirect;      // misprediction recovery
    logic ras_push;
    logic ras_pop;
    logic pred_taken;    // conditional block predicted taken
    logic ic_miss;       // demand I-cache miss
    logic pb_hit;        // demand miss served by the prefetch buffer
    logic probe;         // prefetch probe of the I-cache tags
    logic prefetch;      // prefetch sent to L2
    logic line_reuse;    // block served from the last line, no cache access
  } fe_events_t;

  // Word address of the instructions of a block: the low bits come from
  // the descriptor's pointer, the upper bits from the descriptor's own address.
  function automatic logic [29:0] instr_addr(input logic [29:0] pc,
                                             input logic [IPTR_W-1:0] iptr);
    return {pc[29:IPTR_W], iptr};
  endfunction

  // Target of a PC-relative block: descriptor address plus signed offset.
  function automatic logic [29:0] rel_target(input logic [29:0] pc,
                                             input logic [OFFSET_W-1:0] off);
    return pc + {{(30-OFFSET_W){off[OFFSET_W-1]}}, off};
  endfunction

  // BB-cache form of a descriptor fetched from address pc.
  function automatic bbc_entry_t bbd_to_entry(input logic [29:0] pc, input bbd_t d);
    bbc_entry_t e;
    e.btype  = d.btype;
    e.target = rel_target(pc, d.offset);
    e.len    = d.len;
    e.iptr   = d.iptr;
    e.hints  = d.hints;
    return e;
  endfunction

  // Types whose direction comes from the predictor.
  function automatic logic is_cond(input bb_type_e t);
    return (t == BT_B) || (t == BT_LOOP);
  endfunction

  // Types that push a return address.
  function automatic logic is_call(input bb_type_e t);
    return (t == BT_JAL) || (t == BT_JALR);
  endfunction

endpackage
