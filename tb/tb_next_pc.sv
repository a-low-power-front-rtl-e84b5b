// tb_next_pc: self-checking test of next-descriptor selection.
// For every block type, with the predictor saying taken and not taken, it
// compares the next PC, the RAS push/pop and the BBQ entry with a reference
// written from the selection rules; then checks redirect priority and the
// hold on a BB-cache miss or a full BBQ. Random stimulus follows.
module tb_next_pc;
  import bliss_pkg::*;
  logic [29:0] pc, ras_top, redirect_pc, npc, ras_push_addr;
  logic bbc_hit, bp_taken, bbq_ready, redirect_valid, advance, ras_push, ras_pop;
  bbc_entry_t bbc_entry;
  bbq_entry_t bbq_entry;
  int checks = 0, failures = 0;
  logic clk = 0;

  next_pc dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_case();
    logic [29:0] exp_pc;
    logic exp_adv, exp_push, exp_pop, exp_taken;
    logic [29:0] pred;
    #1;
    exp_taken = 0; pred = pc + 1;
    case (bbc_entry.btype)
      BT_B, BT_LOOP: begin exp_taken = bp_taken; if (bp_taken) pred = bbc_entry.target; end
      BT_J, BT_JAL, BT_JR, BT_JALR: begin exp_taken = 1; pred = bbc_entry.target; end
      BT_RET: begin exp_taken = 1; pred = ras_top; end
      default: ;
    endcase
    exp_adv  = !redirect_valid && bbc_hit && bbq_ready;
    exp_pc   = redirect_valid ? redirect_pc : (exp_adv ? pred : pc);
    exp_push = exp_adv && (bbc_entry.btype == BT_JAL || bbc_entry.btype == BT_JALR);
    exp_pop  = exp_adv && bbc_entry.btype == BT_RET;
    check(npc == exp_pc, $sformatf("npc %h exp %h type %0d", npc, exp_pc, bbc_entry.btype));
    check(advance == exp_adv, "advance");
    check(ras_push == exp_push && ras_pop == exp_pop, "ras push/pop");
    if (exp_push) check(ras_push_addr == pc + 1, "return address");
    if (exp_adv) begin
      check(bbq_entry.pc == pc && bbq_entry.pred_next == pred && bbq_entry.pred_taken == exp_taken,
            "bbq entry prediction");
      check(bbq_entry.iaddr == {pc[29:13], bbc_entry.iptr} && bbq_entry.len == bbc_entry.len &&
            bbq_entry.hints == bbc_entry.hints, "bbq entry fetch fields");
    end
  endtask

  initial begin
    pc = 30'h2000_0100; ras_top = 30'h777; redirect_pc = 30'h55; redirect_valid = 0;
    bbc_hit = 1; bbq_ready = 1; bp_taken = 0;
    bbc_entry = '{btype: BT_FT, target: 30'h400, len: 4'd5, iptr: 13'h1234, hints: 3'd6};
    for (int t = 0; t < 8; t++)
      for (int b = 0; b < 2; b++) begin
        bbc_entry.btype = bb_type_e'(t); bp_taken = 1'(b);
        run_case();
      end
    // fixed values for the main rules
    bbc_entry.btype = BT_B; bp_taken = 1; #1;
    check(npc == 30'h400, "taken branch goes to target");
    bp_taken = 0; #1;
    check(npc == 30'h2000_0101, "not-taken branch falls through");
    bbc_entry.btype = BT_RET; #1;
    check(npc == 30'h777 && ras_pop, "return uses RAS");
    redirect_valid = 1; #1;
    check(npc == 30'h55 && !advance && !ras_pop, "redirect wins");
    redirect_valid = 0; bbc_hit = 0; #1;
    check(npc == pc && !advance, "hold on miss");
    bbc_hit = 1; bbq_ready = 0; #1;
    check(npc == pc && !advance, "hold on full BBQ");
    bbq_ready = 1;
    for (int n = 0; n < 3000; n++) begin
      pc = 30'($urandom); ras_top = 30'($urandom); redirect_pc = 30'($urandom);
      redirect_valid = ($urandom_range(7) == 0); bbc_hit = ($urandom_range(5) != 0);
      bbq_ready = ($urandom_range(5) != 0); bp_taken = 1'($urandom);
      bbc_entry = '{btype: bb_type_e'($urandom_range(7)), target: 30'($urandom),
                    len: 4'($urandom), iptr: 13'($urandom), hints: 3'($urandom)};
      run_case();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
