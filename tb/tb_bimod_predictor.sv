// tb_bimod_predictor: self-checking test of the bimodal predictor.
// Checks the reset state (not taken), counter saturation in both
// directions, hysteresis (one opposite outcome does not flip a strong
// counter), independence of entries and aliasing of PCs 256 apart.
module tb_bimod_predictor;
  logic clk = 0, rst_n = 0;
  logic [29:0] pred_pc, upd_pc;
  logic pred_taken, upd_valid, upd_taken;
  int checks = 0, failures = 0;
  int model [256];

  bimod_predictor dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic train(input logic [29:0] pc, input logic t);
    upd_pc = pc; upd_taken = t; upd_valid = 1;
    @(posedge clk); #1 upd_valid = 0;
    if (t && model[pc[7:0]] < 3) model[pc[7:0]]++;
    if (!t && model[pc[7:0]] > 0) model[pc[7:0]]--;
  endtask

  task automatic check_pred(input logic [29:0] pc);
    pred_pc = pc; #1;
    checks++;
    if (pred_taken !== (model[pc[7:0]] >= 2)) begin
      failures++; $display("FAIL: pc %h predicted %b, model ctr %0d", pc, pred_taken, model[pc[7:0]]);
    end
  endtask

  initial begin
    upd_valid = 0; upd_pc = 0; upd_taken = 0; pred_pc = 0;
    foreach (model[i]) model[i] = 1;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < 256; i++) check_pred(30'(i));
    train(30'h5, 1); check_pred(30'h5);          // 1 -> 2: taken
    train(30'h5, 1); train(30'h5, 1); train(30'h5, 1);
    check_pred(30'h5);
    train(30'h5, 0); check_pred(30'h5);          // 3 -> 2: still taken
    train(30'h5, 0); check_pred(30'h5);          // not taken
    check_pred(30'h105);                         // aliases entry 5
    train(30'h6, 0); train(30'h6, 0); check_pred(30'h6);
    train(30'h6, 1); check_pred(30'h6);
    for (int n = 0; n < 2000; n++) begin
      train(30'($urandom), 1'($urandom));
      check_pred(30'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
