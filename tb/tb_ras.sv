// tb_ras: self-checking test of the return address stack.
// Pushes and pops against a reference queue, checks LIFO order, the empty
// flag and that overflowing the 8 entries keeps the 8 most recent addresses.
module tb_ras;
  logic clk = 0, rst_n = 0;
  logic push, pop, empty;
  logic [29:0] push_addr, top;
  int checks = 0, failures = 0;
  logic [29:0] ref_q [$];

  ras #(.DEPTH(8)) dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic do_push(input logic [29:0] a);
    push = 1; push_addr = a; @(posedge clk); #1 push = 0;
    ref_q.push_back(a);
    if (ref_q.size() > 8) void'(ref_q.pop_front());
    check(top == a, "top after push");
  endtask

  task automatic do_pop();
    logic [29:0] e;
    check(!empty && ref_q.size() > 0, "not empty before pop");
    e = ref_q.pop_back();
    check(top == e, $sformatf("top %h expected %h", top, e));
    pop = 1; @(posedge clk); #1 pop = 0;
  endtask

  initial begin
    push = 0; pop = 0; push_addr = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    check(empty, "empty after reset");
    for (int i = 1; i <= 3; i++) do_push(30'(i * 16));
    repeat (3) do_pop();
    check(empty, "empty after balanced pops");
    for (int i = 0; i < 11; i++) do_push(30'h1000 + 30'(i));   // overflow by 3
    repeat (8) do_pop();
    check(empty, "empty after 8 pops");
    for (int r = 0; r < 200; r++) begin
      if (ref_q.size() == 0 || (ref_q.size() < 8 && $urandom_range(1) == 1)) do_push(30'($urandom));
      else do_pop();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
