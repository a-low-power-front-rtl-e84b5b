// tb_l2_arbiter: self-checking test of the L2 port arbiter.
// Random requests from the three sources against a small L2 stand-in with
// random latency: checks fixed priority (fetch, then descriptor, then
// prefetch), one outstanding request, the address passed on, and that each
// response goes back only to the source that was granted.
module tb_l2_arbiter;
  import bliss_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [2:0] req, gnt, resp_valid;
  logic [29:0] addr [3];
  line_t resp_line, l2_resp_line;
  logic l2_req_valid, l2_req_ready, l2_resp_valid;
  logic [29:0] l2_req_addr;
  int checks = 0, failures = 0;
  int pending = -1, wait_cnt = 0, grants [3] = '{0, 0, 0};
  logic [29:0] pend_addr;
  logic [2:0] g;

  l2_arbiter dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    req = 0; addr = '{0, 0, 0}; l2_req_ready = 0; l2_resp_valid = 0; l2_resp_line = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      // requesters keep a request until granted
      for (int i = 0; i < 3; i++)
        if (!req[i] && $urandom_range(3) == 0) begin req[i] = 1; addr[i] = 30'($urandom); end
      l2_req_ready  = $urandom_range(3) != 0;
      l2_resp_valid = (pending >= 0) && wait_cnt == 0;
      l2_resp_line  = {8{2'b0, pend_addr}};
      #1;
      // expected grant
      if (pending < 0 && req != 0 && l2_req_ready) begin
        int e;
        e = req[0] ? 0 : (req[1] ? 1 : 2);
        check(gnt == 3'(1 << e), $sformatf("grant %b for req %b", gnt, req));
        check(l2_req_addr == addr[e], "address passed to L2");
      end else begin
        check(gnt == 0, "no grant while busy or not ready");
      end
      check(l2_req_valid == (pending < 0 && req != 0), $sformatf("request valid only when idle n=%0d pend=%0d busy=%b", n, pending, dut.busy_q));
      if (l2_resp_valid) check(resp_valid == 3'(1 << pending) && resp_line == l2_resp_line, "response routed");
      else check(resp_valid == 0, "no response");
      g = gnt;
      @(posedge clk); #1;
      if (l2_resp_valid) pending = -1;
      else if (pending >= 0) wait_cnt--;
      for (int i = 0; i < 3; i++)
        if (g[i]) begin
          pending = i; pend_addr = addr[i]; wait_cnt = $urandom_range(4); req[i] = 0; grants[i]++;
        end
    end
    for (int i = 0; i < 3; i++) check(grants[i] > 0, $sformatf("source %0d granted", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
