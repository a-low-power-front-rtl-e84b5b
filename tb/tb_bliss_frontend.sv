// tb_bliss_frontend: end-to-end run of the front-end in its default
// configuration (unified descriptor/instruction cache, prefetching, hint
// redistribution, all sizes at their defaults); see frontend_harness.
module tb_bliss_frontend;
  frontend_harness #(.OUTER(30)) h ();
  initial begin : watchdog
    repeat (200000) @(posedge h.clk);
    h.failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", h.checks, h.failures);
    $finish;
  end
  initial begin
    wait (h.done);
    $display("TB_RESULT checks=%0d failures=%0d", h.checks, h.failures);
    $finish;
  end
endmodule
