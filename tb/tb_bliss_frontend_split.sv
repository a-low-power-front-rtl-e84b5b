// tb_bliss_frontend_split: end-to-end run of the front-end with a separate
// BB-cache (UNIFIED=0) instead of descriptors held in the shared cache;
// see frontend_harness.
module tb_bliss_frontend_split;
  frontend_harness #(.UNIFIED(1'b0), .OUTER(30)) h ();
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
