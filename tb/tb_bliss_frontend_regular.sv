// tb_bliss_frontend_regular: end-to-end run of the front-end with the
// regular (large) array sizes: 32 KB 32-way instruction cache and a 64-set
// 4-way separate BB-cache. The test program then fits in the cache, so only
// cold instruction misses are expected; see frontend_harness.
module tb_bliss_frontend_regular;
  frontend_harness #(.UNIFIED(1'b0), .IC_SIZE(32768), .IC_WAYS(32),
                   .BBC_SETS(64), .BBC_WAYS(4), .FITS_L1(1'b1), .OUTER(30)) h ();
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
