// tb_bliss_frontend_exclude: end-to-end run of the front-end with the
// "exclude from L1" hint mode; see frontend_harness.
module tb_bliss_frontend_exclude;
  frontend_harness #(.HINT_MODE(bliss_pkg::HINTS_EXCLUDE), .OUTER(30)) h ();
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
