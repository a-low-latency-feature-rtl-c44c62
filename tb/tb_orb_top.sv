// tb_orb_top: end-to-end test of the accelerator on a reduced 192 x 144
// frame (scales 192x144, 128x96, 85x64); see orb_top_harness for the checks.
module tb_orb_top;
  orb_top_harness #(.W(192), .H(144), .FULL(0), .NRECT(12), .WATCHDOG(3000000)) h ();
endmodule
