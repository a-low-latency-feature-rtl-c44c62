// tb_orb_top_full: end-to-end test of the accelerator at its default size,
// one 1920 x 1080 frame (scales 1920x1080, 1280x720, 853x480); see
// orb_top_harness for the checks.
module tb_orb_top_full;
  orb_top_harness #(.W(1920), .H(1080), .FULL(1), .NRECT(30), .WATCHDOG(20000000)) h ();
endmodule
