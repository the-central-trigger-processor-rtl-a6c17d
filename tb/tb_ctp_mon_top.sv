// tb_ctp_mon_top: end-to-end test of the whole module with its default parameters,
// programmed for turns of 8 bunches (BCID max = 7) and external FIFOs of 256 words
// so that a readout overfills them and the Core FIFOs take the rest. See
// ctp_mon_harness for the sequence and the checks.
module tb_ctp_mon_top;
  ctp_mon_harness #(.NB(8), .IDT_DEPTH(256), .EXTRA(1), .WATCHDOG(200000)) h ();
endmodule
