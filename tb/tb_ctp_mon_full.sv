// tb_ctp_mon_full: the whole module at full size: 160 inputs, 3564 bunches per turn
// (BCID max left at its power-up value), four external FIFOs of 131,072 words. A
// 5-turn window is integrated and all 4 x 142,680 words are read out over VME; the
// external FIFOs fill up and the Core FIFOs hold the remaining 11,608 words each.
// See ctp_mon_harness for the sequence and the checks.
module tb_ctp_mon_full;
  ctp_mon_harness #(.NB(3564), .IDT_DEPTH(131072), .EXTRA(0), .WATCHDOG(8000000)) h ();
endmodule
