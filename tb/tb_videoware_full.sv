// End-to-end testbench of videoware_top at its default parameters with
// a full 640 x 480 frame, the largest the default MAX_WIDTH holds, for each detector. See videoware_e2e_run for what is driven and checked.
module tb_videoware_full;
  videoware_e2e_run #(.W(640), .H(480)) run ();
endmodule
