// End-to-end testbench of videoware_top at its default parameters with
// a 16 x 12 frame, small enough to run in a fraction of a second. See videoware_e2e_run for what is driven and checked.
module tb_videoware_top;
  videoware_e2e_run #(.W(16), .H(12)) run ();
endmodule
