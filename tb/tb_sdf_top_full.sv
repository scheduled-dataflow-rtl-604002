// tb_sdf_top_full: end-to-end test of sdf_top at its default sizes (16
// register sets, 256 frames of 16 words, 1024-word instruction memory), eight
// parent threads each spawning the worked example thread.
module tb_sdf_top_full;
  tb_sdf_harness #(.NUM_RS(16), .QDEPTH(8), .N_INST(8), .DEFAULTS(1'b1)) h ();
endmodule
