// tb_sdf_top: end-to-end test of sdf_top with only four register sets and
// one-entry continuation queues, so that enabled threads must wait for a free
// register set and a finishing EP thread must wait for room in the full
// poststore queue (fork stall). See tb_sdf_harness for the program.
module tb_sdf_top;
  tb_sdf_harness #(.NUM_RS(4), .QDEPTH(1), .N_INST(8), .DEFAULTS(1'b0)) h ();
endmodule
