// End-to-end test of the EMIND-II array at its full 16 x 16 PE size (8 x 8 chips), with
// the TDNN of the published evaluation: 15 input features over 20 frames, an 8-frame
// first-layer window, 15 hidden neurons, a 7-frame second-layer window and 20 output
// classes. The recognition pass is followed by the output-layer learning step. The
// emind2 top inside tdnn_bench keeps its default parameters. See tdnn_bench.
module tb_emind2_full;
  tdnn_bench #(.LEARN(1'b1)) u_bench ();
endmodule
