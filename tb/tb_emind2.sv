// End-to-end test of the EMIND-II array at a reduced size: a 4 x 4 PE torus (2 x 2 chips)
// runs a TDNN with 3 input features, 3 hidden neurons and 5 output classes, so two of
// the three output columns serve two classes each. The recognition pass is followed by
// the output-layer learning step. See tdnn_bench for the mapping.
module tb_emind2;
  tdnn_bench #(.M(4), .W0(3), .W1(3), .T0(8), .N(5), .MAX_CYCLES(200000), .LEARN(1'b1)) u_bench ();
endmodule
