// sadimm_dimm_full_tb: the same end-to-end run as sadimm_dimm_tb on a DIMM with
// every parameter at its default (2 ranks x 8 chips x 8 bank-groups x 4 banks,
// 256 dimensions per rank, 32 tokens); see sadimm_flow.
module sadimm_dimm_full_tb;
  sadimm_flow #(.FULL(1'b1)) flow ();
endmodule
