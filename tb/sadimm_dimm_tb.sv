// sadimm_dimm_tb: end-to-end sparse attention on a reduced DIMM (2 ranks x
// 2 chips x 2 bank-groups x 2 banks, 16-word DRAM rows); see sadimm_flow.
module sadimm_dimm_tb;
  sadimm_flow #(.FULL(1'b0)) flow ();
endmodule
