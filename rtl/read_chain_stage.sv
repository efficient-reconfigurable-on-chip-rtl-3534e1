// read_chain_stage: one stage of a distributed read multiplexer chain.
//
// The module's data_out is ANDed with the slot's select signal and ORed onto the
// chain coming from the slot N positions farther from the master. A chain ends
// at the dummy slot with a constant 0, so the word reaching the master is the
// OR of all selected modules' data; the select generators guarantee that at
// most one module is selected. On the FPGA each bit of the stage fits into one
// look-up table, exactly as the document draws it. Purely combinational.
module read_chain_stage #(
  parameter int unsigned W = 8       // bits of this slot's share of the read data
) (
  input  logic         sel,          // module_read of the slot's select generator
  input  logic [W-1:0] data_out,     // data driven by the module in this slot
  input  logic [W-1:0] chain_in,     // chain from the slot N positions farther away
  output logic [W-1:0] chain_out     // chain towards the master
);

  assign chain_out = chain_in | (data_out & {W{sel}});

endmodule
