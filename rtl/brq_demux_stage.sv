// brq_demux_stage: configurable bus-request demultiplexer stage of one slot.
//
// A configuration flip-flop chooses between passing the request chain coming
// from the slot N positions farther from the master (0) and putting the slot
// module's bus_request onto the chain (1). The flip-flop is written from one
// config_data line while cfg_en, the slot's enable generator output, is high;
// partial reconfiguration of the slot (pr_init) clears it. Writing a one-hot
// word over the config_data lines into all slots of a module therefore routes
// its request into exactly one chain. Structure after the document; the clear
// on pr_init (modelling the flip-flop's initial value in the bitstream) is this
// design's choice. The chain path is combinational; the flip-flop changes on
// the rising edge.
module brq_demux_stage (
  input  logic clk,
  input  logic pr_init,      // partial reconfiguration of the slot: flip-flop <= 0
  input  logic cfg_en,       // config enable from the slot's enable generator
  input  logic cfg_data,     // this stage's config_data line
  input  logic bus_request,  // request of the module occupying the slot
  input  logic chain_in,     // request chain from the slot N positions farther away
  output logic chain_out,    // request chain towards the arbiter
  output logic connected     // configuration flip-flop state
);

  always_ff @(posedge clk) begin
    if (pr_init)     connected <= 1'b0;
    else if (cfg_en) connected <= cfg_data;
  end

  assign chain_out = connected ? bus_request : chain_in;

endmodule
