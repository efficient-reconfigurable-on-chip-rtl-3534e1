// select_generator: reconfigurable module select generator of one resource slot.
//
// A 16-entry table held in a look-up table that can also run as a shift
// register. Partial reconfiguration of the slot (pr_init) fills the table with
// ones. Entry Q15 doubles as the shift enable and as module_reset: while it is 1
// the slot's module is held in reset and each config_clock pulse (modelled here
// as the clock enable cfg_clk_en on the system clock) shifts config_data into
// Q0 and moves every entry one place towards Q15. The first bit shifted is the
// lock bit 0; after 16 shifts it reaches Q15, which stops the shifting and
// releases module_reset. Afterwards the table is a decoder:
// module_select = Q[bus_enable]. Address 4'hF reads Q15 = 0 and selects nobody,
// so up to 15 module addresses exist. module_read = bus_read AND module_select
// AND NOT module_reset.
//
// The table contents, shift enable, lock mechanism and the outputs follow the
// document's select generator. The bit order is read from its examples: the
// written table string lists Q0 first, and the bit shifted first ends in Q15.
// Using the system clock with an enable instead of a separate config clock is
// this design's choice.
//
// CASCADE = 1 adds the document's optional cascade flip-flop behind Q15: the
// flip-flop becomes the lock bit and module_reset, the table needs 17 shifts
// (lock bit first) and all 16 addresses, 4'hF included, can select a module.
// The bus uses CASCADE = 0, where 4'hF is its idle ("nobody") address.
// Timing: the outputs are combinational from bus_enable, bus_read and the
// table; the table changes on the rising clock edge.
module select_generator
  import recobus_pkg::*;
#(
  parameter bit CASCADE = 1'b0   // extra lock flip-flop behind Q15
) (
  input  logic clk,
  input  logic pr_init,       // partial reconfiguration of this slot: table <= all ones
  input  logic cfg_clk_en,    // one config_clock pulse
  input  logic cfg_data,      // config_data, shifted into Q0
  input  be_t  bus_enable,    // module address on the bus
  input  logic bus_read,      // shared read (or write) strobe
  output logic module_reset,  // Q15: 1 until a table has been shifted in
  output logic module_select, // table entry addressed by bus_enable
  output logic module_read    // bus_read qualified by select, not in reset
);

  localparam int unsigned DEPTH = LUT_DEPTH + (CASCADE ? 1 : 0);

  logic [DEPTH-1:0] q;   // q[15:0] = LUT entries, q[16] = cascade flip-flop

  always_ff @(posedge clk) begin
    if (pr_init)
      q <= '1;
    else if (cfg_clk_en && q[DEPTH-1])
      q <= {q[DEPTH-2:0], cfg_data};
  end

  assign module_reset  = q[DEPTH-1];
  lut_t lut;
  assign lut           = q[LUT_DEPTH-1:0];
  assign module_select = lut[bus_enable];
  assign module_read   = bus_read & module_select & ~module_reset;

endmodule
