// config_interface: system-level configuration interface of the bus.
//
// After a module has been loaded by partial reconfiguration its slots' select
// generators are in shift mode. The host hands this block two 16-bit tables:
// the select table (module address decode) and the interrupt table. On start
// the block drives config_data/cfg_irq_data and 16 config_clock pulses
// (cfg_clk_en), one bit per clock, table bit 15 first and bit 0 last, so that
// table bit i ends in entry Qi. Bit 15 must be 0: it is the lock bit. busy is
// high during the 16 shift cycles; done pulses for one cycle afterwards.
// With CASCADE = 1 (select generators with the extra lock flip-flop) a lock
// bit 0 is sent first and then all 16 table bits, 17 cycles in all, and
// table bit 15 is a normal entry.
// Function after the document; the serial engine itself is this design's own.
module config_interface
  import recobus_pkg::*;
#(
  parameter bit CASCADE = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  lut_t sel_table,
  input  lut_t irq_table,
  output logic cfg_clk_en,
  output logic cfg_data,
  output logic cfg_irq_data,
  output logic busy,
  output logic done
);

  localparam int unsigned DEPTH = LUT_DEPTH + (CASCADE ? 1 : 0);

  logic [DEPTH-1:0] sel_sr, irq_sr;
  logic [BE_W:0]    cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_sr <= '0;
      irq_sr <= '0;
      cnt    <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          sel_sr <= (DEPTH)'(sel_table);   // lock bit 0 on top when cascaded
          irq_sr <= (DEPTH)'(irq_table);
          cnt    <= '0;
          busy   <= 1'b1;
        end
      end else begin
        sel_sr <= {sel_sr[DEPTH-2:0], 1'b0};
        irq_sr <= {irq_sr[DEPTH-2:0], 1'b0};
        cnt    <= cnt + 1'b1;
        if (cnt == (BE_W+1)'(DEPTH - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign cfg_clk_en   = busy;
  assign cfg_data     = sel_sr[DEPTH-1];
  assign cfg_irq_data = irq_sr[DEPTH-1];

  // Shifting a table whose lock bit is 1 would never release the module.
  always_ff @(posedge clk) begin
    if (!CASCADE && start && !busy)
      assert (!sel_table[LUT_DEPTH-1] && !irq_table[LUT_DEPTH-1])
        else $error("config_interface: lock bit (bit 15) of a table must be 0");
  end

endmodule
