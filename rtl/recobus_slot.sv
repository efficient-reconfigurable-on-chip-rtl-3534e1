// recobus_slot: the bus logic inside one resource slot (one bus socket).
//
// A slot holds:
//  * three select generators that are shifted with the same table: one decodes
//    the read address bus (module_select, module_read, module_reset), one the
//    write address bus (module_write) and one the grant address (module_grant);
//  * a fourth select generator, shifted from its own config line, that decodes
//    the interrupt counter and puts the module's interrupt onto the
//    time-multiplexed interrupt chain through a 2:1 multiplexer;
//  * one read chain stage carrying this slot's SLICE bits of the read data;
//  * NB configurable bus-request demultiplexer stages, written while the slot's
//    module is addressed on the read address bus and brq_cfg_we is high;
//  * with MASTER = 1, a second read chain stage of MSLICE bits that carries a
//    master module's outputs towards the static part (its address, byte
//    selects and direction), gated by module_grant.
// All chain paths are combinational; configuration state changes on the rising
// edge. The document draws the select generator, read chain stage, interrupt
// multiplexer and request demultiplexer; using one select generator per
// dedicated write signal follows its LUT count (R * S_DW), and giving the
// interrupt generator its own config_data line is this design's choice so that
// interrupt numbers can differ from module addresses. The master signals are
// shared read signals in the document's sense; gating them with the grant
// decode (rather than with module_read) is this design's choice, so that the
// granted master drives them while the read channel stays free for slaves.
// With MASTER = 0 the master stage is absent, mod_mout is ignored and
// m_chain_out is 0.
module recobus_slot
  import recobus_pkg::*;
#(
  parameter int unsigned SLICE = 8,   // read data bits per slot (B / N)
  parameter int unsigned NB    = 4,   // request chains passing this slot (S_DR / N)
  parameter bit          MASTER = 1'b1,  // build the master signal chain stage
  parameter int unsigned MSLICE = 10   // master signal bits per slot
) (
  input  logic             clk,
  input  logic             pr_init,        // device-level reconfiguration of this slot
  // second-level configuration
  input  logic             cfg_clk_en,
  input  logic             cfg_data,       // select table stream
  input  logic             cfg_irq_data,   // interrupt table stream
  input  logic             brq_cfg_we,
  input  logic [NB-1:0]    brq_cfg_data,
  // forward path from the static part
  input  be_t              rd_be,
  input  logic             bus_read,
  input  be_t              wr_be,
  input  logic             bus_write,
  input  be_t              gnt_be,
  input  be_t              irq_cnt,
  // chains from the slot N (interrupt chain: 1) positions farther away
  input  logic [SLICE-1:0] rd_chain_in,
  input  logic             irq_chain_in,
  input  logic [NB-1:0]    brq_chain_in,
  output logic [SLICE-1:0] rd_chain_out,
  output logic             irq_chain_out,
  output logic [NB-1:0]    brq_chain_out,
  input  logic [MSLICE-1:0] m_chain_in,
  output logic [MSLICE-1:0] m_chain_out,
  // module side
  input  logic [SLICE-1:0] mod_dout,
  input  logic             mod_irq,
  input  logic             mod_brq,
  input  logic [MSLICE-1:0] mod_mout,      // master module: address/byte select/direction part
  output logic             module_reset,
  output logic             module_select,
  output logic             module_read,
  output logic             module_write,
  output logic             module_grant
);

  logic wr_reset, wr_select, gnt_reset, gnt_select, irq_reset, irq_select, irq_drive;
  logic [NB-1:0] brq_connected;

  select_generator u_sg_rd (
    .clk, .pr_init, .cfg_clk_en, .cfg_data,
    .bus_enable(rd_be), .bus_read,
    .module_reset, .module_select, .module_read
  );

  select_generator u_sg_wr (
    .clk, .pr_init, .cfg_clk_en, .cfg_data,
    .bus_enable(wr_be), .bus_read(bus_write),
    .module_reset(wr_reset), .module_select(wr_select), .module_read(module_write)
  );

  select_generator u_sg_gnt (
    .clk, .pr_init, .cfg_clk_en, .cfg_data,
    .bus_enable(gnt_be), .bus_read(1'b1),
    .module_reset(gnt_reset), .module_select(gnt_select), .module_read(module_grant)
  );

  select_generator u_sg_irq (
    .clk, .pr_init, .cfg_clk_en, .cfg_data(cfg_irq_data),
    .bus_enable(irq_cnt), .bus_read(1'b1),
    .module_reset(irq_reset), .module_select(irq_select), .module_read(irq_drive)
  );

  read_chain_stage #(.W(SLICE)) u_rd (
    .sel(module_read), .data_out(mod_dout),
    .chain_in(rd_chain_in), .chain_out(rd_chain_out)
  );

  assign irq_chain_out = irq_drive ? mod_irq : irq_chain_in;

  logic [MSLICE-1:0] m_ignored;
  if (MASTER) begin : g_master
    read_chain_stage #(.W(MSLICE)) u_m (
      .sel(module_grant), .data_out(mod_mout),
      .chain_in(m_chain_in), .chain_out(m_chain_out)
    );
    assign m_ignored = '0;
  end else begin : g_slave
    assign m_chain_out = '0;
    assign m_ignored   = mod_mout ^ m_chain_in;
  end

  // The request configuration flip-flops are enabled by the slot's read select
  // generator: the host addresses the module on rd_be while pulsing brq_cfg_we.
  logic brq_cfg_en;
  assign brq_cfg_en = brq_cfg_we & module_select & ~module_reset;

  for (genvar k = 0; k < NB; k++) begin : g_brq
    brq_demux_stage u_brq (
      .clk, .pr_init, .cfg_en(brq_cfg_en), .cfg_data(brq_cfg_data[k]),
      .bus_request(mod_brq), .chain_in(brq_chain_in[k]),
      .chain_out(brq_chain_out[k]), .connected(brq_connected[k])
    );
  end

  // The reset/select outputs of the write, grant and interrupt generators are
  // equal in state to the read generator's (same table, same shifts) or only
  // used inside their module_read term; they have no further consumer here.
  logic unused;
  assign unused = ^{wr_reset, wr_select, gnt_reset, gnt_select, irq_reset, irq_select, brq_connected,
                    m_ignored};

endmodule
