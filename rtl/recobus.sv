// recobus: reconfigurable on-chip bus macro with R resource slots.
//
// The bus runs horizontally from the static part (slot 0 side) to a dummy
// termination after slot R-1. Every slot carries identical logic
// (recobus_slot), so a module can be loaded into any run of consecutive slots
// and keeps working at any position.
//
//  * Shared write signals (write address/data, byte selects, read address) are
//    plain wires to every slot: modules connect to them directly, without any
//    per-slot logic.
//  * Dedicated write signals (module select, read, write, grant) come from
//    per-slot select generators that decode module addresses on rd_be, wr_be
//    and gnt_be. Their tables are shifted in over cfg_data/cfg_clk_en after a
//    partial reconfiguration (pr_init) of the slot.
//  * Shared read data uses N interleaved distributed read multiplexer chains:
//    slot i feeds chain i mod N and its chain input comes from slot i+N. Each
//    slot carries SLICE = B/N bits; a module of w*SLICE bits spans >= w slots.
//    align_regfile/align_mux rotate the N chain outputs into master order.
//  * Interrupts use one time-multiplexed chain (irq_capture), bus requests
//    S_DR configurable demultiplexer chains interleaved like the read chains
//    (chain c passes the slots i with i mod N == c mod N).
//  * MASTER = 1 (every slot can host a master): a master's further outputs,
//    address (AW), byte selects (B/8) and direction (1), return over N more
//    interleaved chains of MSLICE bits per slot, selected by the grant decode
//    and aligned by the offset of the module on gnt_be (a second read port of
//    the offset file, built as a copy with the same write port). The master's
//    write data returns over the ordinary read data chains when the static
//    part reads the master's address on rd_be; together B + AW + B/8 + 1
//    shared read signals. This path is not pipelined.
//
// Read timing: with PIPELINE = 0 rd_data is combinational from rd_be, rd_addr
// and bus_read (the unpipelined mode of the demonstrator). With PIPELINE = 1 a
// register sits between the forward path and the read chains and rd_data
// belongs to the request of the previous cycle: one more cycle of latency, one
// transfer per cycle. The request-configuration strobe travels with the read
// address through the same register, since it uses the read select decode.
// The chain structure, pipelining choice and signal set
// follow the document; port names, the one-bit-per-slot interrupt chain feed
// and the exact enable for the request configuration are this design's own.
module recobus
  import recobus_pkg::*;
#(
  parameter int unsigned B        = 32,  // data word width
  parameter int unsigned AW       = 32,  // address width
  parameter int unsigned R        = 32,  // resource slots
  parameter int unsigned N        = 4,   // interleaved chains
  parameter int unsigned S_DR     = 16,  // bus-request lines (dedicated read signals)
  parameter int unsigned M        = 15,  // time-multiplexed interrupt lines
  parameter bit          PIPELINE = 1'b0,
  parameter bit          MASTER   = 1'b1,  // slots can host masters
  localparam int unsigned SLICE   = B / N,
  localparam int unsigned MOUT_W  = AW + B / 8 + 1,           // master address, byte selects, direction
  localparam int unsigned MSLICE  = (MOUT_W + N - 1) / N,
  localparam int unsigned NB      = S_DR / N,
  localparam int unsigned OFF_W   = (N > 1) ? $clog2(N) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // device-level reconfiguration of slots (one bit per slot)
  input  logic [R-1:0]                pr_init,
  // second-level configuration
  input  logic                        cfg_clk_en,
  input  logic                        cfg_data,
  input  logic                        cfg_irq_data,
  input  logic                        brq_cfg_we,
  input  logic [S_DR-1:0]             brq_cfg_data,
  input  logic                        align_we,
  input  be_t                         align_waddr,
  input  logic [OFF_W-1:0]            align_wdata,
  // master read channel
  input  be_t                         rd_be,
  input  logic [AW-1:0]               rd_addr,
  input  logic                        bus_read,
  output logic [B-1:0]                rd_data,
  // master write channel
  input  be_t                         wr_be,
  input  logic [AW-1:0]               wr_addr,
  input  logic [B-1:0]                wr_data,
  input  logic [B/8-1:0]              byte_sel,
  input  logic                        bus_write,
  // arbiter side
  input  be_t                         gnt_be,
  output logic [S_DR-1:0]             brq_lines,
  output logic [M-1:0]                irq_lines,
  // granted master's shared read signals (0 with MASTER = 0)
  output logic [AW-1:0]               m_addr,
  output logic [B/8-1:0]              m_byte_sel,
  output logic                        m_write,
  // slot side: shared write signals
  output logic [AW-1:0]               s_rd_addr,
  output logic [AW-1:0]               s_wr_addr,
  output logic [B-1:0]                s_wr_data,
  output logic [B/8-1:0]              s_byte_sel,
  // slot side: per-slot signals
  input  logic [R-1:0][SLICE-1:0]     slot_dout,
  input  logic [R-1:0]                slot_irq,
  input  logic [R-1:0]                slot_brq,
  input  logic [R-1:0][MSLICE-1:0]    slot_mout,
  output logic [R-1:0]                slot_reset,
  output logic [R-1:0]                slot_select,
  output logic [R-1:0]                slot_read,
  output logic [R-1:0]                slot_write,
  output logic [R-1:0]                slot_grant
);

  // ---------------- forward path (optional pipeline register) -------------
  be_t              f_rd_be;
  logic             f_bus_read;
  logic [OFF_W-1:0] off_now, f_off;
  logic             f_brq_cfg_we;
  logic [S_DR-1:0]  f_brq_cfg_data;

  align_regfile #(.N(N), .OFF_W(OFF_W)) u_regfile (
    .clk, .rst_n, .we(align_we), .waddr(align_waddr), .wdata(align_wdata),
    .raddr(rd_be), .rdata(off_now)
  );

  if (PIPELINE) begin : g_pipe
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        f_rd_be    <= BE_NONE;
        f_bus_read <= 1'b0;
        f_off      <= '0;
        s_rd_addr  <= '0;
        f_brq_cfg_we   <= 1'b0;
        f_brq_cfg_data <= '0;
      end else begin
        f_rd_be    <= rd_be;
        f_bus_read <= bus_read;
        f_off      <= off_now;
        s_rd_addr  <= rd_addr;
        f_brq_cfg_we   <= brq_cfg_we;
        f_brq_cfg_data <= brq_cfg_data;
      end
    end
  end else begin : g_nopipe
    assign f_rd_be    = rd_be;
    assign f_bus_read = bus_read;
    assign f_off      = off_now;
    assign s_rd_addr  = rd_addr;
    assign f_brq_cfg_we   = brq_cfg_we;
    assign f_brq_cfg_data = brq_cfg_data;
  end

  // Shared write signals: implicit connection, no logic in the slots.
  assign s_wr_addr  = wr_addr;
  assign s_wr_data  = wr_data;
  assign s_byte_sel = byte_sel;

  // ---------------- slots and chains --------------------------------------
  logic [R-1:0][SLICE-1:0] rd_chain;
  logic [R-1:0]            irq_chain;
  logic [R-1:0][NB-1:0]    brq_chain;
  logic [R-1:0][MSLICE-1:0] m_chain;
  be_t                     irq_cnt;

  for (genvar i = 0; i < R; i++) begin : g_slot
    logic [SLICE-1:0] rd_in;
    logic             irq_in;
    logic [NB-1:0]    brq_in;
    logic [NB-1:0]    brq_cfg;
    logic [MSLICE-1:0] m_in;

    // Dummy termination: constant 0 at the far end of every chain.
    if (i + N < R) begin : g_mid
      assign rd_in  = rd_chain[i+N];
      assign brq_in = brq_chain[i+N];
      assign m_in   = m_chain[i+N];
    end else begin : g_end
      assign rd_in  = '0;
      assign brq_in = '0;
      assign m_in   = '0;
    end
    if (i + 1 < R) begin : g_irq_mid
      assign irq_in = irq_chain[i+1];
    end else begin : g_irq_end
      assign irq_in = 1'b0;
    end

    // Request chain k of this slot is global chain k*N + (i mod N).
    for (genvar k = 0; k < NB; k++) begin : g_cfg
      assign brq_cfg[k] = f_brq_cfg_data[k*N + (i % N)];
    end

    recobus_slot #(.SLICE(SLICE), .NB(NB), .MASTER(MASTER), .MSLICE(MSLICE)) u_slot (
      .clk, .pr_init(pr_init[i]),
      .cfg_clk_en, .cfg_data, .cfg_irq_data,
      .brq_cfg_we(f_brq_cfg_we), .brq_cfg_data(brq_cfg),
      .rd_be(f_rd_be), .bus_read(f_bus_read),
      .wr_be, .bus_write, .gnt_be, .irq_cnt,
      .rd_chain_in(rd_in), .irq_chain_in(irq_in), .brq_chain_in(brq_in),
      .rd_chain_out(rd_chain[i]), .irq_chain_out(irq_chain[i]), .brq_chain_out(brq_chain[i]),
      .m_chain_in(m_in), .m_chain_out(m_chain[i]),
      .mod_dout(slot_dout[i]), .mod_irq(slot_irq[i]), .mod_brq(slot_brq[i]), .mod_mout(slot_mout[i]),
      .module_reset(slot_reset[i]), .module_select(slot_select[i]),
      .module_read(slot_read[i]), .module_write(slot_write[i]), .module_grant(slot_grant[i])
    );
  end

  // ---------------- static side: alignment, interrupts, requests ----------
  logic [N-1:0][SLICE-1:0] chains_at_master, word;
  for (genvar c = 0; c < N; c++) begin : g_master
    assign chains_at_master[c] = rd_chain[c];
  end

  align_mux #(.N(N), .SLICE(SLICE), .OFF_W(OFF_W)) u_align (
    .chains(chains_at_master), .off(f_off), .word
  );
  assign rd_data = word;

  if (MASTER) begin : g_mport
    logic [OFF_W-1:0]         m_off;
    logic [N-1:0][MSLICE-1:0] m_chains, m_word;
    logic [N*MSLICE-1:0]      m_flat;
    align_regfile #(.N(N), .OFF_W(OFF_W)) u_regfile_gnt (
      .clk, .rst_n, .we(align_we), .waddr(align_waddr), .wdata(align_wdata),
      .raddr(gnt_be), .rdata(m_off)
    );
    for (genvar c = 0; c < N; c++) begin : g_mc
      assign m_chains[c] = m_chain[c];
    end
    align_mux #(.N(N), .SLICE(MSLICE), .OFF_W(OFF_W)) u_align_m (
      .chains(m_chains), .off(m_off), .word(m_word)
    );
    assign m_flat     = m_word;
    assign m_addr     = m_flat[AW-1:0];
    assign m_byte_sel = m_flat[AW +: B/8];
    assign m_write    = m_flat[AW + B/8];
  end else begin : g_sport
    assign m_addr     = '0;
    assign m_byte_sel = '0;
    assign m_write    = 1'b0;
  end

  irq_capture #(.M(M)) u_irq (
    .clk, .rst_n, .irq_chain(irq_chain[0]), .irq_cnt, .irq_lines
  );

  for (genvar c = 0; c < S_DR; c++) begin : g_brq_out
    assign brq_lines[c] = brq_chain[c % N][c / N];
  end

  initial begin
    assert (B % N == 0 && S_DR % N == 0 && R >= N && B % 8 == 0)
      else $error("recobus: B and S_DR must be multiples of N, R >= N");
  end

endmodule
