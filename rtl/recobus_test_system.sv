// recobus_test_system: bus demonstrator with reconfigurable test modules.
//
// The static part holds the stimuli generator, the configuration interface and
// a host port; the reconfigurable part is a recobus with R slots. The slot
// fabric is modelled behind the bus: each slot can be the leftmost slot
// ("anchor") of a loaded test module that spans `span` slots. Loading a module
// (pr_we with pr_first, pr_span, pr_func) stands for writing a partial
// bitstream: it re-initialises the select generators and request flip-flops
// of the covered slots and chooses the module function. A module drives its
// sub-word j (SLICE bits) into slot anchor+j for j < N, and its interrupt into
// all slots it covers; it is written through the write generator of its anchor
// slot and read through the select logic of each data slot.
//
// Bring-up of a module, as the host does it:
//   1. pr_we: load the module (its slots now hold module_reset);
//   2. cfg_start with the select table (bit a set = module address a) and the
//      interrupt table (bit i set = interrupt line i); 16 cycles later the
//      module leaves reset;
//   3. align_we: store anchor mod N for the module address;
//   4. optionally brq_cfg_we with a one-hot request-chain word while the
//      module address is on host_rd_be (for master modules).
// Then the stimuli generator (st_*) writes and reads the module every cycle
// and compares with its reference. While the stimuli generator is idle the
// host port drives both bus channels. Master modules are not part of this
// system: their bus requests enter per slot on ext_brq, and with MASTER = 1
// their address/byte-select/direction outputs enter per slot on ext_mout and
// come back, for the master granted on gnt_be, on m_addr/m_byte_sel/m_write.
//
// Defaults are the demonstrator's: B = 32, R = 8, N = 1, unpipelined, slave
// mode (MASTER = 0, ext_mout ignored and m_* outputs 0). The
// interrupt (M) and request (S_DR) counts come from the document's case
// study; the slot-fabric model and the host port are this design's own.
module recobus_test_system
  import recobus_pkg::*;
#(
  parameter int unsigned B        = 32,
  parameter int unsigned AW       = 32,
  parameter int unsigned R        = 8,
  parameter int unsigned N        = 1,
  parameter int unsigned S_DR     = 16,
  parameter int unsigned M        = 15,
  parameter bit          PIPELINE = 1'b0,
  parameter bit          MASTER   = 1'b0,
  localparam int unsigned SLICE   = B / N,
  localparam int unsigned MSLICE  = (AW + B / 8 + 1 + N - 1) / N,
  localparam int unsigned OFF_W   = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned RW      = $clog2(R + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // partial reconfiguration of a run of slots (device level)
  input  logic              pr_we,
  input  logic [RW-1:0]     pr_first,
  input  logic [RW-1:0]     pr_span,
  input  func_e             pr_func,
  // second-level configuration
  input  logic              cfg_start,
  input  lut_t              cfg_sel_table,
  input  lut_t              cfg_irq_table,
  output logic              cfg_busy,
  output logic              cfg_done,
  input  logic              align_we,
  input  be_t               align_waddr,
  input  logic [OFF_W-1:0]  align_wdata,
  input  logic              brq_cfg_we,
  input  logic [S_DR-1:0]   brq_cfg_data,
  // host bus port (used while the stimuli generator is idle)
  input  be_t               host_rd_be,
  input  logic [AW-1:0]     host_rd_addr,
  input  logic              host_bus_read,
  output logic [B-1:0]      host_rd_data,
  input  be_t               host_wr_be,
  input  logic [AW-1:0]     host_wr_addr,
  input  logic [B-1:0]      host_wr_data,
  input  logic [B/8-1:0]    host_byte_sel,
  input  logic              host_bus_write,
  // stimuli generator control
  input  logic              st_start,
  input  be_t               st_mod_be,
  input  func_e             st_func,
  input  logic [15:0]       st_words,
  input  logic [31:0]       st_seed,
  output logic              st_busy,
  output logic              st_done,
  output logic [31:0]       st_tests,
  output logic [31:0]       st_errors,
  // dedicated read/write signals towards master, arbiter and master modules
  output logic [M-1:0]      irq_lines,
  output logic [S_DR-1:0]   brq_lines,
  input  be_t               gnt_be,
  input  logic [R-1:0]      ext_brq,
  output logic [R-1:0]      slot_grant,
  output logic [R-1:0]      slot_reset,
  input  logic [R-1:0][MSLICE-1:0] ext_mout,
  output logic [AW-1:0]     m_addr,
  output logic [B/8-1:0]    m_byte_sel,
  output logic              m_write
);

  // ---------------- configuration interface -------------------------------
  logic cfg_clk_en, cfg_data, cfg_irq_data;

  config_interface u_cfg (
    .clk, .rst_n, .start(cfg_start), .sel_table(cfg_sel_table), .irq_table(cfg_irq_table),
    .cfg_clk_en, .cfg_data, .cfg_irq_data, .busy(cfg_busy), .done(cfg_done)
  );

  // ---------------- stimuli generator and host multiplexing ----------------
  be_t               st_rd_be, st_wr_be, rd_be, wr_be;
  logic [AW-1:0]     st_rd_addr, st_wr_addr, rd_addr, wr_addr;
  logic              st_bus_read, st_bus_write, bus_read, bus_write;
  logic [B-1:0]      st_wr_data, wr_data, rd_data;
  logic [B/8-1:0]    st_byte_sel, byte_sel;

  stimuli_generator #(.B(B), .AW(AW), .PIPELINE(PIPELINE)) u_stim (
    .clk, .rst_n, .start(st_start), .mod_be(st_mod_be), .func(st_func),
    .words(st_words), .seed(st_seed), .busy(st_busy), .done(st_done),
    .tests(st_tests), .errors(st_errors),
    .rd_be(st_rd_be), .rd_addr(st_rd_addr), .bus_read(st_bus_read), .rd_data,
    .wr_be(st_wr_be), .wr_addr(st_wr_addr), .wr_data(st_wr_data),
    .byte_sel(st_byte_sel), .bus_write(st_bus_write)
  );

  always_comb begin
    if (st_busy) begin
      rd_be = st_rd_be;  rd_addr = st_rd_addr;  bus_read = st_bus_read;
      wr_be = st_wr_be;  wr_addr = st_wr_addr;  wr_data  = st_wr_data;
      byte_sel = st_byte_sel;  bus_write = st_bus_write;
    end else begin
      rd_be = host_rd_be;  rd_addr = host_rd_addr;  bus_read = host_bus_read;
      wr_be = host_wr_be;  wr_addr = host_wr_addr;  wr_data  = host_wr_data;
      byte_sel = host_byte_sel;  bus_write = host_bus_write;
    end
  end
  assign host_rd_data = rd_data;

  // ---------------- slot fabric: which module occupies which slots --------
  logic [R-1:0]        anchor;
  func_e               func [R];
  logic [RW-1:0]       span [R];
  logic [R-1:0]        pr_init;

  for (genvar i = 0; i < R; i++) begin : g_pr
    assign pr_init[i] = pr_we && (RW'(i) >= pr_first) && ((RW+1)'(i) < (RW+1)'(pr_first) + (RW+1)'(pr_span));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      anchor <= '0;
      for (int i = 0; i < int'(R); i++) begin
        func[i] <= FUNC_ADD;
        span[i] <= '0;
      end
    end else begin
      for (int i = 0; i < int'(R); i++) begin
        if (pr_init[i]) begin
          anchor[i] <= (RW'(i) == pr_first);
          func[i]   <= pr_func;
          span[i]   <= pr_span;
        end
      end
    end
  end

  // ---------------- bus ---------------------------------------------------
  logic [AW-1:0]           s_rd_addr, s_wr_addr;
  logic [B-1:0]            s_wr_data;
  logic [B/8-1:0]          s_byte_sel;
  logic [R-1:0][SLICE-1:0] slot_dout;
  logic [R-1:0]            slot_irq, slot_select, slot_read, slot_write;
  logic [R-1:0][B-1:0]     mod_dout;
  logic [R-1:0]            mod_irq;

  recobus #(.B(B), .AW(AW), .R(R), .N(N), .S_DR(S_DR), .M(M), .PIPELINE(PIPELINE),
            .MASTER(MASTER)) u_bus (
    .clk, .rst_n, .pr_init,
    .cfg_clk_en, .cfg_data, .cfg_irq_data, .brq_cfg_we, .brq_cfg_data,
    .align_we, .align_waddr, .align_wdata,
    .rd_be, .rd_addr, .bus_read, .rd_data,
    .wr_be, .wr_addr, .wr_data, .byte_sel, .bus_write,
    .gnt_be, .brq_lines, .irq_lines, .m_addr, .m_byte_sel, .m_write,
    .s_rd_addr, .s_wr_addr, .s_wr_data, .s_byte_sel,
    .slot_dout, .slot_irq, .slot_brq(ext_brq), .slot_mout(ext_mout),
    .slot_reset, .slot_select, .slot_read, .slot_write, .slot_grant
  );

  // ---------------- test modules (one possible module per anchor slot) ----
  for (genvar s = 0; s < R; s++) begin : g_mod
    test_module #(.B(B), .AW(AW)) u_tm (
      .clk, .rst(slot_reset[s] || !anchor[s]), .func(func[s]),
      .wr_en(slot_write[s] && anchor[s]), .wr_addr(s_wr_addr), .wr_data(s_wr_data),
      .byte_sel(s_byte_sel), .rd_en(slot_read[s] && anchor[s]), .rd_addr(s_rd_addr),
      .dout(mod_dout[s]), .irq(mod_irq[s])
    );
  end

  // Slot i carries sub-word i - s of the module anchored at s (if it spans i),
  // and that module's interrupt.
  always_comb begin
    for (int i = 0; i < int'(R); i++) begin
      slot_dout[i] = '0;
      slot_irq[i]  = 1'b0;
      for (int s = 0; s <= i; s++) begin
        if (anchor[s] && (i - s) < int'(span[s])) begin
          slot_irq[i] = slot_irq[i] | mod_irq[s];
          if ((i - s) < int'(N))
            slot_dout[i] = slot_dout[i] | mod_dout[s][(i - s)*SLICE +: SLICE];
        end
      end
    end
  end

  logic unused;
  assign unused = ^slot_select;

endmodule
