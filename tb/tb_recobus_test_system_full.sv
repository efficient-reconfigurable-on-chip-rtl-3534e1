// tb_recobus_test_system_full: the bus demonstrator at its default
// parameters (8 slots of 32 bits, no interleaving, unpipelined bus). Three
// test modules of different widths are loaded, configured and tested by the
// stimuli generator at one write plus one read per clock; host access,
// interrupts, a bus request, a grant, a multicast write and a relocation
// follow. Each mechanism is counted and must have happened.
module tb_recobus_test_system_full;
  import recobus_pkg::*;
  localparam int B = 32, AW = 32, R = 8, N = 1, S_DR = 16, M = 15;
  localparam bit MASTER = 1'b0;
  localparam int MSLICE = (AW + B / 8 + 1 + N - 1) / N;
  localparam bit PIPELINE = 1'b0;
  localparam int RW = $clog2(R + 1);
  localparam int OFF_W = (N > 1) ? $clog2(N) : 1;
  localparam int NMOD = 3;
  localparam int    P_FIRST [NMOD] = '{1, 3, 5};
  localparam int    P_SPAN  [NMOD] = '{2, 1, 3};
  localparam func_e P_FUNC  [NMOD] = '{FUNC_ADD, FUNC_XOR, FUNC_PERM};
  localparam be_t   P_ADDR  [NMOD] = '{4'd1, 4'd2, 4'd3};
  localparam int RELOC_FIRST = 0;

  logic clk = 0, rst_n;
  logic pr_we, cfg_start, cfg_busy, cfg_done, align_we, brq_cfg_we;
  logic [RW-1:0] pr_first, pr_span;
  func_e pr_func, st_func;
  lut_t cfg_sel_table, cfg_irq_table;
  be_t align_waddr, host_rd_be, host_wr_be, st_mod_be, gnt_be;
  logic [OFF_W-1:0] align_wdata;
  logic [S_DR-1:0] brq_cfg_data, brq_lines;
  logic [AW-1:0] host_rd_addr, host_wr_addr;
  logic host_bus_read, host_bus_write, st_start, st_busy, st_done;
  logic [B-1:0] host_rd_data, host_wr_data;
  logic [B/8-1:0] host_byte_sel;
  logic [15:0] st_words;
  logic [31:0] st_seed, st_tests, st_errors;
  logic [M-1:0] irq_lines;
  logic [R-1:0] ext_brq, slot_grant, slot_reset;
  logic [R-1:0][MSLICE-1:0] ext_mout;
  logic [AW-1:0] m_addr;
  logic [B/8-1:0] m_byte_sel;
  logic m_write;

  recobus_test_system dut (.*);

  always #5 clk = ~clk;

  `include "recobus_sys_seq.svh"

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run_sequence();
    report_mechanisms(1'b0, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
