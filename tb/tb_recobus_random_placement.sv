// tb_recobus_random_placement: repeated random placement at the default
// parameters (8 slots of 32 bits, unpipelined). In every round the previous
// module is removed, a test module with a random function, width and module
// address is loaded at a random slot position, configured, and checked by the
// stimuli generator; 200 rounds of 100 transfers give 20,000 compared reads.
// A second module stays on the bus in the last slot throughout; every fifth
// round its result register and write counter are read back, so loading and
// configuring neighbours must never disturb it.
module tb_recobus_random_placement;
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
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int ROUNDS = 200, WORDS = 100;

  initial begin
    int first, span, pfirst, pspan, kfirst, kspan;
    be_t a, ka;
    func_e f, kf;
    logic [31:0] kval, d;
    init_inputs();
    // a resident module in the last slot, address 14
    kfirst = R - 1; kspan = 1; ka = 4'd14; kf = FUNC_ROT;
    load(kfirst, kspan, kf);
    configure(kfirst, kspan, lut_t'(1) << ka, '0, ka);
    kval = $urandom;
    host_write(ka, 32'd7, kval);
    pfirst = -1; pspan = 0;
    for (int r = 0; r < ROUNDS; r++) begin
      // remove the previous module
      if (pfirst >= 0) begin
        load(pfirst, pspan, FUNC_ADD);
        configure(pfirst, pspan, '0, '0, BE_NONE);
      end
      span  = $urandom_range(3, 1);
      first = $urandom_range(R - 1 - span, 0);
      a     = be_t'($urandom_range(13, 0));
      f     = func_e'($urandom_range(3, 0));
      load(first, span, f);
      configure(first, span, lut_t'(1) << a, '0, a);
      stim_to(a, f, WORDS);
      if (r % 5 == 4) begin
        host_read(ka, 32'd0, d);
        check(d == model_f(kf, kval, 32'd7), $sformatf("resident module intact (%h)", d));
        host_read(ka, 32'd1, d);
        check(d == 32'd1, "resident module saw exactly one write");
      end
      pfirst = first; pspan = span;
    end
    $display("random placement: %0d rounds, %0d compared reads, %0d loads", ROUNDS, n_tests, n_pr);
    check(n_tests >= ROUNDS * WORDS, "all transfers compared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
