// recobus_sys_seq.svh: host sequence shared by the system-level testbenches.
// Included inside a testbench module that declares, before the include:
//   localparams B, AW, R, N, PIPELINE, MASTER, MSLICE, NMOD and the module plan arrays
//   P_FIRST, P_SPAN, P_FUNC, P_ADDR (one entry per module; P_IRQ = index),
// plus clk and the DUT's port signals under the same names as the ports.
// The sequence loads every module by partial reconfiguration, configures its
// address, interrupt number and alignment, runs the stimuli generator against
// it, and exercises direct host access, multicast, interrupts, bus requests,
// grants and relocation. Every mechanism is counted.

int checks = 0, failures = 0;
int n_tests = 0;
int n_pr = 0, n_release = 0, n_stim = 0, n_offset = 0, n_pipe = 0, n_irq = 0,
    n_irq_clear = 0, n_brq = 0, n_grant = 0, n_mcast = 0, n_reloc = 0, n_host = 0, n_master = 0;

task automatic check(input bit cond, input string what);
  checks++;
  if (!cond) begin failures++; $display("FAIL: %s", what); end
endtask

function automatic logic [31:0] model_f(func_e f, logic [31:0] d, logic [31:0] a);
  logic [31:0] r;
  case (f)
    FUNC_ADD:  r = d + a;
    FUNC_XOR:  r = d ^ ~a;
    FUNC_PERM: for (int i = 0; i < 32; i++) r[i] = d[31 - i];
    default:   r = {d[23:0], d[31:24]};
  endcase
  return r;
endfunction

task automatic load(input int first, input int span, input func_e f);
  @(negedge clk);
  pr_we = 1; pr_first = RW'(first); pr_span = RW'(span); pr_func = f;
  @(negedge clk) pr_we = 0;
  for (int i = first; i < first + span; i++) check(slot_reset[i], $sformatf("slot %0d in reset after load", i));
  n_pr++;
endtask

task automatic configure(input int first, input int span, input lut_t sel_tab, input lut_t irq_tab, input be_t addr);
  int cyc;
  @(negedge clk);
  cfg_start = 1; cfg_sel_table = sel_tab; cfg_irq_table = irq_tab;
  @(negedge clk) cfg_start = 0;
  cyc = 0;
  while (!cfg_done && cyc < 100) begin @(negedge clk); cyc++; end
  check(cyc == 16, $sformatf("configuration took %0d cycles", cyc));
  align_we = 1; align_waddr = addr; align_wdata = OFF_W'(first % N);
  @(negedge clk) align_we = 0;
  for (int i = first; i < first + span; i++) check(!slot_reset[i], $sformatf("slot %0d released", i));
  n_release++;
  if (first % N != 0) n_offset++;
endtask

task automatic place(input int m);
  load(P_FIRST[m], P_SPAN[m], P_FUNC[m]);
  configure(P_FIRST[m], P_SPAN[m], lut_t'(1) << P_ADDR[m], lut_t'(1) << m, P_ADDR[m]);
endtask

task automatic stim_to(input be_t a, input func_e f, input int w);
  int cyc;
  @(negedge clk);
  st_start = 1; st_mod_be = a; st_func = f; st_words = 16'(w); st_seed = $urandom;
  @(negedge clk) st_start = 0;
  cyc = 0;
  while (st_busy && cyc < 4 * w + 20) begin @(negedge clk); cyc++; end
  check(st_tests == 32'(w), $sformatf("address %0d: %0d tests", a, st_tests));
  check(st_errors == 0, $sformatf("address %0d: %0d errors", a, st_errors));
  // one write and one read per clock: W + 1 transfer cycles, one closing cycle
  check(cyc == w + 2 + int'(PIPELINE), $sformatf("address %0d: %0d cycles for %0d words", a, cyc, w));
  n_stim++;
  n_tests += int'(st_tests);
  if (PIPELINE) n_pipe++;
endtask

task automatic stim(input int m, input int w);
  stim_to(P_ADDR[m], P_FUNC[m], w);
endtask

task automatic host_write(input be_t a, input logic [31:0] addr, input logic [31:0] d);
  @(negedge clk);
  host_wr_be = a; host_wr_addr = addr; host_wr_data = d; host_byte_sel = 4'hF; host_bus_write = 1;
  @(negedge clk);
  host_wr_be = BE_NONE; host_bus_write = 0;
endtask

task automatic host_read(input be_t a, input logic [31:0] addr, output logic [31:0] d);
  @(negedge clk);
  host_rd_be = a; host_rd_addr = addr; host_bus_read = 1;
  if (PIPELINE) begin @(negedge clk); host_rd_be = BE_NONE; host_bus_read = 0; end
  #1 d = host_rd_data;
  @(negedge clk);
  host_rd_be = BE_NONE; host_bus_read = 0;
endtask

task automatic wait_irq(input int line, input bit level);
  int lat;
  lat = 0;
  while (irq_lines[line] != level && lat < 3 * M) begin @(negedge clk); lat++; end
  check(irq_lines[line] == level, $sformatf("interrupt line %0d to %0d", line, level));
  check(lat <= M + 1, $sformatf("interrupt latency %0d", lat));
endtask

task automatic init_inputs();
  pr_we = 0; cfg_start = 0; align_we = 0; brq_cfg_we = 0; st_start = 0;
  host_rd_be = BE_NONE; host_wr_be = BE_NONE; host_bus_read = 0; host_bus_write = 0;
  host_rd_addr = '0; host_wr_addr = '0; host_wr_data = '0; host_byte_sel = '0;
  gnt_be = BE_NONE; ext_brq = '0; ext_mout = '0; brq_cfg_data = '0; pr_first = '0; pr_span = '0;
  pr_func = FUNC_ADD; cfg_sel_table = '0; cfg_irq_table = '0; align_waddr = '0; align_wdata = '0;
  st_mod_be = BE_NONE; st_func = FUNC_ADD; st_words = '0; st_seed = '0;
  rst_n = 0;
  repeat (3) @(negedge clk);
  rst_n = 1;
  // Power-up: blank the whole bus and give every slot the empty table.
  load(0, R, FUNC_ADD);
  configure(0, R, '0, '0, BE_NONE);
endtask

task automatic run_sequence();
  logic [31:0] d, cnt_a, cnt_b;
  int last;
  init_inputs();
  // Load and configure every module of the plan.
  for (int m = 0; m < NMOD; m++) place(m);
  // Bus test of every module through the stimuli generator.
  for (int m = 0; m < NMOD; m++) stim(m, 64);
  // Direct host access, unused address.
  for (int m = 0; m < NMOD; m++) begin
    logic [31:0] w;
    w = $urandom;
    host_write(P_ADDR[m], 32'd5, w);
    host_read(P_ADDR[m], 32'd0, d);
    check(d == model_f(P_FUNC[m], w, 32'd5), $sformatf("host read module %0d: %h", m, d));
    n_host++;
  end
  host_read(4'd12, 32'd0, d);
  check(d == 0, "unused address reads 0");
  // Interrupts: a write leaves a result pending, a read clears it.
  for (int m = 0; m < NMOD; m++) begin
    host_write(P_ADDR[m], 32'd9, $urandom);
    wait_irq(m, 1'b1);
    n_irq++;
    host_read(P_ADDR[m], 32'd0, d);
    wait_irq(m, 1'b0);
    n_irq_clear++;
  end
  // Bus request of the last module (a master would drive it) onto line S_DR-1.
  last = NMOD - 1;
  @(negedge clk);
  host_rd_be = P_ADDR[last]; brq_cfg_we = 1; brq_cfg_data = S_DR'(1) << (S_DR - 1);
  @(negedge clk) brq_cfg_we = 0; host_rd_be = BE_NONE; brq_cfg_data = '0;
  @(negedge clk);
  for (int i = P_FIRST[last]; i < P_FIRST[last] + P_SPAN[last]; i++) ext_brq[i] = 1'b1;
  #1 check(brq_lines == S_DR'(1) << (S_DR - 1), $sformatf("bus request line: %h", brq_lines));
  ext_brq = '1;
  #1 check(brq_lines == S_DR'(1) << (S_DR - 1), "only the configured request reaches the lines");
  if (brq_lines[S_DR-1]) n_brq++;
  ext_brq = '0;
  // Grant decode.
  gnt_be = P_ADDR[0];
  #1 for (int i = 0; i < R; i++)
    check(slot_grant[i] == (i >= P_FIRST[0] && i < P_FIRST[0] + P_SPAN[0]), $sformatf("grant slot %0d", i));
  if (slot_grant[P_FIRST[0]]) n_grant++;
  // Master signals: module 0's slots present address, byte selects and
  // direction (as a master module would); only the granted module is seen.
  for (int t = 0; t < 4; t++) begin
    logic [N*MSLICE-1:0] mv;
    logic [AW+B/8:0] exp_m;
    mv = '0;
    for (int k = 0; k < N * MSLICE; k++) mv[k] = 1'($urandom);
    exp_m = '0;
    for (int j = 0; j < N && j < P_SPAN[0]; j++) begin
      ext_mout[P_FIRST[0] + j] = mv[j*MSLICE +: MSLICE];
      for (int k = 0; k < MSLICE; k++)
        if (j*MSLICE + k < AW + B/8 + 1) exp_m[j*MSLICE + k] = mv[j*MSLICE + k];
    end
    gnt_be = P_ADDR[0];
    #1 if (MASTER) begin
      check({m_write, m_byte_sel, m_addr} == exp_m, $sformatf("master signals: %h / %h", {m_write, m_byte_sel, m_addr}, exp_m));
      if (exp_m != 0) n_master++;
    end else
      check({m_write, m_byte_sel, m_addr} == '0, "slave mode: no master signals");
    gnt_be = P_ADDR[1];
    #1 check({m_write, m_byte_sel, m_addr} == '0, "master signals only from the granted module");
    ext_mout = '0;
  end
  gnt_be = BE_NONE;
  // Multicast: modules 0 and 1 re-loaded with address 14 added.
  for (int m = 0; m < 2; m++) begin
    load(P_FIRST[m], P_SPAN[m], P_FUNC[m]);
    configure(P_FIRST[m], P_SPAN[m], (lut_t'(1) << P_ADDR[m]) | (lut_t'(1) << 14), lut_t'(1) << m, P_ADDR[m]);
  end
  host_write(4'd14, 32'd3, 32'h0BAD_F00D);
  host_read(P_ADDR[0], 32'd1, cnt_a);
  host_read(P_ADDR[1], 32'd1, cnt_b);
  check(cnt_a == 1 && cnt_b == 1, $sformatf("multicast write reached both (%0d, %0d)", cnt_a, cnt_b));
  host_read(P_ADDR[0], 32'd0, d);
  check(d == model_f(P_FUNC[0], 32'h0BAD_F00D, 32'd3), "multicast data module 0");
  if (cnt_a == 1 && cnt_b == 1) n_mcast++;
  // Relocation: module 0 is removed and loaded again at RELOC_FIRST with the
  // same address; the stimuli generator reaches it without any change.
  load(P_FIRST[0], P_SPAN[0], FUNC_ADD);
  configure(P_FIRST[0], P_SPAN[0], '0, '0, BE_NONE);
  host_read(P_ADDR[0], 32'd0, d);
  check(d == 0, "removed module no longer answers");
  load(RELOC_FIRST, P_SPAN[0], P_FUNC[0]);
  configure(RELOC_FIRST, P_SPAN[0], lut_t'(1) << P_ADDR[0], lut_t'(1), P_ADDR[0]);
  stim(0, 32);
  n_reloc++;
endtask

task automatic report_mechanisms(input bit need_offset, input bit need_pipe);
  $display("mechanisms: reconfig=%0d release=%0d stimuli=%0d offset=%0d pipelined=%0d irq=%0d irq_clear=%0d brq=%0d grant=%0d master=%0d multicast=%0d relocation=%0d host=%0d",
           n_pr, n_release, n_stim, n_offset, n_pipe, n_irq, n_irq_clear, n_brq, n_grant, n_master, n_mcast, n_reloc, n_host);
  check(n_pr > 0 && n_release > 0 && n_stim > 0 && n_irq > 0 && n_irq_clear > 0, "basic mechanisms happened");
  check(n_brq > 0 && n_grant > 0 && n_mcast > 0 && n_reloc > 0 && n_host > 0, "dedicated-signal mechanisms happened");
  if (need_offset) check(n_offset > 0, "misaligned multi-slot reads happened");
  if (need_pipe)   check(n_pipe > 0, "pipelined transfers happened");
  if (MASTER)      check(n_master > 0, "granted master signals were seen");
endtask
