// tb_recobus: the bus macro at its default size (R = 32 slots, N = 4
// interleaved chains, 32-bit data), unpipelined and pipelined side by side.
// Behavioural modules of 16 and 32 bits are placed at different start
// sockets, configured through the select-table shift and the alignment
// register file, and then read, written, granted, and observed on the
// interrupt and bus-request lines. The pipelined bus must return the data one
// cycle later than the unpipelined one. Each module also acts as a master:
// its address/byte-select/direction outputs (37 bits, 10 per slot) must come
// back aligned on m_addr/m_byte_sel/m_write while it is granted.
module tb_recobus;
  import recobus_pkg::*;
  localparam int B = 32, AW = 32, R = 32, N = 4, S_DR = 16, M = 15, SLICE = 8;
  localparam int MOUT_W = 37, MSLICE = 10;
  localparam int NMOD = 5;
  localparam be_t MCAST = 4'd7;

  logic clk = 0, rst_n = 0;
  logic [R-1:0] pr_init = '0;
  logic cfg_clk_en = 0, cfg_data = 0, cfg_irq_data = 0, brq_cfg_we = 0, align_we = 0;
  logic [S_DR-1:0] brq_cfg_data = '0;
  be_t align_waddr = '0, rd_be = BE_NONE, wr_be = BE_NONE, gnt_be = BE_NONE;
  logic [1:0] align_wdata = '0;
  logic [AW-1:0] rd_addr = '0, wr_addr = '0;
  logic bus_read = 0, bus_write = 0;
  logic [B-1:0] wr_data = '0;
  logic [3:0] byte_sel = '0;
  logic [R-1:0][SLICE-1:0] slot_dout;
  logic [R-1:0] slot_irq, slot_brq;
  logic [R-1:0][MSLICE-1:0] slot_mout;
  logic [AW-1:0] m_addr0, m_addr1;
  logic [3:0] m_byte_sel0, m_byte_sel1;
  logic m_write0, m_write1;

  // outputs of the two instances
  logic [B-1:0] rd_data0, rd_data1;
  logic [S_DR-1:0] brq_lines0, brq_lines1;
  logic [M-1:0] irq_lines0, irq_lines1;
  logic [AW-1:0] s_rd_addr0, s_wr_addr0, s_rd_addr1, s_wr_addr1;
  logic [B-1:0] s_wr_data0, s_wr_data1;
  logic [3:0] s_byte_sel0, s_byte_sel1;
  logic [R-1:0] rst0, sel0, rd0, wr0, gnt0, rst1, sel1, rd1, wr1, gnt1;

  recobus dut0 (
    .clk, .rst_n, .pr_init, .cfg_clk_en, .cfg_data, .cfg_irq_data, .brq_cfg_we, .brq_cfg_data,
    .align_we, .align_waddr, .align_wdata, .rd_be, .rd_addr, .bus_read, .rd_data(rd_data0),
    .wr_be, .wr_addr, .wr_data, .byte_sel, .bus_write, .gnt_be,
    .brq_lines(brq_lines0), .irq_lines(irq_lines0),
    .s_rd_addr(s_rd_addr0), .s_wr_addr(s_wr_addr0), .s_wr_data(s_wr_data0), .s_byte_sel(s_byte_sel0),
    .m_addr(m_addr0), .m_byte_sel(m_byte_sel0), .m_write(m_write0),
    .slot_dout, .slot_irq, .slot_brq, .slot_mout,
    .slot_reset(rst0), .slot_select(sel0), .slot_read(rd0), .slot_write(wr0), .slot_grant(gnt0)
  );

  recobus #(.PIPELINE(1'b1)) dut1 (
    .clk, .rst_n, .pr_init, .cfg_clk_en, .cfg_data, .cfg_irq_data, .brq_cfg_we, .brq_cfg_data,
    .align_we, .align_waddr, .align_wdata, .rd_be, .rd_addr, .bus_read, .rd_data(rd_data1),
    .wr_be, .wr_addr, .wr_data, .byte_sel, .bus_write, .gnt_be,
    .brq_lines(brq_lines1), .irq_lines(irq_lines1),
    .s_rd_addr(s_rd_addr1), .s_wr_addr(s_wr_addr1), .s_wr_data(s_wr_data1), .s_byte_sel(s_byte_sel1),
    .m_addr(m_addr1), .m_byte_sel(m_byte_sel1), .m_write(m_write1),
    .slot_dout, .slot_irq, .slot_brq, .slot_mout,
    .slot_reset(rst1), .slot_select(sel1), .slot_read(rd1), .slot_write(wr1), .slot_grant(gnt1)
  );

  always #5 clk = ~clk;

  // Behavioural modules: address, first slot, slots spanned, data slots
  // (sub-words), interrupt number.
  be_t mod_a  [NMOD] = '{4'd1, 4'd2, 4'd3, 4'd4, 4'd5};
  int  mod_s  [NMOD] = '{0, 4, 9, 14, 27};
  int  mod_w  [NMOD] = '{3, 4, 4, 4, 5};
  int  mod_d  [NMOD] = '{2, 4, 4, 4, 4};
  logic [31:0] mod_val [NMOD];
  logic [N*MSLICE-1:0] mod_mv [NMOD];   // master outputs {direction, byte selects, address}
  logic [NMOD-1:0] mod_irq_v = '0, mod_brq_v = '0;
  bit placed [NMOD];

  always_comb begin
    for (int i = 0; i < R; i++) begin
      slot_dout[i] = '0; slot_irq[i] = 0; slot_brq[i] = 0; slot_mout[i] = '0;
      for (int m = 0; m < NMOD; m++) begin
        if (placed[m] && i >= mod_s[m] && i < mod_s[m] + mod_w[m]) begin
          slot_irq[i] = mod_irq_v[m];
          slot_brq[i] = mod_brq_v[m];
          if (i - mod_s[m] < mod_d[m]) slot_dout[i] = mod_val[m][(i - mod_s[m])*SLICE +: SLICE];
          if (i - mod_s[m] < N) slot_mout[i] = mod_mv[m][(i - mod_s[m])*MSLICE +: MSLICE];
        end
      end
    end
  end

  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] expect_word(int m);
    logic [31:0] v = mod_val[m];
    if (mod_d[m] < 4) v &= (32'h1 << (8 * mod_d[m])) - 1;
    return v;
  endfunction

  task automatic place(int m, lut_t sel_tab);
    @(negedge clk);
    for (int i = mod_s[m]; i < mod_s[m] + mod_w[m]; i++) pr_init[i] = 1;
    @(negedge clk) pr_init = '0; placed[m] = 1;
    for (int i = mod_s[m]; i < mod_s[m] + mod_w[m]; i++) check(rst0[i] && rst1[i], "slot in reset after load");
    for (int b = 15; b >= 0; b--) begin
      lut_t irq_tab = lut_t'(1) << m;   // interrupt number m
      @(negedge clk); cfg_clk_en = 1; cfg_data = sel_tab[b]; cfg_irq_data = irq_tab[b];
    end
    @(negedge clk) cfg_clk_en = 0;
    align_we = 1; align_waddr = mod_a[m]; align_wdata = 2'(mod_s[m] % N);
    @(negedge clk) align_we = 0;
    for (int i = mod_s[m]; i < mod_s[m] + mod_w[m]; i++) check(!rst0[i] && !rst1[i], "slot released");
  endtask

  // Master outputs seen by the static part: as many sub-words as the module
  // has slots (up to N), cut to the 37 signals.
  function automatic logic [MOUT_W-1:0] expect_master(int m);
    logic [N*MSLICE-1:0] v = mod_mv[m];
    if (mod_w[m] < N) v &= (40'h1 << (MSLICE * mod_w[m])) - 1;
    return MOUT_W'(v);
  endfunction

  task automatic read_check(int m);
    @(negedge clk);
    rd_be = mod_a[m]; bus_read = 1; rd_addr = $urandom; #1;
    check(rd_data0 == expect_word(m), $sformatf("unpipelined read m%0d: %h / %h", m, rd_data0, expect_word(m)));
    check(s_rd_addr0 == rd_addr, "read address reaches slots");
    @(negedge clk);
    rd_be = BE_NONE; bus_read = 0; #1;
    check(rd_data1 == expect_word(m), $sformatf("pipelined read m%0d: %h / %h", m, rd_data1, expect_word(m)));
    check(rd_data0 == 0, "idle read chain is 0");
  endtask

  initial begin
    foreach (mod_val[m]) mod_val[m] = $urandom;
    foreach (mod_mv[m]) mod_mv[m] = {8'($urandom), 32'($urandom)};
    foreach (placed[m]) placed[m] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk) pr_init = '1;
    @(negedge clk) pr_init = '0;
    check(&rst0 && &rst1, "empty bus: all slots in reset");
    // give every empty slot the empty (all-zero) table so that later shifts
    // only reach freshly loaded slots
    for (int b = 0; b < 16; b++) begin @(negedge clk); cfg_clk_en = 1; cfg_data = 0; cfg_irq_data = 0; end
    @(negedge clk) cfg_clk_en = 0;
    check(rst0 == '0, "empty tables locked");
    rd_be = 4'd1; bus_read = 1; #1;
    check(rd_data0 == 0 && rd0 == '0, "no module answers before configuration");
    bus_read = 0;
    // modules 1 and 2 also answer to the multicast address
    for (int m = 0; m < NMOD; m++)
      place(m, (lut_t'(1) << mod_a[m]) | ((m == 1 || m == 2) ? (lut_t'(1) << MCAST) : '0));
    // reads at every placement; repeat with new values
    for (int rep = 0; rep < 4; rep++) begin
      for (int m = 0; m < NMOD; m++) read_check(m);
      foreach (mod_val[m]) mod_val[m] = $urandom;
    end
    // unused address: nothing answers
    @(negedge clk) rd_be = 4'd9; bus_read = 1; #1;
    check(rd_data0 == 0 && rd0 == '0, "unused address reads 0");
    bus_read = 0; rd_be = BE_NONE;
    // write decode and shared write wires
    for (int m = 0; m < NMOD; m++) begin
      wr_be = mod_a[m]; bus_write = 1; wr_data = $urandom; wr_addr = $urandom; byte_sel = 4'($urandom); #1;
      for (int i = 0; i < R; i++)
        check(wr0[i] == (i >= mod_s[m] && i < mod_s[m] + mod_w[m]), $sformatf("write decode m%0d slot %0d", m, i));
      check(s_wr_data0 == wr_data && s_wr_addr0 == wr_addr && s_byte_sel0 == byte_sel, "shared write wires");
    end
    wr_be = MCAST; #1;
    for (int i = 0; i < R; i++)
      check(wr0[i] == ((i >= 4 && i < 8) || (i >= 9 && i < 13)), "multicast write decode");
    bus_write = 0; wr_be = BE_NONE;
    // grant
    gnt_be = mod_a[3]; #1;
    for (int i = 0; i < R; i++) check(gnt0[i] == (i >= 14 && i < 18), "grant decode");
    // master signals of the granted module
    for (int rep = 0; rep < 3; rep++) begin
      for (int m = 0; m < NMOD; m++) begin
        gnt_be = mod_a[m]; #1;
        check({m_write0, m_byte_sel0, m_addr0} == expect_master(m),
              $sformatf("master signals m%0d: %h / %h", m, {m_write0, m_byte_sel0, m_addr0}, expect_master(m)));
        check({m_write1, m_byte_sel1, m_addr1} == expect_master(m), "master signals, pipelined bus");
      end
      foreach (mod_mv[m]) mod_mv[m] = {8'($urandom), 32'($urandom)};
    end
    gnt_be = BE_NONE; #1;
    check({m_write0, m_byte_sel0, m_addr0} == '0, "no grant: master signals 0");
    // interrupts: each module raises its interrupt number
    for (int m = 0; m < NMOD; m++) begin
      int lat;
      lat = 0;
      @(negedge clk) mod_irq_v[m] = 1;
      while (!irq_lines0[m] && lat < 40) begin @(negedge clk); lat++; end
      check(irq_lines0 == M'(mod_irq_v), $sformatf("interrupt line %0d", m));
      check(lat <= M + 1, $sformatf("interrupt latency %0d", lat));
    end
    mod_irq_v = '0;
    repeat (M + 1) @(negedge clk);
    check(irq_lines0 == '0 && irq_lines1 == '0, "interrupts cleared");
    // bus requests: module 3 (slots 14..17) to chain 9, module 4 (27..31) to chain 3
    @(negedge clk) rd_be = mod_a[3]; brq_cfg_we = 1; brq_cfg_data = 16'h0200;
    @(negedge clk) rd_be = mod_a[4]; brq_cfg_data = 16'h0008;
    @(negedge clk) brq_cfg_we = 0; rd_be = BE_NONE; brq_cfg_data = '0;
    mod_brq_v = 5'b01000; #1;
    check(brq_lines0 == 16'h0200 && brq_lines1 == 16'h0200, $sformatf("request module 3 on line 9: %h", brq_lines0));
    mod_brq_v = 5'b10000; #1;
    check(brq_lines0 == 16'h0008, $sformatf("request module 4 on line 3: %h", brq_lines0));
    mod_brq_v = 5'b11000; #1;
    check(brq_lines0 == 16'h0208, "both requests");
    mod_brq_v = 5'b00111; #1;
    check(brq_lines0 == 16'h0000, "unconfigured modules do not request");
    // unloading module 3 disconnects its request and its reads
    @(negedge clk);
    for (int i = 14; i < 18; i++) pr_init[i] = 1;
    @(negedge clk) pr_init = '0;
    mod_brq_v = 5'b01000; #1;
    check(brq_lines0 == 16'h0000, "reloaded slots disconnect request");
    rd_be = mod_a[3]; bus_read = 1; #1;
    check(rd_data0 == 0, "reloaded slots do not answer");
    bus_read = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
