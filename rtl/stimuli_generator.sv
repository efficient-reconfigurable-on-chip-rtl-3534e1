// stimuli_generator: bus tester in the static part of the demonstrator.
//
// On start it runs `words` transfers against the bus module at address mod_be.
// Each cycle it writes one pseudo-random word (32-bit Galois LFSR from seed)
// to the bus over the write channel and, in the same cycle, to its own
// reference copy of the test module (function func). From the second cycle on
// it also reads over the independent read channel (read address alternating
// between result and write counter) and compares the bus data with the
// reference copy's output, so one write and one read complete per clock.
// With PIPELINE = 1 the read data is compared one cycle after the request.
// tests/errors count the comparisons; done pulses when the last check is
// made. Running the reference next to the bus module and the two address
// buses follow the document; the LFSR, the byte-select pattern and the
// counters are this design's own.
module stimuli_generator
  import recobus_pkg::*;
#(
  parameter int unsigned B        = 32,
  parameter int unsigned AW       = 32,
  parameter bit          PIPELINE = 1'b0
) (
  input  logic          clk,
  input  logic          rst_n,
  // host control
  input  logic          start,
  input  be_t           mod_be,
  input  func_e         func,
  input  logic [15:0]   words,
  input  logic [31:0]   seed,
  output logic          busy,
  output logic          done,
  output logic [31:0]   tests,
  output logic [31:0]   errors,
  // bus master: read channel
  output be_t           rd_be,
  output logic [AW-1:0] rd_addr,
  output logic          bus_read,
  input  logic [B-1:0]  rd_data,
  // bus master: write channel
  output be_t           wr_be,
  output logic [AW-1:0] wr_addr,
  output logic [B-1:0]  wr_data,
  output logic [B/8-1:0] byte_sel,
  output logic          bus_write
);

  logic [15:0] wcnt, rcnt;
  logic [31:0] lfsr;
  func_e       func_q;
  be_t         be_q;
  logic [15:0] words_q;
  logic        chk_v, chk_v_q;
  logic [AW-1:0] chk_addr, chk_addr_q;
  logic [B-1:0]  ref_dout;
  logic          ref_irq;
  logic          cmp_v;
  logic [AW-1:0] cmp_addr;

  // Request generation.
  logic do_write, do_read;
  assign do_write = busy && (wcnt < words_q);
  assign do_read  = busy && (wcnt != 16'd0) && (rcnt < words_q);

  assign wr_be     = do_write ? be_q : BE_NONE;
  assign bus_write = do_write;
  assign wr_addr   = AW'(wcnt);
  assign wr_data   = B'(lfsr);
  assign byte_sel  = lfsr[3:0] | {3'b000, wcnt[0]};   // always at least byte 0 on odd words
  assign rd_be     = do_read ? be_q : BE_NONE;
  assign bus_read  = do_read;
  assign rd_addr   = AW'(rcnt[0]);

  // Reference test module, written in the same cycle as the bus module.
  test_module #(.B(B), .AW(AW)) u_ref (
    .clk, .rst(start && !busy), .func(func_q),
    .wr_en(do_write), .wr_addr, .wr_data, .byte_sel,
    .rd_en(cmp_v), .rd_addr(cmp_addr), .dout(ref_dout), .irq(ref_irq)
  );

  // Check timing: unpipelined data belongs to this cycle's request,
  // pipelined data to the previous cycle's.
  assign chk_v    = do_read;
  assign chk_addr = rd_addr;

  if (PIPELINE) begin : g_pipe
    assign cmp_v = chk_v_q;
    assign cmp_addr = chk_addr_q;
  end else begin : g_nopipe
    assign cmp_v = chk_v;
    assign cmp_addr = chk_addr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      done       <= 1'b0;
      wcnt       <= '0;
      rcnt       <= '0;
      lfsr       <= 32'h1;
      func_q     <= FUNC_ADD;
      be_q       <= BE_NONE;
      words_q    <= '0;
      tests      <= '0;
      errors     <= '0;
      chk_v_q    <= 1'b0;
      chk_addr_q <= '0;
    end else begin
      done       <= 1'b0;
      chk_v_q    <= chk_v;
      chk_addr_q <= chk_addr;
      if (!busy) begin
        if (start) begin
          busy    <= 1'b1;
          wcnt    <= '0;
          rcnt    <= '0;
          lfsr    <= (seed == 32'd0) ? 32'h1 : seed;
          func_q  <= func;
          be_q    <= mod_be;
          words_q <= words;
          tests   <= '0;
          errors  <= '0;
        end
      end else begin
        if (do_write) begin
          wcnt <= wcnt + 1'b1;
          lfsr <= {1'b0, lfsr[31:1]} ^ (lfsr[0] ? 32'h8020_0003 : 32'h0);
        end
        if (do_read) rcnt <= rcnt + 1'b1;
        if (cmp_v) begin
          tests <= tests + 1'b1;
          if (rd_data != ref_dout) errors <= errors + 1'b1;
        end
        // Finished once every read has been issued and checked.
        if (rcnt == words_q && !(PIPELINE && chk_v_q)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  logic unused;
  assign unused = ^{ref_irq, chk_addr_q};

endmodule
