// tb_test_module: functions, byte selects, write counter, interrupt flag and
// reset of the demonstrator's test module, against a model in the testbench.
module tb_test_module;
  import recobus_pkg::*;
  localparam int B = 32, AW = 32;
  logic clk = 0, rst = 1, wr_en = 0, rd_en = 0;
  func_e func = FUNC_ADD;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  logic [B-1:0] wr_data = '0, dout;
  logic [B/8-1:0] byte_sel = '0;
  logic irq;
  logic [31:0] m_result, m_count;
  logic m_irq;
  int checks = 0, failures = 0;

  test_module #(.B(B), .AW(AW)) dut (.*);
  always #5 clk = ~clk;

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

  function automatic logic [31:0] f_model(func_e f, logic [31:0] d, logic [31:0] a);
    logic [31:0] r;
    case (f)
      FUNC_ADD:  r = d + a;
      FUNC_XOR:  r = d ^ ~a;
      FUNC_PERM: for (int i = 0; i < 32; i++) r[i] = d[31 - i];
      default:   r = {d[23:0], d[31:24]};
    endcase
    return r;
  endfunction

  initial begin
    for (int f = 0; f < 4; f++) begin
      func = func_e'(f);
      rst = 1; @(negedge clk); rst = 0;
      m_result = 0; m_count = 0; m_irq = 0;
      for (int t = 0; t < 200; t++) begin
        logic [31:0] r;
        wr_en = 1'($urandom); rd_en = 1'($urandom);
        wr_addr = $urandom; wr_data = $urandom; byte_sel = 4'($urandom);
        rd_addr = $urandom;
        #1;
        check(dout == (rd_addr[0] ? m_count : m_result), $sformatf("dout f=%0d", f));
        check(irq == m_irq, "irq flag");
        @(negedge clk);
        r = f_model(func, wr_data, wr_addr);
        if (wr_en) begin
          for (int b = 0; b < 4; b++) if (byte_sel[b]) m_result[b*8 +: 8] = r[b*8 +: 8];
          m_count++;
          m_irq = 1;
        end else if (rd_en) m_irq = 0;
      end
      wr_en = 0; rd_en = 0;
    end
    rst = 1; @(negedge clk); rst = 0;
    rd_addr = 0; #1; check(dout == 0 && irq == 0, "reset clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
