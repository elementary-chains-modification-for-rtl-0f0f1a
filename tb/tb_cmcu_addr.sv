// tb_cmcu_addr: drives the address sequencer with random start, y0, yE and
// next-chain codes and compares the address and the fetch flag with a
// reference model every cycle. The stimulus never asks the component
// counter to step past its last code (the microprogram rule the sequencer
// asserts). It also checks that start is ignored while running and that
// reset clears everything.
module tb_cmcu_addr;

  logic       clk;
  logic       rst_n, start, y0, ye;
  logic [2:0] psi;
  logic [4:0] addr;
  logic       fetch;
  int checks = 0, failures = 0;
  int n_step = 0, n_load = 0, n_end = 0, n_start = 0;

  cmcu_addr dut (.clk, .rst_n, .start, .y0, .ye, .psi, .addr, .fetch);

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [2:0] m_rg;
  logic [1:0] m_ct;
  logic       m_fetch;

  initial begin
    rst_n = 1'b0; start = 1'b0; y0 = 1'b0; ye = 1'b0; psi = '0;
    @(posedge clk); @(posedge clk);
    #1;
    rst_n = 1'b1;
    m_rg = '0; m_ct = '0; m_fetch = 1'b0;
    checks++;
    if (fetch !== 1'b0 || addr !== 5'd0) begin
      failures++; $display("FAIL after reset fetch=%b addr=%0d", fetch, addr);
    end
    for (int cyc = 0; cyc < 3000; cyc++) begin
      start = ($urandom % 4) == 0;
      psi   = 3'($urandom);
      ye    = ($urandom % 16) == 0;
      y0    = ($urandom % 3) != 0;
      if (m_ct == 2'b11) y0 = 1'b0;
      @(posedge clk);
      // reference model of the edge just taken
      if (!m_fetch) begin
        if (start) begin m_rg = '0; m_ct = '0; m_fetch = 1'b1; n_start++; end
      end else if (ye) begin
        m_fetch = 1'b0; n_end++;
      end else if (y0) begin
        m_ct = m_ct + 1'b1; n_step++;
      end else begin
        m_rg = psi; m_ct = '0; n_load++;
      end
      #1;
      checks++;
      if (addr !== {m_rg, m_ct} || fetch !== m_fetch) begin
        failures++;
        $display("FAIL cycle %0d addr=%0d fetch=%b expected addr=%0d fetch=%b",
                 cyc, addr, fetch, {m_rg, m_ct}, m_fetch);
      end
    end
    // reset while running
    start = 1'b1; ye = 1'b0; y0 = 1'b0;
    @(posedge clk); @(posedge clk); #1;
    rst_n = 1'b0;
    @(posedge clk); #1;
    checks++;
    if (fetch !== 1'b0 || addr !== 5'd0) begin
      failures++; $display("FAIL reset while running");
    end
    checks++;
    if (n_step == 0 || n_load == 0 || n_end == 0 || n_start == 0) begin
      failures++; $display("FAIL stimulus did not cover all cases");
    end
    $display("steps=%0d loads=%0d ends=%0d starts=%0d", n_step, n_load, n_end, n_start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
