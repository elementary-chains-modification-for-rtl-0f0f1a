// tb_cmcu_u2: end-to-end test of the control unit at its default sizes,
// running the example control algorithm (see tb_gsa_pkg) many times with
// random logical conditions.
//
// A reference interpreter walks the graph-scheme: it knows the chains, their
// vertices and microoperations, the classes of pseudoequivalent chains and
// their transitions, and the rule that every chain not ending the algorithm
// is followed by one idle control-microinstruction cycle. Every clock the
// unit's microoperations, busy, ctrl_mi and done are compared with it, so
// the number of cycles per run is checked as well.
//
// Mechanisms counted, each of which must occur: counter steps inside a
// chain, control microinstructions (idle data-path cycles), a transition
// through each class, the class field read from every chain that has one
// (so both members of each pseudoequivalent pair are exercised), the loop
// back to the first chain, the end of the algorithm, and a start pulse
// ignored while the unit is busy.
module tb_cmcu_u2;
  import tb_gsa_pkg::*;

  localparam int RUNS = 60;

  logic        clk;
  logic        rst_n, start;
  logic [3:0]  x;
  logic [49:0] y;
  logic        busy, ctrl_mi, done;
  logic [4:0]  addr;

  int checks = 0, failures = 0;
  int n_step = 0, n_ctrl = 0, n_loop = 0, n_end = 0, n_ignored = 0;
  int n_class [4];
  int n_from  [NCH];

  cmcu_u2 dut (.clk, .rst_n, .start, .x, .y, .busy, .ctrl_mi, .done, .addr);

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    int g, i;
    logic running, exp_done;
    foreach (n_class[k]) n_class[k] = 0;
    foreach (n_from[k])  n_from[k]  = 0;

    rst_n = 1'b0; start = 1'b0; x = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    running = 1'b0; exp_done = 1'b0; g = 0; i = 0;

    for (int run = 0; run < RUNS; run++) begin
      int cycles, expected_cycles;
      // idle gap, then a start pulse
      repeat (1 + $urandom % 3) begin
        @(negedge clk);
        start = 1'b0; x = 4'($urandom);
        #1;
        check(!busy && y == '0 && !ctrl_mi && done == exp_done, "idle outputs");
        exp_done = 1'b0;
      end
      start = 1'b1;
      @(negedge clk);
      running = 1'b1; g = 0; i = 0;
      cycles = 0; expected_cycles = 0;
      while (running) begin
        logic [49:0] ey;
        logic        ectrl;
        start = ($urandom % 8) == 0;
        x     = 4'($urandom);
        #1;
        cycles++;
        if (i < chain_len(g)) begin ey = yset(first_vertex(g) + i); ectrl = 1'b0; end
        else                  begin ey = '0;                        ectrl = 1'b1; end
        check(busy === 1'b1, "busy while running");
        check(y === ey, $sformatf("microoperations chain %0d component %0d", g, i));
        check(ctrl_mi === ectrl, "control microinstruction flag");
        check(done === 1'b0, "no done while running");
        check(addr === 5'({g[2:0], i[1:0]}), "address {chain, component}");
        if (start) n_ignored++;
        expected_cycles++;
        // reference step taken at the next rising edge
        if (i < chain_len(g) - 1) begin
          i++; n_step++;
        end else if (i == chain_len(g) - 1) begin
          if (chain_class(g) < 0) begin running = 1'b0; n_end++; end
          else begin i++; n_step++; end
        end else begin
          int c, ng;
          c  = chain_class(g);
          ng = next_chain(c, x);
          n_ctrl++; n_class[c]++; n_from[g]++;
          if (ng == 0) n_loop++;
          g = ng; i = 0;
        end
        @(negedge clk);
      end
      start = 1'b0;
      #1;
      check(!busy && done, "done pulse after the final microinstruction");
      check(cycles == expected_cycles, "cycle count");
      exp_done = 1'b0;
    end

    check(n_step > 0, "counter steps happened");
    check(n_ctrl > 0, "control microinstructions happened");
    foreach (n_class[k]) check(n_class[k] > 0, $sformatf("class %0d used", k));
    for (int k = 0; k < NCH - 1; k++) check(n_from[k] > 0, $sformatf("class field of chain %0d read", k));
    check(n_loop > 0, "loop back to the first chain");
    check(n_end == RUNS, "every run ended");
    check(n_ignored > 0, "start ignored while busy");
    $display("steps=%0d control_mi=%0d loops=%0d ends=%0d ignored_starts=%0d",
             n_step, n_ctrl, n_loop, n_end, n_ignored);
    $display("class uses: %0d %0d %0d %0d", n_class[0], n_class[1], n_class[2], n_class[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
