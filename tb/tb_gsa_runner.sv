// tb_gsa_runner: builds a random linear control algorithm of a given size,
// loads it into a cmcu_u2 instance of matching size through hierarchical
// writes into its control memory and BIA planes, then runs it many times and
// compares every cycle with a reference interpreter.
//
// The algorithm: NV operator vertices split into 2^R1 chains of 1 to
// 2^R2 - 1 vertices each (one word of each chain is kept for its control
// microinstruction). Chain 0 is entered on start; the last chain ends the
// algorithm. The other chains are spread over NCLS classes of
// pseudoequivalent chains; each class tests condition x_a and, when it is
// true, condition x_b, to choose one of three target chains (one in four
// targets is the final chain, so runs end). Each vertex drives a random set
// of microoperations. A run still going after MAX_CYCLES is aborted with a
// reset, which is also checked.
//
// The instance runs on its own clock; checks and failures are reported on
// the ports when finished rises.
module tb_gsa_runner #(
  parameter int unsigned N    = 50,
  parameter int unsigned L    = 19,
  parameter int unsigned R1   = 5,
  parameter int unsigned R2   = 2,
  parameter int unsigned R3   = 5,
  parameter int unsigned H    = 72,
  parameter int unsigned NV   = 75,
  parameter int unsigned NCLS = 24,
  parameter int unsigned RUNS = 40,
  parameter int unsigned MAX_CYCLES = 3000
) (
  output int   checks,
  output int   failures,
  output int   n_step,
  output int   n_ctrl,
  output int   n_end,
  output int   n_abort,
  output logic finished
);

  localparam int unsigned G    = 1 << R1;
  localparam int unsigned CAP  = (1 << R2) - 1;
  localparam int unsigned NIN  = L + R3;
  localparam int unsigned W    = N + 2 + R3;
  localparam int unsigned TW   = R1 + 2 * NIN;

  logic             clk;
  logic             rst_n, start;
  logic [L-1:0]     x;
  logic [N-1:0]     y;
  logic             busy, ctrl_mi, done;
  logic [R1+R2-1:0] addr;

  cmcu_u2 #(.N(N), .L(L), .R1(R1), .R2(R2), .R3(R3), .H(H),
            .CM_CONTENTS(""), .BIA_PERSONALITY("")) dut (
    .clk, .rst_n, .start, .x, .y, .busy, .ctrl_mi, .done, .addr
  );

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  // generated algorithm
  int          len   [G];
  int          cls   [G];
  int          ca    [NCLS];
  int          cb    [NCLS];
  int          tgt   [NCLS][3];
  logic [N-1:0] vy   [G][CAP];

  function automatic int next_of(int c, logic [L-1:0] xv);
    if (!xv[ca[c]]) return tgt[c][2];
    return xv[cb[c]] ? tgt[c][0] : tgt[c][1];
  endfunction

  function automatic int rnd_target();
    if ($urandom % 4 == 0) return G - 1;
    return 1 + int'($urandom % (G - 1));
  endfunction

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL [R1=%0d R2=%0d N=%0d] %s at %0t", R1, R2, N, what, $time);
    end
  endtask

  task automatic generate_and_load();
    int extra, h;
    // chain lengths
    foreach (len[g]) len[g] = 1;
    extra = int'(NV) - int'(G);
    while (extra > 0) begin
      int g;
      g = int'($urandom % G);
      if (len[g] < int'(CAP)) begin len[g]++; extra--; end
    end
    // classes: every class gets at least one chain
    for (int g = 0; g < int'(G) - 1; g++)
      cls[g] = (g < int'(NCLS)) ? g : int'($urandom % NCLS);
    cls[G-1] = -1;
    for (int c = 0; c < int'(NCLS); c++) begin
      ca[c] = int'($urandom % L);
      cb[c] = int'($urandom % L);
      if (cb[c] == ca[c]) cb[c] = (ca[c] + 1) % int'(L);
      for (int k = 0; k < 3; k++) tgt[c][k] = rnd_target();
    end
    // microoperations of each vertex
    for (int g = 0; g < int'(G); g++)
      for (int i = 0; i < int'(CAP); i++) begin
        logic [N-1:0] v;
        v = '0;
        repeat (3) begin
          int b;
          b = int'($urandom % N);
          v[b] = 1'b1;
        end
        vy[g][i] = v;
      end
    // control memory image
    for (int a = 0; a < (1 << (R1 + R2)); a++) dut.u_cm.mem[a] = '0;
    for (int g = 0; g < int'(G); g++) begin
      for (int i = 0; i < len[g]; i++) begin
        logic [W-1:0] w;
        w = '0;
        w[N-1:0] = vy[g][i];
        if (cls[g] < 0 && i == len[g] - 1) w[N+1] = 1'b1;   // yE
        else                               w[N]   = 1'b1;   // y0
        dut.u_cm.mem[(g << R2) | i] = w;
      end
      if (cls[g] >= 0) begin
        logic [W-1:0] w;
        w = '0;
        w[N+2 +: R3] = R3'(cls[g]);
        dut.u_cm.mem[(g << R2) | len[g]] = w;
      end
    end
    // BIA personality: {out, care, value}, input vector {z, x}
    for (h = 0; h < int'(H); h++) dut.u_bia.plane[h] = '0;
    h = 0;
    for (int c = 0; c < int'(NCLS); c++) begin
      for (int k = 0; k < 3; k++) begin
        logic [NIN-1:0] care, val;
        logic [TW-1:0]  t;
        if (tgt[c][k] == 0) continue;
        care = '0; val = '0;
        care[L +: R3] = '1;
        val[L +: R3]  = R3'(c);
        care[ca[c]]   = 1'b1;
        val[ca[c]]    = (k != 2);
        if (k != 2) begin
          care[cb[c]] = 1'b1;
          val[cb[c]]  = (k == 0);
        end
        t = {R1'(tgt[c][k]), care, val};
        dut.u_bia.plane[h] = t;
        h++;
      end
    end
    if (h > int'(H)) $fatal(1, "too many product terms");
  endtask

  initial begin
    checks = 0; failures = 0; n_step = 0; n_ctrl = 0; n_end = 0; n_abort = 0;
    finished = 1'b0;
    rst_n = 1'b0; start = 1'b0; x = '0;
    generate_and_load();
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < int'(RUNS); run++) begin
      int g, i, cyc;
      logic running;
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      g = 0; i = 0; cyc = 0; running = 1'b1;
      while (running && cyc < int'(MAX_CYCLES)) begin
        for (int b = 0; b < int'(L); b++) x[b] = 1'($urandom);
        #1;
        cyc++;
        check(busy === 1'b1, "busy");
        check(addr === {R1'(g), R2'(i)}, "address");
        if (i < len[g]) begin
          check(y === vy[g][i] && ctrl_mi === 1'b0, $sformatf("microoperations %h %h g=%0d i=%0d", y, vy[g][i], g, i));
        end else begin
          check(y === '0 && ctrl_mi === 1'b1, "control microinstruction");
        end
        if (i < len[g] - 1) begin
          i++; n_step++;
        end else if (i == len[g] - 1) begin
          if (cls[g] < 0) begin running = 1'b0; n_end++; end
          else begin i++; n_step++; end
        end else begin
          g = next_of(cls[g], x); i = 0; n_ctrl++;
        end
        @(negedge clk);
      end
      #1;
      if (running) begin
        n_abort++;
        rst_n = 1'b0;
        @(negedge clk);
        #1;
        check(busy === 1'b0 && addr === '0, "reset aborts a run");
        rst_n = 1'b1;
      end else begin
        check(busy === 1'b0 && done === 1'b1, "end of algorithm");
      end
    end
    finished = 1'b1;
  end
endmodule
