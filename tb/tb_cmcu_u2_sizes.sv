// tb_cmcu_u2_sizes: runs the control unit at the algorithm sizes of the area
// study it is designed for: graph-schemes of K vertices of which a fraction
// p1 are operator vertices, with N microoperations. For each size the
// number of conditions is L = (1 - p1) K / 1.3, the address width
// R = ceil(log2(p1 K)) is split into R1 + R2 so that every chain, plus its
// control microinstruction, fits in 2^R2 words, and the number of classes
// is 0.75 of the number of chains. Sizes covered:
//   K = 100,  p1 = 0.75, N = 50  (75 operator vertices, R = 7)
//   K = 1000, p1 = 0.90, N = 50  (900 operator vertices, R = 10)
//   K = 500,  p1 = 0.75, N = 10  (375 operator vertices, R = 9)
//   K = 300,  p1 = 0.75, N = 100 (225 operator vertices, R = 8)
// Each size gets a random algorithm and random conditions (tb_gsa_runner).
module tb_cmcu_u2_sizes;

  localparam int NCFG = 4;

  int   checks [NCFG];
  int   fails  [NCFG];
  int   steps  [NCFG];
  int   ctrls  [NCFG];
  int   ends   [NCFG];
  int   aborts [NCFG];
  logic fin    [NCFG];

  tb_gsa_runner #(.N(50), .L(19), .R1(5), .R2(2), .R3(5), .H(72), .NV(75), .NCLS(24))
    k100 (.checks(checks[0]), .failures(fails[0]), .n_step(steps[0]), .n_ctrl(ctrls[0]),
          .n_end(ends[0]), .n_abort(aborts[0]), .finished(fin[0]));

  tb_gsa_runner #(.N(50), .L(77), .R1(6), .R2(4), .R3(6), .H(144), .NV(900), .NCLS(48))
    k1000 (.checks(checks[1]), .failures(fails[1]), .n_step(steps[1]), .n_ctrl(ctrls[1]),
           .n_end(ends[1]), .n_abort(aborts[1]), .finished(fin[1]));

  tb_gsa_runner #(.N(10), .L(96), .R1(6), .R2(3), .R3(6), .H(144), .NV(375), .NCLS(48))
    k500n10 (.checks(checks[2]), .failures(fails[2]), .n_step(steps[2]), .n_ctrl(ctrls[2]),
             .n_end(ends[2]), .n_abort(aborts[2]), .finished(fin[2]));

  tb_gsa_runner #(.N(100), .L(58), .R1(4), .R2(4), .R3(4), .H(36), .NV(225), .NCLS(12))
    k300n100 (.checks(checks[3]), .failures(fails[3]), .n_step(steps[3]), .n_ctrl(ctrls[3]),
              .n_end(ends[3]), .n_abort(aborts[3]), .finished(fin[3]));

  int total_checks, total_fails;

  task automatic report();
    total_checks = 0; total_fails = 0;
    for (int k = 0; k < NCFG; k++) begin
      total_checks += checks[k];
      total_fails  += fails[k];
      $display("size %0d: checks=%0d failures=%0d steps=%0d control_mi=%0d ends=%0d aborted=%0d",
               k, checks[k], fails[k], steps[k], ctrls[k], ends[k], aborts[k]);
    end
  endtask

  initial begin
    #20000000;
    report();
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_fails + 1);
    $finish;
  end

  initial begin
    #1;
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    report();
    // every size must have stepped inside chains, passed through control
    // microinstructions and reached the end of its algorithm
    for (int k = 0; k < NCFG; k++) begin
      total_checks += 3;
      if (steps[k] == 0) total_fails++;
      if (ctrls[k] == 0) total_fails++;
      if (ends[k] == 0)  total_fails++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_fails);
    $finish;
  end
endmodule
