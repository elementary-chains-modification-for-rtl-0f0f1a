// tb_cmcu_bia: exhaustive check of the input addressing block with the
// example personality. For every class code and every combination of the
// four logical conditions the next chain code must equal the transition of
// the reference algorithm; class 3 with x4 = 1 returns to chain 0, which
// needs no product term.
module tb_cmcu_bia;
  import tb_gsa_pkg::*;

  logic [3:0] x;
  logic [1:0] z;
  logic [2:0] psi;
  int checks = 0, failures = 0;

  cmcu_bia dut (.x, .z, .psi);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 4; c++) begin
      for (int v = 0; v < 16; v++) begin
        z = 2'(c);
        x = 4'(v);
        #1;
        checks++;
        if (int'(psi) != next_chain(c, x)) begin
          failures++;
          $display("FAIL class=%0d x=%b psi=%0d expected %0d", c, x, psi, next_chain(c, x));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
