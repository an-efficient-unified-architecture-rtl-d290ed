// tb_mult_precompute: checks every shared product k*b, k in [-KMAX, KMAX],
// for the extreme and random large coefficients against integer products.
module tb_mult_precompute;
  import xnet_pkg::*;

  logic [Q_W-1:0]                     b;
  logic signed [2*KMAX:0][PROD_W-1:0] prod;
  int checks = 0, failures = 0;

  mult_precompute dut (.b(b), .prod(prod));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int unsigned bv);
    b = Q_W'(bv);
    #1;
    for (int i = 0; i <= 2*KMAX; i++) begin
      int expv = (i - int'(KMAX)) * int'(bv);
      checks++;
      if (int'($signed(prod[i])) != expv) begin
        failures++;
        $display("b=%0d k=%0d: got %0d expected %0d", bv, i - int'(KMAX), $signed(prod[i]), expv);
      end
    end
  endtask

  initial begin
    check(0);
    check(1);
    check(8191);
    check(3328);
    repeat (200) check($urandom_range(8191));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
