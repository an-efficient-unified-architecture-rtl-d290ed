// tb_mac_unit: drives one MAC lane (BETA = 2) through clear, accumulate,
// hold and shift cycles with random small coefficients and random shared
// products, and compares the accumulator with a model after every edge.
module tb_mac_unit;
  import xnet_pkg::*;

  localparam int unsigned BETA = 2;

  logic clk = 0, rst_n = 0;
  logic add_en = 0, clr = 0, shift_en = 0;
  logic signed [BETA-1:0][S_W-1:0]              a;
  logic signed [BETA-1:0][2*KMAX:0][PROD_W-1:0] prod;
  logic signed [ACC_W-1:0]                      shift_in;
  logic signed [ACC_W-1:0]                      acc;
  longint model = 0;
  int checks = 0, failures = 0;
  int n_add = 0, n_shift = 0, n_clr = 0;

  mac_unit #(.BETA(BETA)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; prod = '0; shift_in = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int c = 0; c < 1000; c++) begin
      int op;
      longint nxt;
      int av [BETA];
      op  = $urandom_range(9);
      nxt = model;
      for (int k = 0; k < BETA; k++) begin
        av[k] = int'($urandom_range(2*KMAX)) - int'(KMAX);
        a[k] = S_W'(av[k]);
        for (int s = 0; s <= 2*KMAX; s++)
          prod[k][s] = PROD_W'(int'($urandom_range(65535)) - 32768);
      end
      shift_in = ACC_W'(int'($urandom) >>> 6);
      add_en   = (op < 6);
      clr      = (op == 0);
      shift_en = (op == 8);
      if (shift_en) begin
        nxt = longint'(shift_in); n_shift++;
      end else if (add_en) begin
        nxt = clr ? 0 : model;
        for (int k = 0; k < BETA; k++)
          nxt += longint'($signed(prod[k][av[k] + int'(KMAX)]));
        n_add++; if (clr) n_clr++;
      end
      @(posedge clk);
      #1;
      model = longint'($signed(ACC_W'(nxt)));
      checks++;
      if (longint'(acc) != model) begin
        failures++;
        if (failures < 10) $display("cycle %0d: acc %0d expected %0d", c, acc, model);
      end
    end
    checks++;
    if (n_add == 0 || n_shift == 0 || n_clr == 0) begin
      failures++;
      $display("mode never used: add %0d shift %0d clear %0d", n_add, n_shift, n_clr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
