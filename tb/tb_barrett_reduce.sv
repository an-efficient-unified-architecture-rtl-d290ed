// tb_barrett_reduce: reduces extreme and random signed accumulator values
// modulo each prime q (3329, 4621, 4591, 5167) and checks the registered
// result, one cycle after en, against the integer remainder in [0, q).
module tb_barrett_reduce;
  import xnet_pkg::*;

  logic clk = 0, rst_n = 0, en = 0;
  logic signed [ACC_W-1:0] x = '0;
  logic [Q_W:0]            q = '0;
  logic [BAR_M_W-1:0]      m = '0;
  logic [Q_W-1:0]          r;
  int checks = 0, failures = 0;

  barrett_reduce dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input int unsigned ring, input longint xv);
    longint qv = longint'(ring_q(ring));
    longint expv = ((xv % qv) + qv) % qv;
    x  <= ACC_W'(xv);
    q  <= (Q_W+1)'(qv);
    m  <= ring_bar_m(ring);
    en <= 1;
    @(posedge clk);
    en <= 0;
    #1;
    checks++;
    if (longint'(r) != expv) begin
      failures++;
      if (failures < 10) $display("q=%0d x=%0d: got %0d expected %0d", qv, xv, r, expv);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int ring = 0; ring < NUM_RINGS; ring++) begin
      if (!ring_barrett(ring)) continue;
      one(ring, 0);
      one(ring, 1);
      one(ring, -1);
      one(ring, longint'(ring_q(ring)));
      one(ring, -longint'(ring_q(ring)));
      one(ring, (64'sd1 <<< (ACC_W-1)) - 1);
      one(ring, -(64'sd1 <<< (ACC_W-1)));
      repeat (500) one(ring, longint'($signed(ACC_W'($urandom))));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
