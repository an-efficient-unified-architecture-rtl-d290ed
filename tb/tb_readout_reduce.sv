// tb_readout_reduce: fills the accumulator array with random signed values
// and, for every ring, checks that the read-out port returns the top
// accumulators (position n-1, and n-2 for the GAMMA = 2 instance) reduced
// into [0, q), registered one cycle after en, via Barrett or truncation.
module tb_readout_reduce;
  import xnet_pkg::*;

  localparam int unsigned N = 857;

  logic clk = 0, rst_n = 0, en = 0;
  ring_e ring = RING_KYBER;
  logic signed [N-1:0][ACC_W-1:0] acc;
  logic [0:0][Q_W-1:0] d1;
  logic [1:0][Q_W-1:0] d2;
  int checks = 0, failures = 0;

  readout_reduce dut1 (.clk(clk), .rst_n(rst_n), .en(en), .ring(ring), .acc(acc), .data(d1));
  readout_reduce #(.GAMMA(2)) dut2 (.clk(clk), .rst_n(rst_n), .en(en), .ring(ring), .acc(acc), .data(d2));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int modq(input longint v, input int unsigned q);
    return int'(((v % longint'(q)) + longint'(q)) % longint'(q));
  endfunction

  task automatic cmp(input string what, input int got, input int e);
    checks++;
    if (got != e) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, e);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int rep = 0; rep < 100; rep++) begin
      for (int r = 0; r < NUM_RINGS; r++) begin
        int unsigned n, q;
        longint v0, v1;
        n = ring_n(r);
        q = ring_q(r);
        for (int i = 0; i < N; i++) acc[i] = ACC_W'($urandom);
        v0 = longint'($signed(acc[n-1]));
        v1 = longint'($signed(acc[n-2]));
        ring <= ring_e'(r);
        en   <= 1;
        @(posedge clk);
        en   <= 0;
        #1;
        for (int i = 0; i < N; i++) acc[i] = ACC_W'($urandom);  // must not matter
        #1;
        cmp($sformatf("ring %0d gamma1", r), int'(d1[0]), modq(v0, q));
        cmp($sformatf("ring %0d gamma2 lane0", r), int'(d2[0]), modq(v0, q));
        cmp($sformatf("ring %0d gamma2 lane1", r), int'(d2[1]), modq(v1, q));
        @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
