// tb_xnet_lfsr: loads a random small polynomial through the ALPHA = 4 load
// port and then rotates it n times, comparing the exposed power a(x)*x^t with
// a model after every step. A second chain with BETA = 2 rotates every other
// cycle and must expose a*x^t and a*x^(t+1) together. Runs one ring of each
// pi(x) form, including the longest (n = 857) with a padded load word.
module tb_xnet_lfsr;
  import xnet_pkg::*;

  localparam int unsigned N = 857;
  localparam int unsigned ALPHA = 4;

  logic clk = 0, rst_n = 0;
  ring_e ring = RING_KYBER;
  logic load = 0, rot0 = 0, rot1 = 0;
  logic signed [ALPHA-1:0][S_W-1:0] load_data = '0;
  logic signed [0:0][N-1:0][S_W-1:0] pow0;
  logic signed [1:0][N-1:0][S_W-1:0] pow1;
  int checks = 0, failures = 0;
  int m [N];
  int mn [N];

  xnet_lfsr dut0 (.clk(clk), .rst_n(rst_n), .ring(ring), .load(load), .load_data(load_data), .rot(rot0), .pow(pow0));
  xnet_lfsr #(.BETA(2)) dut1 (.clk(clk), .rst_n(rst_n), .ring(ring), .load(load), .load_data(load_data), .rot(rot1), .pow(pow1));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void step_model(input int unsigned r);
    int unsigned n = ring_n(r);
    int top = m[n-1];
    for (int i = n-1; i >= 2; i--) mn[i] = m[i-1];
    mn[0] = (ring_pi(r) == PI_NEGACYCLIC) ? -top : top;
    mn[1] = m[0] + ((ring_pi(r) == PI_NTRUPRIME) ? top : 0);
  endfunction

  task automatic cmp(input string what, input logic signed [N-1:0][S_W-1:0] v,
                     input int unsigned n, input bit use_next);
    for (int i = 0; i < n; i++) begin
      int e = use_next ? mn[i] : m[i];
      checks++;
      if ($signed(v[i]) != S_W'(e)) begin
        failures++;
        if (failures < 10) $display("%s pos %0d: got %0d expected %0d", what, i, $signed(v[i]), e);
      end
    end
  endtask

  task automatic run(input int unsigned r);
    int unsigned n = ring_n(r);
    int unsigned nw = ceil_div(n, ALPHA);
    int kmax = (ring_pi(r) == PI_NEGACYCLIC) ? 5 : 1;
    ring <= ring_e'(r);
    for (int i = 0; i < N; i++) m[i] = $urandom_range(2*kmax) - kmax;
    for (int t = 0; t < nw; t++) begin
      for (int l = 0; l < ALPHA; l++) begin
        int idx;
        idx = (nw-1-t)*ALPHA + l;
        load_data[l] <= (idx < int'(N)) ? S_W'(m[idx]) : S_W'(0);
      end
      load <= 1;
      @(posedge clk);
    end
    load <= 0;
    for (int t = 0; t < n; t++) begin
      #1;
      step_model(r);
      cmp("beta1", pow0[0], n, 0);
      if (t % 2 == 0) begin
        cmp("beta2 k=0", pow1[0], n, 0);
        cmp("beta2 k=1", pow1[1], n, 1);
      end
      rot0 <= 1;
      rot1 <= (t % 2 == 1);
      @(posedge clk);
      rot0 <= 0;
      rot1 <= 0;
      for (int i = 0; i < n; i++) m[i] = mn[i];
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run(RING_SABER);
    run(RING_NTRUHPS509);
    run(RING_SNTRUP857);
    run(RING_SNTRUP653);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
