// tb_xnet_ctrl: runs the sequencer for several rings and packing factors
// and counts the control pulses of each phase: ceil(n/ALPHA) loads,
// ceil(n/BETA) accumulate steps (the first one clearing), ceil(n/GAMMA)
// read-out shifts, one done pulse, and the stall-free total of
// ceil(n/ALPHA)+ceil(n/BETA)+ceil(n/GAMMA) cycles of bus activity. It also
// checks that input and output stalls hold the phase and that the lane masks
// cover exactly the coefficients below n.
module tb_xnet_ctrl;
  import xnet_pkg::*;

  localparam int unsigned ALPHA = 4;
  localparam int unsigned BETA  = 2;
  localparam int unsigned GAMMA = 2;

  logic clk = 0, rst_n = 0, start = 0;
  ring_e ring_in = RING_KYBER, ring;
  logic busy, done, in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic lfsr_load, lfsr_rot, mac_add, mac_clr, mac_shift, ro_en;
  logic [ALPHA-1:0] a_lane_ok;
  logic [BETA-1:0]  b_lane_ok;
  int checks = 0, failures = 0;
  int n_load, n_rot, n_clr, n_shift, n_done, n_a_ok, n_b_ok, n_stall_in, n_stall_out;

  xnet_ctrl #(.ALPHA(ALPHA), .BETA(BETA), .GAMMA(GAMMA)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (lfsr_load) begin
      n_load++;
      for (int l = 0; l < ALPHA; l++) n_a_ok += a_lane_ok[l];
    end
    if (mac_add) begin
      n_rot++;
      for (int k = 0; k < BETA; k++) n_b_ok += b_lane_ok[k];
    end
    if (mac_clr) n_clr++;
    if (mac_shift) n_shift++;
    if (done) n_done++;
    if (busy && in_ready && !in_valid) n_stall_in++;
    if (out_valid && !out_ready) n_stall_out++;
  end

  task automatic cmp(input string what, input int got, input int e);
    checks++;
    if (got != e) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, e);
    end
  endtask

  task automatic run(input int unsigned r, input int stall_pct);
    int unsigned n = ring_n(r);
    int cycles = 0;
    n_load = 0; n_rot = 0; n_clr = 0; n_shift = 0; n_done = 0; n_a_ok = 0; n_b_ok = 0;
    ring_in <= ring_e'(r);
    start <= 1;
    @(posedge clk);
    start <= 0;
    while (!done) begin
      in_valid  <= !(stall_pct > 0 && $urandom_range(99) < stall_pct);
      out_ready <= !(stall_pct > 0 && $urandom_range(99) < stall_pct);
      @(posedge clk);
      cycles++;
    end
    in_valid <= 0;
    out_ready <= 0;
    #1;
    cmp("ring", int'(ring), int'(r));
    cmp("loads", n_load, ceil_div(n, ALPHA));
    cmp("accumulate steps", n_rot, ceil_div(n, BETA));
    cmp("clears", n_clr, 1);
    cmp("shifts", n_shift, ceil_div(n, GAMMA));
    cmp("done", n_done, 1);
    cmp("valid a lanes", n_a_ok, n);
    cmp("valid b lanes", n_b_ok, n);
    if (stall_pct == 0)
      cmp("cycles", cycles, ceil_div(n, ALPHA) + ceil_div(n, BETA) + ceil_div(n, GAMMA) + 2);
    @(posedge clk);
    cmp("idle", int'(busy), 0);
  endtask

  initial begin
    n_stall_in = 0; n_stall_out = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run(RING_SNTRUP761, 0);
    run(RING_KYBER, 0);
    run(RING_NTRUHPS509, 30);
    run(RING_SNTRUP857, 30);
    checks++;
    if (n_stall_in == 0 || n_stall_out == 0) begin failures++; $display("no stall seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
