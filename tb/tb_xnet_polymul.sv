// tb_xnet_polymul: end-to-end test of the unified multiplier at its default size.
//
// The multiplier is built with its defaults (all nine rings, array of 857
// lanes, ALPHA = 4, BETA = GAMMA = 1). For a sequence of rings chosen to
// cover every form of pi(x) and both reduction paths, the bench draws a
// random small a(x) and a random large b(x), streams them in the documented
// word order, collects r(x) and compares every coefficient with a schoolbook
// product reduced by pi(x) and q in the bench itself. The first operation
// runs without stalls and its cycle count is checked against
// ceil(n/4) + n + n + 1. Later operations insert random input bubbles and
// output back-pressure. The bench counts each mechanism (input stall, output
// stall, each pi(x) form, Barrett and truncation read-out, a ring switch
// between consecutive operations) and fails on one that never occurred.
module tb_xnet_polymul;
  import xnet_pkg::*;

  localparam int unsigned ALPHA  = 4;
  localparam int unsigned BETA   = 1;
  localparam int unsigned GAMMA  = 1;
  localparam int unsigned NMAX   = 857;
  localparam int unsigned DATA_W = (ALPHA*S_W > BETA*Q_W) ? ALPHA*S_W : BETA*Q_W;

  logic                      clk = 1'b0;
  logic                      rst_n = 1'b0;
  logic                      start = 1'b0;
  ring_e                     ring_sel = RING_KYBER;
  logic                      busy, done;
  logic                      in_valid = 1'b0;
  logic                      in_ready;
  logic [DATA_W-1:0]         in_data = '0;
  logic                      out_valid;
  logic                      out_ready = 1'b0;
  logic [GAMMA-1:0][Q_W-1:0] out_data;

  xnet_polymul dut (.*);

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int cnt_in_stall = 0, cnt_out_stall = 0;
  int cnt_form [3] = '{0, 0, 0};
  int cnt_barrett = 0, cnt_trunc = 0, cnt_switch = 0;

  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int a_mem [NMAX];
  int b_mem [NMAX];
  int r_ref [NMAX];
  int r_got [NMAX];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Schoolbook product, then x^k (k >= n) folded back with pi(x), then mod q.
  task automatic reference(input int unsigned r);
    longint c [2*NMAX];
    int unsigned n = ring_n(r);
    longint q = longint'(ring_q(r));
    for (int i = 0; i < 2*NMAX; i++) c[i] = 0;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++)
        c[i+j] += longint'(a_mem[i]) * longint'(b_mem[j]);
    for (int k = 2*n-2; k >= int'(n); k--) begin
      case (ring_pi(r))
        PI_NEGACYCLIC: c[k-n] -= c[k];
        PI_CYCLIC:     c[k-n] += c[k];
        default: begin c[k-n] += c[k]; c[k-n+1] += c[k]; end
      endcase
    end
    for (int i = 0; i < n; i++) r_ref[i] = int'(((c[i] % q) + q) % q);
  endtask

  task automatic run_op(input int unsigned r, input int stall_pct, input bit check_cycles);
    int unsigned n = ring_n(r);
    int unsigned q = ring_q(r);
    int unsigned kmax = (r == 1) ? 5 : (r == 0) ? 3 : 1;
    int unsigned nwa = ceil_div(n, ALPHA);
    int unsigned nwb = ceil_div(n, BETA);
    int unsigned nwr = ceil_div(n, GAMMA);
    int unsigned t_first, t_last, got;
    bit prev_stall;

    for (int i = 0; i < NMAX; i++) begin
      a_mem[i] = int'($urandom_range(2*kmax)) - int'(kmax);
      b_mem[i] = int'($urandom_range(q - 1));
    end
    reference(r);

    if (busy) begin failures++; $display("busy before start"); end
    if (int'(dut.ring) != int'(r)) cnt_switch++;
    ring_sel <= ring_e'(r);
    start    <= 1'b1;
    @(posedge clk);
    start    <= 1'b0;

    t_first = 0;
    got = 0;
    fork
      begin : feed
        for (int t = 0; t < nwa + nwb; t++) begin
          logic [DATA_W-1:0] w;
          w = '0;
          if (t < nwa) begin
            int unsigned blk = nwa - 1 - t;
            for (int l = 0; l < ALPHA; l++) begin
              int idx = blk*ALPHA + l;
              w[l*S_W +: S_W] = (idx < n) ? S_W'(a_mem[idx]) : S_W'(7);
            end
          end else begin
            for (int k = 0; k < BETA; k++) begin
              int idx = (t - nwa)*BETA + k;
              w[k*Q_W +: Q_W] = (idx < n) ? Q_W'(b_mem[idx]) : Q_W'(8191);
            end
          end
          while (stall_pct > 0 && $urandom_range(99) < stall_pct) begin
            in_valid <= 1'b0;
            @(posedge clk);
            cnt_in_stall++;
          end
          in_valid <= 1'b1;
          in_data  <= w;
          @(posedge clk);
          while (!in_ready) @(posedge clk);
          if (t == 0) t_first = cyc;
        end
        in_valid <= 1'b0;
      end
      begin : drain
        while (got < nwr) begin
          logic rdy;
          rdy = !(stall_pct > 0 && $urandom_range(99) < stall_pct);
          out_ready <= rdy;
          @(posedge clk);
          if (out_valid && rdy) begin
            for (int l = 0; l < GAMMA; l++) begin
              int idx = int'(n) - 1 - int'(got*GAMMA) - l;
              if (idx >= 0) r_got[idx] = int'(out_data[l]);
            end
            got++;
            t_last = cyc;
          end else if (out_valid && !rdy) begin
            cnt_out_stall++;
          end
        end
        out_ready <= 1'b0;
      end
    join
    @(posedge clk);
    if (!done) @(posedge clk);
    checks++;
    if (!done) begin failures++; $display("done pulse missing"); end

    for (int i = 0; i < n; i++) begin
      checks++;
      if (r_got[i] != r_ref[i]) begin
        failures++;
        if (failures < 10)
          $display("ring %0d: r[%0d] = %0d, expected %0d", r, i, r_got[i], r_ref[i]);
      end
    end
    if (check_cycles) begin
      checks++;
      if (t_last - t_first + 1 != nwa + nwb + nwr + 1) begin
        failures++;
        $display("ring %0d: %0d cycles from first input to last output, expected %0d",
                 r, t_last - t_first + 1, nwa + nwb + nwr + 1);
      end
    end
    cnt_form[int'(ring_pi(r))]++;
    if (ring_barrett(r)) cnt_barrett++; else cnt_trunc++;
    $display("ring %0d (n=%0d q=%0d) done", r, n, q);
    repeat (2) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    run_op(7, 0, 1);    // sntrup761, no stalls, cycle count
    run_op(0, 0, 1);    // Kyber
    run_op(1, 20, 0);   // Saber with stalls
    run_op(4, 20, 0);   // ntruhrss701
    run_op(8, 10, 0);   // sntrup857, full array
    run_op(5, 10, 0);   // ntruhps821
    foreach (cnt_form[f]) begin
      checks++;
      if (cnt_form[f] == 0) begin failures++; $display("pi form %0d never used", f); end
    end
    checks += 5;
    if (cnt_in_stall == 0)  begin failures++; $display("no input stall"); end
    if (cnt_out_stall == 0) begin failures++; $display("no output stall"); end
    if (cnt_barrett == 0)   begin failures++; $display("no Barrett read-out"); end
    if (cnt_trunc == 0)     begin failures++; $display("no truncation read-out"); end
    if (cnt_switch == 0)    begin failures++; $display("no ring switch"); end
    $display("input stalls %0d, output stalls %0d, forms %0d/%0d/%0d, barrett %0d, trunc %0d, switches %0d",
             cnt_in_stall, cnt_out_stall, cnt_form[0], cnt_form[1], cnt_form[2],
             cnt_barrett, cnt_trunc, cnt_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
