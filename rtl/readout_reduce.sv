// readout_reduce: read-out port of the accumulator array.
//
// During the read phase the accumulators shift towards the top of the array
// by GAMMA positions per cycle. This block picks the GAMMA accumulators that
// currently sit at positions n-1, n-2, ..., n-GAMMA for the active ring (a
// multiplexer over the supported degrees n) and reduces each modulo q:
//   - prime q (Kyber, NTRU Prime): one barrett_reduce per lane,
//   - power-of-two q (Saber, NTRU): truncation to the low log2(q) bits,
//     which is exact for two's-complement accumulators.
// Both paths are registered, so the result appears one cycle after en; the
// path is then chosen by the ring. GAMMA parallel Barrett units, the tap
// multiplexer and the Barrett/truncation selection follow the architecture.
//
// Interface: acc is the whole accumulator array; data[l] carries the reduced
// coefficient that was at position n-1-l when en was high. ring must stay
// constant while results are read.
module readout_reduce
  import xnet_pkg::*;
#(
  parameter int unsigned          N         = 857,
  parameter int unsigned          GAMMA     = 1,
  parameter logic [NUM_RINGS-1:0] SUPPORTED = ALL_RINGS
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           en,
  input  ring_e                          ring,
  input  logic signed [N-1:0][ACC_W-1:0] acc,
  output logic [GAMMA-1:0][Q_W-1:0]      data
);

  logic [Q_W:0]       q;
  logic [BAR_M_W-1:0] m;
  logic               use_barrett;

  always_comb begin
    q           = (Q_W+1)'(ring_q(int'(ring)));
    m           = ring_bar_m(int'(ring));
    use_barrett = ring_barrett(int'(ring));
  end

  for (genvar l = 0; l < GAMMA; l++) begin : g_lane
    logic signed [ACC_W-1:0] sel;
    logic [Q_W-1:0]          bar_r;
    logic [Q_W-1:0]          trunc_r;

    always_comb begin
      sel = '0;
      for (int r = 0; r < NUM_RINGS; r++)
        if (SUPPORTED[r] && ring_n(r) <= N && ring_n(r) > l && ring == ring_e'(r))
          sel = acc[ring_n(r)-1-l];
    end

    barrett_reduce u_bar (
      .clk   (clk),
      .rst_n (rst_n),
      .en    (en),
      .x     (sel),
      .q     (q),
      .m     (m),
      .r     (bar_r)
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)  trunc_r <= '0;
      else if (en) trunc_r <= Q_W'(sel) & Q_W'(q - 1'b1);
    end

    assign data[l] = use_barrett ? bar_r : trunc_r;
  end

endmodule
