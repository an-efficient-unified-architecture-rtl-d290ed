// barrett_reduce: registered reduction of a signed accumulator modulo q.
//
// The accumulators hold unreduced signed sums; for prime q they are reduced
// on read-out by a general Barrett reduction, with q chosen at run time.
// The magnitude u = |x| is reduced as
//   t = floor(u * m / 2^BAR_K),  m = floor(2^BAR_K / q),  r = u - t*q,
// followed by one conditional subtraction of q; since u < 2^BAR_K the
// estimate t is at most one below floor(u/q). A negative x then gives
// q - r (or 0). Reducing the magnitude and restoring the sign, and the choice
// BAR_K = ACC_W, are this design's own; the document names the Barrett
// reduction and the clocked output register only.
//
// Interface: q and m must match (m from xnet_pkg::ring_bar_m). When en is
// high the result is registered on the rising clock edge: one cycle latency.
module barrett_reduce
  import xnet_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic signed [ACC_W-1:0] x,
  input  logic [Q_W:0]            q,
  input  logic [BAR_M_W-1:0]      m,
  output logic [Q_W-1:0]          r
);

  localparam int unsigned PW = ACC_W + BAR_M_W;

  logic [ACC_W-1:0] u;
  logic [PW-1:0]    prod;
  logic [ACC_W-1:0] t;
  logic [ACC_W-1:0] rem;
  logic [ACC_W-1:0] rem1;
  logic [Q_W-1:0]   res;

  always_comb begin
    u    = x[ACC_W-1] ? ACC_W'(-x) : ACC_W'(x);
    prod = PW'(u) * PW'(m);
    t    = ACC_W'(prod >> BAR_K);
    rem  = u - ACC_W'(t * ACC_W'(q));
    rem1 = (rem >= ACC_W'(q)) ? rem - ACC_W'(q) : rem;
    if (x[ACC_W-1] && rem1 != '0)
      res = Q_W'(ACC_W'(q) - rem1);
    else
      res = Q_W'(rem1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  r <= '0;
    else if (en) r <= res;
  end

endmodule
