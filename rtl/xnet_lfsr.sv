// xnet_lfsr: the register chain that holds the small operand a(x).
//
// The chain has N = largest supported n registers of S_W bits. It has two
// modes:
//   load   : ALPHA small coefficients enter positions 0..ALPHA-1 and every
//            register moves up by ALPHA positions. Words are presented from
//            the highest block of coefficients down to the block holding a_0,
//            so that after ceil(n/ALPHA) loads coefficient a_i sits in
//            position i. Padding lanes of the first word land above n-1.
//   rotate : the chain advances by BETA multiplications by x modulo pi(x)
//            (BETA chained xnet_feedback steps).
// The intermediate powers a(x)*x^k, k = 0..BETA-1, are exposed on pow so
// that the MAC units can use BETA large coefficients in the same cycle.
// The load packing by ALPHA and the rotation by BETA follow the
// architecture; the ordering of the load words is this design's choice.
//
// Interface: load and rot are exclusive, sampled on the rising edge; rst_n is
// an asynchronous active-low reset clearing the chain. pow[k][i] is
// coefficient i of a(x)*x^k mod pi(x), combinational from the registers.
module xnet_lfsr
  import xnet_pkg::*;
#(
  parameter int unsigned          N         = 857,
  parameter int unsigned          ALPHA     = 4,
  parameter int unsigned          BETA      = 1,
  parameter logic [NUM_RINGS-1:0] SUPPORTED = ALL_RINGS
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  ring_e                                 ring,
  input  logic                                  load,
  input  logic signed [ALPHA-1:0][S_W-1:0]      load_data,
  input  logic                                  rot,
  output logic signed [BETA-1:0][N-1:0][S_W-1:0] pow
);

  logic signed [BETA:0][N-1:0][S_W-1:0] step;
  logic signed [N-1:0][S_W-1:0]         state;

  assign step[0] = state;

  for (genvar k = 0; k < BETA; k++) begin : g_step
    xnet_feedback #(.N(N), .SUPPORTED(SUPPORTED)) u_fb (
      .ring  (ring),
      .a_in  (step[k]),
      .a_out (step[k+1])
    );
    assign pow[k] = step[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= '0;
    end else if (load) begin
      for (int i = 0; i < ALPHA; i++)
        state[i] <= load_data[i];
      for (int i = ALPHA; i < N; i++)
        state[i] <= state[i-ALPHA];
    end else if (rot) begin
      state <= step[BETA];
    end
  end

endmodule
