// xnet_feedback: one step of the LFSR, a(x) <- a(x) * x mod pi(x).
//
// Multiplying by x shifts every coefficient up by one position; the
// coefficient a_{n-1} that leaves the top is folded back according to pi(x):
//   x^n + 1     (Kyber, Saber): a_0 <- -a_{n-1}
//   x^n - 1     (NTRU)        : a_0 <-  a_{n-1}
//   x^n - x - 1 (NTRU Prime)  : a_0 <-  a_{n-1}, a_1 <- a_0 + a_{n-1}
// Since only these few taps of pi(x) are non-zero, no multipliers are needed:
// the network is a tap selector, an optional negation and one conditional
// adder in front of the second register, as in the unified feedback network
// of the architecture. The tap selector only has inputs for the rings in
// SUPPORTED, so a single-ring build reduces to the scheme-specific network.
// Positions at and above n keep shifting but carry no meaning.
//
// Interface: purely combinational; ring selects the active ring and must be
// one of SUPPORTED. Coefficients are signed S_W-bit values; for NTRU Prime
// the conditional addition can double the magnitude of a ternary coefficient.
module xnet_feedback
  import xnet_pkg::*;
#(
  parameter int unsigned         N         = 857,
  parameter logic [NUM_RINGS-1:0] SUPPORTED = ALL_RINGS
) (
  input  ring_e                        ring,
  input  logic signed [N-1:0][S_W-1:0] a_in,
  output logic signed [N-1:0][S_W-1:0] a_out
);

  logic signed [S_W-1:0] top;
  pi_form_e              form;

  always_comb begin
    top  = '0;
    form = PI_CYCLIC;
    for (int r = 0; r < NUM_RINGS; r++) begin
      if (SUPPORTED[r] && ring_n(r) <= N && ring == ring_e'(r)) begin
        top  = a_in[ring_n(r)-1];
        form = ring_pi(r);
      end
    end
  end

  always_comb begin
    for (int i = 2; i < N; i++)
      a_out[i] = a_in[i-1];
    a_out[0] = (form == PI_NEGACYCLIC) ? S_W'(0) - top : top;
    a_out[1] = (form == PI_NTRUPRIME)  ? a_in[0] + top : a_in[0];
  end

endmodule
