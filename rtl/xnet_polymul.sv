// xnet_polymul: unified x-net polynomial multiplier, r(x) = a(x)*b(x) mod pi(x) mod q.
//
// The multiplier runs a schoolbook algorithm with one MAC lane per result
// coefficient. Instead of forming the full product and dividing by pi(x),
// it keeps a(x) in an LFSR and multiplies it by x modulo pi(x) every cycle,
// so that cycle i adds b_i * (a(x) * x^i mod pi(x)) into all n accumulators:
//     r(x) = sum_i b_i * (x^i a(x) mod pi(x)).
// a(x) is the small operand (coefficients in [-KMAX, KMAX]), so each lane
// selects a precomputed multiple of b_i instead of multiplying. The
// accumulators are wide enough for the unreduced sum and are reduced mod q
// only on read-out (Barrett for prime q, truncation for q = 2^k).
//
// One build supports every ring in SUPPORTED (default: Kyber, Saber, NTRU
// HPS/HRSS and NTRU Prime up to n = 857), selected at run time by ring; the
// array is sized for the largest n. Restricting SUPPORTED to one ring gives
// the scheme-specific multiplier with a trimmed feedback network and
// read-out multiplexer. ALPHA small coefficients are loaded, BETA large
// coefficients consumed and GAMMA results produced per bus word; the default
// ALPHA = 4, BETA = GAMMA = 1 is the unified configuration of the design.
//
// Bus (a single shared stream, words in this order):
//   LOAD    ceil(n/ALPHA) words; word t carries a_{ALPHA*w+l} in lane l,
//           bits [l*S_W +: S_W] (two's complement), w = ceil(n/ALPHA)-1-t:
//           the block holding a_0 comes last. Lanes beyond n-1 are ignored;
//           the others must lie in [-KMAX, KMAX] (checked by an assertion).
//   COMPUTE ceil(n/BETA) words; word t carries b_{BETA*t+k} in lane k, bits
//           [k*Q_W +: Q_W], 0 <= b < q. Lanes beyond n-1 are ignored.
//   READ    ceil(n/GAMMA) words on out_data; word t lane l holds
//           r_{n-1-GAMMA*t-l} (highest coefficient first; indices below 0
//           read as 0), fully reduced to [0, q).
// start (while busy is low) captures ring. in_valid/in_ready and
// out_valid/out_ready are valid/ready handshakes; done pulses once the last
// result word has been taken. Without stalls an operation takes
// ceil(n/ALPHA) + ceil(n/BETA) + ceil(n/GAMMA) + 1 cycles from the first
// input word to the last output word.
module xnet_polymul
  import xnet_pkg::*;
#(
  parameter logic [NUM_RINGS-1:0] SUPPORTED = ALL_RINGS,
  parameter int unsigned          ALPHA     = 4,
  parameter int unsigned          BETA      = 1,
  parameter int unsigned          GAMMA     = 1,
  localparam int unsigned         N         = max_n(SUPPORTED),
  localparam int unsigned         DATA_W    = (ALPHA*S_W > BETA*Q_W) ? ALPHA*S_W : BETA*Q_W
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  ring_e                     ring_sel,
  output logic                      busy,
  output logic                      done,
  input  logic                      in_valid,
  output logic                      in_ready,
  input  logic [DATA_W-1:0]         in_data,
  output logic                      out_valid,
  input  logic                      out_ready,
  output logic [GAMMA-1:0][Q_W-1:0] out_data
);

  ring_e           ring;
  logic            lfsr_load, lfsr_rot;
  logic            mac_add, mac_clr, mac_shift, ro_en;
  logic [ALPHA-1:0] a_lane_ok;
  logic [BETA-1:0]  b_lane_ok;

  logic signed [ALPHA-1:0][S_W-1:0]              a_word;
  logic signed [BETA-1:0][N-1:0][S_W-1:0]        a_pow;
  logic signed [BETA-1:0][2*KMAX:0][PROD_W-1:0]  prod;
  logic signed [N-1:0][ACC_W-1:0]                acc;

  xnet_ctrl #(.ALPHA(ALPHA), .BETA(BETA), .GAMMA(GAMMA)) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .ring_in   (ring_sel),
    .ring      (ring),
    .busy      (busy),
    .done      (done),
    .in_valid  (in_valid),
    .in_ready  (in_ready),
    .out_valid (out_valid),
    .out_ready (out_ready),
    .lfsr_load (lfsr_load),
    .lfsr_rot  (lfsr_rot),
    .mac_add   (mac_add),
    .mac_clr   (mac_clr),
    .mac_shift (mac_shift),
    .ro_en     (ro_en),
    .a_lane_ok (a_lane_ok),
    .b_lane_ok (b_lane_ok)
  );

  always_comb
    for (int l = 0; l < ALPHA; l++)
      a_word[l] = a_lane_ok[l] ? in_data[l*S_W +: S_W] : '0;

  // Only rings the build supports can be started.
  property p_ring_supported;
    @(posedge clk) disable iff (!rst_n) start && !busy |-> SUPPORTED[ring_sel];
  endproperty
  a_ring_supported: assert property (p_ring_supported);

  // Every loaded small coefficient must have a precomputed product.
  always_ff @(posedge clk)
    if (lfsr_load)
      for (int l = 0; l < ALPHA; l++)
        assert (int'($signed(a_word[l])) >= -int'(KMAX) && int'($signed(a_word[l])) <= int'(KMAX))
          else $error("xnet_polymul: small coefficient %0d out of range", int'($signed(a_word[l])));

  xnet_lfsr #(.N(N), .ALPHA(ALPHA), .BETA(BETA), .SUPPORTED(SUPPORTED)) u_lfsr (
    .clk       (clk),
    .rst_n     (rst_n),
    .ring      (ring),
    .load      (lfsr_load),
    .load_data (a_word),
    .rot       (lfsr_rot),
    .pow       (a_pow)
  );

  for (genvar k = 0; k < BETA; k++) begin : g_pre
    logic [Q_W-1:0] b;
    assign b = b_lane_ok[k] ? in_data[k*Q_W +: Q_W] : '0;
    mult_precompute u_pre (.b(b), .prod(prod[k]));
  end

  for (genvar j = 0; j < N; j++) begin : g_mac
    logic signed [BETA-1:0][S_W-1:0] a_lane;
    logic signed [ACC_W-1:0]         shift_in;

    always_comb
      for (int k = 0; k < BETA; k++)
        a_lane[k] = a_pow[k][j];

    if (j >= GAMMA) begin : g_chain
      assign shift_in = acc[j-GAMMA];
    end else begin : g_first
      assign shift_in = '0;
    end

    mac_unit #(.BETA(BETA)) u_mac (
      .clk      (clk),
      .rst_n    (rst_n),
      .add_en   (mac_add),
      .clr      (mac_clr),
      .shift_en (mac_shift),
      .a        (a_lane),
      .prod     (prod),
      .shift_in (shift_in),
      .acc      (acc[j])
    );
  end

  readout_reduce #(.N(N), .GAMMA(GAMMA), .SUPPORTED(SUPPORTED)) u_ro (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (ro_en),
    .ring  (ring),
    .acc   (acc),
    .data  (out_data)
  );

endmodule
