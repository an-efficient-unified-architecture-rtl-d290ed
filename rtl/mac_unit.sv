// mac_unit: one coefficient lane of the x-net accumulator array.
//
// Lane j holds the accumulator r_j. In the compute phase it adds, for each of
// the BETA large coefficients handled in this cycle, the precomputed product
// selected by the small coefficient a_j of the matching power a(x)*x^k: the
// multiplier of a textbook MAC is replaced by a multiplexer over the shared
// products (-KMAX..KMAX times b). The first compute cycle starts from zero
// instead of the old value, which clears r(x) without a separate pass.
// In the read phase the lane instead loads shift_in, the accumulator GAMMA
// lanes below it, so that r(x) moves towards the read-out end of the array.
// No reduction mod q happens here: the accumulator is wide enough for the
// unreduced sum and is reduced once on read-out.
//
// Interface: add_en / clr select accumulate (clr = start from zero),
// shift_en selects the read-out shift; at most one of add_en and shift_en is
// high. A small coefficient outside [-KMAX, KMAX] selects no product (adds
// zero); lanes above n-1 may hold such values and are never read. The
// accumulator updates on the rising clock edge; rst_n is an
// asynchronous active-low reset to zero.
module mac_unit
  import xnet_pkg::*;
#(
  parameter int unsigned BETA = 1
) (
  input  logic                                         clk,
  input  logic                                         rst_n,
  input  logic                                         add_en,
  input  logic                                         clr,
  input  logic                                         shift_en,
  input  logic signed [BETA-1:0][S_W-1:0]              a,
  input  logic signed [BETA-1:0][2*KMAX:0][PROD_W-1:0] prod,
  input  logic signed [ACC_W-1:0]                      shift_in,
  output logic signed [ACC_W-1:0]                      acc
);

  logic signed [ACC_W-1:0] sum;

  always_comb begin
    sum = clr ? '0 : acc;
    for (int k = 0; k < BETA; k++) begin
      for (int s = 0; s <= 2*KMAX; s++) begin
        if (int'($signed(a[k])) == s - int'(KMAX))
          sum = sum + ACC_W'($signed(prod[k][s]));
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        acc <= '0;
    else if (shift_en) acc <= shift_in;
    else if (add_en)   acc <= sum;
  end

endmodule
