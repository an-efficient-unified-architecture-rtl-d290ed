// xnet_ctrl: phase sequencer of the x-net multiplier.
//
// One multiplication runs through three phases, each a fixed number of
// transfers on the shared bus:
//   LOAD    : ceil(n/ALPHA) words of a(x), shifted into the LFSR,
//   COMPUTE : ceil(n/BETA)  words of b(x); each word is accumulated into all
//             lanes and the LFSR rotates by BETA,
//   READ    : ceil(n/GAMMA) words of r(x) leave through the read-out port,
// so the bus-limited latency is ceil(n/ALPHA)+ceil(n/BETA)+ceil(n/GAMMA)
// transfers. The phases and their lengths follow the architecture; the
// handshakes are this design's choice. The input side is a valid/ready
// stream: a word is taken in a cycle with in_valid and in_ready; a missing
// in_valid stalls the phase. The output side has a one-word register stage
// (the reduction register) with valid/ready; out_ready low stalls the
// accumulator shift. The ring is captured at start and held for the whole
// operation.
//
// Interface: start is accepted only while idle (busy low). done pulses for
// one cycle after the last result word has been taken. b_lane_ok[k] is low
// for large-coefficient lanes of the last compute word beyond n-1, and
// a_lane_ok[l] likewise for padding lanes of the first load word.
module xnet_ctrl
  import xnet_pkg::*;
#(
  parameter int unsigned ALPHA = 4,
  parameter int unsigned BETA  = 1,
  parameter int unsigned GAMMA = 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  ring_e           ring_in,
  output ring_e           ring,
  output logic            busy,
  output logic            done,
  input  logic            in_valid,
  output logic            in_ready,
  output logic            out_valid,
  input  logic            out_ready,
  output logic            lfsr_load,
  output logic            lfsr_rot,
  output logic            mac_add,
  output logic            mac_clr,
  output logic            mac_shift,
  output logic            ro_en,
  output logic [ALPHA-1:0] a_lane_ok,
  output logic [BETA-1:0]  b_lane_ok
);

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_COMPUTE, S_READ} state_e;

  state_e      state;
  logic [10:0] cnt;
  logic [10:0] n_words;
  logic [10:0] n;
  logic        advance;
  logic        last;

  always_comb begin
    n = 11'(ring_n(int'(ring)));
    case (state)
      S_LOAD:    n_words = 11'(ceil_div(ring_n(int'(ring)), ALPHA));
      S_COMPUTE: n_words = 11'(ceil_div(ring_n(int'(ring)), BETA));
      default:   n_words = 11'(ceil_div(ring_n(int'(ring)), GAMMA));
    endcase
    last    = (cnt == n_words - 1'b1);
    advance = !out_valid || out_ready;
  end

  assign busy      = (state != S_IDLE);
  assign in_ready  = (state == S_LOAD) || (state == S_COMPUTE);
  assign lfsr_load = (state == S_LOAD) && in_valid;
  assign lfsr_rot  = (state == S_COMPUTE) && in_valid;
  assign mac_add   = lfsr_rot;
  assign mac_clr   = lfsr_rot && (cnt == '0);
  assign mac_shift = (state == S_READ) && advance && (cnt < n_words);
  assign ro_en     = mac_shift;

  always_comb
    for (int l = 0; l < ALPHA; l++)
      a_lane_ok[l] = ((32'(n_words) - 1 - 32'(cnt)) * ALPHA + l) < 32'(n);

  always_comb
    for (int k = 0; k < BETA; k++)
      b_lane_ok[k] = (32'(cnt) * BETA + k) < 32'(n);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cnt       <= '0;
      ring      <= RING_KYBER;
      out_valid <= 1'b0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          ring  <= ring_in;
          cnt   <= '0;
          state <= S_LOAD;
        end
        S_LOAD, S_COMPUTE: if (in_valid) begin
          if (last) begin
            cnt   <= '0;
            state <= (state == S_LOAD) ? S_COMPUTE : S_READ;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_READ: if (advance) begin
          if (cnt < n_words) begin
            out_valid <= 1'b1;
            cnt       <= cnt + 1'b1;
          end else begin
            out_valid <= 1'b0;
            done      <= 1'b1;
            state     <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A result word must stay offered until it is taken.
  property p_out_hold;
    @(posedge clk) disable iff (!rst_n) out_valid && !out_ready |=> out_valid;
  endproperty
  a_out_hold: assert property (p_out_hold);

  // The ring cannot change in the middle of an operation.
  property p_ring_stable;
    @(posedge clk) disable iff (!rst_n) busy && $past(busy) |-> ring == $past(ring);
  endproperty
  a_ring_stable: assert property (p_ring_stable);

endmodule
