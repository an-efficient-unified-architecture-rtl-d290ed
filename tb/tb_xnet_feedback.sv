// tb_xnet_feedback: applies one multiplication by x to random register
// contents for every ring of the unified network, and for a network built for
// Saber alone, and compares all positions with the shift-and-fold rule of the
// ring's pi(x) computed here.
module tb_xnet_feedback;
  import xnet_pkg::*;

  localparam int unsigned N  = 857;
  localparam int unsigned NS = 256;
  localparam logic [NUM_RINGS-1:0] SABER_ONLY = NUM_RINGS'(1) << RING_SABER;

  ring_e                         ring;
  logic signed [N-1:0][S_W-1:0]  a_in, a_out;
  logic signed [NS-1:0][S_W-1:0] s_out;
  int checks = 0, failures = 0;

  xnet_feedback dut (.ring(ring), .a_in(a_in), .a_out(a_out));
  xnet_feedback #(.N(NS), .SUPPORTED(SABER_ONLY)) dut_saber (
    .ring(ring), .a_in(a_in[NS-1:0]), .a_out(s_out));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_at(input int unsigned r, input int i);
    int unsigned n = ring_n(r);
    int top = int'($signed(a_in[n-1]));
    if (i >= 2) return int'($signed(a_in[i-1]));
    if (i == 0) return (ring_pi(r) == PI_NEGACYCLIC) ? -top : top;
    return int'($signed(a_in[0])) + ((ring_pi(r) == PI_NTRUPRIME) ? top : 0);
  endfunction

  initial begin
    for (int rep = 0; rep < 20; rep++) begin
      for (int r = 0; r < NUM_RINGS; r++) begin
        for (int i = 0; i < N; i++) a_in[i] = S_W'($urandom_range(4) - 2);
        ring = ring_e'(r);
        #1;
        for (int i = 0; i < N; i++) begin
          checks++;
          if ($signed(a_out[i]) != S_W'(expect_at(r, i))) begin
            failures++;
            if (failures < 10) $display("ring %0d pos %0d: got %0d expected %0d", r, i, $signed(a_out[i]), expect_at(r, i));
          end
        end
        if (r == RING_SABER)
          for (int i = 0; i < NS; i++) begin
            checks++;
            if ($signed(s_out[i]) != S_W'(expect_at(r, i))) begin
              failures++;
              if (failures < 10) $display("saber-only pos %0d: got %0d", i, $signed(s_out[i]));
            end
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
