// 16-to-4 priority encoder for a bank of active-low switches.
//
// Each switch pulls its input LOW when pressed. The output is the binary index
// of the pressed switch; when several are pressed the highest index wins. With
// no switch pressed the output is all ones (4'b1111), so an idle transmitter
// sends nothing but ones. Note that switch 15 also encodes to 4'b1111; the
// start bit, not the code, tells a pressed switch 15 from the idle state.
//
// Purely combinational. The all-ones idle code follows the original design;
// binary index coding and highest-index priority are this design's choices.
module priority_encoder #(
  parameter int unsigned N     = 16,
  parameter int unsigned OUT_W = $clog2(N)
) (
  input  logic [N-1:0]     sw_n,   // active-low switch inputs
  output logic [OUT_W-1:0] code    // index of highest pressed switch, all ones if none
);

  always_comb begin
    code = '1;
    for (int unsigned i = 0; i < N; i++) begin
      if (!sw_n[i]) code = OUT_W'(i);
    end
  end

endmodule
