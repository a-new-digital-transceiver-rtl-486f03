// Binary-to-one-hot decoder (4-to-16 for the default size).
//
// Drives one active-high output per code, for example one indicator LED per
// function that the transmitter's switches select. Purely combinational.
// Active-high outputs are this design's choice.
module decoder_4to16 #(
  parameter int unsigned IN_W = 4
) (
  input  logic [IN_W-1:0]       code,
  output logic [(1<<IN_W)-1:0]  onehot
);

  always_comb begin
    onehot       = '0;
    onehot[code] = 1'b1;
  end

endmodule
