// global_decoder -- memory-enable decoder of the 64-byte ping-pong chip.
//
// Turns a 2-bit array number into the one-hot memory-enable (ME) lines of the
// four 8-byte arrays of one half of the chip; `en` low disables all four.
// The chip has two of these, one per half, driven by global pins G[1:0] and
// G[3:2].  Built like the word-line decoder: one NAND per output followed by
// an inverter.  Purely combinational.
module global_decoder (
  input  logic       en,
  input  logic [1:0] sel,
  output logic [3:0] me
);

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      me[i] = ~(~(en & (sel[1] ~^ i[1]) & (sel[0] ~^ i[0])));
    end
  end

endmodule
