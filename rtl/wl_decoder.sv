// wl_decoder -- local word-line decoder of an 8-word memory array.
//
// Each of the eight word lines is driven by a 4-input NAND gate whose inputs
// are the three address bits (true or complemented) and the array's memory
// enable ME, followed by the word-line driver (an inverter).  Word line i is
// therefore high exactly when ME=1 and addr=i; with ME=0 all word lines stay
// low and the array is idle.  Purely combinational.
module wl_decoder (
  input  logic       me,
  input  logic [2:0] addr,
  output logic [7:0] wl
);

  logic [7:0] wl_n;   // NAND outputs, active low

  always_comb begin
    for (int i = 0; i < 8; i++) begin
      wl_n[i] = ~(me & (addr[2] ~^ i[2]) & (addr[1] ~^ i[1]) & (addr[0] ~^ i[0]));
    end
  end

  assign wl = ~wl_n;

endmodule
