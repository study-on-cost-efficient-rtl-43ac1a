// sram_array8x8 -- one 8-word x 8-bit (64-bit) memory array of the 64-byte
// ping-pong chip, at word level.
//
// The array is a grid of 6-transistor cells with one word line per word,
// differential bit lines, precharge/equalisation and a latch sense amplifier
// per column.  Here the cells are flip-flops, the word line comes from the
// array's own NAND decoder (wl_decoder) and a read returns the selected word
// on the next clock edge, as the sense amplifiers would at the end of the
// access.  One access per clock: with me=1, we=1 writes din into the word at
// addr; with me=1, we=0 reads it onto dout (dout holds while me=0).  Cell
// contents are not reset; dout resets to zero.
module sram_array8x8 (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       me,
  input  logic       we,
  input  logic [2:0] addr,
  input  logic [7:0] din,
  output logic [7:0] dout
);

  logic [7:0] wl;
  logic [7:0] cells [8];
  logic [7:0] bitline;

  wl_decoder u_dec (.me(me), .addr(addr), .wl(wl));

  // Cell write through the selected word line.
  always_ff @(posedge clk) begin
    for (int i = 0; i < 8; i++) begin
      if (wl[i] && we) cells[i] <= din;
    end
  end

  // The selected word drives the bit lines (one-hot word line, wired OR).
  always_comb begin
    bitline = '0;
    for (int i = 0; i < 8; i++) begin
      if (wl[i]) bitline = bitline | cells[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          dout <= '0;
    else if (me && !we)  dout <= bitline;
  end

endmodule
