// pp_chip64 -- the 64-byte ping-pong memory chip.
//
// Eight 8-byte arrays (sram_array8x8) form two halves of 32 bytes: arrays
// 0-3 are the Ping half, arrays 4-7 the Pong half.  A single write-enable
// pin sets the direction of both halves at once: WE=1 writes the Ping half
// from din and reads the Pong half onto dout; WE=0 does the opposite.  Each
// half has its own global decoder (array select: G[1:0] for Ping, G[3:2] for
// Pong) and its own 3-bit local word address (PE1 for Ping, PE2 for Pong),
// so a word can be written into one half and another read from the other
// half in the same cycle.
//
// The pin names follow the chip's pin list (In, Out, WE, G, PE1x, PE2x).
// How the G and PE pins divide between the halves is this design's reading
// of that list; the precharge pin and the supplies are analog and not
// modelled.  Timing: one access per half per clock; dout shows the word read
// in the previous cycle.
module pp_chip64 (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       we,
  input  logic [3:0] g,
  input  logic [2:0] pe1,
  input  logic [2:0] pe2,
  input  logic [7:0] din,
  output logic [7:0] dout
);

  logic [3:0] me_ping, me_pong;
  logic [7:0] q [8];
  logic [2:0] rd_arr_q;

  global_decoder u_gdec_ping (.en(1'b1), .sel(g[1:0]), .me(me_ping));
  global_decoder u_gdec_pong (.en(1'b1), .sel(g[3:2]), .me(me_pong));

  for (genvar i = 0; i < 4; i++) begin : g_ping
    sram_array8x8 u_arr (
      .clk, .rst_n,
      .me   (me_ping[i]),
      .we   (we),
      .addr (pe1),
      .din  (din),
      .dout (q[i])
    );
  end

  for (genvar i = 0; i < 4; i++) begin : g_pong
    sram_array8x8 u_arr (
      .clk, .rst_n,
      .me   (me_pong[i]),
      .we   (!we),
      .addr (pe2),
      .din  (din),
      .dout (q[4+i])
    );
  end

  // Remember which array was read so its word reaches the output pins.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  rd_arr_q <= '0;
    else if (we) rd_arr_q <= {1'b1, g[3:2]};
    else         rd_arr_q <= {1'b0, g[1:0]};
  end

  assign dout = q[rd_arr_q];

endmodule
