// sppm_top -- Sandwich Ping-Pong Memory: a row-in / column-out transpose
// buffer that shares P rows between its two banks, with its built-in test,
// an 8x8 two-dimensional DCT that uses the same kind of buffer, and the
// 64-byte ping-pong memory chip.
//
// Transpose buffer (sppm_buffer).  Frames of M x N words enter row by row on
// the in_* stream and leave column by column on the out_* stream.  A plain
// ping-pong buffer would need 2*M*N words; here the last P rows of both banks
// share one single-port array, the Common Bar, so only (2M-P)*N words are
// stored:
//     Ping  (M-P)*N  |  Common Bar  P*N  |  Pong  (M-P)*N
// The price is a write gap of IDLE = P*N-(M-P) cycles after every frame
// (in_ready low), so the input rate drops to M*N/(M*N+IDLE).  The first word
// of a frame appears on out_data INIT+1 cycles after its first word was
// accepted (INIT = M*N-(M-P), plus one cycle of array latency).
// Flow control: a missing input word in the middle of a frame freezes the
// whole schedule for that cycle (stall); the output has no back-pressure.
//
// Built-in test (sppm_bist).  A pulse on bist_start runs the modified
// March C- on Ping and Pong together, then on the Common Bar.  While
// bist_busy is high the test owns the buffer's arrays through its test port,
// the input is closed and no output is made; start it only when no frame is
// in flight.  The test overwrites the arrays.
//
// 2-D DCT (dct2d_sppm).  Independent of the buffer above: 8x8 blocks of
// signed 8-bit samples enter on dct_in_* (eight vectors of eight samples)
// and leave as 16-bit coefficients Y_pq on dct_out_*, p-major.  It is the
// row-column DCT with an 8x8, P = 1 sandwich buffer as its transpose memory.
//
// Chip (pp_chip64).  The separately built 64-byte ping-pong memory (eight
// 8-byte arrays with global and local decoders); its pins are brought out
// unchanged as chip_*.
module sppm_top
  import sppm_pkg::*;
#(
  parameter int M = 16,
  parameter int N = 512,
  parameter int P = 1,
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  // row-major input stream
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  // column-major output stream
  output logic         out_valid,
  output logic [W-1:0] out_data,
  output logic         out_first,
  output logic         out_last,
  // schedule events
  output logic         stall,
  output logic         idle_gap,
  // built-in test
  input  logic         bist_start,
  output logic         bist_busy,
  output logic         bist_done,
  output logic         bist_fail,
  output logic [15:0]  bist_errors,
  output logic [16:0]  bist_reads,
  // 64-byte ping-pong chip
  input  logic         chip_we,
  input  logic [3:0]   chip_g,
  input  logic [2:0]   chip_pe1,
  input  logic [2:0]   chip_pe2,
  input  logic [7:0]   chip_din,
  output logic [7:0]   chip_dout,
  // 8x8 two-dimensional DCT
  input  logic         dct_in_valid,
  output logic         dct_in_ready,
  input  logic [7:0]   dct_in_data,
  output logic         dct_out_valid,
  output logic [15:0]  dct_out_data,
  output logic         dct_out_first
);

  localparam int PAW = ((M - P) * N > 1) ? $clog2((M - P) * N) : 1;
  localparam int CAW = (P * N > 1) ? $clog2(P * N) : 1;

  logic [W-1:0] ping_rdata, cb_rdata, pong_rdata;

  // ------------------------------------------------------------ built-in test
  logic           t_ping_en, t_ping_we, t_cb_en, t_cb_we, t_pong_en, t_pong_we;
  logic [PAW-1:0] t_ping_addr, t_pong_addr;
  logic [CAW-1:0] t_cb_addr;
  logic [W-1:0]   t_ping_wdata, t_cb_wdata, t_pong_wdata;

  sppm_bist #(.M(M), .N(N), .P(P), .W(W)) u_bist (
    .clk, .rst_n,
    .start  (bist_start),
    .busy   (bist_busy),
    .done   (bist_done),
    .fail   (bist_fail),
    .errors (bist_errors),
    .reads  (bist_reads),
    .ping_en (t_ping_en), .ping_we (t_ping_we), .ping_addr (t_ping_addr),
    .ping_wdata (t_ping_wdata), .ping_rdata,
    .cb_en   (t_cb_en),   .cb_we   (t_cb_we),   .cb_addr   (t_cb_addr),
    .cb_wdata   (t_cb_wdata),   .cb_rdata,
    .pong_en (t_pong_en), .pong_we (t_pong_we), .pong_addr (t_pong_addr),
    .pong_wdata (t_pong_wdata), .pong_rdata
  );

  // ------------------------------------------------------------ buffer
  sppm_buffer #(.M(M), .N(N), .P(P), .W(W)) u_buf (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data,
    .out_valid, .out_data, .out_first, .out_last,
    .stall, .idle_gap,
    .test_en (bist_busy),
    .t_ping_en, .t_ping_we, .t_ping_addr, .t_ping_wdata,
    .t_cb_en,   .t_cb_we,   .t_cb_addr,   .t_cb_wdata,
    .t_pong_en, .t_pong_we, .t_pong_addr, .t_pong_wdata,
    .ping_rdata, .cb_rdata, .pong_rdata
  );

  // ------------------------------------------------------------ 2-D DCT
  logic signed [15:0] dct_y;
  logic               dct_stall, dct_idle;   // buffer events, not brought out

  dct2d_sppm #(.IW(8), .MW(12), .OW(16), .P(1)) u_dct (
    .clk, .rst_n,
    .in_valid  (dct_in_valid),
    .in_ready  (dct_in_ready),
    .in_data   (signed'(dct_in_data)),
    .out_valid (dct_out_valid),
    .out_data  (dct_y),
    .out_first (dct_out_first),
    .stall     (dct_stall),
    .idle_gap  (dct_idle)
  );

  assign dct_out_data = dct_y;

  logic unused_dct;
  assign unused_dct = dct_stall ^ dct_idle;

  // ------------------------------------------------------------ chip
  pp_chip64 u_chip (
    .clk, .rst_n,
    .we   (chip_we),
    .g    (chip_g),
    .pe1  (chip_pe1),
    .pe2  (chip_pe2),
    .din  (chip_din),
    .dout (chip_dout)
  );

endmodule
