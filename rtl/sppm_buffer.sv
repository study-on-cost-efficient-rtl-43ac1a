// sppm_buffer -- the Sandwich Ping-Pong transpose buffer: frames of M x N
// words enter row by row and leave column by column.
//
// A plain ping-pong buffer holds two M x N banks.  Here the last P rows of
// both banks share one single-port array, the Common Bar, so only
// (2M-P)*N words are stored:
//     Ping  (M-P)*N  |  Common Bar  P*N  |  Pong  (M-P)*N
//   sppm_sched  makes the row-major write and column-major read sequences
//               with the Initially Idle Time (INIT = M*N-(M-P)) and the
//               Idle Time (IDLE = P*N-(M-P)) of the analysis;
//   sppm_ctrl   maps the two-bank view onto Ping, Common Bar and Pong;
//   spram x 3   the single-port arrays.
// Timing: the first word of a frame leaves INIT+1 cycles after its first
// word was accepted; a new frame can be accepted every M*N+IDLE cycles
// (in_ready is low for IDLE cycles after each frame).  A missing input word
// in the middle of a frame freezes the schedule for that cycle (stall).  The
// output has no back-pressure.
//
// Test access: while test_en is high the t_* ports drive the three arrays
// directly (used by the built-in test), the input is closed and no output is
// produced; the arrays' read data are always visible on *_rdata.
module sppm_buffer
  import sppm_pkg::*;
#(
  parameter int M = 16,
  parameter int N = 512,
  parameter int P = 1,
  parameter int W = 16,
  localparam int PAW = ((M - P) * N > 1) ? $clog2((M - P) * N) : 1,
  localparam int CAW = (P * N > 1) ? $clog2(P * N) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // row-major input stream
  input  logic           in_valid,
  output logic           in_ready,
  input  logic [W-1:0]   in_data,
  // column-major output stream
  output logic           out_valid,
  output logic [W-1:0]   out_data,
  output logic           out_first,
  output logic           out_last,
  // schedule events
  output logic           stall,
  output logic           idle_gap,
  // test access
  input  logic           test_en,
  input  logic           t_ping_en,
  input  logic           t_ping_we,
  input  logic [PAW-1:0] t_ping_addr,
  input  logic [W-1:0]   t_ping_wdata,
  input  logic           t_cb_en,
  input  logic           t_cb_we,
  input  logic [CAW-1:0] t_cb_addr,
  input  logic [W-1:0]   t_cb_wdata,
  input  logic           t_pong_en,
  input  logic           t_pong_we,
  input  logic [PAW-1:0] t_pong_addr,
  input  logic [W-1:0]   t_pong_wdata,
  output logic [W-1:0]   ping_rdata,
  output logic [W-1:0]   cb_rdata,
  output logic [W-1:0]   pong_rdata
);

  localparam int LAW = $clog2(M * N);

  // ------------------------------------------------------------ schedule
  logic           s_in_valid, s_in_ready;
  logic           wr_en, wr_bank, rd_en, rd_bank, rd_first, rd_last;
  logic [LAW-1:0] wr_addr, rd_addr;
  logic           conflict;

  assign s_in_valid = in_valid && !test_en;
  assign in_ready   = s_in_ready && !test_en;

  sppm_sched #(.M(M), .N(N), .P(P)) u_sched (
    .clk, .rst_n,
    .in_valid (s_in_valid),
    .in_ready (s_in_ready),
    .wr_en, .wr_bank, .wr_addr,
    .rd_en, .rd_bank, .rd_addr, .rd_first, .rd_last,
    .stall, .idle_gap
  );

  // ------------------------------------------------------------ control unit
  logic           f_ping_en, f_ping_we, f_cb_en, f_cb_we, f_pong_en, f_pong_we;
  logic [PAW-1:0] f_ping_addr, f_pong_addr;
  logic [CAW-1:0] f_cb_addr;
  logic [W-1:0]   f_ping_wdata, f_cb_wdata, f_pong_wdata;

  sppm_ctrl #(.M(M), .N(N), .P(P), .W(W)) u_ctrl (
    .clk, .rst_n,
    .wr_en   (wr_en && !test_en),
    .wr_bank, .wr_addr,
    .wr_data (in_data),
    .rd_en   (rd_en && !test_en),
    .rd_bank, .rd_addr,
    .rd_valid (out_valid),
    .rd_data  (out_data),
    .conflict,
    .ping_en (f_ping_en), .ping_we (f_ping_we), .ping_addr (f_ping_addr),
    .ping_wdata (f_ping_wdata), .ping_rdata,
    .cb_en   (f_cb_en),   .cb_we   (f_cb_we),   .cb_addr   (f_cb_addr),
    .cb_wdata   (f_cb_wdata),   .cb_rdata,
    .pong_en (f_pong_en), .pong_we (f_pong_we), .pong_addr (f_pong_addr),
    .pong_wdata (f_pong_wdata), .pong_rdata
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_first <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      out_first <= rd_en && rd_first && !test_en;
      out_last  <= rd_en && rd_last && !test_en;
    end
  end

  // ------------------------------------------------------------ arrays
  spram #(.DEPTH((M - P) * N), .WIDTH(W), .AW(PAW)) u_ping (
    .clk, .rst_n,
    .en    (test_en ? t_ping_en    : f_ping_en),
    .we    (test_en ? t_ping_we    : f_ping_we),
    .addr  (test_en ? t_ping_addr  : f_ping_addr),
    .wdata (test_en ? t_ping_wdata : f_ping_wdata),
    .rdata (ping_rdata)
  );

  spram #(.DEPTH(P * N), .WIDTH(W), .AW(CAW)) u_cb (
    .clk, .rst_n,
    .en    (test_en ? t_cb_en    : f_cb_en),
    .we    (test_en ? t_cb_we    : f_cb_we),
    .addr  (test_en ? t_cb_addr  : f_cb_addr),
    .wdata (test_en ? t_cb_wdata : f_cb_wdata),
    .rdata (cb_rdata)
  );

  spram #(.DEPTH((M - P) * N), .WIDTH(W), .AW(PAW)) u_pong (
    .clk, .rst_n,
    .en    (test_en ? t_pong_en    : f_pong_en),
    .we    (test_en ? t_pong_we    : f_pong_we),
    .addr  (test_en ? t_pong_addr  : f_pong_addr),
    .wdata (test_en ? t_pong_wdata : f_pong_wdata),
    .rdata (pong_rdata)
  );

  // The schedule must never make the control unit collide on an array.
  a_no_conflict : assert property (@(posedge clk) disable iff (!rst_n) !conflict)
    else $error("sppm_buffer: array collision");

endmodule
