// sppm_sched -- write/read sequencer of the Sandwich Ping-Pong Memory.
//
// Writes: each incoming frame of M*N words is written row by row (logical
// address 0, 1, 2, ... M*N-1) into the write bank; the bank toggles every
// frame (even frames: Ping + Common Bar, odd frames: Pong + Common Bar).
// After the last word of a frame the writer stays closed for IDLE cycles
// (the Idle Time, IDLE = P*N - (M-P)); in_ready is low during that gap.
//
// Reads: a frame is read column by column (addresses c, N+c, 2N+c, ...,
// (M-1)N+c for c = 0 .. N-1), starting in the very cycle in which word
// number INIT of the same frame is written (the Initially Idle Time,
// INIT = M*N - (M-P), the smallest value the contention conditions allow).
// From then on one word is read per cycle until the frame is out, so reads of
// one frame interleave its Ping/Pong rows with its Common Bar rows.  With these
// two figures no array is ever read and written in the same cycle.
//
// Flow control (this design's choice; the original analysis assumes one word
// per unit time): once a frame has started, a cycle with in_ready=1 but
// in_valid=0 freezes the writer and the reader together (stall=1), which
// keeps their distance, and with it the contention rules, unchanged.  Between
// frames the writer simply waits for in_valid and the reader drains freely,
// so the last frame always comes out.  The read side has no back-pressure.
//
// Timing: with no stalls a frame enters every M*N+IDLE cycles and its first
// read is issued INIT cycles after its first write.
module sppm_sched
  import sppm_pkg::*;
#(
  parameter int M = 16,
  parameter int N = 512,
  parameter int P = 1,
  localparam int LAW  = $clog2(M * N),
  localparam int INIT = init_idle(M, N, P),
  localparam int IDLE = idle_time(M, N, P),
  localparam int GW   = $clog2(IDLE + 2)
) (
  input  logic           clk,
  input  logic           rst_n,
  // input stream handshake
  input  logic           in_valid,
  output logic           in_ready,
  // write side of the ping-pong view
  output logic           wr_en,
  output logic           wr_bank,
  output logic [LAW-1:0] wr_addr,
  // read side of the ping-pong view
  output logic           rd_en,
  output logic           rd_bank,
  output logic [LAW-1:0] rd_addr,
  output logic           rd_first,   // first word of a frame
  output logic           rd_last,    // last word of a frame
  // events
  output logic           stall,      // schedule frozen by a missing input word
  output logic           idle_gap    // writer inside the Idle Time
);

  initial begin
    assert (geometry_ok(M, N, P))
      else $fatal(1, "sppm_sched: illegal geometry M=%0d N=%0d P=%0d", M, N, P);
  end

  // ---------------------------------------------------------------- writer
  logic [LAW-1:0] w_idx;
  logic           w_bank;
  logic [GW-1:0]  gap;
  logic           accept;

  assign in_ready = (gap == '0);
  assign idle_gap = (gap != '0);
  assign accept   = in_valid && in_ready;
  assign stall    = (w_idx != '0) && !in_valid;
  assign wr_en    = accept;
  assign wr_bank  = w_bank;
  assign wr_addr  = w_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_idx  <= '0;
      w_bank <= 1'b0;
      gap    <= '0;
    end else if (accept) begin
      if (w_idx == LAW'(M * N - 1)) begin
        w_idx  <= '0;
        w_bank <= ~w_bank;
        gap    <= GW'(IDLE);
      end else begin
        w_idx <= w_idx + 1'b1;
      end
    end else if (gap != '0) begin
      gap <= gap - 1'b1;
    end
  end

  // ---------------------------------------------------------------- reader
  logic                 r_act, r_bank;
  logic [$clog2(M)-1:0] r_row;
  logic [$clog2(N+1)-1:0] r_col;
  logic [LAW-1:0]       r_addr;
  logic                 start;
  logic [$clog2(M)-1:0] c_row;
  logic [$clog2(N+1)-1:0] c_col;
  logic [LAW-1:0]       c_addr;

  assign start = accept && (w_idx == LAW'(INIT));

  always_comb begin
    if (start) begin
      c_row  = '0;
      c_col  = '0;
      c_addr = '0;
    end else begin
      c_row  = r_row;
      c_col  = r_col;
      c_addr = r_addr;
    end
  end

  assign rd_en    = start || (r_act && !stall);
  assign rd_bank  = start ? w_bank : r_bank;
  assign rd_addr  = c_addr;
  assign rd_first = start;
  assign rd_last  = rd_en && (c_row == $bits(c_row)'(M - 1)) && (c_col == $bits(c_col)'(N - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_act  <= 1'b0;
      r_bank <= 1'b0;
      r_row  <= '0;
      r_col  <= '0;
      r_addr <= '0;
    end else if (rd_en) begin
      if (start) r_bank <= w_bank;
      if (c_row == $bits(c_row)'(M - 1)) begin
        r_row  <= '0;
        r_col  <= c_col + 1'b1;
        r_addr <= LAW'(c_col + 1'b1);
        r_act  <= (c_col != $bits(c_col)'(N - 1));
      end else begin
        r_row  <= c_row + 1'b1;
        r_col  <= c_col;
        r_addr <= c_addr + LAW'(N);
        r_act  <= 1'b1;
      end
    end
  end

  // A new frame may only start reading once the previous one is out.
  a_no_overlap : assert property (@(posedge clk) disable iff (!rst_n) start |-> !r_act)
    else $error("sppm_sched: read of a new frame started before the previous one ended");

endmodule
