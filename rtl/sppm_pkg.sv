// sppm_pkg -- shared types and timing formulas of the Sandwich Ping-Pong
// Memory (SPPM).
//
// A logical frame is an M x N array (M rows, N columns).  Its first M-P rows
// live in the Ping (even frames) or Pong (odd frames) memory, its last P rows
// in the Common Bar that both frames share.  Frames are written row by row
// and read column by column, one access per clock.
//
// The two timing figures of the schedule follow the derivation of the
// original analysis (word-access form, one unit time = one clock):
//   Initially Idle Time  INIT = M*N - (M-P)   (smallest value allowed by the
//                                              three read/write contention
//                                              conditions)
//   Idle Time            IDLE = P*N - (M-P)   (write gap between frames that
//                                              keeps the next frame's Common
//                                              Bar writes after the current
//                                              frame's Common Bar reads)
// The geometry is legal when 1 <= P < M and P*N >= M-P (otherwise the Ping
// memory would be read before it is written).
//
// The March types describe one memory operation of the built-in test.
package sppm_pkg;

  // Physical memory selected by the control unit.
  typedef enum logic [1:0] {
    MEM_PING = 2'd0,
    MEM_CB   = 2'd1,
    MEM_PONG = 2'd2
  } mem_sel_e;

  // Cycles from the first write of a frame to its first read.
  function automatic int init_idle(input int m, input int n, input int p);
    return m * n - (m - p);
  endfunction

  // Write gap inserted after every frame.
  function automatic int idle_time(input int m, input int n, input int p);
    return p * n - (m - p);
  endfunction

  function automatic bit geometry_ok(input int m, input int n, input int p);
    return (p >= 1) && (p < m) && (n >= 1) && (p * n >= m - p);
  endfunction

  // One operation issued by the March test pattern generator to one array.
  typedef struct packed {
    logic en;    // access this cycle
    logic we;    // 1 = write, 0 = read
    logic bg;    // background bit: data written, or value expected on a read
  } march_op_t;

endpackage
