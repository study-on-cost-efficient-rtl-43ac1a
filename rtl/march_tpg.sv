// march_tpg -- test pattern generator for the modified March C- test.
//
// The test runs on two equal single-port arrays at once, block A and block B,
// under one rule taken from the ping-pong organisation: in any cycle in which
// both arrays are accessed, one of them reads while the other writes.  Plain
// March C-
//     {(w0); up(r0,w1); up(r1,w0); down(r0,w1); down(r1,w0); (r0)}
// is therefore stretched into eight elements, with a one-operation offset
// between the two blocks inside the read-write elements:
//     M0  A: up(w0)                          B: no operation
//     M1  A: up(r0)                          B: up(w0)
//     M2..M5  A: March C- elements 1..4      B: the same operations, one
//                                               cycle later (so B writes
//                                               whenever A reads)
//     (one cycle: A idle, B does its last operation)
//     M6  A: up(r0)                          B: no operation
//     M7  A: no operation                    B: up(r0)
// The elements added to March C- only insert reads and no-operations, so the
// fault coverage of March C- (stuck-at, transition, address-decoder and
// unlinked coupling faults) is kept.  The exact element list of the original
// is only partly legible; the order above is this design's reading of it.
//
// With dual=0 only block A is exercised (B stays idle) and M1/M7 reduce to
// the A part; this is used for the lone Common Bar array.
//
// Interface: a start pulse begins a run over `depth` words (1 .. 2**AW-1);
// every cycle a_op/a_addr and b_op/b_addr give the operation for each block
// (en, we, and the background bit written or expected).  `done` pulses in the
// cycle after the last operation.  A run takes 12*depth+1 cycles (dual=1).
module march_tpg
  import sppm_pkg::*;
#(
  parameter int AW = 13
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          dual,
  input  logic [AW-1:0] depth,
  output march_op_t     a_op,
  output logic [AW-1:0] a_addr,
  output march_op_t     b_op,
  output logic [AW-1:0] b_addr,
  output logic          busy,
  output logic          done
);

  typedef enum logic [3:0] {
    E_IDLE, E_W0, E_R0, E_P0, E_P1, E_P2, E_P3, E_FLUSH, E_AR0, E_BR0
  } elem_e;

  elem_e         elem, elem_n;
  logic [AW-1:0] idx;
  logic          ph;          // 0: read half, 1: write half of a pair element
  logic          dual_q;
  logic          last_idx;
  logic          pair;
  logic [1:0]    k;           // pair element number 0..3
  march_op_t     b_dly_op;
  logic [AW-1:0] b_dly_addr;

  assign last_idx = (idx == depth - 1'b1);
  assign pair     = (elem == E_P0) || (elem == E_P1) || (elem == E_P2) || (elem == E_P3);
  assign k        = 2'(elem - E_P0);
  assign busy     = (elem != E_IDLE);

  // ------------------------------------------------ operations of this cycle
  always_comb begin
    a_op   = '0;
    a_addr = idx;
    b_op   = '0;
    b_addr = idx;
    unique case (elem)
      E_W0:  a_op = '{en: 1'b1, we: 1'b1, bg: 1'b0};
      E_R0: begin
        a_op = '{en: 1'b1, we: 1'b0, bg: 1'b0};
        b_op = '{en: dual_q, we: 1'b1, bg: 1'b0};
      end
      E_P0, E_P1, E_P2, E_P3: begin
        a_addr = k[1] ? (depth - 1'b1 - idx) : idx;
        a_op   = '{en: 1'b1, we: ph, bg: ph ^ k[0]};
        b_op   = b_dly_op;
        b_addr = b_dly_addr;
      end
      E_FLUSH: begin
        b_op   = b_dly_op;
        b_addr = b_dly_addr;
      end
      E_AR0: a_op = '{en: 1'b1, we: 1'b0, bg: 1'b0};
      E_BR0: b_op = '{en: 1'b1, we: 1'b0, bg: 1'b0};
      default: ;
    endcase
  end

  // B replays A's read-write elements one cycle later.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_dly_op   <= '0;
      b_dly_addr <= '0;
    end else begin
      b_dly_op   <= (pair && dual_q) ? a_op : '0;
      b_dly_addr <= a_addr;
    end
  end

  // ------------------------------------------------ element sequencing
  always_comb begin
    elem_n = elem;
    unique case (elem)
      E_IDLE:  elem_n = E_IDLE;
      E_W0:    if (last_idx) elem_n = E_R0;
      E_R0:    if (last_idx) elem_n = E_P0;
      E_P0:    if (last_idx && ph) elem_n = E_P1;
      E_P1:    if (last_idx && ph) elem_n = E_P2;
      E_P2:    if (last_idx && ph) elem_n = E_P3;
      E_P3:    if (last_idx && ph) elem_n = dual_q ? E_FLUSH : E_AR0;
      E_FLUSH: elem_n = E_AR0;
      E_AR0:   if (last_idx) elem_n = dual_q ? E_BR0 : E_IDLE;
      E_BR0:   if (last_idx) elem_n = E_IDLE;
      default: elem_n = E_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      elem   <= E_IDLE;
      idx    <= '0;
      ph     <= 1'b0;
      dual_q <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= busy && (elem_n == E_IDLE);
      if (!busy) begin
        if (start) begin
          elem   <= E_W0;
          idx    <= '0;
          ph     <= 1'b0;
          dual_q <= dual;
        end
      end else begin
        elem <= elem_n;
        if (pair) begin
          ph <= ~ph;
          if (ph) idx <= last_idx ? '0 : idx + 1'b1;
        end else if (elem != E_FLUSH) begin
          idx <= last_idx ? '0 : idx + 1'b1;
        end
      end
    end
  end

  // The ping-pong rule: when both blocks are accessed, exactly one writes.
  a_rw_opposite : assert property (@(posedge clk) disable iff (!rst_n)
                                   (a_op.en && b_op.en) |-> (a_op.we != b_op.we))
    else $error("march_tpg: both blocks read or both write in one cycle");

endmodule
