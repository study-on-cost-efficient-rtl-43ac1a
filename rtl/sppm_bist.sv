// sppm_bist -- built-in test circuit of the Sandwich Ping-Pong Memory.
//
// The test is split the way the memory is built: first the Ping/Pong pair is
// tested as blocks A and B of the modified March C- (both at once, one
// reading while the other writes), then the single-port Common Bar is tested
// on its own as block A.  A test pattern generator (march_tpg: counters,
// algorithm sequencer and address/data "counter sets") drives the arrays, and
// two output response analyzers (march_ora) compare what the arrays return
// with the written background; `errors` and `reads` count mismatching and
// checked reads (the read counters saturate at 65535 per analyzer).
//
// Interface: `start` (pulse) begins a test; `busy` is high while it runs;
// `done` pulses at the end and `fail` (valid from then on, until the next
// start) tells whether any read mismatched.  The array ports are meant to be
// multiplexed onto the arrays while busy.  Data backgrounds are all-zero and
// all-one words.  Test length from the start pulse to done: (12*(M-P)*N + 1) +
// 11*P*N + 7 cycles.
module sppm_bist
  import sppm_pkg::*;
#(
  parameter int M = 16,
  parameter int N = 512,
  parameter int P = 1,
  parameter int W = 16,
  localparam int PAW = ((M - P) * N > 1) ? $clog2((M - P) * N) : 1,
  localparam int CAW = (P * N > 1) ? $clog2(P * N) : 1,
  localparam int TAW = $clog2((M - P) * N + 1) > $clog2(P * N + 1) ?
                       $clog2((M - P) * N + 1) : $clog2(P * N + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           busy,
  output logic           done,
  output logic           fail,
  output logic [15:0]    errors,     // mismatching reads (saturating per analyzer)
  output logic [16:0]    reads,      // reads checked in this test
  // Ping array (block A of the first phase)
  output logic           ping_en,
  output logic           ping_we,
  output logic [PAW-1:0] ping_addr,
  output logic [W-1:0]   ping_wdata,
  input  logic [W-1:0]   ping_rdata,
  // Common Bar (block A of the second phase)
  output logic           cb_en,
  output logic           cb_we,
  output logic [CAW-1:0] cb_addr,
  output logic [W-1:0]   cb_wdata,
  input  logic [W-1:0]   cb_rdata,
  // Pong array (block B of the first phase)
  output logic           pong_en,
  output logic           pong_we,
  output logic [PAW-1:0] pong_addr,
  output logic [W-1:0]   pong_wdata,
  input  logic [W-1:0]   pong_rdata
);

  typedef enum logic [2:0] {PH_IDLE, PH_PP_GO, PH_PP, PH_CB_GO, PH_CB, PH_END} phase_e;

  phase_e        phase;
  logic          tpg_start, tpg_dual, tpg_busy, tpg_done;
  logic [TAW-1:0] tpg_depth;
  march_op_t     a_op, b_op;
  logic [TAW-1:0] a_addr, b_addr;
  logic          in_cb, a_cb_q;
  logic          fail_a, fail_b;
  logic [W-1:0]  a_rdata;
  logic [15:0]   err_a, err_b, chk_a, chk_b;

  assign in_cb     = (phase == PH_CB_GO) || (phase == PH_CB);
  assign tpg_start = (phase == PH_PP_GO) || (phase == PH_CB_GO);
  assign tpg_dual  = !in_cb;
  assign tpg_depth = in_cb ? TAW'(P * N) : TAW'((M - P) * N);
  assign busy      = (phase != PH_IDLE);

  march_tpg #(.AW(TAW)) u_tpg (
    .clk, .rst_n,
    .start (tpg_start),
    .dual  (tpg_dual),
    .depth (tpg_depth),
    .a_op, .a_addr, .b_op, .b_addr,
    .busy  (tpg_busy),
    .done  (tpg_done)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= PH_IDLE;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (phase)
        PH_IDLE:  if (start) phase <= PH_PP_GO;
        PH_PP_GO: phase <= PH_PP;
        PH_PP:    if (tpg_done) phase <= PH_CB_GO;
        PH_CB_GO: phase <= PH_CB;
        PH_CB:    if (tpg_done) phase <= PH_END;
        PH_END:   begin phase <= PH_IDLE; done <= 1'b1; end
        default:  phase <= PH_IDLE;
      endcase
    end
  end

  // Route block A to Ping or to the Common Bar, block B to Pong.
  always_comb begin
    ping_en   = a_op.en && !in_cb;
    ping_we   = a_op.we;
    ping_addr = PAW'(a_addr);
    cb_en     = a_op.en && in_cb;
    cb_we     = a_op.we;
    cb_addr   = CAW'(a_addr);
    pong_en   = b_op.en;
    pong_we   = b_op.we;
    pong_addr = PAW'(b_addr);
  end

  assign ping_wdata = {W{a_op.bg}};
  assign cb_wdata   = {W{a_op.bg}};
  assign pong_wdata = {W{b_op.bg}};

  // Read data for analyzer A come from the array read in the previous cycle.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) a_cb_q <= 1'b0;
    else        a_cb_q <= in_cb;
  end
  assign a_rdata = a_cb_q ? cb_rdata : ping_rdata;

  march_ora #(.W(W)) u_ora_a (
    .clk, .rst_n,
    .clear   (start && !busy),
    .chk     (a_op.en && !a_op.we),
    .exp     (a_op.bg),
    .rdata   (a_rdata),
    .fail    (fail_a),
    .err_cnt (err_a),
    .chk_cnt (chk_a)
  );

  march_ora #(.W(W)) u_ora_b (
    .clk, .rst_n,
    .clear   (start && !busy),
    .chk     (b_op.en && !b_op.we),
    .exp     (b_op.bg),
    .rdata   (pong_rdata),
    .fail    (fail_b),
    .err_cnt (err_b),
    .chk_cnt (chk_b)
  );

  assign fail   = fail_a || fail_b;
  assign errors = (err_a > 16'hffff - err_b) ? 16'hffff : err_a + err_b;
  assign reads  = {1'b0, chk_a} + {1'b0, chk_b};

  // tpg_busy is only observed by the assertion below.
  a_tpg_runs : assert property (@(posedge clk) disable iff (!rst_n)
                                (phase == PH_PP || phase == PH_CB) |-> (tpg_busy || tpg_done))
    else $error("sppm_bist: pattern generator stopped early");

endmodule
