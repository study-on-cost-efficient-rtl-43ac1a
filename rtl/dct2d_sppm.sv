// dct2d_sppm -- 8x8 two-dimensional DCT built by the row-column method
// around a Sandwich Ping-Pong transpose buffer.
//
//   in -> dct1d_8 (first pass) -> sppm_buffer 8x8, P shared rows -> dct1d_8
//   (second pass) -> out
// A block arrives as eight vectors of eight samples (vector j = samples
// X_0j .. X_7j).  The first unit turns each vector into Z_0j .. Z_7j, which
// are written into the buffer as row j.  The buffer gives them back column by
// column, i.e. Z_p0 .. Z_p7 for p = 0..7, and the second unit transforms each
// of these, so the block leaves as Y_pq (p-major, q-minor):
//     Y_pq = sum_j sum_i X_ij c_(p,i) c_(q,j),   c_(l,h) = cos(pi/8 (h+1/2) l)
// with normalisation and scale factors left out, and each 1-D pass rounded
// to integers.
//
// Flow control: the input is valid/ready (ready falls while the buffer is in
// its Idle Time or the first unit is full); the output has no back-pressure,
// like the buffer's own output.  Latency from the last sample of a block to
// its first coefficient: INIT of the buffer (8*8-(8-P)) plus a few cycles of
// the 1-D units, with a one-cycle Idle Time per block for P = 1.
module dct2d_sppm #(
  parameter int IW = 8,      // input samples (signed)
  parameter int MW = 12,     // coefficients between the passes
  parameter int OW = 16,     // output coefficients (signed)
  parameter int P  = 1       // Common Bar rows of the transpose buffer
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [IW-1:0] in_data,
  output logic                 out_valid,
  output logic signed [OW-1:0] out_data,
  output logic                 out_first,   // Y_00 of a block
  output logic                 stall,       // transpose buffer stalled
  output logic                 idle_gap     // transpose buffer in its Idle Time
);

  localparam int PAW = $clog2((8 - P) * 8);
  localparam int CAW = (P * 8 > 1) ? $clog2(P * 8) : 1;

  logic                 r_valid, r_ready, r_first;
  logic signed [MW-1:0] r_data;
  logic                 t_valid, t_first, t_last;
  logic [MW-1:0]        t_data;
  logic                 c_ready, c_first;
  logic [MW-1:0]        ping_q, cb_q, pong_q;

  dct1d_8 #(.IW(IW), .OW(MW)) u_row (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data,
    .out_valid (r_valid),
    .out_ready (r_ready),
    .out_data  (r_data),
    .out_first (r_first)
  );

  sppm_buffer #(.M(8), .N(8), .P(P), .W(MW)) u_buf (
    .clk, .rst_n,
    .in_valid  (r_valid),
    .in_ready  (r_ready),
    .in_data   (r_data),
    .out_valid (t_valid),
    .out_data  (t_data),
    .out_first (t_first),
    .out_last  (t_last),
    .stall, .idle_gap,
    .test_en   (1'b0),
    .t_ping_en (1'b0), .t_ping_we (1'b0), .t_ping_addr (PAW'(0)), .t_ping_wdata ('0),
    .t_cb_en   (1'b0), .t_cb_we   (1'b0), .t_cb_addr   (CAW'(0)), .t_cb_wdata   ('0),
    .t_pong_en (1'b0), .t_pong_we (1'b0), .t_pong_addr (PAW'(0)), .t_pong_wdata ('0),
    .ping_rdata (ping_q),
    .cb_rdata   (cb_q),
    .pong_rdata (pong_q)
  );

  dct1d_8 #(.IW(MW), .OW(OW)) u_col (
    .clk, .rst_n,
    .in_valid  (t_valid),
    .in_ready  (c_ready),
    .in_data   (signed'(t_data)),
    .out_valid,
    .out_ready (1'b1),
    .out_data,
    .out_first (c_first)
  );

  // First coefficient of each block: every block leaves as eight vectors,
  // so counting the vectors modulo 8 finds Y_00.
  logic [2:0] vec_cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      vec_cnt <= '0;
    else if (out_valid && c_first)   vec_cnt <= vec_cnt + 1'b1;
  end
  assign out_first = out_valid && c_first && (vec_cnt == 3'd0);

  // Status outputs of the parts that this wrapper does not need.
  logic unused_status;
  assign unused_status = ^{r_first, t_first, t_last, ping_q, cb_q, pong_q};

  // With its output always taken, the second unit can always take a word.
  a_col_ready : assert property (@(posedge clk) disable iff (!rst_n) t_valid |-> c_ready)
    else $error("dct2d_sppm: second DCT pass dropped a word");

endmodule
