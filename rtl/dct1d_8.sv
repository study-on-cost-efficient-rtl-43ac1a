// dct1d_8 -- 8-point one-dimensional DCT-II, serial in and serial out, one of
// the two 1-D DCT units placed around the transpose buffer in a 2-D DCT.
//
// Eight input samples x0..x7 are collected; then the symmetry of the cosine
// basis halves the work: the sums s_i = x_i + x_(7-i) feed the even outputs
// and the differences d_i = x_i - x_(7-i) the odd outputs, so each output is
// a 4-term inner product
//     Z_p = sum_{i=0..3} (p even ? s_i : d_i) * c_(p,i),
//     c_(p,i) = cos(pi/8 * (i + 1/2) * p)
// evaluated by four parallel multipliers, one output per cycle (the
// matrix-vector form of the even/odd decomposition).  No normalisation or
// scale factor is applied, as in the row-column formulation this follows.  The cosines are FRAC-bit fixed-point constants computed at
// elaboration; Z_p is rounded (half up) back to integer units and kept to OW
// bits.
//
// Interface: valid/ready on both sides.  Collection of the next eight
// samples overlaps the output of the current eight, so with out_ready held
// high the unit takes and gives one word per cycle.  The first output of a
// vector is on the output two cycles after the cycle that took its eighth
// sample (one cycle to move the vector into the output stage); outputs come in
// the order Z_0 .. Z_7 (out_first marks Z_0).
module dct1d_8 #(
  parameter int IW   = 8,     // input sample width (signed)
  parameter int OW   = 12,    // output width (signed)
  parameter int FRAC = 12     // fraction bits of the cosine constants
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [IW-1:0] in_data,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic signed [OW-1:0] out_data,
  output logic                 out_first
);

  localparam int CW = FRAC + 2;               // signed constant width
  localparam int SW = IW + 1;                 // butterfly width
  localparam int PW = SW + CW + 2;            // inner-product width
  localparam real PI = 3.14159265358979323846;

  typedef logic signed [CW-1:0] coef_t;

  function automatic coef_t coef(input int p, input int i);
    return coef_t'($rtoi($floor($cos(PI / 8.0 * (real'(i) + 0.5) * real'(p)) * real'(1 << FRAC) + 0.5)));
  endfunction

  // c_(p,i) for p = 0..7, i = 0..3, one constant per element
  coef_t C [8][4];
  for (genvar gp = 0; gp < 8; gp++) begin : g_cp
    for (genvar gi = 0; gi < 4; gi++) begin : g_ci
      localparam coef_t K = coef(gp, gi);
      assign C[gp][gi] = K;
    end
  end

  // ------------------------------------------------ collection stage
  logic signed [IW-1:0] xa [8];
  logic [3:0]           ca;           // samples collected, 0..8
  logic                 full, transfer, accept;

  // ------------------------------------------------ output stage
  logic signed [SW-1:0] sb [4], db [4];
  logic [2:0]           pb;
  logic                 bv, b_free;

  assign full     = (ca == 4'd8);
  assign b_free   = !bv || (out_ready && pb == 3'd7);
  assign transfer = full && b_free;
  assign in_ready = !full || transfer;
  assign accept   = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ca <= '0;
      for (int i = 0; i < 8; i++) xa[i] <= '0;
    end else begin
      if (accept) xa[transfer ? 3'd0 : ca[2:0]] <= in_data;
      if (transfer)    ca <= accept ? 4'd1 : 4'd0;
      else if (accept) ca <= ca + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bv <= 1'b0;
      pb <= '0;
      for (int i = 0; i < 4; i++) begin
        sb[i] <= '0;
        db[i] <= '0;
      end
    end else if (transfer) begin
      bv <= 1'b1;
      pb <= '0;
      for (int i = 0; i < 4; i++) begin
        sb[i] <= SW'(xa[i]) + SW'(xa[7-i]);
        db[i] <= SW'(xa[i]) - SW'(xa[7-i]);
      end
    end else if (bv && out_ready) begin
      if (pb == 3'd7) bv <= 1'b0;
      pb <= pb + 1'b1;
    end
  end

  // ------------------------------------------------ inner product
  logic signed [PW-1:0] acc;

  logic signed [PW-1:0] term [4];

  always_comb begin
    acc = '0;
    for (int i = 0; i < 4; i++) begin
      term[i] = PW'(pb[0] ? db[i] : sb[i]) * PW'(C[pb][i]);
      acc     = acc + term[i];
    end
  end

  assign out_valid = bv;
  assign out_first = bv && (pb == 3'd0);
  assign out_data  = OW'((acc + PW'(1 <<< (FRAC - 1))) >>> FRAC);

endmodule
