// march_ora -- output response analyzer of the built-in memory test.
//
// The pattern generator announces a read with chk=1 and the background bit it
// expects (exp).  The array returns the word one cycle later; the analyzer
// compares every bit with the expected value by an XNOR, ORs the inverted
// results into a mismatch flag and keeps a sticky fail bit.  It also counts
// the mismatching reads (saturating) and the reads it checked.
//
// Timing: chk/exp in cycle t are compared with rdata in cycle t+1; fail is
// visible in cycle t+2.  clear resets the flag and the counters.
module march_ora #(
  parameter int W  = 16,
  parameter int CW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          chk,
  input  logic          exp,
  input  logic [W-1:0]  rdata,
  output logic          fail,
  output logic [CW-1:0] err_cnt,
  output logic [CW-1:0] chk_cnt
);

  logic         chk_q, exp_q;
  logic [W-1:0] same;
  logic         mismatch;

  assign same     = rdata ~^ {W{exp_q}};
  assign mismatch = chk_q && (|(~same));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      chk_q   <= 1'b0;
      exp_q   <= 1'b0;
      fail    <= 1'b0;
      err_cnt <= '0;
      chk_cnt <= '0;
    end else if (clear) begin
      chk_q   <= 1'b0;
      exp_q   <= 1'b0;
      fail    <= 1'b0;
      err_cnt <= '0;
      chk_cnt <= '0;
    end else begin
      chk_q <= chk;
      exp_q <= exp;
      if (mismatch) begin
        fail <= 1'b1;
        if (err_cnt != '1) err_cnt <= err_cnt + 1'b1;
      end
      if (chk_q && chk_cnt != '1) chk_cnt <= chk_cnt + 1'b1;
    end
  end

endmodule
