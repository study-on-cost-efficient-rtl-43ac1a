// tb_march_ora -- random reads with and without single-bit and multi-bit
// errors: the sticky fail flag, the error and read counters and the clear
// input are checked against a count kept here; a check also confirms that
// data arriving while no read was announced are ignored.
module tb_march_ora;
  localparam int W = 8;
  logic clk = 0, rst_n = 0, clear = 0, chk = 0, exp = 0;
  logic [W-1:0] rdata = '0;
  logic fail;
  logic [15:0] err_cnt, chk_cnt;
  int checks = 0, failures = 0;
  int n_err, n_chk;

  march_ora #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  task automatic expect_state(input string what);
    checks++;
    if (fail !== (n_err != 0) || int'(err_cnt) != n_err || int'(chk_cnt) != n_chk) begin
      failures++;
      $display("FAIL %s: fail=%b err=%0d chk=%0d, expected %0d %0d", what, fail, err_cnt, chk_cnt, n_err, n_chk);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    n_err = 0; n_chk = 0;
    for (int t = 0; t < 600; t++) begin
      logic e, c, bad;
      logic [W-1:0] flip;
      c = 1'($urandom);
      e = 1'($urandom);
      bad = ($urandom_range(0, 9) == 0);
      // one wrong bit, or a random group of wrong bits
      flip = $urandom_range(0, 1) ? W'(1 << $urandom_range(0, W - 1)) : W'($urandom_range(1, 255));
      chk <= c; exp <= e;
      @(posedge clk);
      chk <= 0;
      rdata <= {W{e}} ^ (bad ? flip : '0);
      @(posedge clk);
      rdata <= '0;
      if (c) begin n_chk++; if (bad) n_err++; end
      @(negedge clk);
      expect_state("after read");
      if (t == 300) begin
        clear <= 1; @(posedge clk); clear <= 0; n_err = 0; n_chk = 0;
        @(negedge clk);
        expect_state("after clear");
      end
    end
    // unannounced garbage is ignored
    chk <= 0; rdata <= '1;
    repeat (3) @(posedge clk);
    @(negedge clk);
    expect_state("idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
