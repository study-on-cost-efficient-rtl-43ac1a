// tb_global_decoder -- exhaustive: one-hot memory enables when enabled, none
// when disabled.
module tb_global_decoder;
  logic en;
  logic [1:0] sel;
  logic [3:0] me;
  int checks = 0, failures = 0;

  global_decoder dut (.*);

  initial begin
    for (int e = 0; e < 2; e++)
      for (int s = 0; s < 4; s++) begin
        en = e[0]; sel = 2'(s);
        #1;
        checks++;
        if (me !== (e ? 4'(1 << s) : 4'h0)) begin
          failures++;
          $display("FAIL en=%0d sel=%0d me=%b", e, s, me);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
