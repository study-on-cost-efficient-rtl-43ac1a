// tb_wl_decoder -- exhaustive: for every address and memory-enable value the
// word lines must be one-hot at the address when enabled and all low when not.
module tb_wl_decoder;
  logic me;
  logic [2:0] addr;
  logic [7:0] wl;
  int checks = 0, failures = 0;

  wl_decoder dut (.*);

  initial begin
    for (int e = 0; e < 2; e++)
      for (int a = 0; a < 8; a++) begin
        me = e[0]; addr = 3'(a);
        #1;
        checks++;
        if (wl !== (e ? 8'(1 << a) : 8'h00)) begin
          failures++;
          $display("FAIL me=%0d addr=%0d wl=%b", e, a, wl);
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
