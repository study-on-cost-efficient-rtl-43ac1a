// tb_sppm_pkg -- checks the timing formulas of sppm_pkg against the worked
// numbers of the analysis: the 4x4 example with one shared row (Initially
// Idle Time 13, Idle Time 1) and the Initially Idle column of the 128-Kbit
// data sheet (M=16, N=512, one cell = 16 bits, so word-level times are
// multiplied by 16), plus the legality check of a few geometries.
module tb_sppm_pkg;
  import sppm_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Data-sheet Initially Idle Time for P = 1 .. 16 (unit: bit access).
  int sheet_init [16] = '{130832, 130848, 130864, 130880, 130896, 130912, 130928, 130944,
                          130960, 130976, 130992, 131008, 131024, 131040, 131056, 131072};

  initial begin
    check("init 4x4 P=1", init_idle(4, 4, 1), 13);
    check("idle 4x4 P=1", idle_time(4, 4, 1), 1);
    for (int p = 1; p <= 16; p++)
      check($sformatf("sheet init P=%0d", p), init_idle(16, 512, p) * 16, sheet_init[p-1]);
    check("idle 16x512 P=1", idle_time(16, 512, 1), 497);
    check("idle 8x8 P=2", idle_time(8, 8, 2), 10);
    check("ok 4x4x1", int'(geometry_ok(4, 4, 1)), 1);
    check("ok 16x512x15", int'(geometry_ok(16, 512, 15)), 1);
    check("bad P=M", int'(geometry_ok(4, 4, 4)), 0);
    check("bad P=0", int'(geometry_ok(4, 4, 0)), 0);
    check("bad PN<M-P", int'(geometry_ok(8, 2, 1)), 0);
    check("enum", int'(MEM_CB), 1);
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
