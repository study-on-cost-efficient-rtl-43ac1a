// tb_dct1d_8 -- random 8-sample vectors through the 1-D DCT unit with random
// gaps on the input and random back-pressure on the output.  Each output is
// compared with a direct 8-term sum over independently computed constants
// (same rounding), and that sum is compared with the real-valued DCT to
// within one unit.  Also checks out_first, that a stalled output holds,
// that with no back-pressure the unit takes one sample every cycle, and that
// full-scale inputs do not overflow the output.
module tb_dct1d_8;
  localparam int IW = 8, OW = 12, FRAC = 12;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, out_first;
  logic signed [IW-1:0] in_data = '0;
  logic signed [OW-1:0] out_data;
  int checks = 0, failures = 0;

  dct1d_8 #(.IW(IW), .OW(OW), .FRAC(FRAC)) dut (.*);

  always #5 clk = ~clk;

  int   xin [$];          // accepted samples, in order
  int   nout = 0;         // outputs seen
  int   gap_prob = 30, bp_prob = 30;
  bit   extreme = 0;  // drive only the largest magnitudes
  logic hold_v = 0;
  logic signed [OW-1:0] hold_d;

  function automatic int cfix(int p, int i);
    return int'($floor($cos(PI / 8.0 * (i + 0.5) * p) * 4096.0 + 0.5));
  endfunction

  function automatic int ref_out(int v, int p);
    longint acc = 0;
    for (int i = 0; i < 8; i++) acc += longint'(xin[v * 8 + i]) * cfix(p, i);
    return int'((acc + 2048) >>> 12);
  endfunction

  function automatic real real_out(int v, int p);
    real acc = 0.0;
    for (int i = 0; i < 8; i++) acc += real'(xin[v * 8 + i]) * $cos(PI / 8.0 * (i + 0.5) * p);
    return acc;
  endfunction

  // input driver
  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && in_ready) xin.push_back(int'(in_data));
      if (!in_valid || in_ready) begin
        in_valid <= ($urandom_range(0, 99) >= gap_prob);
        in_data  <= extreme ? ($urandom_range(0, 1) ? IW'(2 ** (IW - 1) - 1) : IW'(2 ** (IW - 1)))
                            : IW'($urandom);
      end
      out_ready <= ($urandom_range(0, 99) >= bp_prob);
    end
  end

  // output monitor
  always @(posedge clk) begin
    if (rst_n) begin
      if (hold_v) begin
        checks++;
        if (!out_valid || out_data !== hold_d) begin
          failures++;
          $display("FAIL stalled output changed");
        end
      end
      hold_v <= out_valid && !out_ready;
      hold_d <= out_data;
      if (out_valid && out_ready) begin
        automatic int v = nout / 8, p = nout % 8;
        automatic int r = ref_out(v, p);
        automatic real rr = real_out(v, p);
        checks += 3;
        if (int'(out_data) != r) begin
          failures++;
          $display("FAIL vec %0d Z%0d = %0d expected %0d", v, p, out_data, r);
        end
        if (out_first !== (p == 0)) begin
          failures++;
          $display("FAIL out_first at vec %0d Z%0d", v, p);
        end
        if (real'(r) - rr > 1.0 || rr - real'(r) > 1.0) begin
          failures++;
          $display("FAIL constants: vec %0d Z%0d fixed %0d real %f", v, p, r, rr);
        end
        nout++;
      end
    end
  end

  initial begin
    int n0, busy_cycles;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // random traffic
    wait (nout >= 8 * 300);
    // full-rate traffic
    gap_prob = 0; bp_prob = 0;
    repeat (20) @(posedge clk);
    n0 = xin.size();
    busy_cycles = 0;
    repeat (400) begin
      @(posedge clk);
      if (!in_ready) busy_cycles++;
    end
    checks++;
    if (busy_cycles != 0 || xin.size() - n0 != 400) begin
      failures++;
      $display("FAIL full rate: %0d refused cycles, %0d samples taken", busy_cycles, xin.size() - n0);
    end
    // largest magnitudes, to check the output width does not overflow
    extreme = 1; gap_prob = 10; bp_prob = 10;
    repeat (400) @(posedge clk);
    // drain
    gap_prob = 100;
    repeat (20) @(posedge clk);
    checks++;
    if (nout != xin.size() - (xin.size() % 8)) begin
      failures++;
      $display("FAIL %0d outputs for %0d samples", nout, xin.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
