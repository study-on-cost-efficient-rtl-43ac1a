// tb_dct2d_sppm -- random 8x8 blocks through the row-column 2-D DCT.  A
// reference model runs the same two rounded 1-D passes with the transpose
// between them; every coefficient and out_first are compared with it, and the
// reference is compared with the real-valued 2-D DCT (within 4 units, the
// error budget of rounding the first pass).  Random input gaps exercise the
// buffer's stall path; a full-rate run checks that a block is taken every
// 64 + IDLE cycles (IDLE = 1 for the 8x8, P = 1 buffer).
module tb_dct2d_sppm;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_first, stall, idle_gap;
  logic signed [7:0]  in_data = '0;
  logic signed [15:0] out_data;
  int checks = 0, failures = 0;

  dct2d_sppm dut (.*);

  always #5 clk = ~clk;

  int   xin [$];
  int   nout = 0, nstall = 0;
  int   gap_prob = 20;
  bit   run = 1;

  function automatic int cfix(int p, int i);
    return int'($floor($cos(PI / 8.0 * (i + 0.5) * p) * 4096.0 + 0.5));
  endfunction

  function automatic int pass1(int v[8], int p);
    longint acc = 0;
    for (int i = 0; i < 8; i++) acc += longint'(v[i]) * cfix(p, i);
    return int'((acc + 2048) >>> 12);
  endfunction

  // Y_pq of block b; input sample X_ij is xin[b*64 + j*8 + i]
  function automatic int ref_y(int b, int p, int q);
    int z [8];
    for (int j = 0; j < 8; j++) begin
      int v [8];
      for (int i = 0; i < 8; i++) v[i] = xin[b * 64 + j * 8 + i];
      z[j] = pass1(v, p);
    end
    return pass1(z, q);
  endfunction

  function automatic real real_y(int b, int p, int q);
    real acc = 0.0;
    for (int j = 0; j < 8; j++)
      for (int i = 0; i < 8; i++)
        acc += real'(xin[b * 64 + j * 8 + i]) * $cos(PI / 8.0 * (i + 0.5) * p)
               * $cos(PI / 8.0 * (j + 0.5) * q);
    return acc;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && in_ready) xin.push_back(int'(in_data));
      if (!in_valid || in_ready) begin
        in_valid <= run && ($urandom_range(0, 99) >= gap_prob);
        in_data  <= 8'($urandom);
      end
      if (stall) nstall++;
      if (out_valid) begin
        automatic int b = nout / 64, p = (nout % 64) / 8, q = nout % 8;
        automatic int r = ref_y(b, p, q);
        automatic real rr = real_y(b, p, q);
        checks += 3;
        if (int'(out_data) != r) begin
          failures++;
          $display("FAIL block %0d Y%0d%0d = %0d expected %0d", b, p, q, out_data, r);
        end
        if (out_first !== (nout % 64 == 0)) begin
          failures++;
          $display("FAIL out_first at block %0d Y%0d%0d", b, p, q);
        end
        if (real'(r) - rr > 4.0 || rr - real'(r) > 4.0) begin
          failures++;
          $display("FAIL accuracy block %0d Y%0d%0d: %0d vs %f", b, p, q, r, rr);
        end
        nout++;
      end
    end
  end

  initial begin
    int n0, refused;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (nout >= 64 * 20);
    gap_prob = 0;
    repeat (200) @(posedge clk);
    // measure over ten block periods, starting right after a block
    wait (in_valid && in_ready && xin.size() % 64 == 63);
    @(posedge clk);
    n0 = xin.size();
    refused = 0;
    repeat (10 * 65) begin
      #1;
      if (!in_ready) refused++;
      @(posedge clk);
    end
    checks += 2;
    if (xin.size() - n0 != 640 || refused != 10) begin
      failures++;
      $display("FAIL rate: %0d samples and %0d refused cycles in 650", xin.size() - n0, refused);
    end
    if (nstall == 0) begin
      failures++;
      $display("FAIL no stall seen");
    end
    run = 0;
    wait (nout == xin.size() - xin.size() % 64);
    repeat (200) @(posedge clk);
    checks++;
    if (nout != xin.size() - xin.size() % 64) begin
      failures++;
      $display("FAIL %0d outputs for %0d samples", nout, xin.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
