// tb_sppm_buffer -- the transpose buffer in three geometries (4x4 P=1,
// 8x8 P=2, 6x5 P=3).  Random frames enter row by row with random input gaps;
// every output word is compared with the column-major order of its frame,
// together with out_first/out_last.  After the traffic the test port is
// exercised: while test_en is high the input must be refused, no output may
// appear, and words written through t_* must read back on *_rdata.
module tb_sppm_buffer;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  bit   done_g [3];

  always #5 clk = ~clk;

  for (genvar g = 0; g < 3; g++) begin : g_cfg
    localparam int M = (g == 0) ? 4 : (g == 1) ? 8 : 6;
    localparam int N = (g == 0) ? 4 : (g == 1) ? 8 : 5;
    localparam int P = (g == 0) ? 1 : (g == 1) ? 2 : 3;
    localparam int W = 10;
    localparam int PAW = $clog2((M - P) * N);
    localparam int CAW = (P * N > 1) ? $clog2(P * N) : 1;
    localparam int FRAMES = 40;

    logic in_valid = 0, in_ready, out_valid, out_first, out_last, stall, idle_gap;
    logic [W-1:0] in_data = '0, out_data;
    logic test_en = 0;
    logic t_ping_en = 0, t_ping_we = 0, t_cb_en = 0, t_cb_we = 0, t_pong_en = 0, t_pong_we = 0;
    logic [PAW-1:0] t_ping_addr = '0, t_pong_addr = '0;
    logic [CAW-1:0] t_cb_addr = '0;
    logic [W-1:0] t_ping_wdata = '0, t_cb_wdata = '0, t_pong_wdata = '0;
    logic [W-1:0] ping_rdata, cb_rdata, pong_rdata;

    sppm_buffer #(.M(M), .N(N), .P(P), .W(W)) dut (.*);

    logic [W-1:0] sent [$];
    int nout = 0, nstall = 0, ngap = 0;
    bit traffic = 1;

    // input: random gaps, data counts up with a random offset per frame
    always @(posedge clk) begin
      if (rst_n) begin
        if (in_valid && in_ready) sent.push_back(in_data);
        if (!in_valid || in_ready) begin
          in_valid <= traffic && (sent.size() + (in_valid && in_ready) < M * N * FRAMES)
                      && ($urandom_range(0, 99) < 85);
          in_data  <= W'($urandom);
        end
        if (stall) nstall++;
        if (idle_gap) ngap++;
      end
    end

    // output: column-major order of each frame
    always @(posedge clk) begin
      if (rst_n && out_valid) begin
        automatic int f = nout / (M * N), k = nout % (M * N);
        automatic int r = k % M, c = k / M;
        checks += 2;
        if (test_en) begin
          failures++;
          $display("FAIL cfg %0d output during test access", g);
        end else if (out_data !== sent[f * M * N + r * N + c]) begin
          failures++;
          $display("FAIL cfg %0d frame %0d word %0d: %h expected %h", g, f, k, out_data,
                   sent[f * M * N + r * N + c]);
        end
        if (out_first !== (k == 0) || out_last !== (k == M * N - 1)) begin
          failures++;
          $display("FAIL cfg %0d frame %0d word %0d: first/last flags", g, f, k);
        end
        nout++;
      end
    end

    initial begin
      logic [W-1:0] pat [3][$];
      wait (rst_n);
      wait (nout == M * N * FRAMES);
      traffic = 0;
      repeat (5) @(posedge clk);
      checks += 2;
      if (nstall == 0 || ngap == 0) begin
        failures++;
        $display("FAIL cfg %0d: no stall (%0d) or no idle gap (%0d) seen", g, nstall, ngap);
      end
      // test port: write all three arrays, then read them back
      test_en <= 1;
      in_valid <= 1;
      for (int a = 0; a < (M - P) * N; a++) begin
        pat[0].push_back(W'($urandom));
        pat[2].push_back(W'($urandom));
        if (a < P * N) pat[1].push_back(W'($urandom));
        t_ping_en <= 1; t_ping_we <= 1; t_ping_addr <= PAW'(a); t_ping_wdata <= pat[0][a];
        t_pong_en <= 1; t_pong_we <= 1; t_pong_addr <= PAW'(a); t_pong_wdata <= pat[2][a];
        t_cb_en <= (a < P * N); t_cb_we <= 1; t_cb_addr <= CAW'(a % (P * N));
        t_cb_wdata <= (a < P * N) ? pat[1][a] : '0;
        @(posedge clk);
        checks++;
        if (in_ready) begin
          failures++;
          $display("FAIL cfg %0d: input accepted during test access", g);
        end
      end
      for (int a = 0; a < (M - P) * N; a++) begin
        t_ping_en <= 1; t_ping_we <= 0; t_ping_addr <= PAW'(a);
        t_pong_en <= 1; t_pong_we <= 0; t_pong_addr <= PAW'(a);
        t_cb_en <= (a < P * N); t_cb_we <= 0; t_cb_addr <= CAW'(a % (P * N));
        @(posedge clk);
        #1;
        checks += 2;
        if (ping_rdata !== pat[0][a] || pong_rdata !== pat[2][a]) begin
          failures++;
          $display("FAIL cfg %0d: test port read at %0d", g, a);
        end
        if (a < P * N) begin
          checks++;
          if (cb_rdata !== pat[1][a]) begin
            failures++;
            $display("FAIL cfg %0d: Common Bar test read at %0d", g, a);
          end
        end
      end
      t_ping_en <= 0; t_pong_en <= 0; t_cb_en <= 0;
      test_en <= 0;
      in_valid <= 0;
      done_g[g] = 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (done_g[0] && done_g[1] && done_g[2]);
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
