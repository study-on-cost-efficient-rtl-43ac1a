// tb_sppm_datasheet -- the 128K-bit Sandwich memory of the data sheet
// (16 x 512 cells of 16 bits) built for every legal Common Bar height,
// P = 1 .. 15, side by side.
//
// Each instance receives three frames back to back (in_valid always high)
// and must
//   * return every frame transposed (column by column), with out_first and
//     out_last on the right words,
//   * give its first output word INIT + 1 cycles after the first input word,
//     INIT = 16*512 - (16-P)  (the data sheet's Initially Idle column,
//     130832 + 16*(P-1) bit-times, is checked against INIT*16),
//   * accept frames every 16*512 + IDLE cycles, IDLE = P*512 - (16-P),
//   * hold P*512*16 bits in its Common Bar (the data sheet's Common Bar
//     column).
// The throughput reduction IDLE / (M*N + IDLE) is printed next to the data
// sheet's value.  The sheet's Idle column is P*(N-M) words, which is shorter
// than IDLE by (P-1)*M + P words and would let the writer reach the Common
// Bar before the reader has left it, so its reductions are slightly lower.
module tb_sppm_datasheet;
  localparam int M = 16, N = 512, W = 16, NP = 15, FRAMES = 3;
  localparam int MN = M * N;

  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0;
  bit   done_p [NP];

  always #5 clk = ~clk;

  for (genvar g = 0; g < NP; g++) begin : g_row
    localparam int P    = g + 1;
    localparam int INIT = MN - (M - P);
    localparam int IDLE = P * N - (M - P);
    localparam int PAW  = $clog2((M - P) * N);
    localparam int CAW  = (P * N > 1) ? $clog2(P * N) : 1;
    localparam int LAT   = INIT + 1;                  // first output
    localparam int PER   = MN + IDLE;                 // frame period
    localparam int TINIT = 130832 + 16 * (P - 1);     // data sheet column

    logic in_valid = 0, in_ready, out_valid, out_first, out_last, stall, idle_gap;
    logic [W-1:0] in_data = '0, out_data;
    logic [W-1:0] ping_rdata, cb_rdata, pong_rdata;

    sppm_buffer #(.M(M), .N(N), .P(P), .W(W)) dut (
      .clk, .rst_n, .in_valid, .in_ready, .in_data,
      .out_valid, .out_data, .out_first, .out_last, .stall, .idle_gap,
      .test_en (1'b0),
      .t_ping_en (1'b0), .t_ping_we (1'b0), .t_ping_addr (PAW'(0)), .t_ping_wdata ('0),
      .t_cb_en   (1'b0), .t_cb_we   (1'b0), .t_cb_addr   (CAW'(0)), .t_cb_wdata   ('0),
      .t_pong_en (1'b0), .t_pong_we (1'b0), .t_pong_addr (PAW'(0)), .t_pong_wdata ('0),
      .ping_rdata, .cb_rdata, .pong_rdata
    );

    logic [W-1:0] sent [$];
    longint cyc = 0, t_in0 = -1, t_out0 = -1;
    longint fstart [$];
    int nout = 0;

    always @(posedge clk) if (rst_n) begin
      cyc <= cyc + 1;
      if (in_valid && in_ready) begin
        if (sent.size() % MN == 0) fstart.push_back(cyc);
        if (t_in0 < 0) t_in0 = cyc;
        sent.push_back(in_data);
        in_valid <= (sent.size() < FRAMES * MN);
        in_data  <= W'($urandom);
      end else if (!in_valid && sent.size() == 0) begin
        in_valid <= 1;
        in_data  <= W'($urandom);
      end
      if (out_valid) begin
        automatic int f = nout / MN, k = nout % MN;
        automatic int idx = f * MN + (k % M) * N + k / M;
        if (t_out0 < 0) t_out0 = cyc;
        checks++;
        if (out_data !== sent[idx] || out_first !== (k == 0) || out_last !== (k == MN - 1)) begin
          failures++;
          if (failures < 20) $display("FAIL P=%0d frame %0d word %0d", P, f, k);
        end
        nout++;
      end
    end

    initial begin
      int table_init;
      real red_built, red_sheet;
      wait (rst_n);
      wait (nout == FRAMES * MN);
      checks += 4;
      if (int'(t_out0 - t_in0) != LAT) begin
        failures++;
        $display("FAIL P=%0d latency %0d, expected %0d", P, t_out0 - t_in0, LAT);
      end
      for (int f = 1; f < FRAMES; f++)
        if (int'(fstart[f] - fstart[f-1]) != PER) begin
          failures++;
          $display("FAIL P=%0d frame period %0d, expected %0d", P, fstart[f] - fstart[f-1], PER);
        end
      // data sheet columns, in bit-times and bits
      table_init = TINIT;
      if (INIT * W != table_init) begin
        failures++;
        $display("FAIL P=%0d Initially Idle %0d bit-times, data sheet %0d", P, INIT * W, table_init);
      end
      if ($bits(dut.u_cb.mem) != P * 8192) begin
        failures++;
        $display("FAIL P=%0d Common Bar holds %0d bits, data sheet %0d", P, $bits(dut.u_cb.mem), P * 8192);
      end
      red_built = 100.0 * IDLE / (MN + IDLE);
      red_sheet = 100.0 * (P * (N - M)) / (MN + P * (N - M));
      $display("P=%2d  Initially Idle %6d  Idle %5d words  throughput reduction %6.3f%% (data sheet %6.3f%%)",
               P, INIT, IDLE, red_built, red_sheet);
      done_p[g] = 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int g = 0; g < NP; g++) wait (done_p[g]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
