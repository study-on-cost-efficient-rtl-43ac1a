// tb_sppm_top_full -- end-to-end test of sppm_top
// At its default size (16 x 512 words of 16 bits, P = 1).
//
// Frames of random words are sent row by row and must come out column by
// column (the transpose), each word exactly once, with out_first/out_last on
// the first and last word of each frame.
//   1. 3 frames back to back with in_valid always high: the first output
//      word must appear INIT+1 cycles after the first input word
//      (INIT = M*N-(M-P)) and frames must be accepted every M*N+IDLE cycles
//      (IDLE = P*N-(M-P)).
//   2. 2 frames with random holes in in_valid (the schedule stalls).
//   3. The built-in test runs on the now idle buffer and must pass; the input
//      must stay closed while it runs.
//   4. One more frame after the test: normal operation resumes.
//   5. A short ping-pong exchange through the 64-byte chip pins.
//   6. Random 8x8 blocks through the 2-D DCT, sent while frames are still
//      flowing through the main buffer; every coefficient is compared with a
//      model of the two rounded 1-D passes.
// Each mechanism (stall, Idle-Time gap, Common Bar write and read, both
// banks, built-in test, chip traffic, DCT blocks) is counted and must occur.
module tb_sppm_top_full;
  import sppm_pkg::*;
  localparam int M = 16, N = 512, P = 1, W = 16;
  localparam int MN = M * N;
  localparam int INIT = M * N - (M - P);
  localparam int IDLE = P * N - (M - P);
  localparam int FA = 3, FB = 2;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_first, out_last, stall, idle_gap;
  logic [W-1:0] in_data = '0, out_data;
  logic bist_start = 0, bist_busy, bist_done, bist_fail;
  logic [15:0] bist_errors;
  logic [16:0] bist_reads;
  logic chip_we = 1;
  logic [3:0] chip_g = '0;
  logic [2:0] chip_pe1 = '0, chip_pe2 = '0;
  logic [7:0] chip_din = '0, chip_dout;
  logic dct_in_valid = 0, dct_in_ready, dct_out_valid, dct_out_first;
  logic [7:0] dct_in_data = '0;
  logic [15:0] dct_out_data;

  sppm_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  logic [W-1:0] expq [$];
  int out_idx = 0;            // position inside the current output frame
  longint t_first_in = -1, t_first_out = -1;
  longint frame_start [$];
  int n_stall = 0, n_gap = 0, n_cb_wr = 0, n_cb_rd = 0, n_bank1 = 0, n_bist = 0, n_chip = 0, n_dct = 0;
  int sent = 0;

  task automatic fail(input string s);
    failures++;
    if (failures < 20) $display("FAIL cyc %0d: %s", cyc, s);
  endtask

  // one frame: generate, queue the transpose, send (with holes if gaps)
  task automatic send_frame(input bit gaps);
    logic [W-1:0] f [];
    f = new[MN];
    foreach (f[i]) f[i] = W'($urandom);
    for (int c = 0; c < N; c++)
      for (int r = 0; r < M; r++) expq.push_back(f[r * N + c]);
    for (int i = 0; i < MN; ) begin
      in_valid <= gaps ? ($urandom_range(0, 2) != 0) : 1'b1;
      in_data  <= f[i];
      @(posedge clk);
      if (in_valid && in_ready) begin
        if (i == 0) frame_start.push_back(cyc);
        if (t_first_in < 0) t_first_in = cyc;
        i++;
        sent++;
      end
    end
    in_valid <= 0;
  endtask

  always @(posedge clk) cyc <= cyc + 1;

  // ---- 2-D DCT model: two rounded 1-D passes, sample X_ij = dct_x[b*64+j*8+i]
  localparam real PI = 3.14159265358979323846;
  int dct_x [$];
  int dct_nout = 0;

  function automatic int cfix(int p, int i);
    return int'($floor($cos(PI / 8.0 * (i + 0.5) * p) * 4096.0 + 0.5));
  endfunction

  function automatic int pass1(int v[8], int p);
    longint acc = 0;
    for (int i = 0; i < 8; i++) acc += longint'(v[i]) * cfix(p, i);
    return int'((acc + 2048) >>> 12);
  endfunction

  function automatic int ref_y(int b, int p, int q);
    int z [8];
    for (int j = 0; j < 8; j++) begin
      int v [8];
      for (int i = 0; i < 8; i++) v[i] = dct_x[b * 64 + j * 8 + i];
      z[j] = pass1(v, p);
    end
    return pass1(z, q);
  endfunction

  task automatic send_dct_blocks(input int nblk);
    for (int i = 0; i < 64 * nblk; ) begin
      dct_in_valid <= ($urandom_range(0, 3) != 0);
      dct_in_data  <= 8'($urandom);
      @(posedge clk);
      if (dct_in_valid && dct_in_ready) begin
        dct_x.push_back(int'($signed(dct_in_data)));
        i++;
      end
    end
    dct_in_valid <= 0;
  endtask

  always @(posedge clk) if (rst_n && dct_out_valid) begin
    automatic int b = dct_nout / 64, p = (dct_nout % 64) / 8, q = dct_nout % 8;
    automatic int r = ref_y(b, p, q);
    checks += 2;
    if (int'($signed(dct_out_data)) != r)
      fail($sformatf("DCT block %0d Y%0d%0d = %0d expected %0d", b, p, q, $signed(dct_out_data), r));
    if (dct_out_first != (dct_nout % 64 == 0)) fail("DCT block marker");
    dct_nout++;
    if (dct_nout % 64 == 0) n_dct++;
  end

  // monitor (sampled at the clock edge, before the design updates)
  always @(posedge clk) if (rst_n) begin
    if (stall) n_stall++;
    if (idle_gap) n_gap++;
    if (!bist_busy && dut.u_buf.u_cb.en && dut.u_buf.u_cb.we) n_cb_wr++;
    if (!bist_busy && dut.u_buf.u_cb.en && !dut.u_buf.u_cb.we) n_cb_rd++;
    if (dut.u_buf.u_sched.wr_en && dut.u_buf.u_sched.wr_bank) n_bank1++;
    if (bist_busy && in_ready) fail("input open during the built-in test");
    if (out_valid) begin
      if (t_first_out < 0) t_first_out = cyc;
      checks++;
      if (expq.size() == 0) fail("unexpected output word");
      else begin
        logic [W-1:0] e;
        e = expq.pop_front();
        if (out_data !== e) fail($sformatf("output word %0d: %h expected %h", out_idx, out_data, e));
      end
      checks++;
      if (out_first != (out_idx == 0) || out_last != (out_idx == MN - 1)) fail("frame markers");
      out_idx = (out_idx == MN - 1) ? 0 : out_idx + 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // 1. back to back
    for (int k = 0; k < FA; k++) send_frame(0);
    // 2. with holes, while the DCT (6) runs beside the buffer
    fork
      for (int k = 0; k < FB; k++) send_frame(1);
      send_dct_blocks(3);
    join
    while (expq.size() != 0) @(posedge clk);
    repeat (4) @(posedge clk);
    checks++;
    if (t_first_out - t_first_in != INIT + 1)
      fail($sformatf("first output after %0d cycles, expected %0d", t_first_out - t_first_in, INIT + 1));
    for (int k = 1; k < FA; k++) begin
      checks++;
      if (frame_start[k] - frame_start[k-1] != MN + IDLE)
        fail($sformatf("frame %0d started %0d cycles after the previous, expected %0d", k, frame_start[k] - frame_start[k-1], MN + IDLE));
    end
    // 3. built-in test
    bist_start <= 1;
    @(posedge clk);
    bist_start <= 0;
    while (!bist_done) @(posedge clk);
    #1;
    checks++;
    if (bist_fail) fail($sformatf("built-in test failed with %0d errors", bist_errors));
    else n_bist++;
    checks++;
    if (int'(bist_reads) != 11 * (M - P) * N + 6 * P * N) fail($sformatf("built-in test checked %0d reads", bist_reads));
    // 4. normal operation again
    send_frame(1);
    while (expq.size() != 0) @(posedge clk);
    // 5. chip: write 8 bytes into ping array 1, then read them back while writing pong
    begin
      logic [7:0] d [8];
      for (int i = 0; i < 8; i++) begin
        d[i] = 8'($urandom);
        chip_we <= 1; chip_g <= 4'b0001; chip_pe1 <= 3'(i); chip_din <= d[i];
        @(posedge clk);
      end
      for (int i = 0; i < 8; i++) begin
        chip_we <= 0; chip_g <= 4'b0001; chip_pe1 <= 3'(i); chip_pe2 <= 3'(i); chip_din <= 8'hA5;
        @(posedge clk);
        #1;
        checks++;
        if (chip_dout !== d[i]) fail($sformatf("chip byte %0d: %h expected %h", i, chip_dout, d[i]));
        else n_chip++;
      end
    end
    // 6. the DCT blocks sent during step 2 must all have come out
    while (dct_nout < 3 * 64) @(posedge clk);
    // every mechanism must have happened
    checks += 8;
    if (n_stall == 0) fail("no stall happened");
    if (n_gap == 0) fail("no Idle-Time gap happened");
    if (n_cb_wr == 0) fail("no Common Bar write");
    if (n_cb_rd == 0) fail("no Common Bar read");
    if (n_bank1 == 0) fail("Pong bank never used");
    if (n_bist == 0) fail("built-in test never passed");
    if (n_chip == 0) fail("no chip traffic");
    if (n_dct != 3) fail($sformatf("%0d DCT blocks out, expected 3", n_dct));
    $display("events: stall=%0d idle_gap=%0d cb_wr=%0d cb_rd=%0d pong_writes=%0d bist=%0d chip=%0d dct_blocks=%0d words=%0d",
             n_stall, n_gap, n_cb_wr, n_cb_rd, n_bank1, n_bist, n_chip, n_dct, sent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
