// sched_harness -- drives one sppm_sched instance and checks it against the
// schedule worked out here independently:
//   phase 1: a burst of back-to-back frames with in_valid always high; every
//            write must come at t0 + k*(M*N+IDLE) + i with address i, every
//            read at t0 + INIT + k*(M*N+IDLE) + j with the column-major
//            address (j mod M)*N + j div M, banks alternating by frame;
//   phase 2: frames with random gaps in in_valid; each frame must still be
//            read completely in column order, each word only after it was
//            written, and never while the next frame overwrites it.
// In both phases no cycle may send a read and a write to the same array.
module sched_harness
  import sppm_pkg::*;
#(
  parameter int M = 4,
  parameter int N = 4,
  parameter int P = 1,
  parameter int FRAMES = 5
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   stalls,
  output int   gaps,
  output logic done
);
  localparam int MN = M * N;
  localparam int LAW = $clog2(MN);
  localparam int INIT = M * N - (M - P);   // written out again on purpose
  localparam int IDLE = P * N - (M - P);
  localparam int T = MN + IDLE;

  logic in_valid, in_ready, wr_en, wr_bank, rd_en, rd_bank, rd_first, rd_last, stall, idle_gap;
  logic [LAW-1:0] wr_addr, rd_addr;

  sppm_sched #(.M(M), .N(N), .P(P)) dut (.*);

  int cyc;
  int phase;
  int wr_cnt, rd_cnt;
  int t0;
  int wtime [int];     // key frame*MN+addr -> write cycle (phase 2)
  int rd_frame;

  function automatic int arr(input logic bank, input int a);
    if (a >= (M - P) * N) return 1;
    return bank ? 2 : 0;
  endfunction

  // phase 2 continues the bank sequence of phase 1
  function automatic logic bank_of(input int k);
    return 1'((phase == 2) ? k + FRAMES : k);
  endfunction

  task automatic fail(input string s);
    failures++;
    $display("FAIL [%0dx%0d P=%0d] cyc %0d: %s", M, N, P, cyc, s);
  endtask

  initial begin
    checks = 0; failures = 0; stalls = 0; gaps = 0; done = 0;
    cyc = 0; phase = 0; wr_cnt = 0; rd_cnt = 0; t0 = -1; in_valid = 0;
  end

  // stimulus
  initial begin
    @(posedge rst_n);
    @(posedge clk);
    phase = 1;
    in_valid <= 1;
    while (wr_cnt < FRAMES * MN) @(posedge clk);
    in_valid <= 0;
    while (rd_cnt < FRAMES * MN) @(posedge clk);
    repeat (IDLE + 3) @(posedge clk);
    phase = 2; wr_cnt = 0; rd_cnt = 0; wtime.delete();
    while (wr_cnt < FRAMES * MN) begin
      in_valid <= ($urandom_range(0, 3) != 0);
      @(posedge clk);
    end
    in_valid <= 0;
    while (rd_cnt < FRAMES * MN) @(posedge clk);
    repeat (3) @(posedge clk);
    done = 1;
  end

  // checking, sampled just before each rising edge
  always @(negedge clk) if (rst_n) begin
    cyc++;
    if (stall) stalls++;
    if (idle_gap) gaps++;
    if (wr_en && rd_en) begin
      checks++;
      if (arr(wr_bank, int'(wr_addr)) == arr(rd_bank, int'(rd_addr))) fail("array collision");
    end
    if (wr_en) begin
      int k, i;
      k = wr_cnt / MN; i = wr_cnt % MN;
      checks++;
      if (int'(wr_addr) != i || wr_bank != bank_of(k)) fail($sformatf("write addr %0d bank %0d, expected %0d %0d", wr_addr, wr_bank, i, bank_of(k)));
      if (phase == 1) begin
        if (t0 < 0) t0 = cyc;
        checks++;
        if (cyc != t0 + k * T + i) fail($sformatf("write %0d of frame %0d at %0d, expected %0d", i, k, cyc, t0 + k * T + i));
      end
      wtime[k * MN + i] = cyc;
      wr_cnt++;
    end
    if (rd_en) begin
      int k, j, a;
      k = rd_cnt / MN; j = rd_cnt % MN; a = (j % M) * N + j / M;
      checks++;
      if (int'(rd_addr) != a || rd_bank != bank_of(k)) fail($sformatf("read addr %0d bank %0d, expected %0d %0d", rd_addr, rd_bank, a, bank_of(k)));
      checks++;
      if (rd_first != (j == 0) || rd_last != (j == MN - 1)) fail("frame markers");
      if (phase == 1) begin
        checks++;
        if (cyc != t0 + INIT + k * T + j) fail($sformatf("read %0d of frame %0d at %0d, expected %0d", j, k, cyc, t0 + INIT + k * T + j));
      end
      checks++;
      if (!wtime.exists(k * MN + a) || wtime[k * MN + a] >= cyc) fail("read before write");
      // the same location of the next frame that shares this array must not be written yet
      if (arr(bank_of(k), a) == 1 && wtime.exists((k + 1) * MN + a)) fail("common bar overwritten before read");
      if (arr(bank_of(k), a) != 1 && wtime.exists((k + 2) * MN + a)) fail("bank overwritten before read");
      rd_cnt++;
    end
  end
endmodule
