// tb_sppm_bist -- the test circuit on a 4x4 memory with one shared row
// (Ping and Pong 12 words, Common Bar 4 words, 4-bit words), connected to
// fault-injecting array models.  A fault-free memory must pass; every
// injected stuck-at, transition, idempotent and inversion coupling and
// address-decoder fault, in any of the three arrays, must make it fail.
// The test length (12*12+1 + 10*4 cycles plus phase changes) and the number
// of reads checked are compared with the values worked out from the
// algorithm.
module tb_sppm_bist;
  localparam int M = 4, N = 4, P = 1, W = 4;
  localparam int PAW = 4, CAW = 2;
  localparam int D = (M - P) * N, C = P * N;

  logic clk = 0, rst_n = 0, start = 0, busy, done, fail;
  logic [15:0] errors;
  logic [16:0] reads;
  logic ping_en, ping_we, cb_en, cb_we, pong_en, pong_we;
  logic [PAW-1:0] ping_addr, pong_addr;
  logic [CAW-1:0] cb_addr;
  logic [W-1:0] ping_wdata, cb_wdata, pong_wdata, ping_rdata, cb_rdata, pong_rdata;
  int k [3], cl [3], ag [3], bn [3];
  int checks = 0, failures = 0;

  sppm_bist #(.M(M), .N(N), .P(P), .W(W)) dut (.*);
  fault_ram #(.DEPTH(D), .WIDTH(W), .AW(PAW)) u_ping (.clk, .rst_n, .en(ping_en), .we(ping_we),
    .addr(ping_addr), .wdata(ping_wdata), .rdata(ping_rdata), .kind(k[0]), .victim(cl[0]), .aggr(ag[0]), .bitn(bn[0]));
  fault_ram #(.DEPTH(C), .WIDTH(W), .AW(CAW)) u_cb (.clk, .rst_n, .en(cb_en), .we(cb_we),
    .addr(cb_addr), .wdata(cb_wdata), .rdata(cb_rdata), .kind(k[1]), .victim(cl[1]), .aggr(ag[1]), .bitn(bn[1]));
  fault_ram #(.DEPTH(D), .WIDTH(W), .AW(PAW)) u_pong (.clk, .rst_n, .en(pong_en), .we(pong_we),
    .addr(pong_addr), .wdata(pong_wdata), .rdata(pong_rdata), .kind(k[2]), .victim(cl[2]), .aggr(ag[2]), .bitn(bn[2]));

  always #5 clk = ~clk;

  task automatic run_test(output bit failed, output int cycles);
    start <= 1;
    @(posedge clk);
    start <= 0;
    cycles = 1;
    do begin
      @(posedge clk);
      cycles++;
    end while (!done);
    #1 failed = fail;
  endtask

  initial begin
    bit f;
    int cyc;
    foreach (k[i]) begin k[i] = 0; cl[i] = 0; ag[i] = 0; bn[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run_test(f, cyc);
    checks++;
    if (f) begin failures++; $display("FAIL fault-free memory reported faulty (%0d errors)", errors); end
    checks++;
    // phase PP: 12D+1 cycles, CB: 11C cycles, plus 7 cycles of phase change and done handshake
    if (cyc != (12 * D + 1) + (11 * C) + 7) begin failures++; $display("FAIL test took %0d cycles", cyc); end
    checks++;
    // reads: A in PP: D + 4D + D, B: 4D + D, A in CB: C + 4C + C
    if (int'(reads) != 6 * D + 5 * D + 6 * C) begin failures++; $display("FAIL %0d reads checked", reads); end
    for (int arr = 0; arr < 3; arr++) begin
      for (int kind = 1; kind <= 11; kind++) begin
        for (int rep = 0; rep < 4; rep++) begin
          int depth;
          depth = (arr == 1) ? C : D;
          foreach (k[i]) k[i] = 0;
          k[arr] = kind;
          cl[arr] = $urandom_range(0, depth - 1);
          do ag[arr] = $urandom_range(0, depth - 1); while (ag[arr] == cl[arr]);
          bn[arr] = $urandom_range(0, W - 1);
          run_test(f, cyc);
          checks++;
          if (!f) begin
            failures++;
            $display("FAIL fault kind %0d in array %0d (victim %0d aggr %0d bit %0d) not detected", kind, arr, cl[arr], ag[arr], bn[arr]);
          end
        end
      end
    end
    foreach (k[i]) k[i] = 0;
    run_test(f, cyc);
    checks++;
    if (f) begin failures++; $display("FAIL fail flag not cleared by a new run"); end
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
