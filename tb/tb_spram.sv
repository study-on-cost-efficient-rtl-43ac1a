// tb_spram -- random single-port traffic against a reference array: checks
// written words come back, one-cycle read latency, and that rdata holds
// while the RAM is idle or writing.
module tb_spram;
  localparam int DEPTH = 40, WIDTH = 12, AW = 6;
  logic clk = 0, rst_n = 0, en = 0, we = 0;
  logic [AW-1:0] addr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] ref_mem [DEPTH];
  logic [WIDTH-1:0] exp_q;

  spram #(.DEPTH(DEPTH), .WIDTH(WIDTH), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // fill
    for (int i = 0; i < DEPTH; i++) begin
      en <= 1; we <= 1; addr <= AW'(i); wdata <= WIDTH'($urandom);
      @(posedge clk);
      ref_mem[i] = wdata;
    end
    exp_q = '0;
    for (int t = 0; t < 2000; t++) begin
      automatic int a = $urandom_range(0, DEPTH - 1);
      automatic int kind = $urandom_range(0, 2);
      en <= (kind != 0); we <= (kind == 2); addr <= AW'(a); wdata <= WIDTH'($urandom);
      #1;
      if (en && !we) exp_q = ref_mem[addr];
      @(posedge clk);
      #1;
      checks++;
      if (rdata !== exp_q) begin
        failures++;
        $display("FAIL t=%0d rdata=%h exp=%h", t, rdata, exp_q);
      end
      if (en && we) ref_mem[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
