// tb_sram_array8x8 -- random reads and writes against a reference array:
// data integrity, one-cycle read latency, dout held while idle, and no access
// while the memory enable is low.
module tb_sram_array8x8;
  logic clk = 0, rst_n = 0, me = 0, we = 0;
  logic [2:0] addr = '0;
  logic [7:0] din = '0, dout;
  logic [7:0] ref_mem [8];
  logic [7:0] exp_q;
  int checks = 0, failures = 0;

  sram_array8x8 dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 8; i++) begin
      me <= 1; we <= 1; addr <= 3'(i); din <= 8'($urandom);
      @(posedge clk);
      ref_mem[i] = din;
    end
    exp_q = '0;
    for (int t = 0; t < 1000; t++) begin
      int kind;
      kind = $urandom_range(0, 3);    // 0 idle, 1 read, 2 write, 3 write with ME low
      me <= (kind == 1 || kind == 2); we <= (kind >= 2); addr <= 3'($urandom); din <= 8'($urandom);
      #1;
      if (me && !we) exp_q = ref_mem[addr];
      @(posedge clk);
      #1;
      checks++;
      if (dout !== exp_q) begin failures++; $display("FAIL t=%0d dout=%h exp=%h", t, dout, exp_q); end
      if (me && we) ref_mem[addr] = din;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
