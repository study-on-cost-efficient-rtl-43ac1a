// tb_pp_chip64 -- uses the 64-byte chip as a ping-pong buffer: blocks of 32
// bytes are written into one half while the previous block is read from the
// other half, with WE flipping every block; every byte read must be the one
// written there one block earlier, so the two halves (and the four arrays
// of each) must hold separate data.
module tb_pp_chip64;
  logic clk = 0, rst_n = 0, we = 1;
  logic [3:0] g = '0;
  logic [2:0] pe1 = '0, pe2 = '0;
  logic [7:0] din = '0, dout;
  logic [7:0] ref_mem [64];     // 0..31 ping half, 32..63 pong half
  int checks = 0, failures = 0;

  pp_chip64 dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int blk = 0; blk < 6; blk++) begin
      bit ping_w;
      ping_w = (blk % 2 == 0);
      for (int i = 0; i < 32; i++) begin
        int wi, ri;
        logic [7:0] expd;
        // write byte i into the write half, read byte 31-i from the other
        wi = i; ri = 31 - i;
        we <= ping_w;
        din <= 8'($urandom);
        if (ping_w) begin
          g <= {2'(ri / 8), 2'(wi / 8)}; pe1 <= 3'(wi % 8); pe2 <= 3'(ri % 8);
        end else begin
          g <= {2'(wi / 8), 2'(ri / 8)}; pe2 <= 3'(wi % 8); pe1 <= 3'(ri % 8);
        end
        #1;
        expd = ref_mem[(ping_w ? 32 : 0) + ri];
        @(posedge clk);
        ref_mem[(ping_w ? 0 : 32) + wi] = din;
        #1;
        if (blk > 0) begin
          checks++;
          if (dout !== expd) begin
            failures++;
            $display("FAIL block %0d byte %0d: read %h expected %h", blk, ri, dout, expd);
          end
        end
      end
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
