// tb_march_tpg -- compares the operation streams of the pattern generator
// with the modified March C- written out here: for each block the ordered
// list of (read/write, background, address) it must receive, the rule that a
// cycle in which both blocks are accessed has one read and one write, and
// the run length (12*depth+1 cycles with two blocks, 11*depth with one).
module tb_march_tpg;
  import sppm_pkg::*;
  localparam int AW = 4;

  logic clk = 0, rst_n = 0, start = 0, dual = 0, busy, done;
  logic [AW-1:0] depth = '0, a_addr, b_addr;
  march_op_t a_op, b_op;
  int checks = 0, failures = 0;

  march_tpg #(.AW(AW)) dut (.*);
  always #5 clk = ~clk;

  typedef struct { bit we; bit bg; int addr; } op_s;
  op_s expa [$], expb [$];

  // March C- body: up(r0,w1) up(r1,w0) down(r0,w1) down(r1,w0)
  function automatic void add_pairs(ref op_s q [$], input int d);
    for (int e = 0; e < 4; e++)
      for (int j = 0; j < d; j++) begin
        int a;
        a = (e < 2) ? j : d - 1 - j;
        q.push_back('{0, e[0], a});
        q.push_back('{1, !e[0], a});
      end
  endfunction

  task automatic run(input int d, input bit two);
    int cycles;
    expa.delete(); expb.delete();
    for (int i = 0; i < d; i++) expa.push_back('{1, 0, i});
    for (int i = 0; i < d; i++) expa.push_back('{0, 0, i});
    add_pairs(expa, d);
    for (int i = 0; i < d; i++) expa.push_back('{0, 0, i});
    if (two) begin
      for (int i = 0; i < d; i++) expb.push_back('{1, 0, i});
      add_pairs(expb, d);
      for (int i = 0; i < d; i++) expb.push_back('{0, 0, i});
    end
    depth <= AW'(d); dual <= two; start <= 1;
    @(posedge clk);
    start <= 0;
    cycles = 0;
    while (1) begin
      @(negedge clk);
      if (done) break;
      cycles++;
      if (a_op.en && b_op.en) begin
        checks++;
        if (a_op.we == b_op.we) begin failures++; $display("FAIL both blocks %s", a_op.we ? "write" : "read"); end
      end
      if (a_op.en) begin
        op_s e;
        checks++;
        if (expa.size() == 0) begin failures++; $display("FAIL extra A op"); end
        else begin
          e = expa.pop_front();
          if (a_op.we != e.we || a_op.bg != e.bg || int'(a_addr) != e.addr) begin
            failures++;
            $display("FAIL A op we%b bg%b @%0d, expected we%b bg%b @%0d", a_op.we, a_op.bg, a_addr, e.we, e.bg, e.addr);
          end
        end
      end
      if (b_op.en) begin
        op_s e;
        checks++;
        if (expb.size() == 0) begin failures++; $display("FAIL extra B op"); end
        else begin
          e = expb.pop_front();
          if (b_op.we != e.we || b_op.bg != e.bg || int'(b_addr) != e.addr) begin
            failures++;
            $display("FAIL B op we%b bg%b @%0d, expected we%b bg%b @%0d", b_op.we, b_op.bg, b_addr, e.we, e.bg, e.addr);
          end
        end
      end
    end
    checks++;
    if (expa.size() != 0 || expb.size() != 0) begin failures++; $display("FAIL missing ops %0d %0d", expa.size(), expb.size()); end
    checks++;
    if (cycles != (two ? 12 * d + 1 : 11 * d)) begin failures++; $display("FAIL run took %0d cycles", cycles); end
    checks++;
    if (busy) begin failures++; $display("FAIL still busy"); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run(5, 1);
    run(3, 0);
    run(1, 1);
    run(15, 1);
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
