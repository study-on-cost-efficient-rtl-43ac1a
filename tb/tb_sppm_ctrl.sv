// tb_sppm_ctrl -- the control unit on the 4x4 geometry with one shared row
// (logical addresses 0..15, Common Bar from address 12 upward).  Random
// two-bank traffic that never collides is checked against a reference model
// of the three arrays: the array strobes and addresses are compared every
// cycle, and every read is compared one cycle later with the model.  A
// deliberate collision checks the conflict flag.
module tb_sppm_ctrl;
  localparam int M = 4, N = 4, P = 1, W = 8;
  localparam int LAW = 4, PAW = 4, CAW = 2;
  localparam int CB_BASE = (M - P) * N;

  logic clk = 0, rst_n = 0;
  logic wr_en = 0, wr_bank = 0, rd_en = 0, rd_bank = 0;
  logic [LAW-1:0] wr_addr = '0, rd_addr = '0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic rd_valid, conflict;
  logic ping_en, ping_we, cb_en, cb_we, pong_en, pong_we;
  logic [PAW-1:0] ping_addr, pong_addr;
  logic [CAW-1:0] cb_addr;
  logic [W-1:0] ping_wdata, cb_wdata, pong_wdata, ping_rdata, cb_rdata, pong_rdata;

  int checks = 0, failures = 0;

  sppm_ctrl #(.M(M), .N(N), .P(P), .W(W)) dut (.*);
  spram #(.DEPTH(12), .WIDTH(W), .AW(PAW)) u_ping (.clk, .rst_n, .en(ping_en), .we(ping_we),
    .addr(ping_addr), .wdata(ping_wdata), .rdata(ping_rdata));
  spram #(.DEPTH(4), .WIDTH(W), .AW(CAW)) u_cb (.clk, .rst_n, .en(cb_en), .we(cb_we),
    .addr(cb_addr), .wdata(cb_wdata), .rdata(cb_rdata));
  spram #(.DEPTH(12), .WIDTH(W), .AW(PAW)) u_pong (.clk, .rst_n, .en(pong_en), .we(pong_we),
    .addr(pong_addr), .wdata(pong_wdata), .rdata(pong_rdata));

  always #5 clk = ~clk;

  // reference storage: index 0..11 ping, 12..15 common bar, 16..27 pong
  logic [W-1:0] model [28];
  logic [W-1:0] exp_rd;
  logic exp_valid;

  function automatic int arr_of(input logic bank, input int a);   // 0 ping 1 cb 2 pong
    if (a >= CB_BASE) return 1;
    return bank ? 2 : 0;
  endfunction
  function automatic int slot_of(input logic bank, input int a);
    if (a >= CB_BASE) return a;
    return bank ? 16 + a : a;
  endfunction

  task automatic chk(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %b exp %b (wr %0d/%0d rd %0d/%0d)", what, got, exp, wr_bank, wr_addr, rd_bank, rd_addr);
    end
  endtask

  task automatic check_strobes();
    int wa, ra;
    wa = wr_en ? arr_of(wr_bank, int'(wr_addr)) : -1;
    ra = rd_en ? arr_of(rd_bank, int'(rd_addr)) : -1;
    chk("ping_en", ping_en, wa == 0 || ra == 0);
    chk("cb_en",   cb_en,   wa == 1 || ra == 1);
    chk("pong_en", pong_en, wa == 2 || ra == 2);
    chk("ping_we", ping_en && ping_we, wa == 0);
    chk("cb_we",   cb_en && cb_we,     wa == 1);
    chk("pong_we", pong_en && pong_we, wa == 2);
    chk("conflict", conflict, wr_en && rd_en && wa == ra);
    if (wa == 1) chk("cb waddr", cb_addr == CAW'(int'(wr_addr) - CB_BASE), 1'b1);
    if (ra == 1 && wa != 1) chk("cb raddr", cb_addr == CAW'(int'(rd_addr) - CB_BASE), 1'b1);
    if (wa == 0) chk("ping waddr", ping_addr == wr_addr, 1'b1);
    if (ra == 2) chk("pong raddr", pong_addr == rd_addr, 1'b1);
  endtask

  initial begin
    exp_valid = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // write every location of both banks once (common bar twice)
    for (int b = 0; b < 2; b++)
      for (int a = 0; a < 16; a++) begin
        wr_en <= 1; wr_bank <= b[0]; wr_addr <= LAW'(a); wr_data <= W'($urandom); rd_en <= 0;
        #1 check_strobes();
        model[slot_of(b[0], a)] = wr_data;
        @(posedge clk);
      end
    wr_en <= 0;
    for (int t = 0; t < 3000; t++) begin
      int wa, ra;
      logic wb, rb;
      do begin
        wa = $urandom_range(0, 15); ra = $urandom_range(0, 15);
        wb = 1'($urandom); rb = 1'($urandom);
      end while (arr_of(wb, wa) == arr_of(rb, ra));
      wr_en <= 1'($urandom); wr_bank <= wb; wr_addr <= LAW'(wa); wr_data <= W'($urandom);
      rd_en <= 1'($urandom); rd_bank <= rb; rd_addr <= LAW'(ra);
      #1 check_strobes();
      exp_valid = rd_en;
      if (rd_en) exp_rd = model[slot_of(rd_bank, int'(rd_addr))];
      @(posedge clk);
      #1;
      chk("rd_valid", rd_valid, exp_valid);
      if (exp_valid) begin
        checks++;
        if (rd_data !== exp_rd) begin
          failures++;
          $display("FAIL read data %h exp %h", rd_data, exp_rd);
        end
      end
      if (wr_en) model[slot_of(wr_bank, int'(wr_addr))] = wr_data;
      // the next check happens after the next edge; keep the read result
    end
    // deliberate collision on the common bar
    wr_en <= 1; wr_bank <= 0; wr_addr <= 4'd13; rd_en <= 1; rd_bank <= 1; rd_addr <= 4'd14;
    #1 chk("collision flagged", conflict, 1'b1);
    rst_n <= 0;  // keep the assertion quiet for the deliberate collision
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
