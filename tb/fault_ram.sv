// fault_ram -- behavioural single-port RAM for testbenches, with one
// injectable memory fault (same ports and timing as spram).
//   kind 0 none
//   1 stuck-at-0, 2 stuck-at-1                 bit `bitn` of word `victim`
//   3 transition fault: cannot rise 0->1,  4: cannot fall 1->0
//   5 idempotent coupling <up;0>, 6 <up;1>, 7 <down;0>, 8 <down;1>:
//       a transition of bit `bitn` in word `aggr` forces that bit of `victim`
//   9 inversion coupling <up;inv>, 10 <down;inv>
//  11 address-decoder fault: address `aggr` reaches word `victim` instead
module fault_ram #(
  parameter int DEPTH = 16,
  parameter int WIDTH = 4,
  parameter int AW = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata,
  input  int               kind,
  input  int               victim,
  input  int               aggr,
  input  int               bitn
);
  logic [WIDTH-1:0] mem [DEPTH];

  function automatic int eff(input int a);
    return (kind == 11 && a == aggr) ? victim : a;
  endfunction

  function automatic logic [WIDTH-1:0] stuck(input int a, input logic [WIDTH-1:0] v);
    logic [WIDTH-1:0] r;
    r = v;
    if (a == victim && kind == 1) r[bitn] = 1'b0;
    if (a == victim && kind == 2) r[bitn] = 1'b1;
    return r;
  endfunction

  always @(posedge clk) begin
    if (en && we) begin
      int a;
      logic [WIDTH-1:0] old, nw;
      a = eff(int'(addr));
      if (a < DEPTH) begin
        old = mem[a];
        nw = wdata;
        if (a == victim && kind == 3 && !old[bitn] && nw[bitn]) nw[bitn] = 1'b0;
        if (a == victim && kind == 4 && old[bitn] && !nw[bitn]) nw[bitn] = 1'b1;
        mem[a] = stuck(a, nw);
        if (a == aggr && victim != aggr) begin
          logic up, dn;
          up = !old[bitn] && nw[bitn];
          dn = old[bitn] && !nw[bitn];
          if (kind == 5 && up) mem[victim][bitn] = 1'b0;
          if (kind == 6 && up) mem[victim][bitn] = 1'b1;
          if (kind == 7 && dn) mem[victim][bitn] = 1'b0;
          if (kind == 8 && dn) mem[victim][bitn] = 1'b1;
          if (kind == 9 && up) mem[victim][bitn] = ~mem[victim][bitn];
          if (kind == 10 && dn) mem[victim][bitn] = ~mem[victim][bitn];
        end
      end
    end
  end

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) rdata <= '0;
    else if (en && !we) rdata <= (eff(int'(addr)) < DEPTH) ? stuck(eff(int'(addr)), mem[eff(int'(addr))]) : '0;
  end
endmodule
