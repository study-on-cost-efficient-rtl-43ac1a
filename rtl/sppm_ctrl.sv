// sppm_ctrl -- control unit of the Sandwich Ping-Pong Memory.
//
// Outside, the memory looks like an ordinary ping-pong (double) buffer of two
// M x N banks: a write port and a read port, each with a bank select and a
// logical address 0 .. M*N-1 (row-major: address = row*N + column).
// Inside there are three single-port arrays: Ping ((M-P)*N words), Common Bar
// (P*N words) and Pong ((M-P)*N words).  Logical addresses below (M-P)*N go
// to the bank's own array (bank 0 = Ping, bank 1 = Pong) at the same address;
// addresses from (M-P)*N upward go to the Common Bar at address-(M-P)*N.
// This is the address comparison of the original control-unit truth table
// (there: 16 addresses, Common Bar from address 12 upward); the strobe form
// below (en/we per array instead of a read/write mode per array) is this
// design's choice.
//
// Read data come back one cycle after rd_en (array latency); the array that
// was read is remembered for that cycle and its output is selected onto
// rd_data, with rd_valid marking the cycle.
//
// The scheduler must never send a read and a write to the same array in one
// cycle; a violation is reported on `conflict` and by an assertion.
module sppm_ctrl
  import sppm_pkg::*;
#(
  parameter int M = 16,
  parameter int N = 512,
  parameter int P = 1,
  parameter int W = 16,
  localparam int LAW = $clog2(M * N),                                  // logical address width
  localparam int PAW = ((M - P) * N > 1) ? $clog2((M - P) * N) : 1,   // Ping/Pong address width
  localparam int CAW = (P * N > 1) ? $clog2(P * N) : 1                // Common Bar address width
) (
  input  logic           clk,
  input  logic           rst_n,
  // ping-pong view
  input  logic           wr_en,
  input  logic           wr_bank,
  input  logic [LAW-1:0] wr_addr,
  input  logic [W-1:0]   wr_data,
  input  logic           rd_en,
  input  logic           rd_bank,
  input  logic [LAW-1:0] rd_addr,
  output logic           rd_valid,
  output logic [W-1:0]   rd_data,
  output logic           conflict,
  // Ping array
  output logic           ping_en,
  output logic           ping_we,
  output logic [PAW-1:0] ping_addr,
  output logic [W-1:0]   ping_wdata,
  input  logic [W-1:0]   ping_rdata,
  // Common Bar array
  output logic           cb_en,
  output logic           cb_we,
  output logic [CAW-1:0] cb_addr,
  output logic [W-1:0]   cb_wdata,
  input  logic [W-1:0]   cb_rdata,
  // Pong array
  output logic           pong_en,
  output logic           pong_we,
  output logic [PAW-1:0] pong_addr,
  output logic [W-1:0]   pong_wdata,
  input  logic [W-1:0]   pong_rdata
);

  localparam int unsigned CB_BASE = (M - P) * N;

  mem_sel_e wr_sel, rd_sel, rd_sel_q;
  logic [LAW-1:0] wr_local, rd_local;

  // Which array each port hits, and the address inside it.
  always_comb begin
    if (wr_addr >= LAW'(CB_BASE)) begin
      wr_sel   = MEM_CB;
      wr_local = wr_addr - LAW'(CB_BASE);
    end else begin
      wr_sel   = wr_bank ? MEM_PONG : MEM_PING;
      wr_local = wr_addr;
    end
    if (rd_addr >= LAW'(CB_BASE)) begin
      rd_sel   = MEM_CB;
      rd_local = rd_addr - LAW'(CB_BASE);
    end else begin
      rd_sel   = rd_bank ? MEM_PONG : MEM_PING;
      rd_local = rd_addr;
    end
  end

  assign conflict = wr_en && rd_en && (wr_sel == rd_sel);

  // Array strobes: the write wins a (forbidden) collision so that the
  // incoming data are never lost.
  always_comb begin
    ping_en = 1'b0;  ping_we = 1'b0;  ping_addr = '0;
    cb_en   = 1'b0;  cb_we   = 1'b0;  cb_addr   = '0;
    pong_en = 1'b0;  pong_we = 1'b0;  pong_addr = '0;
    if (rd_en) begin
      unique case (rd_sel)
        MEM_PING: begin ping_en = 1'b1; ping_addr = PAW'(rd_local); end
        MEM_PONG: begin pong_en = 1'b1; pong_addr = PAW'(rd_local); end
        default:  begin cb_en   = 1'b1; cb_addr   = CAW'(rd_local); end
      endcase
    end
    if (wr_en) begin
      unique case (wr_sel)
        MEM_PING: begin ping_en = 1'b1; ping_we = 1'b1; ping_addr = PAW'(wr_local); end
        MEM_PONG: begin pong_en = 1'b1; pong_we = 1'b1; pong_addr = PAW'(wr_local); end
        default:  begin cb_en   = 1'b1; cb_we   = 1'b1; cb_addr   = CAW'(wr_local); end
      endcase
    end
  end

  assign ping_wdata = wr_data;
  assign cb_wdata   = wr_data;
  assign pong_wdata = wr_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid <= 1'b0;
      rd_sel_q <= MEM_PING;
    end else begin
      rd_valid <= rd_en && !conflict;
      if (rd_en) rd_sel_q <= rd_sel;
    end
  end

  always_comb begin
    unique case (rd_sel_q)
      MEM_PING: rd_data = ping_rdata;
      MEM_PONG: rd_data = pong_rdata;
      default:  rd_data = cb_rdata;
    endcase
  end

  // The single-port rule of the three arrays.
  a_single_port : assert property (@(posedge clk) disable iff (!rst_n) !conflict)
    else $error("sppm_ctrl: read and write hit the same single-port array");

endmodule
