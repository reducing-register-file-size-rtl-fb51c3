// tsd_regfile: physical register file of one register class. Under TSD it is
// written only by main executions, whose write has been granted; results of
// pre-executions never reach it and travel on the bypass buses instead.
// NR asynchronous read ports (dispatch operand reads and commit reads) and NW
// synchronous write ports (ALU and load main executions). A write is visible
// to reads from the next cycle. Registers reset to zero, which is the
// initial architectural state; an address beyond NPREGS reads 0 and is not
// written. Port counts are this design's choice.
module tsd_regfile #(
  parameter int unsigned NPREGS = 48,
  parameter int unsigned XLEN   = 32,
  parameter int unsigned NR     = 24,
  parameter int unsigned NW     = 12,
  localparam int unsigned PW    = $clog2(NPREGS)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [PW-1:0]       raddr [NR],
  output logic [XLEN-1:0]     rdata [NR],
  input  logic                we    [NW],
  input  logic [PW-1:0]       waddr [NW],
  input  logic [XLEN-1:0]     wdata [NW]
);
  logic [XLEN-1:0] regs [NPREGS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NPREGS; i++) regs[i] <= '0;
    end else begin
      for (int w = 0; w < NW; w++)
        if (we[w] && int'(waddr[w]) < NPREGS) regs[waddr[w]] <= wdata[w];
    end
  end

  always_comb
    for (int r = 0; r < NR; r++)
      rdata[r] = (int'(raddr[r]) < NPREGS) ? regs[raddr[r]] : '0;
endmodule
