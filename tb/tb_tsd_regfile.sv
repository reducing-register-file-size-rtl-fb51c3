// tb_tsd_regfile: random multi-port writes and reads of the physical
// register file against a model array. Checks that registers reset to zero,
// that a write is visible from the next cycle, and that all read ports work.
// 64 registers, a power of two, so every address bit is in use.
module tb_tsd_regfile;
  localparam int NP = 64, NR = 24, NW = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [5:0]  raddr [NR];
  logic [31:0] rdata [NR];
  logic        we    [NW];
  logic [5:0]  waddr [NW];
  logic [31:0] wdata [NW];
  logic [31:0] model [NP];
  int checks = 0, failures = 0;
  tsd_regfile #(.NPREGS(NP), .NR(NR), .NW(NW)) dut (.*);
  initial begin
    for (int p = 0; p < NP; p++) model[p] = 0;
    for (int w = 0; w < NW; w++) begin we[w] = 0; waddr[w] = 0; wdata[w] = 0; end
    for (int r = 0; r < NR; r++) raddr[r] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 500; cyc++) begin
      bit used [NP];
      @(negedge clk);
      for (int r = 0; r < NR; r++) raddr[r] = 6'($urandom_range(0, NP-1));
      #1;
      for (int r = 0; r < NR; r++) begin
        checks++;
        if (rdata[r] !== model[raddr[r]]) begin
          failures++;
          if (failures < 10) $display("FAIL read p%0d got %h exp %h", raddr[r], rdata[r], model[raddr[r]]);
        end
      end
      for (int p = 0; p < NP; p++) used[p] = 0;
      for (int w = 0; w < NW; w++) begin
        int a;
        a = $urandom_range(0, NP-1);
        we[w] = ($urandom_range(0, 2) == 0) && !used[a];
        waddr[w] = 6'(a);
        wdata[w] = $urandom;
        if (we[w]) begin used[a] = 1; model[a] = wdata[w]; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
