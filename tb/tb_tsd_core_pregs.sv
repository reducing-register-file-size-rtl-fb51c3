// tb_tsd_core_pregs: a shorter form of the end-to-end test's program, run on four
// cores that differ only in the number of physical registers: 34, 64, 96
// and 112 (with 32 logical registers; 34 leaves a free list of two). Each
// core has its own memory model. Every committed value is checked against a
// sequential reference model, and the cycle count of each size is printed.
// A larger register file leaves fewer writes deferred, so the count of
// deferred writes, and the cycle count, must not grow with the register
// count.
module tb_tsd_core_pregs;
  import tsd_pkg::*;
  localparam int W = 8, P = 4, NS = 4;
  localparam int SIZES [NS] = '{34, 64, 96, 112};
  localparam int ITER = 40, BODY = 8, N = 2 + ITER * BODY;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  inst_t       prog [N];
  logic [31:0] exp_val [N];

  function automatic inst_t mk(op_e op, int pc, int rd, int rs1, int rs2, int imm);
    inst_t x;
    x.op = op; x.pc = 32'(pc); x.has_rd = 1'b1; x.rd = 5'(rd);
    x.rs1 = 5'(rs1); x.rs2 = 5'(rs2); x.imm = 32'(imm);
    return x;
  endfunction

  initial begin
    int k;
    logic [31:0] regs [32];
    k = 0;
    prog[k++] = mk(OP_ADDI, 'h100, 1, 0, 0, 'h0001_0000);
    prog[k++] = mk(OP_ADDI, 'h104, 5, 0, 0, 'h0008_0000);
    for (int it = 0; it < ITER; it++) begin
      prog[k++] = mk(OP_LOAD, 'h200, 2, 1, 0, 0);
      prog[k++] = mk(OP_ADD,  'h204, 3, 3, 2, 0);
      prog[k++] = mk(OP_LOAD, 'h208, 4, 5, 0, 4);
      prog[k++] = mk(OP_XOR,  'h20c, 6, 4, 3, 0);
      prog[k++] = mk(OP_ADDI, 'h210, 1, 1, 0, 64);
      prog[k++] = mk(OP_ADDI, 'h214, 5, 5, 0, 96);
      prog[k++] = mk(OP_SUB,  'h218, 7, 6, 2, 0);
      prog[k++] = mk(OP_AND,  'h21c, 8, 7, 4, 0);
    end
    for (int r = 0; r < 32; r++) regs[r] = 0;
    for (int i = 0; i < N; i++) begin
      logic [31:0] a, b, v;
      a = regs[prog[i].rs1]; b = regs[prog[i].rs2];
      case (prog[i].op)
        OP_ADD:  v = a + b;
        OP_SUB:  v = a - b;
        OP_AND:  v = a & b;
        OP_OR:   v = a | b;
        OP_XOR:  v = a ^ b;
        OP_ADDI: v = a + prog[i].imm;
        OP_LOAD: v = (a + prog[i].imm) * 32'd7 + 32'd3;
        default: v = 0;
      endcase
      exp_val[i] = v;
      regs[prog[i].rd] = v;
    end
  end

  int checks = 0, failures = 0;
  int committed [NS];
  int cycles_to_finish [NS];
  longint deferred [NS];

  for (genvar s = 0; s < NS; s++) begin : g_size
    logic        in_valid [W];
    inst_t       in_inst  [W];
    logic        in_ready;
    logic        mreq_valid [P], mreq_main [P];
    logic [31:0] mreq_addr [P];
    logic [6:0]  mreq_rob [P];
    logic [5:0]  mreq_lsq [P];
    logic        mrsp_valid [P], mrsp_main [P];
    logic [6:0]  mrsp_rob [P];
    logic [5:0]  mrsp_lsq [P];
    logic [31:0] mrsp_data [P];
    logic        cm_valid [W], cm_has_rd [W];
    logic [31:0] cm_pc [W], cm_value [W];
    logic [4:0]  cm_rd [W];
    tsd_events_t ev;
    int unsigned misses, max_om;
    int fed = 0, cyc = 0;

    tsd_core #(.NUM_PREGS(SIZES[s])) dut (
      .clk, .rst_n, .in_valid, .in_inst, .in_ready,
      .mreq_valid, .mreq_main, .mreq_addr, .mreq_rob, .mreq_lsq,
      .mrsp_valid, .mrsp_main, .mrsp_rob, .mrsp_lsq, .mrsp_data,
      .cm_out_valid(cm_valid), .cm_out_pc(cm_pc), .cm_out_has_rd(cm_has_rd),
      .cm_out_rd(cm_rd), .cm_out_value(cm_value), .ev);

    tb_dmem_model #(.PORTS(P), .RW(7), .QW(6)) u_mem (
      .clk, .rst_n, .mreq_valid, .mreq_main, .mreq_addr, .mreq_rob, .mreq_lsq,
      .mrsp_valid, .mrsp_main, .mrsp_rob, .mrsp_lsq, .mrsp_data,
      .misses, .max_outstanding_misses(max_om));

    always_comb
      for (int i = 0; i < W; i++) begin
        in_valid[i] = rst_n && (fed + i < N);
        in_inst[i]  = prog[(fed + i < N) ? fed + i : 0];
      end

    initial begin committed[s] = 0; deferred[s] = 0; cycles_to_finish[s] = 0; end

    always @(posedge clk) if (rst_n) begin
      cyc++;
      if (in_ready && fed < N) fed <= (fed + W > N) ? N : fed + W;
      deferred[s] += ev.deferred;
      for (int i = 0; i < W; i++)
        if (cm_valid[i]) begin
          checks++;
          if (committed[s] >= N || cm_value[i] != exp_val[committed[s]] || cm_rd[i] != prog[committed[s]].rd) begin
            failures++;
            if (failures < 10) $display("FAIL size %0d commit #%0d", SIZES[s], committed[s]);
          end
          committed[s]++;
          if (committed[s] == N) cycles_to_finish[s] = cyc;
        end
    end
  end

  initial begin
    bit all_done;
    repeat (3) @(posedge clk);
    rst_n = 1;
    do begin
      @(posedge clk);
      all_done = 1;
      for (int s = 0; s < NS; s++) if (committed[s] < N) all_done = 0;
    end while (!all_done);
    repeat (5) @(posedge clk);
    for (int s = 0; s < NS; s++)
      $display("physical registers %0d: %0d cycles, %0d deferred writes", SIZES[s], cycles_to_finish[s], deferred[s]);
    for (int s = 1; s < NS; s++) begin
      checks++;
      if (deferred[s] > deferred[s-1]) begin
        failures++;
        $display("FAIL deferred writes grow from %0d to %0d registers", SIZES[s-1], SIZES[s]);
      end
      checks++;
      if (cycles_to_finish[s] > cycles_to_finish[s-1]) begin
        failures++;
        $display("FAIL cycles grow from %0d to %0d registers", SIZES[s-1], SIZES[s]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
