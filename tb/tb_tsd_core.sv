// tb_tsd_core: end-to-end test of the TSD core at its default size
// (8-wide, 48 physical registers, 128-entry ROB, 64-entry window and load
// queue, 1024-entry predictor). A program of ITER loop iterations with two
// strided load streams (every load touches a new 32-byte line, so each
// misses for MISS_LAT cycles unless an earlier pre-execution fetched it)
// and dependent ALU work is fed in groups of eight. A sequential reference
// model computes every destination value; each committed instruction is
// compared in program order. The test also counts the mechanisms of the
// scheme (deferred write grants, grants by ROBP match, ALU and load
// pre-executions, predictions and pre-executions on predicted addresses,
// dropped bypass-only operands, dispatch stalls) and fails if any never
// happened.
module tb_tsd_core;
  import tsd_pkg::*;
  localparam int W = 8, P = 4;
  localparam int ITER = 60;
  localparam int BODY = 8;
  localparam int N = 2 + ITER * BODY;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

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

  tsd_core dut (
    .clk, .rst_n, .in_valid, .in_inst, .in_ready,
    .mreq_valid, .mreq_main, .mreq_addr, .mreq_rob, .mreq_lsq,
    .mrsp_valid, .mrsp_main, .mrsp_rob, .mrsp_lsq, .mrsp_data,
    .cm_out_valid(cm_valid), .cm_out_pc(cm_pc), .cm_out_has_rd(cm_has_rd),
    .cm_out_rd(cm_rd), .cm_out_value(cm_value), .ev);

  tb_dmem_model #(.PORTS(P), .RW(7), .QW(6), .HIT_LAT(2), .MISS_LAT(300)) u_mem (
    .clk, .rst_n, .mreq_valid, .mreq_main, .mreq_addr, .mreq_rob, .mreq_lsq,
    .mrsp_valid, .mrsp_main, .mrsp_rob, .mrsp_lsq, .mrsp_data,
    .misses, .max_outstanding_misses(max_om));

  // ---- program and reference model ----
  inst_t       prog [N];
  logic [31:0] exp_val [N];
  logic [31:0] regs [32];

  function automatic inst_t mk(op_e op, int pc, int rd, int rs1, int rs2, int imm);
    inst_t x;
    x.op = op; x.pc = 32'(pc); x.has_rd = 1'b1; x.rd = 5'(rd);
    x.rs1 = 5'(rs1); x.rs2 = 5'(rs2); x.imm = 32'(imm);
    return x;
  endfunction

  initial begin
    int k;
    k = 0;
    prog[k++] = mk(OP_ADDI, 'h100, 1, 0, 0, 'h0001_0000);
    prog[k++] = mk(OP_ADDI, 'h104, 5, 0, 0, 'h0008_0000);
    for (int it = 0; it < ITER; it++) begin
      prog[k++] = mk(OP_LOAD, 'h200, 2, 1, 0, 0);     // a[i]
      prog[k++] = mk(OP_ADD,  'h204, 3, 3, 2, 0);
      prog[k++] = mk(OP_LOAD, 'h208, 4, 5, 0, 4);     // b[i]
      prog[k++] = mk(OP_XOR,  'h20c, 6, 4, 3, 0);
      prog[k++] = mk(OP_ADDI, 'h210, 1, 1, 0, 64);
      prog[k++] = mk(OP_ADDI, 'h214, 5, 5, 0, 96);
      prog[k++] = mk(OP_SUB,  'h218, 7, 6, 2, 0);
      prog[k++] = mk(OP_OR,   'h21c, 8, 7, 4, 0);
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

  // ---- feed ----
  int fed = 0;
  always_comb
    for (int i = 0; i < W; i++) begin
      in_valid[i] = rst_n && (fed + i < N);
      in_inst[i]  = prog[(fed + i < N) ? fed + i : 0];
    end
  always @(posedge clk)
    if (rst_n && in_ready && fed < N) fed <= (fed + W > N) ? N : fed + W;

  // ---- checking ----
  int checks = 0, failures = 0, committed = 0, cycles = 0;
  longint c_alu_pexec, c_ld_pexec, c_ld_pexec_pred, c_ld_pred, c_pred_ok,
          c_grants, c_deferred, c_byp_drop, c_stall, c_alu_main, c_ld_main;
  initial begin
    c_alu_pexec = 0; c_ld_pexec = 0; c_ld_pexec_pred = 0; c_ld_pred = 0; c_pred_ok = 0;
    c_grants = 0; c_deferred = 0; c_byp_drop = 0; c_stall = 0; c_alu_main = 0; c_ld_main = 0;
  end

  always @(posedge clk) if (rst_n) begin
    cycles++;
    for (int i = 0; i < W; i++)
      if (cm_valid[i]) begin
        checks++;
        if (committed >= N) begin
          failures++;
          $display("FAIL extra commit pc=%h", cm_pc[i]);
        end else if (cm_pc[i] != prog[committed].pc || cm_rd[i] != prog[committed].rd ||
                     cm_value[i] != exp_val[committed]) begin
          failures++;
          $display("FAIL commit #%0d pc=%h rd=%0d val=%h, expected pc=%h rd=%0d val=%h", committed,
                   cm_pc[i], cm_rd[i], cm_value[i], prog[committed].pc, prog[committed].rd, exp_val[committed]);
        end
        committed++;
      end
    c_alu_pexec     += ev.alu_pexec;
    c_alu_main      += ev.alu_main;
    c_ld_pexec      += ev.ld_pexec;
    c_ld_main       += ev.ld_main;
    c_ld_pexec_pred += ev.ld_pexec_pred;
    c_ld_pred       += ev.ld_pred;
    c_pred_ok       += ev.pred_correct;
    c_grants        += ev.grants;
    c_deferred      += ev.deferred;
    c_byp_drop      += ev.byp_drop;
    if (!in_ready && fed < N) c_stall++;
  end

  task automatic need(string what, longint n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (committed >= N);
    repeat (20) @(posedge clk);
    $display("cycles=%0d committed=%0d misses=%0d max concurrent misses=%0d", cycles, committed, misses, max_om);
    $display("alu main=%0d pexec=%0d | load main=%0d pexec=%0d pexec_on_pred=%0d | predicted=%0d correct=%0d",
             c_alu_main, c_alu_pexec, c_ld_main, c_ld_pexec, c_ld_pexec_pred, c_ld_pred, c_pred_ok);
    $display("deferred=%0d grants=%0d bypass_drops=%0d dispatch_stall_cycles=%0d",
             c_deferred, c_grants, c_byp_drop, c_stall);
    need("write deferred to a ROBP", c_deferred);
    need("grant by ROBP broadcast", c_grants);
    need("ALU pre-execution", c_alu_pexec);
    need("load pre-execution", c_ld_pexec);
    need("confident address prediction", c_ld_pred);
    need("correct address prediction", c_pred_ok);
    need("load pre-executed with predicted address", c_ld_pexec_pred);
    need("bypass-only operand dropped", c_byp_drop);
    need("dispatch stall", c_stall);
    checks++;
    if (c_ld_main != 2 * ITER) begin
      failures++;
      $display("FAIL main load executions %0d, expected %0d", c_ld_main, 2 * ITER);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: committed %0d of %0d", committed, N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
