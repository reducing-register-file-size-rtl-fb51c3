// tsd_core: back end of an out-of-order core that renames with two-step
// physical register deallocation (TSD) and pre-executes instructions whose
// destination register is only temporarily allocated, with a stride
// predictor supplying load addresses to such pre-executions.
// Dispatch (one cycle, a group of WIDTH decoded instructions, all or none):
// the group is accepted when the ROB, the instruction window and the load
// queue each have room for WIDTH more entries. Each instruction gets a ROB
// entry and is renamed (tsd_rename); a load is split into an OP_AGEN entry in
// the window and a memory-access entry in the load queue, which receives the
// address predicted from the load's PC (tsd_vpred). A source is available at
// dispatch when its producer has committed or completed its main execution;
// its value is then read from the register file, otherwise it waits for the
// producer's tag on the bypass buses.
// Execute: up to ALU_UNITS window entries issue per cycle to single-cycle
// ALUs; up to LDST_PORTS loads per cycle go to the data cache (outside the
// core, mreq/mrsp). A main execution writes the register file, marks the
// ROB entry done and broadcasts a persistent wakeup; a pre-execution only
// broadcasts its result on the bypass for one cycle.
// Commit: up to WIDTH instructions per cycle in order. Their ROB numbers are
// broadcast to the window and the load queue (second-step deallocation,
// granting result writes), clear DAT and map entries, train the predictor
// with each committed load's address, and appear on cm_* with the value
// read from the register file.
// The scheme follows the document; the instruction set, the dispatch-group
// rule, single-cycle ALUs and training at commit are this design's choices.
// One register class is modelled (the document's processor has an integer
// and a floating-point file of equal size).
module tsd_core
  import tsd_pkg::*;
#(
  parameter int unsigned WIDTH       = 8,
  parameter int unsigned NUM_LREGS   = 32,
  parameter int unsigned NUM_PREGS   = 48,
  parameter int unsigned ROB_DEPTH   = 128,
  parameter int unsigned IW_DEPTH    = 64,
  parameter int unsigned LSQ_DEPTH   = 64,
  parameter int unsigned LDST_PORTS  = 4,
  parameter int unsigned ALU_UNITS   = 8,
  parameter int unsigned VHT_ENTRIES = 1024,
  parameter int unsigned XLEN        = 32,
  localparam int unsigned RW = $clog2(ROB_DEPTH),
  localparam int unsigned PW = $clog2(NUM_PREGS),
  localparam int unsigned QW = $clog2(LSQ_DEPTH),
  localparam int unsigned LW = $clog2(NUM_LREGS)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid   [WIDTH],
  input  inst_t           in_inst    [WIDTH],
  output logic            in_ready,
  output logic            mreq_valid [LDST_PORTS],
  output logic            mreq_main  [LDST_PORTS],
  output logic [XLEN-1:0] mreq_addr  [LDST_PORTS],
  output logic [RW-1:0]   mreq_rob   [LDST_PORTS],
  output logic [QW-1:0]   mreq_lsq   [LDST_PORTS],
  input  logic            mrsp_valid [LDST_PORTS],
  input  logic            mrsp_main  [LDST_PORTS],
  input  logic [RW-1:0]   mrsp_rob   [LDST_PORTS],
  input  logic [QW-1:0]   mrsp_lsq   [LDST_PORTS],
  input  logic [XLEN-1:0] mrsp_data  [LDST_PORTS],
  output logic            cm_out_valid [WIDTH],
  output logic [XLEN-1:0] cm_out_pc    [WIDTH],
  output logic            cm_out_has_rd[WIDTH],
  output logic [LW-1:0]   cm_out_rd    [WIDTH],
  output logic [XLEN-1:0] cm_out_value [WIDTH],
  output tsd_events_t     ev
);
  localparam int unsigned NWK    = ALU_UNITS + LDST_PORTS;
  localparam int unsigned NTRAIN = LDST_PORTS;

  // ---------------- dispatch ----------------
  logic fire, rob_space, iw_space, lsq_space;
  logic any_valid;
  always_comb begin
    any_valid = 1'b0;
    for (int i = 0; i < WIDTH; i++) any_valid |= in_valid[i];
  end
  assign in_ready = rob_space && iw_space && lsq_space;
  assign fire     = in_ready && any_valid;

  logic            is_load  [WIDTH];
  logic            rd_valid [WIDTH];
  logic [LW-1:0]   f_rd [WIDTH], f_rs1 [WIDTH], f_rs2 [WIDTH];
  logic [XLEN-1:0] f_pc [WIDTH];
  always_comb
    for (int i = 0; i < WIDTH; i++) begin
      is_load[i]  = in_valid[i] && in_inst[i].op == OP_LOAD;
      rd_valid[i] = in_inst[i].has_rd;
      f_rd[i]     = LW'(in_inst[i].rd);
      f_rs1[i]    = LW'(in_inst[i].rs1);
      f_rs2[i]    = LW'(in_inst[i].rs2);
      f_pc[i]     = XLEN'(in_inst[i].pc);
    end

  logic [XLEN-1:0] imm_of [WIDTH];
  // value predictor results per slot
  logic            vp_hit        [WIDTH];
  logic            vp_lk         [WIDTH];
  logic            vp_pred_valid [WIDTH];
  logic [XLEN-1:0] vp_pred_addr  [WIDTH];

  // commit side signals
  logic            cm_valid  [WIDTH];
  logic [RW-1:0]   cm_rob    [WIDTH];
  logic            cm_has_rd [WIDTH];
  logic [LW-1:0]   cm_rd     [WIDTH];
  logic [PW-1:0]   cm_pd     [WIDTH];
  logic [PW-1:0]   cm_pold   [WIDTH];
  logic            cm_load   [WIDTH];
  logic [XLEN-1:0] cm_pc     [WIDTH];
  logic [XLEN-1:0] cm_addr   [WIDTH];
  logic            cm_vhit   [WIDTH];
  logic [XLEN-1:0] cm_vpred  [WIDTH];
  logic [$clog2(WIDTH+1)-1:0] cm_loads;

  // ROB
  logic [RW-1:0]   rob_idx [WIDTH];
  logic [ROB_DEPTH-1:0] done_vec;
  logic            dn_valid [NWK];
  logic [RW-1:0]   dn_idx   [NWK];
  logic [XLEN-1:0] dn_addr  [NWK];

  // rename
  logic [PW-1:0] rn_pd [WIDTH], rn_pold [WIDTH], rn_ps1 [WIDTH], rn_ps2 [WIDTH];
  logic [RW-1:0] rn_robp [WIDTH], rn_s1_rob [WIDTH], rn_s2_rob [WIDTH];
  logic          rn_robp_valid [WIDTH], rn_s1_inflight [WIDTH], rn_s2_inflight [WIDTH];

  tsd_rename #(.WIDTH(WIDTH), .NUM_LREGS(NUM_LREGS), .NUM_PREGS(NUM_PREGS), .ROB_DEPTH(ROB_DEPTH)) u_rename (
    .clk, .rst_n, .fire,
    .rn_valid(in_valid), .rn_has_rd(rd_valid), .rn_rd(f_rd), .rn_rs1(f_rs1), .rn_rs2(f_rs2),
    .rn_rob(rob_idx), .rn_pd, .rn_pold, .rn_robp, .rn_robp_valid,
    .rn_ps1, .rn_s1_inflight, .rn_s1_rob, .rn_ps2, .rn_s2_inflight, .rn_s2_rob,
    .cm_valid, .cm_rob, .cm_has_rd, .cm_rd, .cm_pold);

  tsd_rob #(.DEPTH(ROB_DEPTH), .WIDTH(WIDTH), .NDONE(NWK), .NTRAIN(NTRAIN),
            .NUM_LREGS(NUM_LREGS), .NUM_PREGS(NUM_PREGS), .XLEN(XLEN)) u_rob (
    .clk, .rst_n, .al_fire(fire), .al_valid(in_valid), .al_has_rd(rd_valid), .al_rd(f_rd),
    .al_pd(rn_pd), .al_pold(rn_pold), .al_load(is_load), .al_pc(f_pc), .al_vhit(vp_hit), .al_vpred(vp_pred_addr), .al_idx(rob_idx),
    .al_space(rob_space), .dn_valid, .dn_idx, .dn_addr, .done_vec,
    .cm_valid, .cm_rob, .cm_has_rd, .cm_rd, .cm_pd, .cm_pold, .cm_load, .cm_pc, .cm_addr, .cm_vhit, .cm_vpred, .cm_loads);

  // register file: 2*WIDTH dispatch reads, WIDTH commit reads
  localparam int unsigned NR = 3 * WIDTH;
  logic [PW-1:0]   rf_raddr [NR];
  logic [XLEN-1:0] rf_rdata [NR];
  logic            rf_we    [NWK];
  logic [PW-1:0]   rf_waddr [NWK];
  logic [XLEN-1:0] rf_wdata [NWK];
  always_comb
    for (int i = 0; i < WIDTH; i++) begin
      rf_raddr[2*i]       = rn_ps1[i];
      rf_raddr[2*i+1]     = rn_ps2[i];
      rf_raddr[2*WIDTH+i] = cm_pd[i];
    end
  tsd_regfile #(.NPREGS(NUM_PREGS), .XLEN(XLEN), .NR(NR), .NW(NWK)) u_rf (
    .clk, .rst_n, .raddr(rf_raddr), .rdata(rf_rdata), .we(rf_we), .waddr(rf_waddr), .wdata(rf_wdata));

  // value predictor
  logic            tr_valid [NTRAIN];
  logic [XLEN-1:0] tr_pc    [NTRAIN];
  logic [XLEN-1:0] tr_addr  [NTRAIN];
  logic            tr_hit   [NTRAIN];
  logic [XLEN-1:0] tr_pred  [NTRAIN];
  always_comb begin
    int t;
    t = 0;
    for (int k = 0; k < NTRAIN; k++) begin
      tr_valid[k] = 1'b0;
      tr_pc[k]    = '0;
      tr_addr[k]  = '0;
      tr_hit[k]   = 1'b0;
      tr_pred[k]  = '0;
    end
    for (int i = 0; i < WIDTH; i++)
      if (cm_valid[i] && cm_load[i] && t < NTRAIN) begin
        tr_valid[t] = 1'b1;
        tr_pc[t]    = cm_pc[i];
        tr_addr[t]  = cm_addr[i];
        tr_hit[t]   = cm_vhit[i];
        tr_pred[t]  = cm_vpred[i];
        t++;
      end
  end
  tsd_vpred #(.ENTRIES(VHT_ENTRIES), .XLEN(XLEN), .NLOOK(WIDTH), .NTRAIN(NTRAIN)) u_vpred (
    .clk, .rst_n, .lk_valid(vp_lk), .lk_pc(f_pc), .lk_hit(vp_hit), .lk_pred_valid(vp_pred_valid),
    .lk_pred_addr(vp_pred_addr), .tr_valid, .tr_pc, .tr_addr, .tr_hit, .tr_pred);
  always_comb for (int i = 0; i < WIDTH; i++) vp_lk[i] = fire && is_load[i];

  // operand availability at dispatch
  logic            s1_avail [WIDTH], s2_avail [WIDTH];
  logic [XLEN-1:0] s1_val [WIDTH], s2_val [WIDTH];
  op_e             iw_op [WIDTH];
  logic            iw_has_rd [WIDTH];
  logic [RW-1:0]   iw_robp [WIDTH];
  logic            iw_robp_valid [WIDTH];
  always_comb
    for (int i = 0; i < WIDTH; i++) begin
      s1_avail[i] = !rn_s1_inflight[i] || done_vec[rn_s1_rob[i]];
      s2_avail[i] = !uses_rs2(in_inst[i].op) || !rn_s2_inflight[i] || done_vec[rn_s2_rob[i]];
      s1_val[i]   = rf_rdata[2*i];
      s2_val[i]   = uses_rs2(in_inst[i].op) ? rf_rdata[2*i+1] : '0;
      // a load's window part is its address calculation, always granted
      iw_op[i]         = is_load[i] ? OP_AGEN : in_inst[i].op;
      iw_has_rd[i]     = !is_load[i] && rd_valid[i];
      iw_robp[i]       = rn_robp[i];
      iw_robp_valid[i] = !is_load[i] && rd_valid[i] && rn_robp_valid[i];
    end

  // bypass / wakeup buses: ALU results then load results
  logic            wk_valid [NWK];
  logic            wk_main  [NWK];
  logic [RW-1:0]   wk_tag   [NWK];
  logic [XLEN-1:0] wk_val   [NWK];

  // load queue allocation
  logic [QW-1:0]   lsq_idx [WIDTH];
  logic            lq_robp_valid [WIDTH];
  always_comb
    for (int i = 0; i < WIDTH; i++) lq_robp_valid[i] = rd_valid[i] && rn_robp_valid[i];

  // ---------------- window and ALUs ----------------
  logic            is_valid  [ALU_UNITS];
  logic            is_main   [ALU_UNITS];
  op_e             is_op     [ALU_UNITS];
  logic [RW-1:0]   is_rob    [ALU_UNITS];
  logic            is_has_rd [ALU_UNITS];
  logic [PW-1:0]   is_pd     [ALU_UNITS];
  logic [XLEN-1:0] is_a [ALU_UNITS], is_b [ALU_UNITS], is_imm [ALU_UNITS], alu_y [ALU_UNITS];
  logic [QW-1:0]   is_lsq    [ALU_UNITS];
  logic [7:0]      iw_grants, iw_byp_drop, lq_grants, lq_pred_correct;

  tsd_iwin #(.DEPTH(IW_DEPTH), .WIDTH(WIDTH), .ISSUE(ALU_UNITS), .NWK(NWK), .NCM(WIDTH),
             .ROB_DEPTH(ROB_DEPTH), .NUM_PREGS(NUM_PREGS), .LSQ_DEPTH(LSQ_DEPTH), .XLEN(XLEN)) u_iwin (
    .clk, .rst_n, .ins_fire(fire), .ins_valid(in_valid), .ins_op(iw_op), .ins_rob(rob_idx),
    .ins_has_rd(iw_has_rd), .ins_pd(rn_pd), .ins_robp(iw_robp), .ins_robp_valid(iw_robp_valid),
    .ins_s1_avail(s1_avail), .ins_s1_tag(rn_s1_rob), .ins_s1_val(s1_val),
    .ins_s2_avail(s2_avail), .ins_s2_tag(rn_s2_rob), .ins_s2_val(s2_val),
    .ins_imm(imm_of), .ins_lsq(lsq_idx), .ins_space(iw_space),
    .wk_valid, .wk_main, .wk_tag, .wk_val, .cm_valid, .cm_rob,
    .is_valid, .is_main, .is_op, .is_rob, .is_has_rd, .is_pd, .is_a, .is_b, .is_imm, .is_lsq,
    .ev_grants(iw_grants), .ev_byp_drop(iw_byp_drop));

  always_comb for (int i = 0; i < WIDTH; i++) imm_of[i] = XLEN'(in_inst[i].imm);

  for (genvar k = 0; k < ALU_UNITS; k++) begin : g_alu
    tsd_alu #(.XLEN(XLEN)) u_alu (.op(is_op[k]), .a(is_a[k]), .b(is_b[k]), .imm(is_imm[k]), .y(alu_y[k]));
  end

  // address results to the load queue
  logic            ag_valid [ALU_UNITS];
  logic            ag_main  [ALU_UNITS];
  logic [QW-1:0]   ag_lsq   [ALU_UNITS];
  always_comb
    for (int k = 0; k < ALU_UNITS; k++) begin
      ag_valid[k] = is_valid[k] && is_op[k] == OP_AGEN;
      ag_main[k]  = is_main[k];
      ag_lsq[k]   = is_lsq[k];
    end

  // ---------------- load queue ----------------
  logic            wb_valid [LDST_PORTS];
  logic            wb_main  [LDST_PORTS];
  logic [RW-1:0]   wb_rob   [LDST_PORTS];
  logic [PW-1:0]   wb_pd    [LDST_PORTS];
  logic [XLEN-1:0] wb_val   [LDST_PORTS];
  logic [XLEN-1:0] wb_addr  [LDST_PORTS];
  logic            mreq_pred [LDST_PORTS];

  tsd_lsq #(.DEPTH(LSQ_DEPTH), .WIDTH(WIDTH), .PORTS(LDST_PORTS), .NAG(ALU_UNITS), .NCM(WIDTH),
            .ROB_DEPTH(ROB_DEPTH), .NUM_PREGS(NUM_PREGS), .XLEN(XLEN)) u_lsq (
    .clk, .rst_n, .ins_fire(fire), .ins_valid(is_load), .ins_rob(rob_idx), .ins_pd(rn_pd),
    .ins_robp(rn_robp), .ins_robp_valid(lq_robp_valid), .ins_pred_valid(vp_pred_valid),
    .ins_pred_addr(vp_pred_addr), .ins_idx(lsq_idx), .ins_space(lsq_space),
    .ag_valid, .ag_main, .ag_lsq, .ag_addr(alu_y), .cm_valid, .cm_rob, .cm_loads,
    .mreq_valid, .mreq_main, .mreq_addr, .mreq_rob, .mreq_lsq, .mreq_pred,
    .mrsp_valid, .mrsp_main, .mrsp_rob, .mrsp_lsq, .mrsp_data,
    .wb_valid, .wb_main, .wb_rob, .wb_pd, .wb_val, .wb_addr,
    .ev_grants(lq_grants), .ev_pred_correct(lq_pred_correct));

  // ---------------- result buses ----------------
  always_comb begin
    for (int k = 0; k < ALU_UNITS; k++) begin
      logic res;
      res = is_valid[k] && is_op[k] != OP_AGEN;
      wk_valid[k] = res && is_has_rd[k];
      wk_main[k]  = is_main[k];
      wk_tag[k]   = is_rob[k];
      wk_val[k]   = alu_y[k];
      rf_we[k]    = res && is_main[k] && is_has_rd[k];
      rf_waddr[k] = is_pd[k];
      rf_wdata[k] = alu_y[k];
      dn_valid[k] = res && is_main[k];
      dn_idx[k]   = is_rob[k];
      dn_addr[k]  = '0;
    end
    for (int p = 0; p < LDST_PORTS; p++) begin
      wk_valid[ALU_UNITS+p] = wb_valid[p];
      wk_main[ALU_UNITS+p]  = wb_main[p];
      wk_tag[ALU_UNITS+p]   = wb_rob[p];
      wk_val[ALU_UNITS+p]   = wb_val[p];
      rf_we[ALU_UNITS+p]    = wb_valid[p] && wb_main[p];
      rf_waddr[ALU_UNITS+p] = wb_pd[p];
      rf_wdata[ALU_UNITS+p] = wb_val[p];
      dn_valid[ALU_UNITS+p] = wb_valid[p] && wb_main[p];
      dn_idx[ALU_UNITS+p]   = wb_rob[p];
      dn_addr[ALU_UNITS+p]  = wb_addr[p];
    end
  end

  // ---------------- commit outputs ----------------
  always_comb
    for (int i = 0; i < WIDTH; i++) begin
      cm_out_valid[i]  = cm_valid[i];
      cm_out_pc[i]     = cm_pc[i];
      cm_out_has_rd[i] = cm_has_rd[i];
      cm_out_rd[i]     = cm_rd[i];
      cm_out_value[i]  = rf_rdata[2*WIDTH+i];
    end

  // ---------------- events ----------------
  always_comb begin
    ev = '0;
    for (int k = 0; k < ALU_UNITS; k++)
      if (is_valid[k]) begin
        if (is_main[k]) ev.alu_main++;
        else            ev.alu_pexec++;
      end
    for (int p = 0; p < LDST_PORTS; p++)
      if (mreq_valid[p]) begin
        if (mreq_main[p]) ev.ld_main++;
        else begin
          ev.ld_pexec++;
          if (mreq_pred[p]) ev.ld_pexec_pred++;
        end
      end
    if (fire)
      for (int i = 0; i < WIDTH; i++) begin
        if (is_load[i] && vp_pred_valid[i]) ev.ld_pred++;
        if (in_valid[i] && rd_valid[i] && rn_robp_valid[i]) ev.deferred++;
      end
    ev.pred_correct = lq_pred_correct;
    ev.grants       = iw_grants + lq_grants;
    ev.byp_drop     = iw_byp_drop;
  end
endmodule
