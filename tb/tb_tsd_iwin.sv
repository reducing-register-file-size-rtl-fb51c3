// tb_tsd_iwin: directed test of the instruction window's TSD behaviour
// (8 entries, 2 wide, 2 issue ports):
//  1. an entry whose write is not granted but whose operands are ready is
//     pre-executed once, stays in the window and is not issued again;
//  2. broadcasting the committed ROB number equal to its ROBP grants it and
//     it then issues as a main execution and leaves;
//  3. a consumer woken by a pre-executed producer's bypass can issue in the
//     next cycle only; when its other operand arrives a cycle later the
//     bypass flag has been dropped and it is not pre-executed (the bypass
//     problem), and the drop is counted;
//  4. main results make operands persistently available, including a
//     result broadcast in the same cycle the consumer is inserted;
//  5. main executions win the issue ports over pre-executions.
// Issued operations and operand values are checked cycle by cycle.
module tb_tsd_iwin;
  import tsd_pkg::*;
  localparam int D = 8, W = 2, IS = 2, NWK = 2, NCM = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic        ins_fire, ins_space;
  logic        ins_valid [W], ins_has_rd [W], ins_robp_valid [W], ins_s1_avail [W], ins_s2_avail [W];
  op_e         ins_op [W];
  logic [3:0]  ins_rob [W], ins_robp [W], ins_s1_tag [W], ins_s2_tag [W];
  logic [2:0]  ins_pd [W];
  logic [31:0] ins_s1_val [W], ins_s2_val [W], ins_imm [W];
  logic [1:0]  ins_lsq [W];
  logic        wk_valid [NWK], wk_main [NWK];
  logic [3:0]  wk_tag [NWK];
  logic [31:0] wk_val [NWK];
  logic        cm_valid [NCM];
  logic [3:0]  cm_rob [NCM];
  logic        is_valid [IS], is_main [IS], is_has_rd [IS];
  op_e         is_op [IS];
  logic [3:0]  is_rob [IS];
  logic [2:0]  is_pd [IS];
  logic [31:0] is_a [IS], is_b [IS], is_imm [IS];
  logic [1:0]  is_lsq [IS];
  logic [7:0]  ev_grants, ev_byp_drop;

  tsd_iwin #(.DEPTH(D), .WIDTH(W), .ISSUE(IS), .NWK(NWK), .NCM(NCM), .ROB_DEPTH(16),
             .NUM_PREGS(8), .LSQ_DEPTH(4)) dut (.*);

  int checks = 0, failures = 0, drops = 0, grants = 0;
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic idle_inputs();
    ins_fire = 0;
    for (int i = 0; i < W; i++) begin
      ins_valid[i] = 0; ins_has_rd[i] = 1; ins_robp_valid[i] = 0; ins_s1_avail[i] = 1; ins_s2_avail[i] = 1;
      ins_op[i] = OP_ADD; ins_rob[i] = 0; ins_robp[i] = 0; ins_s1_tag[i] = 0; ins_s2_tag[i] = 0;
      ins_pd[i] = 0; ins_s1_val[i] = 0; ins_s2_val[i] = 0; ins_imm[i] = 0; ins_lsq[i] = 0;
    end
    for (int k = 0; k < NWK; k++) begin wk_valid[k] = 0; wk_main[k] = 0; wk_tag[k] = 0; wk_val[k] = 0; end
    for (int c = 0; c < NCM; c++) begin cm_valid[c] = 0; cm_rob[c] = 0; end
  endtask

  task automatic insert(int slot, int rob, bit robp_v, int robp, bit a1, int t1, int v1, bit a2, int t2, int v2);
    ins_fire = 1; ins_valid[slot] = 1; ins_rob[slot] = 4'(rob); ins_robp_valid[slot] = robp_v;
    ins_robp[slot] = 4'(robp); ins_s1_avail[slot] = a1; ins_s1_tag[slot] = 4'(t1); ins_s1_val[slot] = 32'(v1);
    ins_s2_avail[slot] = a2; ins_s2_tag[slot] = 4'(t2); ins_s2_val[slot] = 32'(v2); ins_pd[slot] = 3'(rob % 8);
  endtask

  // issued this cycle: returns number and fills rob/main/a/b of port 0..1
  function automatic int n_issued();
    int n;
    n = 0;
    for (int k = 0; k < IS; k++) if (is_valid[k]) n++;
    return n;
  endfunction
  function automatic bit issued(int rob, bit main, int a, int b);
    for (int k = 0; k < IS; k++)
      if (is_valid[k] && is_rob[k] == 4'(rob) && is_main[k] == main && is_a[k] == 32'(a) && is_b[k] == 32'(b))
        return 1;
    return 0;
  endfunction

  task automatic step();
    @(posedge clk);
    drops += ev_byp_drop;
    grants += ev_grants;
    @(negedge clk);
    idle_inputs();
  endtask

  initial begin
    idle_inputs();
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // 1. not granted (ROBP 5), operands ready -> pre-executed once
    insert(0, 1, 1, 5, 1, 0, 3, 1, 0, 4);
    #1 chk(n_issued() == 0, "nothing issues before insertion");
    step();
    chk(n_issued() == 1 && issued(1, 0, 3, 4), "1: pre-execution of rob 1");
    step();
    chk(n_issued() == 0, "1: pre-executed entry not issued again");
    step();
    chk(n_issued() == 0, "1: still waiting for grant");
    // 2. commit of ROB entry 5 grants it -> main execution next cycle
    cm_valid[1] = 1; cm_rob[1] = 5;
    step();
    chk(n_issued() == 1 && issued(1, 1, 3, 4), "2: main execution of rob 1 after grant");
    step();
    chk(n_issued() == 0, "2: entry left the window");
    chk(grants == 1, "2: one grant counted");
    // 3. bypass problem: consumer rob 2 waits on tags 7 and 8 (not granted, ROBP 9)
    insert(0, 2, 1, 9, 0, 7, 0, 0, 8, 0);
    step();
    wk_valid[0] = 1; wk_main[0] = 0; wk_tag[0] = 7; wk_val[0] = 70;   // pre-executed producer 7
    step();
    chk(n_issued() == 0, "3: one operand only");
    wk_valid[1] = 1; wk_main[1] = 0; wk_tag[1] = 8; wk_val[1] = 80;   // producer 8 a cycle later
    step();
    chk(n_issued() == 0, "3: bypassed operand 7 dropped, consumer not pre-executed");
    chk(drops >= 1, "3: drop counted");
    step();
    chk(n_issued() == 0, "3: still not issued");
    // back-to-back case: both operands on the bypass in the same cycle -> issues next cycle
    insert(0, 3, 1, 9, 0, 10, 0, 0, 11, 0);
    step();
    wk_valid[0] = 1; wk_tag[0] = 10; wk_val[0] = 100; wk_valid[1] = 1; wk_tag[1] = 11; wk_val[1] = 110;
    step();
    chk(n_issued() == 1 && issued(3, 0, 100, 110), "3: back-to-back pre-execution with bypassed operands");
    // 4. main results: producers 7 and 8 complete; 8 in the same cycle as a new consumer is inserted
    wk_valid[0] = 1; wk_main[0] = 1; wk_tag[0] = 7; wk_val[0] = 71;
    wk_valid[1] = 1; wk_main[1] = 1; wk_tag[1] = 8; wk_val[1] = 81;
    insert(0, 4, 0, 0, 0, 8, 0, 1, 0, 5);   // granted, waits for tag 8
    step();
    chk(n_issued() == 2 && issued(4, 1, 81, 5) && issued(2, 0, 71, 81),
        "4/5: main of rob 4 (same-cycle wakeup) and pre-execution of rob 2");
    step();
    chk(n_issued() == 0, "4: nothing left ready");
    // grant rob 2 and rob 3 together: both issue as main executions
    cm_valid[0] = 1; cm_rob[0] = 9;
    step();
    chk(n_issued() == 1 && issued(2, 1, 71, 81), "2 granted: main execution");
    $display("drops=%0d grants=%0d", drops, grants);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (500) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
