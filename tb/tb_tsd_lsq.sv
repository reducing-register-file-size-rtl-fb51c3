// tb_tsd_lsq: directed test of the load queue (8 entries, 2 wide, 2 cache
// ports):
//  1. a load whose write is not granted is pre-executed once with its
//     predicted address, before its address is computed;
//  2. the computed address arrives (a wrong prediction, not counted as
//     correct); after the ROBP commit broadcast the load issues its main
//     access with the computed address, and the main response is written
//     back; a late pre-execution response is dropped;
//  3. a granted load never uses its predicted address: it pre-executes with
//     an address from a pre-executed address calculation, then issues its
//     main access with the computed address (prediction counted correct);
//  4. entries are freed by committed loads and allocation wraps around;
//  5. at most two requests per cycle, main accesses first.
module tb_tsd_lsq;
  localparam int D = 8, W = 2, P = 2, NA = 2, NC = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic        ins_fire, ins_space;
  logic        ins_valid [W], ins_robp_valid [W], ins_pred_valid [W];
  logic [3:0]  ins_rob [W], ins_robp [W];
  logic [2:0]  ins_pd [W], ins_idx [W];
  logic [31:0] ins_pred_addr [W];
  logic        ag_valid [NA], ag_main [NA];
  logic [2:0]  ag_lsq [NA];
  logic [31:0] ag_addr [NA];
  logic        cm_valid [NC];
  logic [3:0]  cm_rob [NC];
  logic [1:0]  cm_loads;
  logic        mreq_valid [P], mreq_main [P], mreq_pred [P];
  logic [31:0] mreq_addr [P];
  logic [3:0]  mreq_rob [P];
  logic [2:0]  mreq_lsq [P];
  logic        mrsp_valid [P], mrsp_main [P];
  logic [3:0]  mrsp_rob [P];
  logic [2:0]  mrsp_lsq [P];
  logic [31:0] mrsp_data [P];
  logic        wb_valid [P], wb_main [P];
  logic [3:0]  wb_rob [P];
  logic [2:0]  wb_pd [P];
  logic [31:0] wb_val [P], wb_addr [P];
  logic [7:0]  ev_grants, ev_pred_correct;

  tsd_lsq #(.DEPTH(D), .WIDTH(W), .PORTS(P), .NAG(NA), .NCM(NC), .ROB_DEPTH(16), .NUM_PREGS(8)) dut (.*);

  int checks = 0, failures = 0, pc_count = 0;
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  task automatic idle_inputs();
    ins_fire = 0; cm_loads = 0;
    for (int i = 0; i < W; i++) begin ins_valid[i] = 0; ins_robp_valid[i] = 0; ins_pred_valid[i] = 0;
      ins_rob[i] = 0; ins_robp[i] = 0; ins_pd[i] = 0; ins_pred_addr[i] = 0; end
    for (int a = 0; a < NA; a++) begin ag_valid[a] = 0; ag_main[a] = 0; ag_lsq[a] = 0; ag_addr[a] = 0; end
    for (int c = 0; c < NC; c++) begin cm_valid[c] = 0; cm_rob[c] = 0; end
    for (int p = 0; p < P; p++) begin mrsp_valid[p] = 0; mrsp_main[p] = 0; mrsp_rob[p] = 0; mrsp_lsq[p] = 0; mrsp_data[p] = 0; end
  endtask
  task automatic step();
    @(posedge clk);
    pc_count += ev_pred_correct;
    @(negedge clk);
    idle_inputs();
  endtask
  function automatic int nreq();
    int n; n = 0;
    for (int p = 0; p < P; p++) if (mreq_valid[p]) n++;
    return n;
  endfunction
  function automatic bit req(int rob, bit main, int addr, bit pred);
    for (int p = 0; p < P; p++)
      if (mreq_valid[p] && mreq_rob[p] == 4'(rob) && mreq_main[p] == main && mreq_addr[p] == 32'(addr) && mreq_pred[p] == pred)
        return 1;
    return 0;
  endfunction

  initial begin
    idle_inputs();
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // 1. L0: rob 1, ROBP 5 pending, predicted 0x100; L1: rob 2, granted, predicted 0x300
    ins_fire = 1;
    ins_valid[0] = 1; ins_rob[0] = 1; ins_pd[0] = 3; ins_robp_valid[0] = 1; ins_robp[0] = 5;
    ins_pred_valid[0] = 1; ins_pred_addr[0] = 32'h100;
    ins_valid[1] = 1; ins_rob[1] = 2; ins_pd[1] = 4; ins_robp_valid[1] = 0;
    ins_pred_valid[1] = 1; ins_pred_addr[1] = 32'h300;
    #1 chk(ins_idx[0] == 0 && ins_idx[1] == 1 && ins_space, "allocation numbering");
    step();
    chk(nreq() == 1 && req(1, 0, 'h100, 1), "1: pre-execution of L0 with predicted address only");
    step();
    chk(nreq() == 0, "1: no second pre-execution; granted L1 ignores its prediction");
    // 2. address of L0 computed (0x180, prediction wrong); 3. pre-executed address of L1
    ag_valid[0] = 1; ag_main[0] = 1; ag_lsq[0] = 0; ag_addr[0] = 32'h180;
    ag_valid[1] = 1; ag_main[1] = 0; ag_lsq[1] = 1; ag_addr[1] = 32'h340;
    step();
    chk(nreq() == 1 && req(2, 0, 'h340, 0), "3: L1 pre-executes with the pre-executed address");
    chk(pc_count == 0, "2: wrong prediction not counted");
    step();
    chk(nreq() == 0, "2: L0 waits for its grant");
    ag_valid[0] = 1; ag_main[0] = 1; ag_lsq[0] = 1; ag_addr[0] = 32'h300;
    cm_valid[0] = 1; cm_rob[0] = 5;
    step();
    chk(pc_count == 1, "3: correct prediction counted");
    chk(nreq() == 2 && req(1, 1, 'h180, 0) && req(2, 1, 'h300, 0), "2/3: both main accesses");
    step();
    chk(nreq() == 0, "main accesses issued once");
    // responses: main for L0, late pre-execution for L1 (dropped), then main L1
    mrsp_valid[0] = 1; mrsp_main[0] = 1; mrsp_rob[0] = 1; mrsp_lsq[0] = 0; mrsp_data[0] = 32'hAAAA;
    mrsp_valid[1] = 1; mrsp_main[1] = 0; mrsp_rob[1] = 2; mrsp_lsq[1] = 1; mrsp_data[1] = 32'hBBBB;
    #1 chk(wb_valid[0] && wb_main[0] && wb_rob[0] == 1 && wb_pd[0] == 3 && wb_val[0] == 32'hAAAA && wb_addr[0] == 32'h180,
           "2: main write-back of L0");
    chk(!wb_valid[1], "late pre-execution response dropped");
    step();
    mrsp_valid[0] = 1; mrsp_main[0] = 1; mrsp_rob[0] = 2; mrsp_lsq[0] = 1; mrsp_data[0] = 32'hCCCC;
    #1 chk(wb_valid[0] && wb_main[0] && wb_pd[0] == 4 && wb_val[0] == 32'hCCCC, "3: main write-back of L1");
    step();
    // 4. commit both loads, then fill the queue around the wrap point
    cm_loads = 2;
    step();
    for (int g = 0; g < 4; g++) begin
      ins_fire = 1;
      for (int i = 0; i < W; i++) begin
        ins_valid[i] = 1; ins_rob[i] = 4'(8 + 2 * g + i); ins_robp_valid[i] = 1; ins_robp[i] = 15;
        ins_pred_valid[i] = 1; ins_pred_addr[i] = 32'h1000 + 32'(64 * (2 * g + i));
      end
      #1 chk(ins_space && ins_idx[0] == 3'((2 + 2 * g) % 8) && ins_idx[1] == 3'((3 + 2 * g) % 8), "4: wrap-around numbering");
      step();
      // 5. the group just inserted pre-executes next, two per cycle
      chk(nreq() == 2 && req(8 + 2 * g, 0, 'h1000 + 128 * g, 1) && req(9 + 2 * g, 0, 'h1040 + 128 * g, 1),
          "5: two pre-executions per cycle, oldest first");
    end
    #1 chk(!ins_space, "4: queue full");
    // 5. main accesses take the ports before pre-executions
    for (int a = 0; a < NA; a++) begin
      ag_valid[a] = 1; ag_main[a] = 1; ag_lsq[a] = 3'(6 + a); ag_addr[a] = 32'h2000 + 32'(a * 4);
    end
    cm_valid[0] = 1; cm_rob[0] = 15;
    step();
    chk(nreq() == 2 && req(12, 1, 'h2000, 0) && req(13, 1, 'h2004, 0), "5: main accesses first");
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
