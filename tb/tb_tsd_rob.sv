// tb_tsd_rob: randomized reorder-buffer test (16 entries, 4 wide, at most
// two loads committed per cycle). Entries are allocated with random fields,
// completed in random order, and every cycle the committing entries are
// compared with a queue model: in order from the head, as many as are done
// up to the width and the per-cycle load limit, with the fields given at
// allocation and the address given at completion. Also checks allocation
// numbering, the space flag and the done vector.
module tb_tsd_rob;
  localparam int D = 16, W = 4, ND = 4, NT = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic        al_fire, al_space;
  logic        al_valid [W], al_has_rd [W], al_load [W], al_vhit [W];
  logic [4:0]  al_rd [W];
  logic [5:0]  al_pd [W], al_pold [W];
  logic [31:0] al_pc [W], al_vpred [W];
  logic [3:0]  al_idx [W];
  logic        dn_valid [ND];
  logic [3:0]  dn_idx [ND];
  logic [31:0] dn_addr [ND];
  logic [D-1:0] done_vec;
  logic        cm_valid [W], cm_has_rd [W], cm_load [W], cm_vhit [W];
  logic [3:0]  cm_rob [W];
  logic [4:0]  cm_rd [W];
  logic [5:0]  cm_pd [W], cm_pold [W];
  logic [31:0] cm_pc [W], cm_addr [W], cm_vpred [W];
  logic [2:0]  cm_loads;

  tsd_rob #(.DEPTH(D), .WIDTH(W), .NDONE(ND), .NTRAIN(NT)) dut (.*);

  typedef struct { int idx; bit has_rd; int rd; int pd; int pold; bit load; int pc; bit done; int addr; } e_t;
  e_t q [$];
  bit pend [D];
  int tail = 0, checks = 0, failures = 0, limited = 0;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", msg); end
  endtask

  initial begin
    al_fire = 0;
    for (int i = 0; i < W; i++) begin al_valid[i] = 0; al_has_rd[i] = 0; al_load[i] = 0; al_vhit[i] = 0;
      al_rd[i] = 0; al_pd[i] = 0; al_pold[i] = 0; al_pc[i] = 0; al_vpred[i] = 0; end
    for (int d = 0; d < ND; d++) begin dn_valid[d] = 0; dn_idx[d] = 0; dn_addr[d] = 0; end
    for (int i = 0; i < D; i++) pend[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 600; cyc++) begin
      int n, nl, exp_n;
      @(negedge clk);
      // completions of random not-done entries (visible after the edge)
      for (int d = 0; d < ND; d++) begin
        dn_valid[d] = 0;
        if (q.size() > 0 && $urandom_range(0, 1)) begin
          int j;
          j = $urandom_range(0, q.size() - 1);
          if (!q[j].done && !pend[j]) begin
            pend[j] = 1; q[j].addr = $urandom;
            dn_valid[d] = 1; dn_idx[d] = 4'(q[j].idx); dn_addr[d] = q[j].addr;
          end
        end
      end
      // allocation
      chk(al_space == (q.size() + W <= D), "al_space");
      al_fire = al_space && $urandom_range(0, 1);
      n = 0;
      for (int i = 0; i < W; i++) begin
        al_valid[i] = $urandom_range(0, 3) != 0;
        al_has_rd[i] = $urandom; al_load[i] = $urandom; al_rd[i] = 5'($urandom);
        al_pd[i] = 6'($urandom_range(0, 47)); al_pold[i] = 6'($urandom_range(0, 47)); al_pc[i] = $urandom;
        al_vhit[i] = $urandom; al_vpred[i] = $urandom;
      end
      #1;
      for (int i = 0; i < W; i++)
        if (al_valid[i]) begin
          chk(al_idx[i] == 4'((tail + n) % D), "al_idx");
          n++;
        end
      // commits this cycle (state before the edge)
      exp_n = 0; nl = 0;
      for (int i = 0; i < W && i < q.size(); i++) begin
        if (!q[i].done) break;
        if (q[i].load && nl == NT) begin limited++; break; end
        if (q[i].load) nl++;
        exp_n++;
      end
      for (int i = 0; i < W; i++) begin
        chk(cm_valid[i] == (i < exp_n), $sformatf("cm_valid[%0d]", i));
        if (i < exp_n)
          chk(cm_rob[i] == 4'(q[i].idx) && cm_has_rd[i] == q[i].has_rd && cm_rd[i] == 5'(q[i].rd) &&
              cm_pd[i] == 6'(q[i].pd) && cm_pold[i] == 6'(q[i].pold) && cm_load[i] == q[i].load &&
              cm_pc[i] == 32'(q[i].pc) && cm_addr[i] == 32'(q[i].addr), "commit fields");
      end
      chk(cm_loads == 3'(nl), "cm_loads");
      for (int i = 0; i < q.size(); i++)
        chk(done_vec[q[i].idx] == q[i].done, "done_vec");
      @(posedge clk);
      for (int i = 0; i < q.size(); i++) if (pend[i]) q[i].done = 1;
      for (int i = 0; i < D; i++) pend[i] = 0;
      for (int i = 0; i < exp_n; i++) void'(q.pop_front());
      if (al_fire)
        for (int i = 0; i < W; i++)
          if (al_valid[i]) begin
            q.push_back('{idx: tail, has_rd: al_has_rd[i], rd: al_rd[i], pd: al_pd[i], pold: al_pold[i],
                          load: al_load[i], pc: al_pc[i], done: 0, addr: 0});
            tail = (tail + 1) % D;
          end
    end
    chk(limited > 0, "load limit per cycle never reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
