// tb_tsd_rename: randomized test of the TSD rename stage against a
// sequential reference model (map table array, free list as a FIFO queue,
// DAT array). Eight-wide groups with random destinations and sources are
// renamed while earlier instructions commit in order, a random number per
// cycle. With 32 logical and 34 physical registers (the smallest size the
// document evaluates) the free list holds only two registers, so a register
// deallocated by one slot is reallocated later in the same group, as in the
// document's Fig. 2 example where the register freed by i2 is taken by i3
// and inherits i2's ROB entry as ROBP. Every output of every valid slot is
// compared with the model.
module tb_tsd_rename;
  localparam int W = 8, L = 32, P = 34, R = 128;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       fire;
  logic       rn_valid [W], rn_has_rd [W];
  logic [4:0] rn_rd [W], rn_rs1 [W], rn_rs2 [W];
  logic [6:0] rn_rob [W];
  logic [5:0] rn_pd [W], rn_pold [W], rn_ps1 [W], rn_ps2 [W];
  logic [6:0] rn_robp [W], rn_s1_rob [W], rn_s2_rob [W];
  logic       rn_robp_valid [W], rn_s1_inflight [W], rn_s2_inflight [W];
  logic       cm_valid [W], cm_has_rd [W];
  logic [6:0] cm_rob [W];
  logic [4:0] cm_rd [W];
  logic [5:0] cm_pold [W];

  tsd_rename #(.WIDTH(W), .NUM_LREGS(L), .NUM_PREGS(P), .ROB_DEPTH(R)) dut (.*);

  // reference model
  int  m_preg [L];
  int  m_rob  [L];
  bit  m_inf  [L];
  int  fl [$];
  bit  d_v [P];
  int  d_rob [P];
  typedef struct { int rob; bit has_rd; int rd; int pold; } rec_t;
  rec_t inflight [$];
  int next_rob = 0;
  int checks = 0, failures = 0, fig2_seen = 0;

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int l = 0; l < L; l++) begin m_preg[l] = l; m_inf[l] = 0; m_rob[l] = 0; end
    for (int p = L; p < P; p++) fl.push_back(p);
    for (int p = 0; p < P; p++) d_v[p] = 0;
    fire = 0;
    for (int i = 0; i < W; i++) begin
      rn_valid[i] = 0; rn_has_rd[i] = 0; rn_rd[i] = 0; rn_rs1[i] = 0; rn_rs2[i] = 0; rn_rob[i] = 0;
      cm_valid[i] = 0; cm_has_rd[i] = 0; cm_rob[i] = 0; cm_rd[i] = 0; cm_pold[i] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 400; cyc++) begin
      int ncm, nv;
      @(negedge clk);
      // commits (in order)
      ncm = $urandom_range(0, W);
      for (int c = 0; c < W; c++) begin
        cm_valid[c] = 0;
        if (c < ncm && inflight.size() > 0) begin
          rec_t r;
          r = inflight.pop_front();
          cm_valid[c] = 1; cm_rob[c] = 7'(r.rob); cm_has_rd[c] = r.has_rd;
          cm_rd[c] = 5'(r.rd); cm_pold[c] = 6'(r.pold);
          if (r.has_rd) begin
            if (d_v[r.pold] && d_rob[r.pold] == r.rob) d_v[r.pold] = 0;
            if (m_inf[r.rd] && m_rob[r.rd] == r.rob) m_inf[r.rd] = 0;
          end
        end
      end
      // new group
      fire = (inflight.size() + W < R - 8) && ($urandom_range(0, 3) != 0);
      nv = 0;
      for (int i = 0; i < W; i++) begin
        rn_valid[i]  = fire && ($urandom_range(0, 7) != 0);
        rn_has_rd[i] = ($urandom_range(0, 5) != 0);
        rn_rd[i]     = 5'($urandom_range(0, 7));    // few registers: many redefinitions
        rn_rs1[i]    = 5'($urandom_range(0, 7));
        rn_rs2[i]    = 5'($urandom_range(0, L-1));
        rn_rob[i]    = 7'((next_rob + nv) % R);
        if (rn_valid[i]) nv++;
      end
      #1;
      for (int i = 0; i < W; i++)
        if (rn_valid[i]) begin
          chk("ps1", rn_ps1[i], m_preg[rn_rs1[i]]);
          chk("s1_inflight", rn_s1_inflight[i], m_inf[rn_rs1[i]]);
          if (m_inf[rn_rs1[i]]) chk("s1_rob", rn_s1_rob[i], m_rob[rn_rs1[i]]);
          chk("ps2", rn_ps2[i], m_preg[rn_rs2[i]]);
          chk("s2_inflight", rn_s2_inflight[i], m_inf[rn_rs2[i]]);
          if (m_inf[rn_rs2[i]]) chk("s2_rob", rn_s2_rob[i], m_rob[rn_rs2[i]]);
          if (rn_has_rd[i]) begin
            int pold, pd;
            pold = m_preg[rn_rd[i]];
            fl.push_back(pold);
            d_v[pold] = 1; d_rob[pold] = rn_rob[i];
            pd = fl.pop_front();
            chk("pold", rn_pold[i], pold);
            chk("pd", rn_pd[i], pd);
            chk("robp_valid", rn_robp_valid[i], d_v[pd]);
            if (d_v[pd]) begin
              chk("robp", rn_robp[i], d_rob[pd]);
              // Fig. 2 pattern: register freed earlier in this group, ROBP = that slot's ROB entry
              for (int j = 0; j < i; j++)
                if (rn_valid[j] && rn_has_rd[j] && rn_pold[j] == pd && d_rob[pd] == rn_rob[j]) fig2_seen++;
            end
            m_preg[rn_rd[i]] = pd; m_rob[rn_rd[i]] = rn_rob[i]; m_inf[rn_rd[i]] = 1;
            inflight.push_back('{rob: rn_rob[i], has_rd: 1, rd: rn_rd[i], pold: pold});
          end else begin
            inflight.push_back('{rob: rn_rob[i], has_rd: 0, rd: 0, pold: 0});
          end
        end
      next_rob = (next_rob + nv) % R;
    end
    checks++;
    if (fig2_seen == 0) begin
      failures++;
      $display("FAIL same-group reallocation with ROBP never seen");
    end
    $display("same-group reallocations with ROBP: %0d", fig2_seen);
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
