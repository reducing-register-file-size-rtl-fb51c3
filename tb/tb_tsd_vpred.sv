// tb_tsd_vpred: stride predictor test. A load at one PC walks an array with
// stride 16, then switches to stride 24. Each cycle two new instances are
// looked up (two ports, same PC, so the second sees the first's update) and
// the two instances LAG positions older are trained with their actual
// addresses, as a pipeline with LAG loads in flight would. Checked: no
// prediction before the entry exists or while the confidence flag is clear;
// once warmed up every instance is predicted and every prediction equals
// the actual address; after the stride change predictions resume, correct,
// once the in-flight instances have drained. A second PC with the same index
// but another tag must not hit the first PC's entry.
module tb_tsd_vpred;
  localparam int NL = 8, NT = 4, LAG = 12, N = 400, CHG = 200;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic        lk_valid [NL], lk_hit [NL], lk_pred_valid [NL];
  logic [31:0] lk_pc [NL], lk_pred_addr [NL];
  logic        tr_valid [NT], tr_hit [NT];
  logic [31:0] tr_pc [NT], tr_addr [NT], tr_pred [NT];
  tsd_vpred dut (.*);

  localparam logic [31:0] PC  = 32'h0000_1040;
  localparam logic [31:0] PC2 = 32'h0001_1040;   // same index, other tag
  logic [31:0] actual [N];
  bit          ph [N], pv [N];
  logic [31:0] pa [N];
  int checks = 0, failures = 0, predicted = 0;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    for (int k = 0; k < N; k++)
      actual[k] = (k < CHG) ? 32'h8000 + 32'(16 * k) : 32'h8000 + 32'(16 * CHG) + 32'(24 * (k - CHG));
    for (int i = 0; i < NL; i++) begin lk_valid[i] = 0; lk_pc[i] = PC; end
    for (int i = 0; i < NT; i++) begin tr_valid[i] = 0; tr_pc[i] = PC; tr_addr[i] = 0; tr_hit[i] = 0; tr_pred[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < N / 2 + LAG; c++) begin
      @(negedge clk);
      for (int j = 0; j < 2; j++) begin
        int k, t;
        k = 2 * c + j;
        t = k - LAG;
        lk_valid[j] = (k < N);
        tr_valid[j] = (t >= 0 && t < N);
        if (tr_valid[j]) begin
          tr_addr[j] = actual[t]; tr_hit[j] = ph[t]; tr_pred[j] = pa[t];
        end
      end
      #1;
      for (int j = 0; j < 2; j++) begin
        int k;
        k = 2 * c + j;
        if (k < N) begin
          ph[k] = lk_hit[j]; pv[k] = lk_pred_valid[j]; pa[k] = lk_pred_addr[j];
          if (pv[k]) predicted++;
          if (k < LAG) chk(!pv[k], $sformatf("prediction for instance %0d before any training", k));
          if (pv[k]) chk(pa[k] == actual[k] || (k >= CHG && k < CHG + LAG + 2),
                         $sformatf("instance %0d predicted %h actual %h", k, pa[k], actual[k]));
          if ((k > 3 * LAG && k < CHG) || k > CHG + 3 * LAG + 4)
            chk(pv[k] && pa[k] == actual[k], $sformatf("instance %0d not predicted correctly", k));
        end
      end
    end
    // another tag at the same index must miss
    @(negedge clk);
    for (int i = 0; i < NT; i++) tr_valid[i] = 0;
    lk_valid[0] = 1; lk_pc[0] = PC2; lk_valid[1] = 0;
    #1;
    chk(!lk_hit[0] && !lk_pred_valid[0], "tag mismatch hit");
    @(negedge clk);
    lk_valid[0] = 0;
    chk(predicted > N / 2, $sformatf("only %0d predictions", predicted));
    $display("predicted %0d of %0d instances", predicted, N);
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
