// tsd_lsq: load queue holding the memory-access half of split loads.
// Entries are allocated in program order at dispatch, one per load slot,
// together with the load's ROB entry, destination register, ROBP tag and the
// predicted reference address (if the stride predictor was confident). They
// are freed from the head when the ROB commits loads (cm_loads per cycle).
// The address-calculation instruction delivers its result on ag_*: a main
// execution gives the actual address, a pre-execution gives an address good
// only for pre-execution. Write grant works as in the instruction window:
// granted at insertion without pending ROBP, or when a committed ROB number
// equal to ROBP is broadcast on cm_*.
// Up to PORTS requests per cycle, oldest-first from the head, in two passes:
// main executions (granted, actual address known, not yet issued) then
// pre-executions (not main-eligible, not pre-executed before, and an address
// available: actual, else pre-executed, else predicted if not granted). A
// request names its ROB entry and LSQ entry; responses come back in any order.
// A main response completes the load (wb_* with main=1: write the register,
// wake consumers, mark the ROB entry done); a pre-execution response is only
// broadcast (wb_* with main=0) and is dropped if the entry has since been
// reused. The data cache is assumed to accept every request. Issue from the
// LSQ with the predicted address follows the document; everything else about
// the queue (ordering, port handling, stale-response check) is this design's.
module tsd_lsq #(
  parameter int unsigned DEPTH     = 64,
  parameter int unsigned WIDTH     = 8,
  parameter int unsigned PORTS     = 4,
  parameter int unsigned NAG       = 8,
  parameter int unsigned NCM       = 8,
  parameter int unsigned ROB_DEPTH = 128,
  parameter int unsigned NUM_PREGS = 48,
  parameter int unsigned XLEN      = 32,
  localparam int unsigned RW = $clog2(ROB_DEPTH),
  localparam int unsigned PW = $clog2(NUM_PREGS),
  localparam int unsigned QW = $clog2(DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  // allocation
  input  logic            ins_fire,
  input  logic            ins_valid     [WIDTH],
  input  logic [RW-1:0]   ins_rob       [WIDTH],
  input  logic [PW-1:0]   ins_pd        [WIDTH],
  input  logic [RW-1:0]   ins_robp      [WIDTH],
  input  logic            ins_robp_valid[WIDTH],
  input  logic            ins_pred_valid[WIDTH],
  input  logic [XLEN-1:0] ins_pred_addr [WIDTH],
  output logic [QW-1:0]   ins_idx       [WIDTH],
  output logic            ins_space,
  // computed addresses
  input  logic            ag_valid [NAG],
  input  logic            ag_main  [NAG],
  input  logic [QW-1:0]   ag_lsq   [NAG],
  input  logic [XLEN-1:0] ag_addr  [NAG],
  // second-step deallocation broadcast and commit
  input  logic            cm_valid [NCM],
  input  logic [RW-1:0]   cm_rob   [NCM],
  input  logic [$clog2(WIDTH+1)-1:0] cm_loads,
  // data-cache requests
  output logic            mreq_valid [PORTS],
  output logic            mreq_main  [PORTS],
  output logic [XLEN-1:0] mreq_addr  [PORTS],
  output logic [RW-1:0]   mreq_rob   [PORTS],
  output logic [QW-1:0]   mreq_lsq   [PORTS],
  output logic            mreq_pred  [PORTS],
  // data-cache responses
  input  logic            mrsp_valid [PORTS],
  input  logic            mrsp_main  [PORTS],
  input  logic [RW-1:0]   mrsp_rob   [PORTS],
  input  logic [QW-1:0]   mrsp_lsq   [PORTS],
  input  logic [XLEN-1:0] mrsp_data  [PORTS],
  // load results
  output logic            wb_valid [PORTS],
  output logic            wb_main  [PORTS],
  output logic [RW-1:0]   wb_rob   [PORTS],
  output logic [PW-1:0]   wb_pd    [PORTS],
  output logic [XLEN-1:0] wb_val   [PORTS],
  output logic [XLEN-1:0] wb_addr  [PORTS],
  // events
  output logic [7:0]      ev_grants,
  output logic [7:0]      ev_pred_correct
);
  typedef struct packed {
    logic            valid;
    logic [RW-1:0]   rob;
    logic [PW-1:0]   pd;
    logic            granted;
    logic [RW-1:0]   robp;
    logic            pred_valid;
    logic [XLEN-1:0] pred_addr;
    logic            addr_valid;
    logic [XLEN-1:0] addr;
    logic            paddr_valid;
    logic [XLEN-1:0] paddr;
    logic            pexec_done;
    logic            main_issued;
  } ent_t;

  ent_t          ent_q [DEPTH];
  logic [QW-1:0] head_q, tail_q;
  logic [QW:0]   count_q;

  function automatic logic [QW-1:0] wrap(logic [QW:0] v);
    return (v >= (QW+1)'(DEPTH)) ? QW'(v - (QW+1)'(DEPTH)) : QW'(v);
  endfunction

  logic [QW:0] n_alloc;
  always_comb begin
    n_alloc = '0;
    for (int i = 0; i < WIDTH; i++) begin
      ins_idx[i] = wrap({1'b0, tail_q} + n_alloc);
      if (ins_valid[i]) n_alloc = n_alloc + 1'b1;
    end
  end
  assign ins_space = (count_q + (QW+1)'(WIDTH)) <= (QW+1)'(DEPTH);

  // ---- request select, oldest first ----
  logic [DEPTH-1:0] pick, pick_main;
  always_comb begin
    int n;
    n = 0;
    pick = '0;
    pick_main = '0;
    for (int p = 0; p < PORTS; p++) begin
      mreq_valid[p] = 1'b0; mreq_main[p] = 1'b0; mreq_addr[p] = '0;
      mreq_rob[p] = '0; mreq_lsq[p] = '0; mreq_pred[p] = 1'b0;
    end
    for (int pass = 0; pass < 2; pass++) begin
      for (int j = 0; j < DEPTH; j++) begin
        logic [QW-1:0] k;
        ent_t e;
        logic main_ok, pre_ok, use_pred;
        k = wrap({1'b0, head_q} + (QW+1)'(j));
        e = ent_q[k];
        main_ok  = e.valid && e.granted && e.addr_valid && !e.main_issued;
        use_pred = !e.addr_valid && !e.paddr_valid && e.pred_valid && !e.granted;
        pre_ok   = e.valid && !main_ok && !e.main_issued && !e.pexec_done &&
                   (e.addr_valid || e.paddr_valid || use_pred);
        if (n < PORTS && ((pass == 0) ? main_ok : pre_ok)) begin
          pick[k]       = 1'b1;
          pick_main[k]  = (pass == 0);
          mreq_valid[n] = 1'b1;
          mreq_main[n]  = (pass == 0);
          mreq_addr[n]  = e.addr_valid ? e.addr : (e.paddr_valid ? e.paddr : e.pred_addr);
          mreq_rob[n]   = e.rob;
          mreq_lsq[n]   = k;
          mreq_pred[n]  = (pass == 1) && use_pred;
          n++;
        end
      end
    end
  end

  // ---- responses ----
  always_comb begin
    for (int p = 0; p < PORTS; p++) begin
      ent_t e;
      e = ent_q[mrsp_lsq[p]];
      wb_valid[p] = mrsp_valid[p] && e.valid && e.rob == mrsp_rob[p] &&
                    (mrsp_main[p] || !e.main_issued);
      wb_main[p]  = mrsp_main[p];
      wb_rob[p]   = mrsp_rob[p];
      wb_pd[p]    = e.pd;
      wb_val[p]   = mrsp_data[p];
      wb_addr[p]  = e.addr;
    end
  end

  // ---- next state ----
  ent_t ent_n [DEPTH];
  logic [QW:0] n_free;
  always_comb begin
    logic [7:0] g, pc;
    ent_t x;
    x  = '0;
    g  = '0;
    pc = '0;
    n_free = (QW+1)'(cm_loads);
    for (int k = 0; k < DEPTH; k++) begin
      ent_n[k] = ent_q[k];
      if (ent_q[k].valid) begin
        if (pick[k] && pick_main[k]) ent_n[k].main_issued = 1'b1;
        if (pick[k] && !pick_main[k]) ent_n[k].pexec_done = 1'b1;
        if (!ent_q[k].granted)
          for (int c = 0; c < NCM; c++)
            if (cm_valid[c] && cm_rob[c] == ent_q[k].robp) ent_n[k].granted = 1'b1;
        if (!ent_q[k].granted && ent_n[k].granted) g++;
      end
    end
    for (int a = 0; a < NAG; a++)
      if (ag_valid[a] && ent_q[ag_lsq[a]].valid) begin
        if (ag_main[a]) begin
          ent_n[ag_lsq[a]].addr_valid = 1'b1;
          ent_n[ag_lsq[a]].addr       = ag_addr[a];
          if (ent_q[ag_lsq[a]].pred_valid && ent_q[ag_lsq[a]].pred_addr == ag_addr[a]) pc++;
        end else begin
          ent_n[ag_lsq[a]].paddr_valid = 1'b1;
          ent_n[ag_lsq[a]].paddr       = ag_addr[a];
        end
      end
    // free committed loads from the head
    for (int j = 0; j < WIDTH; j++)
      if ((QW+1)'(j) < n_free) ent_n[wrap({1'b0, head_q} + (QW+1)'(j))].valid = 1'b0;
    if (ins_fire)
      for (int i = 0; i < WIDTH; i++)
        if (ins_valid[i]) begin
          x             = '0;
          x.valid       = 1'b1;
          x.rob         = ins_rob[i];
          x.pd          = ins_pd[i];
          x.granted     = !ins_robp_valid[i];
          x.robp        = ins_robp[i];
          x.pred_valid  = ins_pred_valid[i];
          x.pred_addr   = ins_pred_addr[i];
          ent_n[ins_idx[i]] = x;
        end
    ev_grants       = g;
    ev_pred_correct = pc;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < DEPTH; k++) ent_q[k] <= '0;
      head_q  <= '0;
      tail_q  <= '0;
      count_q <= '0;
    end else begin
      ent_q   <= ent_n;
      head_q  <= wrap({1'b0, head_q} + n_free);
      tail_q  <= ins_fire ? wrap({1'b0, tail_q} + n_alloc) : tail_q;
      count_q <= count_q - n_free + (ins_fire ? n_alloc : '0);
    end
  end
endmodule
