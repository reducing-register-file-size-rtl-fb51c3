// tsd_iwin: instruction window with TSD write grant and pre-execution.
// Each entry holds the instruction tags of the scheme: ROBP (the ROB entry
// whose commit finally frees the destination register), the destination
// register (dtag) and two source tags. Source tags are the producers' ROB
// entry numbers, because under TSD several in-flight instructions may hold
// the same physical register; operand values are captured in the entry.
// Per source two ready flags are kept: 'avail' (the producer's main
// execution has written the value, persistent) and 'byp' (a pre-executed
// producer broadcast its result last cycle; it lasts one cycle only, since a
// pre-executed result exists only on the bypass).
// Write grant: an entry is granted when inserted with no pending ROBP, or
// when a committed ROB number equal to its ROBP is broadcast on cm_*.
// Issue, up to ISSUE per cycle, in two passes over the entries (lowest index
// first): main executions (granted, both sources avail; the entry leaves
// the window) then pre-executions (both sources ready through avail or byp,
// not main-eligible, not pre-executed before; the entry stays, its bypass
// ready flags are reset and it is not pre-executed again). An OP_AGEN entry
// has no destination register and is granted at insertion.
// Timing: issue is combinational from the state; results broadcast on wk_*
// in a cycle are captured at that clock edge, so a dependent instruction can
// issue in the next cycle (back to back). Insertion checks the same cycle's
// wk_* buses. The grant, the reset of ready flags after pre-execution and
// the one-cycle bypass flag follow the document; tags by ROB entry, the
// select order and the single pre-execution per instruction are this
// design's choices.
module tsd_iwin
  import tsd_pkg::*;
#(
  parameter int unsigned DEPTH     = 64,
  parameter int unsigned WIDTH     = 8,
  parameter int unsigned ISSUE     = 8,
  parameter int unsigned NWK       = 12,
  parameter int unsigned NCM       = 8,
  parameter int unsigned ROB_DEPTH = 128,
  parameter int unsigned NUM_PREGS = 48,
  parameter int unsigned LSQ_DEPTH = 64,
  parameter int unsigned XLEN      = 32,
  localparam int unsigned RW = $clog2(ROB_DEPTH),
  localparam int unsigned PW = $clog2(NUM_PREGS),
  localparam int unsigned QW = $clog2(LSQ_DEPTH),
  localparam int unsigned CW = $clog2(DEPTH+1)
) (
  input  logic            clk,
  input  logic            rst_n,
  // insertion
  input  logic            ins_fire,
  input  logic            ins_valid     [WIDTH],
  input  op_e             ins_op        [WIDTH],
  input  logic [RW-1:0]   ins_rob       [WIDTH],
  input  logic            ins_has_rd    [WIDTH],
  input  logic [PW-1:0]   ins_pd        [WIDTH],
  input  logic [RW-1:0]   ins_robp      [WIDTH],
  input  logic            ins_robp_valid[WIDTH],
  input  logic            ins_s1_avail  [WIDTH],
  input  logic [RW-1:0]   ins_s1_tag    [WIDTH],
  input  logic [XLEN-1:0] ins_s1_val    [WIDTH],
  input  logic            ins_s2_avail  [WIDTH],
  input  logic [RW-1:0]   ins_s2_tag    [WIDTH],
  input  logic [XLEN-1:0] ins_s2_val    [WIDTH],
  input  logic [XLEN-1:0] ins_imm       [WIDTH],
  input  logic [QW-1:0]   ins_lsq       [WIDTH],
  output logic            ins_space,
  // result broadcast (bypass)
  input  logic            wk_valid [NWK],
  input  logic            wk_main  [NWK],
  input  logic [RW-1:0]   wk_tag   [NWK],
  input  logic [XLEN-1:0] wk_val   [NWK],
  // second-step deallocation broadcast
  input  logic            cm_valid [NCM],
  input  logic [RW-1:0]   cm_rob   [NCM],
  // issue
  output logic            is_valid  [ISSUE],
  output logic            is_main   [ISSUE],
  output op_e             is_op     [ISSUE],
  output logic [RW-1:0]   is_rob    [ISSUE],
  output logic            is_has_rd [ISSUE],
  output logic [PW-1:0]   is_pd     [ISSUE],
  output logic [XLEN-1:0] is_a      [ISSUE],
  output logic [XLEN-1:0] is_b      [ISSUE],
  output logic [XLEN-1:0] is_imm    [ISSUE],
  output logic [QW-1:0]   is_lsq    [ISSUE],
  // events
  output logic [7:0]      ev_grants,
  output logic [7:0]      ev_byp_drop
);
  typedef struct packed {
    logic            avail;
    logic            byp;
    logic [RW-1:0]   tag;
    logic [XLEN-1:0] val;
  } src_t;
  typedef struct packed {
    logic            valid;
    op_e             op;
    logic [RW-1:0]   rob;
    logic            has_rd;
    logic [PW-1:0]   pd;
    logic            granted;
    logic [RW-1:0]   robp;
    src_t            s1;
    src_t            s2;
    logic [XLEN-1:0] imm;
    logic [QW-1:0]   lsq;
    logic            pexec_done;
  } ent_t;

  ent_t ent_q [DEPTH];

  // ---- select ----
  logic [DEPTH-1:0] pick, pick_main;
  always_comb begin
    int n;
    n = 0;
    pick = '0;
    pick_main = '0;
    for (int k = 0; k < ISSUE; k++) begin
      is_valid[k] = 1'b0; is_main[k] = 1'b0; is_op[k] = OP_ADD; is_rob[k] = '0;
      is_has_rd[k] = 1'b0; is_pd[k] = '0; is_a[k] = '0; is_b[k] = '0;
      is_imm[k] = '0; is_lsq[k] = '0;
    end
    for (int pass = 0; pass < 2; pass++) begin
      for (int e = 0; e < DEPTH; e++) begin
        logic main_ok, pre_ok;
        main_ok = ent_q[e].valid && ent_q[e].granted && ent_q[e].s1.avail && ent_q[e].s2.avail;
        pre_ok  = ent_q[e].valid && !main_ok && !ent_q[e].pexec_done &&
                  (ent_q[e].s1.avail || ent_q[e].s1.byp) && (ent_q[e].s2.avail || ent_q[e].s2.byp);
        if (n < ISSUE && ((pass == 0) ? main_ok : pre_ok)) begin
          pick[e]         = 1'b1;
          pick_main[e]    = (pass == 0);
          is_valid[n]     = 1'b1;
          is_main[n]      = (pass == 0);
          is_op[n]        = ent_q[e].op;
          is_rob[n]       = ent_q[e].rob;
          is_has_rd[n]    = ent_q[e].has_rd;
          is_pd[n]        = ent_q[e].pd;
          is_a[n]         = ent_q[e].s1.val;
          is_b[n]         = ent_q[e].s2.val;
          is_imm[n]       = ent_q[e].imm;
          is_lsq[n]       = ent_q[e].lsq;
          n++;
        end
      end
    end
  end

  // ---- free slots for insertion ----
  logic [CW-1:0] n_free;
  int            slot_of [WIDTH];
  logic          slot_ok [WIDTH];
  always_comb begin
    int s;
    n_free = '0;
    for (int e = 0; e < DEPTH; e++) if (!ent_q[e].valid) n_free++;
    s = 0;
    for (int i = 0; i < WIDTH; i++) begin
      slot_of[i] = 0;
      slot_ok[i] = 1'b0;
    end
    for (int e = 0; e < DEPTH; e++)
      if (!ent_q[e].valid && s < WIDTH) begin
        slot_of[s] = e;
        slot_ok[s] = 1'b1;
        s++;
      end
  end
  assign ins_space = n_free >= CW'(WIDTH);

  // Apply bypass/result broadcasts to one source.
  function automatic src_t wake(src_t s, logic keep_byp);
    src_t r;
    r = s;
    r.byp = keep_byp ? s.byp : 1'b0;
    for (int w = 0; w < NWK; w++)
      if (wk_valid[w] && !s.avail && wk_tag[w] == s.tag) begin
        if (wk_main[w]) begin
          r.avail = 1'b1;
          r.byp   = 1'b0;
          r.val   = wk_val[w];
        end else if (!r.avail) begin
          r.byp = 1'b1;
          r.val = wk_val[w];
        end
      end
    return r;
  endfunction

  // ---- next state ----
  ent_t ent_n [DEPTH];
  always_comb begin
    logic [7:0] g, d;
    ent_t x;
    g = '0;
    d = '0;
    x = '0;
    for (int e = 0; e < DEPTH; e++) begin
      ent_n[e] = ent_q[e];
      if (ent_q[e].valid) begin
        // a bypass-only ready flag not used this cycle is dropped
        if (!pick[e] && ((ent_q[e].s1.byp && !ent_q[e].s1.avail) || (ent_q[e].s2.byp && !ent_q[e].s2.avail)))
          d++;
        ent_n[e].s1 = wake(ent_q[e].s1, 1'b0);
        ent_n[e].s2 = wake(ent_q[e].s2, 1'b0);
        if (pick[e] && !pick_main[e]) ent_n[e].pexec_done = 1'b1;
        if (pick_main[e]) ent_n[e].valid = 1'b0;
        if (!ent_q[e].granted)
          for (int c = 0; c < NCM; c++)
            if (cm_valid[c] && cm_rob[c] == ent_q[e].robp) begin
              ent_n[e].granted = 1'b1;
            end
        if (!ent_q[e].granted && ent_n[e].granted) g++;
      end
    end
    if (ins_fire)
      for (int i = 0; i < WIDTH; i++)
        if (ins_valid[i] && slot_ok[i]) begin
          x.valid      = 1'b1;
          x.op         = ins_op[i];
          x.rob        = ins_rob[i];
          x.has_rd     = ins_has_rd[i];
          x.pd         = ins_pd[i];
          x.granted    = !ins_robp_valid[i];
          x.robp       = ins_robp[i];
          x.s1         = wake('{avail: ins_s1_avail[i], byp: 1'b0, tag: ins_s1_tag[i], val: ins_s1_val[i]}, 1'b0);
          x.s2         = wake('{avail: ins_s2_avail[i], byp: 1'b0, tag: ins_s2_tag[i], val: ins_s2_val[i]}, 1'b0);
          x.imm        = ins_imm[i];
          x.lsq        = ins_lsq[i];
          x.pexec_done = 1'b0;
          ent_n[slot_of[i]] = x;
        end
    ev_grants   = g;
    ev_byp_drop = d;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int e = 0; e < DEPTH; e++) ent_q[e] <= '0;
    end else begin
      ent_q <= ent_n;
    end
  end
endmodule
