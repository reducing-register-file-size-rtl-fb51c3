// tsd_vpred: stride address predictor for loads. A direct-mapped value history
// table (VHT) of ENTRIES entries is indexed by the load PC (word address bits
// above bit 1). Each entry holds, as in the document, a tag (the remaining PC
// bits), the immediately previous address, a stride and a confidence flag;
// a lookup hitting a confident entry predicts previous + stride, and the
// confidence flag is set exactly when the previous prediction was correct.
// Because a load may be dispatched many times before its first instance
// commits, this design keeps the previous address speculatively: every
// lookup hit advances it to the address it predicted and counts one more
// instance in flight (cnt). Training, in program order at commit, receives
// the actual address, whether that instance's lookup hit and what it
// predicted. A correct prediction sets the flag. Otherwise the flag is
// cleared, the stride becomes actual - last committed address, and the
// previous address is realigned to actual + stride * (instances still in
// flight), so the next lookup predicts the right element again. A training
// miss allocates the entry (stride 0, flag clear).
// Lookups are combinational (NLOOK ports, program order within the group)
// and see this cycle's training; all updates are written at the clock edge,
// later ports seeing the effect of earlier ones. lk_valid must be high only
// for loads that are actually dispatched.
module tsd_vpred #(
  parameter int unsigned ENTRIES = 1024,
  parameter int unsigned XLEN    = 32,
  parameter int unsigned NLOOK   = 8,
  parameter int unsigned NTRAIN  = 4,
  parameter int unsigned CNTW    = 8,
  localparam int unsigned IW     = $clog2(ENTRIES),
  localparam int unsigned TW     = XLEN - IW - 2,
  localparam int unsigned NP     = NTRAIN + NLOOK
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            lk_valid      [NLOOK],
  input  logic [XLEN-1:0] lk_pc         [NLOOK],
  output logic            lk_hit        [NLOOK],
  output logic            lk_pred_valid [NLOOK],
  output logic [XLEN-1:0] lk_pred_addr  [NLOOK],
  input  logic            tr_valid      [NTRAIN],
  input  logic [XLEN-1:0] tr_pc         [NTRAIN],
  input  logic [XLEN-1:0] tr_addr       [NTRAIN],
  input  logic            tr_hit        [NTRAIN],
  input  logic [XLEN-1:0] tr_pred       [NTRAIN]
);
  typedef struct packed {
    logic [TW-1:0]   tag;
    logic [XLEN-1:0] prev;     // immediately previous address (speculative)
    logic [XLEN-1:0] stride;
    logic            conf;
    logic [XLEN-1:0] last;     // last committed address
    logic [CNTW-1:0] cnt;      // predicted instances not yet trained
  } vht_t;

  vht_t               vht [ENTRIES];
  logic [ENTRIES-1:0] valid_q;

  // write ports: training first, then lookups
  logic            wr_en  [NP];
  logic [IW-1:0]   wr_idx [NP];
  vht_t            wr_ent [NP];

  always_comb begin
    logic            en_l  [NP];
    logic [IW-1:0]   idx_l [NP];
    vht_t            ent_l [NP];
    logic [XLEN-1:0] pc;
    logic            en;
    vht_t            e;
    logic            v;
    logic            hit;
    logic [CNTW-1:0] c;
    logic [XLEN-1:0] s;
    en_l  = '{default: 1'b0};
    idx_l = '{default: '0};
    ent_l = '{default: '0};
    for (int l = 0; l < NLOOK; l++) begin
      lk_hit[l]        = 1'b0;
      lk_pred_valid[l] = 1'b0;
      lk_pred_addr[l]  = '0;
    end
    for (int p = 0; p < NP; p++) begin
      if (p < NTRAIN) begin
        pc = tr_pc[p];
        en = tr_valid[p];
      end else begin
        pc = lk_pc[p-NTRAIN];
        en = lk_valid[p-NTRAIN];
      end
      idx_l[p] = pc[IW+1:2];
      e = vht[idx_l[p]];
      v = valid_q[idx_l[p]];
      for (int j = 0; j < p; j++)
        if (en_l[j] && idx_l[j] == idx_l[p]) begin
          e = ent_l[j];
          v = 1'b1;
        end
      hit = v && e.tag == pc[XLEN-1:IW+2];
      en_l[p]  = en;
      ent_l[p] = e;
      c = (e.cnt != '0) ? e.cnt - 1'b1 : e.cnt;
      s = tr_addr[(p < NTRAIN) ? p : 0] - e.last;
      if (p < NTRAIN) begin
        if (hit) begin
          if (!tr_hit[p]) c = e.cnt;
          ent_l[p].cnt  = c;
          ent_l[p].last = tr_addr[p];
          if (tr_hit[p] && tr_pred[p] == tr_addr[p]) begin
            ent_l[p].conf = 1'b1;
          end else begin
            ent_l[p].conf   = 1'b0;
            ent_l[p].stride = s;
            ent_l[p].prev   = tr_addr[p] + s * XLEN'(c);
          end
        end else begin
          ent_l[p] = '{tag: pc[XLEN-1:IW+2], prev: tr_addr[p], stride: '0, conf: 1'b0,
                       last: tr_addr[p], cnt: '0};
        end
      end else begin
        lk_hit[p-NTRAIN]        = en && hit;
        lk_pred_valid[p-NTRAIN] = en && hit && e.conf;
        lk_pred_addr[p-NTRAIN]  = e.prev + e.stride;
        en_l[p] = en && hit;
        ent_l[p].prev = e.prev + e.stride;
        if (e.cnt != '1) ent_l[p].cnt = e.cnt + 1'b1;
      end
    end
    wr_en  = en_l;
    wr_idx = idx_l;
    wr_ent = ent_l;
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < NP; p++)
      if (wr_en[p]) vht[wr_idx[p]] <= wr_ent[p];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) valid_q <= '0;
    else
      for (int p = 0; p < NTRAIN; p++)
        if (tr_valid[p]) valid_q[wr_idx[p]] <= 1'b1;
  end
endmodule
