// tsd_rob: reorder buffer. Entries are allocated in program order, one per
// valid dispatch slot (al_idx gives each slot its entry), and marked done when
// the instruction's main execution completes (NDONE completion ports; loads
// also deliver their computed address). Up to WIDTH entries commit per cycle
// from the head, in order, stopping at the first entry that is not done and
// after NTRAIN loads (each committed load trains the address predictor once).
// The cm_* outputs describe the committing entries in the same cycle; their
// ROB numbers are the broadcast of the TSD second-step deallocation, and
// cm_pold is the physical register being finally deallocated. done_vec shows
// which entries are done (free entries read 0). Allocation happens at the
// clock edge when al_fire is high; the caller must check al_space.
// In-order commit and the broadcast follow the document; the port counts and
// the load limit per cycle are this design's choices. Each entry also keeps,
// for a load, the predictor lookup result made at dispatch (al_vhit,
// al_vpred), returned at commit for training.
module tsd_rob #(
  parameter int unsigned DEPTH     = 128,
  parameter int unsigned WIDTH     = 8,
  parameter int unsigned NDONE     = 12,
  parameter int unsigned NTRAIN    = 4,
  parameter int unsigned NUM_LREGS = 32,
  parameter int unsigned NUM_PREGS = 48,
  parameter int unsigned XLEN      = 32,
  localparam int unsigned RW = $clog2(DEPTH),
  localparam int unsigned LW = $clog2(NUM_LREGS),
  localparam int unsigned PW = $clog2(NUM_PREGS)
) (
  input  logic            clk,
  input  logic            rst_n,
  // allocation
  input  logic            al_fire,
  input  logic            al_valid  [WIDTH],
  input  logic            al_has_rd [WIDTH],
  input  logic [LW-1:0]   al_rd     [WIDTH],
  input  logic [PW-1:0]   al_pd     [WIDTH],
  input  logic [PW-1:0]   al_pold   [WIDTH],
  input  logic            al_load   [WIDTH],
  input  logic [XLEN-1:0] al_pc     [WIDTH],
  input  logic            al_vhit   [WIDTH],
  input  logic [XLEN-1:0] al_vpred  [WIDTH],
  output logic [RW-1:0]   al_idx    [WIDTH],
  output logic            al_space,
  // completion of main executions
  input  logic            dn_valid  [NDONE],
  input  logic [RW-1:0]   dn_idx    [NDONE],
  input  logic [XLEN-1:0] dn_addr   [NDONE],
  output logic [DEPTH-1:0] done_vec,
  // commit
  output logic            cm_valid  [WIDTH],
  output logic [RW-1:0]   cm_rob    [WIDTH],
  output logic            cm_has_rd [WIDTH],
  output logic [LW-1:0]   cm_rd     [WIDTH],
  output logic [PW-1:0]   cm_pd     [WIDTH],
  output logic [PW-1:0]   cm_pold   [WIDTH],
  output logic            cm_load   [WIDTH],
  output logic [XLEN-1:0] cm_pc     [WIDTH],
  output logic [XLEN-1:0] cm_addr   [WIDTH],
  output logic            cm_vhit   [WIDTH],
  output logic [XLEN-1:0] cm_vpred  [WIDTH],
  output logic [$clog2(WIDTH+1)-1:0] cm_loads
);
  typedef struct packed {
    logic            has_rd;
    logic [LW-1:0]   rd;
    logic [PW-1:0]   pd;
    logic [PW-1:0]   pold;
    logic            load;
    logic [XLEN-1:0] pc;
    logic [XLEN-1:0] addr;
    logic            vhit;
    logic [XLEN-1:0] vpred;
  } rob_t;

  rob_t             ent [DEPTH];
  logic [DEPTH-1:0] done_q;
  logic [RW-1:0]    head_q, tail_q;
  logic [RW:0]      count_q;

  function automatic logic [RW-1:0] wrap(logic [RW:0] v);
    return (v >= (RW+1)'(DEPTH)) ? RW'(v - (RW+1)'(DEPTH)) : RW'(v);
  endfunction

  assign done_vec = done_q;
  assign al_space = (count_q + (RW+1)'(WIDTH)) <= (RW+1)'(DEPTH);

  logic [RW:0] n_alloc;
  always_comb begin
    n_alloc = '0;
    for (int i = 0; i < WIDTH; i++) begin
      al_idx[i] = wrap({1'b0, tail_q} + n_alloc);
      if (al_valid[i]) n_alloc = n_alloc + 1'b1;
    end
  end

  logic [RW:0] n_commit;
  always_comb begin
    logic stop;
    logic [$clog2(WIDTH+1)-1:0] nl;
    stop = 1'b0;
    nl = '0;
    n_commit = '0;
    for (int i = 0; i < WIDTH; i++) begin
      rob_t e;
      logic [RW-1:0] k;
      k = wrap({1'b0, head_q} + (RW+1)'(i));
      e = ent[k];
      if ((RW+1)'(i) >= count_q || !done_q[k] || (e.load && nl == ($clog2(WIDTH+1))'(NTRAIN)))
        stop = 1'b1;
      cm_valid[i]  = !stop;
      cm_rob[i]    = k;
      cm_has_rd[i] = e.has_rd;
      cm_rd[i]     = e.rd;
      cm_pd[i]     = e.pd;
      cm_pold[i]   = e.pold;
      cm_load[i]   = e.load;
      cm_pc[i]     = e.pc;
      cm_addr[i]   = e.addr;
      cm_vhit[i]   = e.vhit;
      cm_vpred[i]  = e.vpred;
      if (!stop) begin
        n_commit = n_commit + 1'b1;
        if (e.load) nl = nl + 1'b1;
      end
    end
    cm_loads = nl;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      head_q  <= '0;
      tail_q  <= '0;
      count_q <= '0;
      done_q  <= '0;
    end else begin
      for (int d = 0; d < NDONE; d++)
        if (dn_valid[d]) begin
          done_q[dn_idx[d]]    <= 1'b1;
          ent[dn_idx[d]].addr  <= dn_addr[d];
        end
      for (int i = 0; i < WIDTH; i++)
        if (cm_valid[i]) done_q[cm_rob[i]] <= 1'b0;
      if (al_fire)
        for (int i = 0; i < WIDTH; i++)
          if (al_valid[i]) begin
            ent[al_idx[i]] <= '{has_rd: al_has_rd[i], rd: al_rd[i], pd: al_pd[i],
                                pold: al_pold[i], load: al_load[i], pc: al_pc[i], addr: '0,
                                vhit: al_vhit[i], vpred: al_vpred[i]};
            done_q[al_idx[i]] <= 1'b0;
          end
      head_q  <= wrap({1'b0, head_q} + n_commit);
      tail_q  <= al_fire ? wrap({1'b0, tail_q} + n_alloc) : tail_q;
      count_q <= count_q - n_commit + (al_fire ? n_alloc : '0);
    end
  end
endmodule
