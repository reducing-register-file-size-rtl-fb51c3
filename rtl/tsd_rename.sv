// tsd_rename: rename stage with two-step physical register deallocation
// (TSD), first step. It holds the three tables of the scheme:
//  * map table: logical -> physical register, plus the ROB entry of the
//    newest in-flight producer and an in-flight flag (the producer ROB entry
//    is this design's addition, used as the wakeup tag);
//  * free list: under TSD every renamed destination pushes the physical
//    register it deallocates temporarily and pops a new one, so the list
//    always holds NUM_PREGS - NUM_LREGS registers. It is kept as a ring where
//    the popped slot receives the pushed register, so renaming never stalls
//    for lack of registers;
//  * deallocation table (DAT): one entry per physical register holding the
//    ROB entry of the instruction that will finally deallocate it.
// For each instruction with a destination, in slot order within the group:
// the register currently mapped to rd is deallocated temporarily (pushed to
// the free list) and the instruction's ROB entry is written to its DAT
// entry; a register is taken from the free list and mapped to rd; the DAT
// entry of that register gives the ROBP tag. ROBP is valid while the DAT
// entry is valid: a committed instruction (second step) clears the DAT entry
// of the register it deallocated if the entry still names it, and those
// clears are applied before this cycle's lookups. Sources read the map after
// the updates of earlier slots of the group. All outputs are combinational;
// the tables update at the clock edge when fire is high (commit clears are
// applied every cycle). The tables and the order of the operations follow
// the document; the ring organisation of the free list and the map's
// producer field are this design's.
module tsd_rename #(
  parameter int unsigned WIDTH     = 8,
  parameter int unsigned NUM_LREGS = 32,
  parameter int unsigned NUM_PREGS = 48,
  parameter int unsigned ROB_DEPTH = 128,
  localparam int unsigned LW = $clog2(NUM_LREGS),
  localparam int unsigned PW = $clog2(NUM_PREGS),
  localparam int unsigned RW = $clog2(ROB_DEPTH),
  localparam int unsigned NFREE = NUM_PREGS - NUM_LREGS
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          fire,
  input  logic          rn_valid      [WIDTH],
  input  logic          rn_has_rd     [WIDTH],
  input  logic [LW-1:0] rn_rd         [WIDTH],
  input  logic [LW-1:0] rn_rs1        [WIDTH],
  input  logic [LW-1:0] rn_rs2        [WIDTH],
  input  logic [RW-1:0] rn_rob        [WIDTH],
  output logic [PW-1:0] rn_pd         [WIDTH],
  output logic [PW-1:0] rn_pold       [WIDTH],
  output logic [RW-1:0] rn_robp       [WIDTH],
  output logic          rn_robp_valid [WIDTH],
  output logic [PW-1:0] rn_ps1        [WIDTH],
  output logic          rn_s1_inflight[WIDTH],
  output logic [RW-1:0] rn_s1_rob     [WIDTH],
  output logic [PW-1:0] rn_ps2        [WIDTH],
  output logic          rn_s2_inflight[WIDTH],
  output logic [RW-1:0] rn_s2_rob     [WIDTH],
  input  logic          cm_valid      [WIDTH],
  input  logic [RW-1:0] cm_rob        [WIDTH],
  input  logic          cm_has_rd     [WIDTH],
  input  logic [LW-1:0] cm_rd         [WIDTH],
  input  logic [PW-1:0] cm_pold       [WIDTH]
);
  typedef struct packed {
    logic [PW-1:0] preg;
    logic [RW-1:0] rob;
    logic          inflight;
  } map_t;
  typedef struct packed {
    logic          valid;
    logic [RW-1:0] rob;
  } dat_t;

  localparam int unsigned HW = (NFREE > 1) ? $clog2(NFREE) : 1;

  map_t          map_q [NUM_LREGS];
  dat_t          dat_q [NUM_PREGS];
  logic [PW-1:0] ring_q[NFREE];
  logic [HW-1:0] head_q;

  map_t          map_c [NUM_LREGS], map_n [NUM_LREGS];
  dat_t          dat_c [NUM_PREGS], dat_n [NUM_PREGS];
  logic [PW-1:0] ring_n[NFREE];
  logic [HW-1:0] head_n;

  initial assert (NUM_PREGS > NUM_LREGS)
    else $fatal(1, "TSD needs more physical than logical registers");

  always_comb begin
    map_c = map_q;
    dat_c = dat_q;
    // Second step: commits retire their DAT entry and their map producer.
    for (int c = 0; c < WIDTH; c++) begin
      if (cm_valid[c] && cm_has_rd[c]) begin
        if (dat_c[cm_pold[c]].valid && dat_c[cm_pold[c]].rob == cm_rob[c])
          dat_c[cm_pold[c]].valid = 1'b0;
        if (map_c[cm_rd[c]].inflight && map_c[cm_rd[c]].rob == cm_rob[c])
          map_c[cm_rd[c]].inflight = 1'b0;
      end
    end
    map_n  = map_c;
    dat_n  = dat_c;
    ring_n = ring_q;
    head_n = head_q;
    // First step, in slot order.
    for (int i = 0; i < WIDTH; i++) begin
      rn_ps1[i]         = map_n[rn_rs1[i]].preg;
      rn_s1_inflight[i] = map_n[rn_rs1[i]].inflight;
      rn_s1_rob[i]      = map_n[rn_rs1[i]].rob;
      rn_ps2[i]         = map_n[rn_rs2[i]].preg;
      rn_s2_inflight[i] = map_n[rn_rs2[i]].inflight;
      rn_s2_rob[i]      = map_n[rn_rs2[i]].rob;
      rn_pold[i]        = map_n[rn_rd[i]].preg;
      rn_pd[i]          = ring_n[head_n];
      rn_robp[i]        = '0;
      rn_robp_valid[i]  = 1'b0;
      if (rn_valid[i] && rn_has_rd[i]) begin
        // (1) temporary deallocation: push old register, (2) record in DAT
        ring_n[head_n]       = rn_pold[i];
        dat_n[rn_pold[i]]    = '{valid: 1'b1, rob: rn_rob[i]};
        head_n               = (head_n == HW'(NFREE - 1)) ? '0 : head_n + 1'b1;
        // (3) ROBP lookup for the newly allocated register
        rn_robp[i]           = dat_n[rn_pd[i]].rob;
        rn_robp_valid[i]     = dat_n[rn_pd[i]].valid;
        map_n[rn_rd[i]]      = '{preg: rn_pd[i], rob: rn_rob[i], inflight: 1'b1};
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int l = 0; l < NUM_LREGS; l++)
        map_q[l] <= '{preg: PW'(l), rob: '0, inflight: 1'b0};
      for (int p = 0; p < NUM_PREGS; p++) dat_q[p] <= '0;
      for (int f = 0; f < NFREE; f++) ring_q[f] <= PW'(NUM_LREGS + f);
      head_q <= '0;
    end else if (fire) begin
      map_q  <= map_n;
      dat_q  <= dat_n;
      ring_q <= ring_n;
      head_q <= head_n;
    end else begin
      map_q <= map_c;
      dat_q <= dat_c;
    end
  end
endmodule
