// tsd_pkg: types shared by the TSD (two-step physical register deallocation)
// core. The instruction format is this design's own: the core models one
// integer register class with a small set of ALU operations and loads, which
// is what is needed to exercise renaming, pre-execution and load address
// prediction. A load is split at dispatch into an address-calculation
// operation (OP_AGEN, held in the instruction window) and a memory access
// (held in the load/store queue).
package tsd_pkg;

  typedef enum logic [2:0] {
    OP_ADD  = 3'd0,   // rd = rs1 + rs2
    OP_SUB  = 3'd1,   // rd = rs1 - rs2
    OP_AND  = 3'd2,   // rd = rs1 & rs2
    OP_OR   = 3'd3,   // rd = rs1 | rs2
    OP_XOR  = 3'd4,   // rd = rs1 ^ rs2
    OP_ADDI = 3'd5,   // rd = rs1 + imm
    OP_LOAD = 3'd6,   // rd = mem[rs1 + imm]
    OP_AGEN = 3'd7    // internal: address of a split load, rs1 + imm
  } op_e;

  // Decoded instruction as delivered by the front end.
  typedef struct packed {
    op_e         op;
    logic [31:0] pc;
    logic        has_rd;
    logic [4:0]  rd;
    logic [4:0]  rs1;
    logic [4:0]  rs2;
    logic [31:0] imm;
  } inst_t;

  // True when the operation reads rs2.
  function automatic logic uses_rs2(op_e op);
    return !(op == OP_ADDI || op == OP_LOAD || op == OP_AGEN);
  endfunction

  // Per-cycle event counts brought out of the core for measurement.
  typedef struct packed {
    logic [7:0] alu_main;       // ALU/AGEN main executions issued
    logic [7:0] alu_pexec;      // ALU/AGEN pre-executions issued
    logic [7:0] ld_main;        // loads issued for main execution
    logic [7:0] ld_pexec;       // loads issued for pre-execution
    logic [7:0] ld_pexec_pred;  // ... of which used the predicted address
    logic [7:0] ld_pred;        // loads dispatched with a confident prediction
    logic [7:0] pred_correct;   // predictions found correct when the address was computed
    logic [7:0] grants;         // window/LSQ entries granted by a ROBP match
    logic [7:0] deferred;       // dispatched instructions whose write is not yet granted
    logic [7:0] byp_drop;       // bypass-only ready flags dropped unused
  } tsd_events_t;

endpackage
