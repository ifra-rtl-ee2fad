// ifra_pkg: sizes shared by the IFRA recording hardware.
//
// The numbers describe the main configuration: an Alpha 21264-like 4-way
// superscalar core with at most 64 instructions in flight, 2 ALUs,
// 2 multipliers, 2 branch units and 2 load/store units, and footprint
// recorders of 1,024 entries each. The instruction ID is log2(4n) bits wide
// for n instructions in flight. The auxiliary-information widths per pipeline
// stage are those of the recorder table of the design (fetch 32, decode 4,
// dispatch 6, issue 6, ALU/MUL 3, branch 0, load/store 35). Register-name and
// data widths (PREG_W, DATA_W, ADDR_W) are choices of this implementation.
package ifra_pkg;

  // Processor configuration
  parameter int unsigned N_INFLIGHT = 64;   // max instructions in flight (= ROB entries)
  parameter int unsigned WAYS       = 4;    // pipeline width
  parameter int unsigned N_ALU      = 2;
  parameter int unsigned N_MUL      = 2;
  parameter int unsigned N_BR       = 2;
  parameter int unsigned N_LSU      = 2;
  parameter int unsigned N_FU       = N_ALU + N_MUL + N_BR + N_LSU;

  // Instruction ID: log2(4n) bits
  parameter int unsigned ID_W = $clog2(4 * N_INFLIGHT);

  // Recorder depth
  parameter int unsigned REC_DEPTH = 1024;

  // Auxiliary information widths per pipeline stage
  parameter int unsigned FETCH_AUX_W    = 32; // program counter
  parameter int unsigned DECODE_AUX_W   = 4;  // decoding results
  parameter int unsigned DISPATCH_AUX_W = 6;  // 2-bit residue of three register names
  parameter int unsigned ISSUE_AUX_W    = 6;  // 3-bit residue of two operands
  parameter int unsigned EXEC_AUX_W     = 3;  // 3-bit residue of the result
  parameter int unsigned BRANCH_AUX_W   = 0;  // nothing
  parameter int unsigned LSU_AUX_W      = 35; // 3-bit residue of result + address

  // Datapath widths of the host core (implementation choices)
  parameter int unsigned PREG_W = 7;   // physical register name
  parameter int unsigned DATA_W = 64;  // operand / result width
  parameter int unsigned ADDR_W = 32;  // recorded memory address bits
  parameter int unsigned PC_W   = 32;  // recorded program counter bits

  // Functional-unit numbering used on the issue ports
  typedef enum logic [2:0] {
    FU_ALU0 = 3'd0, FU_ALU1 = 3'd1,
    FU_MUL0 = 3'd2, FU_MUL1 = 3'd3,
    FU_BR0  = 3'd4, FU_BR1  = 3'd5,
    FU_LSU0 = 3'd6, FU_LSU1 = 3'd7
  } fu_e;

  // Cause of a hard post-trigger, kept sticky for the debugger
  typedef struct packed {
    logic null_addr;   // load/store address equal to zero
    logic segfault;    // segmentation fault declared by the OS
    logic deadlock;    // long instruction-retirement gap
    logic exception;   // built-in exception
    logic arith_err;   // residue check of an arithmetic unit
    logic array_err;   // parity check of an array
  } trig_cause_t;

endpackage
