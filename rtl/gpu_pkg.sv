// gpu_pkg - shared constants and types of the SIMT GPU.
//
// The GPU runs one kernel on up to NUM_SM streaming multiprocessors (SMs). Each SM
// executes warps of WARP_SIZE threads in lock step on WARP_SIZE ALU cores. A thread
// block of BLOCK_SIZE elements goes to one SM, so an SM holds up to
// BLOCK_SIZE/WARP_SIZE = 8 warps. Every core has, per warp, NUM_REGS registers of
// WORD_W bits.
//
// Instruction word (INSTR_W = 20 bits), field positions as the design specifies them:
//   [3:0]   opcode
//   [8:4]   source register 1          (register-register forms)
//   [13:9]  source register 2          (register-register forms)
//   [13:4]  10-bit D-cache address     (LOAD / STORE)
//   [18:14] destination register; the register of INC; the source register of STORE
//   [19]    unused
// The opcode values themselves are this design's own choice; so are the SQRT
// (special function unit) and HALT opcodes, which the instruction list does not give.
package gpu_pkg;

  localparam int unsigned WORD_W     = 32;    // data word and register width
  localparam int unsigned INSTR_W    = 20;    // instruction word width
  localparam int unsigned REG_AW     = 5;     // register select width
  localparam int unsigned NUM_REGS   = 32;    // registers per thread
  localparam int unsigned DADDR_W    = 10;    // D-cache address width
  localparam int unsigned IADDR_W    = 16;    // instruction address width (lower half of data_IN)
  localparam int unsigned WARP_SIZE  = 32;    // threads per warp = cores per SM
  localparam int unsigned MAX_WARPS  = 8;     // warps per block
  localparam int unsigned BLOCK_SIZE = 256;   // elements per block
  localparam int unsigned NUM_SM     = 8;     // streaming multiprocessors

  typedef enum logic [3:0] {
    OP_ADD   = 4'h0,
    OP_SUB   = 4'h1,
    OP_AND   = 4'h2,
    OP_OR    = 4'h3,
    OP_INC   = 4'h4,
    OP_LOAD  = 4'h5,
    OP_STORE = 4'h6,
    OP_SQRT  = 4'h7,
    OP_HALT  = 4'hF
  } opcode_e;

  // Register-register view of an instruction word.
  typedef struct packed {
    logic             unused;
    logic [REG_AW-1:0] rd;
    logic [REG_AW-1:0] rs2;
    logic [REG_AW-1:0] rs1;
    logic [3:0]        opcode;
  } instr_r_t;

  // Memory view of an instruction word (LOAD / STORE).
  typedef struct packed {
    logic              unused;
    logic [REG_AW-1:0] rd;      // LOAD destination or STORE source
    logic [DADDR_W-1:0] addr;   // first element address
    logic [3:0]        opcode;
  } instr_m_t;

  typedef enum logic [2:0] {
    ALU_ADD  = 3'd0,
    ALU_SUB  = 3'd1,
    ALU_AND  = 3'd2,
    ALU_OR   = 3'd3,
    ALU_INC  = 3'd4
  } alu_op_e;

  // Functional unit an instruction needs.
  typedef enum logic [1:0] {
    FU_ALU  = 2'd0,
    FU_LSU  = 2'd1,
    FU_SFU  = 2'd2,
    FU_NONE = 2'd3
  } fu_e;

  // Control word produced by the control logic for one instruction.
  typedef struct packed {
    fu_e     unit;        // functional unit the instruction is dispatched to
    alu_op_e alu_control; // operation of the cores
    logic    reg_write;   // instruction writes the register file
    logic    mem_to_reg;  // register write data comes from memory (LOAD)
    logic    mem_read;    // D-cache read (LOAD)
    logic    mem_write;   // D-cache write (STORE)
    logic    pc_write;    // PC advances in the issue cycle (single-cycle instructions)
    logic    done;        // HALT: the warp has finished the kernel
    logic    valid_op;    // opcode is one of the defined ones
  } ctrl_t;

  // Per-cycle event pulses of one SM, for performance counting.
  typedef struct packed {
    logic alu_issue;    // an ALU instruction issued to all cores
    logic lsu_issue;    // a LOAD or STORE issued to the load/store unit
    logic sfu_issue;    // a SQRT issued to the special function unit
    logic halt_issue;   // a warp executed HALT
    logic unit_stall;   // the selected warp waited because its unit was busy
    logic wb_stall;     // an ALU instruction waited for the register write port
    logic hide_issue;   // an instruction issued while another warp waited on LSU/SFU
    logic lane_masked;  // a STORE skipped a thread beyond the element count
  } sm_events_t;

endpackage
