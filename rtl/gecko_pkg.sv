// gecko_pkg: types shared by the stages of the gecko integer pipeline (RV32I) of a
// vector core. The names of the bundles between stages follow the pipeline block
// diagram: gecko_jump_command_t (Execute to Fetch and Decode, a bus without flow
// control), gecko_sys_command_t (Decode to System Management) and gecko_reg_result_t
// (results into Writeback). The field layouts are this implementation's own.
package gecko_pkg;

  localparam int unsigned EPOCH_W = 2;
  typedef logic [EPOCH_W-1:0] epoch_t;

  // RV32 major opcodes used by the core
  localparam logic [6:0] OPC_LUI    = 7'b0110111;
  localparam logic [6:0] OPC_AUIPC  = 7'b0010111;
  localparam logic [6:0] OPC_JAL    = 7'b1101111;
  localparam logic [6:0] OPC_JALR   = 7'b1100111;
  localparam logic [6:0] OPC_BRANCH = 7'b1100011;
  localparam logic [6:0] OPC_LOAD   = 7'b0000011;
  localparam logic [6:0] OPC_STORE  = 7'b0100011;
  localparam logic [6:0] OPC_OPIMM  = 7'b0010011;
  localparam logic [6:0] OPC_OP     = 7'b0110011;
  localparam logic [6:0] OPC_FENCE  = 7'b0001111;
  localparam logic [6:0] OPC_SYSTEM = 7'b1110011;
  localparam logic [6:0] OPC_OPFP   = 7'b1010011;
  localparam logic [6:0] OPC_FMADD  = 7'b1000011;
  localparam logic [6:0] OPC_FMSUB  = 7'b1000111;
  localparam logic [6:0] OPC_FNMSUB = 7'b1001011;
  localparam logic [6:0] OPC_FNMADD = 7'b1001111;
  localparam logic [6:0] OPC_OPV    = 7'b1010111;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_SLL, ALU_SLT, ALU_SLTU, ALU_XOR, ALU_SRL, ALU_SRA,
    ALU_OR, ALU_AND, ALU_PASS_B
  } alu_op_e;

  // What the Execute stage does with an instruction
  typedef enum logic [2:0] {
    EX_ALU,      // register-to-register result, forwarded straight to Writeback
    EX_LOAD,
    EX_STORE,
    EX_BRANCH,
    EX_JAL,      // jal and jalr: link result plus a jump
    EX_JALR
  } ex_kind_e;

  // Decode to Execute
  typedef struct packed {
    ex_kind_e    kind;
    alu_op_e     alu_op;
    logic [2:0]  funct3;     // branch condition, load/store width
    logic [31:0] pc;
    logic [31:0] op_a;       // rs1 value (or pc for auipc)
    logic [31:0] op_b;       // rs2 value or immediate
    logic [31:0] rs2_val;    // store data, branch comparison operand
    logic [31:0] imm;
    logic        a_saved;    // take op_a from Execute's saved last result
    logic        b_saved;    // take op_b from Execute's saved last result
    logic        s_saved;    // take rs2_val from Execute's saved last result
    logic [4:0]  rd;
    epoch_t      epoch;
  } gecko_exec_command_t;

  // Execute to Fetch/Decode; no flow control
  typedef struct packed {
    logic [31:0] target;
  } gecko_jump_command_t;

  // Execute to Memory
  typedef struct packed {
    logic        store;
    logic [2:0]  funct3;
    logic [31:0] addr;
    logic [31:0] data;
    logic [4:0]  rd;
  } gecko_mem_command_t;

  // Decode to System Management (CSR instructions)
  typedef struct packed {
    logic [1:0]  op;         // 1 = write, 2 = set, 3 = clear (funct3[1:0])
    logic [11:0] csr;
    logic [31:0] value;      // rs1 value or zero-extended immediate
    logic [4:0]  rd;
  } gecko_sys_command_t;

  // Any producer to Writeback. write = 0 only releases rd (killed instruction).
  typedef struct packed {
    logic [4:0]  rd;
    logic [31:0] value;
    logic        write;
  } gecko_reg_result_t;

  // Exception causes reported to the interrupt controller
  typedef enum logic [1:0] {
    EXC_NONE    = 2'd0,
    EXC_ILLEGAL = 2'd1,     // undefined instruction
    EXC_MEMORY  = 2'd2,     // access outside the scratchpad
    EXC_ECALL   = 2'd3      // ecall / ebreak: program asks the supervisor
  } exc_cause_e;

  // CSR addresses (cycle counters are standard; the operation counters are custom)
  localparam logic [11:0] CSR_CYCLE    = 12'hC00;
  localparam logic [11:0] CSR_CYCLEH   = 12'hC80;
  localparam logic [11:0] CSR_MCYCLE   = 12'hB00;
  localparam logic [11:0] CSR_MHARTID  = 12'hF14;
  localparam logic [11:0] CSR_MSCRATCH = 12'h340;
  localparam logic [11:0] CSR_FPOPS    = 12'hCC0;
  localparam logic [11:0] CSR_VECOPS   = 12'hCC1;

endpackage
