// rv_pkg -- shared types and constants of the RISC-V cores.
//
// Holds the RV32 major opcodes, the ALU operation encoding and the control
// word that the instruction decoder (rv_control) hands to the datapath. The
// control-signal names mem_read, mask_mode, alu_op, alu_imm, reg_write,
// mem_write, mem_sign_ext and jump follow the published control logic for a
// load-word instruction; the remaining fields (alu_pc, jalr, branch, cmov) and
// all numeric encodings of alu_op_e are this design's own choices.
package rv_pkg;

  // RV32 major opcodes (instruction bits 6:0)
  localparam logic [6:0] OPC_LUI    = 7'b0110111;
  localparam logic [6:0] OPC_AUIPC  = 7'b0010111;
  localparam logic [6:0] OPC_JAL    = 7'b1101111;
  localparam logic [6:0] OPC_JALR   = 7'b1100111;
  localparam logic [6:0] OPC_BRANCH = 7'b1100011;
  localparam logic [6:0] OPC_LOAD   = 7'b0000011;
  localparam logic [6:0] OPC_STORE  = 7'b0100011;
  localparam logic [6:0] OPC_OPIMM  = 7'b0010011;
  localparam logic [6:0] OPC_OP     = 7'b0110011;
  // custom-0 space, used by the constant-time core's conditional move
  localparam logic [6:0] OPC_CMOV   = 7'b0001011;

  // data memory access size (mask_mode); 2 = word as in the LW control word
  localparam logic [1:0] MASK_BYTE = 2'd0;
  localparam logic [1:0] MASK_HALF = 2'd1;
  localparam logic [1:0] MASK_WORD = 2'd2;

  typedef enum logic [4:0] {
    ALU_ADD, ALU_SUB, ALU_SLL, ALU_SLT, ALU_SLTU, ALU_XOR, ALU_SRL, ALU_SRA,
    ALU_OR, ALU_AND, ALU_PASSB,
    // Zbkb
    ALU_ROL, ALU_ROR, ALU_ANDN, ALU_ORN, ALU_XNOR, ALU_REV8, ALU_BREV8,
    ALU_ZIP, ALU_UNZIP, ALU_PACK, ALU_PACKH,
    // Zbkc
    ALU_CLMUL, ALU_CLMULH,
    // constant-time core: pass rs1, flag rs2 != 0
    ALU_CMOV
  } alu_op_e;

  typedef struct packed {
    logic       reg_write;     // write rd
    logic       mem_read;      // rd <- data memory
    logic       mem_write;     // data memory <- rs2
    logic [1:0] mask_mode;     // access size
    logic       mem_sign_ext;  // sign-extend a byte/half load
    alu_op_e    alu_op;
    logic       alu_imm;       // ALU operand 2 = immediate (else rs2)
    logic       alu_pc;        // ALU operand 1 = pc (else rs1)
    logic       jump;          // unconditional jump (JAL, JALR); rd <- pc+4
    logic       jalr;          // jump target is the ALU result with bit 0 cleared
    logic       branch;        // conditional branch, condition from funct3
    logic       cmov;          // register write only if the ALU condition holds
  } ctrl_t;

  localparam ctrl_t CTRL_NOP = '{
    reg_write: 1'b0, mem_read: 1'b0, mem_write: 1'b0, mask_mode: MASK_WORD,
    mem_sign_ext: 1'b0, alu_op: ALU_ADD, alu_imm: 1'b0, alu_pc: 1'b0,
    jump: 1'b0, jalr: 1'b0, branch: 1'b0, cmov: 1'b0};

  // Immediate of any RV32 format, selected by opcode.
  function automatic logic [31:0] imm_of(input logic [31:0] ins);
    unique case (ins[6:0])
      OPC_LUI, OPC_AUIPC: imm_of = {ins[31:12], 12'b0};
      OPC_JAL:    imm_of = {{12{ins[31]}}, ins[19:12], ins[20], ins[30:21], 1'b0};
      OPC_BRANCH: imm_of = {{20{ins[31]}}, ins[7], ins[30:25], ins[11:8], 1'b0};
      OPC_STORE:  imm_of = {{21{ins[31]}}, ins[30:25], ins[11:7]};
      default:    imm_of = {{21{ins[31]}}, ins[30:20]};
    endcase
  endfunction

  // Conditional-branch comparator (funct3 of BEQ..BGEU).
  function automatic logic branch_taken(input logic [2:0] f3, input logic [31:0] a,
                                        input logic [31:0] b);
    unique case (f3)
      3'b000:  branch_taken = (a == b);
      3'b001:  branch_taken = (a != b);
      3'b100:  branch_taken = ($signed(a) <  $signed(b));
      3'b101:  branch_taken = ($signed(a) >= $signed(b));
      3'b110:  branch_taken = (a <  b);
      3'b111:  branch_taken = (a >= b);
      default: branch_taken = 1'b0;
    endcase
  endfunction

endpackage
