// rv_control -- instruction-decoder control logic of the RISC-V cores.
//
// Combinational. From the opcode, funct3, funct7 and (for the Zbkb unary
// operations) the 12-bit immediate field of an instruction it produces the
// control word ctrl_t that steers the datapath: ALU operation and operand
// selects, register write, data-memory read/write with access size and sign
// extension, jump/branch. Every instruction is decoded independently of every
// other, so the logic is a flat case over mutually exclusive encodings, the
// form a per-instruction solve joined by a union of the results takes. For LW
// it yields exactly the published control word (mem_read=1, mask_mode=2,
// alu_op=ADD, alu_imm=1, reg_write=1, mem_write=0, mem_sign_ext=0, jump=0).
//
// Parameters select the ISA of each core: ZBKB and ZBKC add the two
// cryptography extensions, BRANCHES = 0 drops the conditional branches and
// CMOV = 1 adds the conditional move (custom-0 opcode, funct3 = 0, funct7 = 0;
// that encoding is this design's choice). Anything not decoded, FENCE and
// ecall/ebreak included, gives the all-zero-effect CTRL_NOP.
module rv_control
  import rv_pkg::*;
#(
  parameter bit ZBKB     = 1'b1,
  parameter bit ZBKC     = 1'b1,
  parameter bit BRANCHES = 1'b1,
  parameter bit CMOV     = 1'b0
) (
  input  logic [31:0] instr,
  output ctrl_t       ctrl
);

  logic [6:0]  opcode;
  logic [2:0]  funct3;
  logic [6:0]  funct7;
  logic [11:0] imm12;

  assign opcode = instr[6:0];
  assign funct3 = instr[14:12];
  assign funct7 = instr[31:25];
  assign imm12  = instr[31:20];

  always_comb begin
    ctrl = CTRL_NOP;
    unique case (opcode)
      OPC_LUI: begin
        ctrl.alu_op = ALU_PASSB; ctrl.alu_imm = 1'b1; ctrl.reg_write = 1'b1;
      end
      OPC_AUIPC: begin
        ctrl.alu_op = ALU_ADD; ctrl.alu_pc = 1'b1; ctrl.alu_imm = 1'b1; ctrl.reg_write = 1'b1;
      end
      OPC_JAL: begin
        ctrl.alu_op = ALU_ADD; ctrl.alu_pc = 1'b1; ctrl.alu_imm = 1'b1;
        ctrl.jump = 1'b1; ctrl.reg_write = 1'b1;
      end
      OPC_JALR: if (funct3 == 3'b000) begin
        ctrl.alu_op = ALU_ADD; ctrl.alu_imm = 1'b1;
        ctrl.jump = 1'b1; ctrl.jalr = 1'b1; ctrl.reg_write = 1'b1;
      end
      OPC_BRANCH: if (BRANCHES && funct3 != 3'b010 && funct3 != 3'b011) begin
        // target pc + imm from the ALU; comparison of rs1, rs2 in the datapath
        ctrl.alu_op = ALU_ADD; ctrl.alu_pc = 1'b1; ctrl.alu_imm = 1'b1; ctrl.branch = 1'b1;
      end
      OPC_LOAD: if (funct3 inside {3'b000, 3'b001, 3'b010, 3'b100, 3'b101}) begin
        ctrl.mem_read = 1'b1; ctrl.mask_mode = funct3[1:0];
        ctrl.mem_sign_ext = ~funct3[2] & (funct3[1:0] != MASK_WORD);
        ctrl.alu_op = ALU_ADD; ctrl.alu_imm = 1'b1; ctrl.reg_write = 1'b1;
      end
      OPC_STORE: if (funct3 inside {3'b000, 3'b001, 3'b010}) begin
        ctrl.mem_write = 1'b1; ctrl.mask_mode = funct3[1:0];
        ctrl.alu_op = ALU_ADD; ctrl.alu_imm = 1'b1;
      end
      OPC_OPIMM: begin
        ctrl.alu_imm = 1'b1; ctrl.reg_write = 1'b1;
        unique case (funct3)
          3'b000: ctrl.alu_op = ALU_ADD;
          3'b010: ctrl.alu_op = ALU_SLT;
          3'b011: ctrl.alu_op = ALU_SLTU;
          3'b100: ctrl.alu_op = ALU_XOR;
          3'b110: ctrl.alu_op = ALU_OR;
          3'b111: ctrl.alu_op = ALU_AND;
          3'b001:
            if (funct7 == 7'b0000000)           ctrl.alu_op = ALU_SLL;
            else if (ZBKB && imm12 == 12'h08F)  ctrl.alu_op = ALU_ZIP;
            else                                ctrl = CTRL_NOP;
          default: // 3'b101
            if (funct7 == 7'b0000000)           ctrl.alu_op = ALU_SRL;
            else if (funct7 == 7'b0100000)      ctrl.alu_op = ALU_SRA;
            else if (ZBKB && funct7 == 7'b0110000) ctrl.alu_op = ALU_ROR;
            else if (ZBKB && imm12 == 12'h698)  ctrl.alu_op = ALU_REV8;
            else if (ZBKB && imm12 == 12'h687)  ctrl.alu_op = ALU_BREV8;
            else if (ZBKB && imm12 == 12'h08F)  ctrl.alu_op = ALU_UNZIP;
            else                                ctrl = CTRL_NOP;
        endcase
      end
      OPC_OP: begin
        ctrl.reg_write = 1'b1;
        unique case ({funct7, funct3})
          {7'b0000000, 3'b000}: ctrl.alu_op = ALU_ADD;
          {7'b0100000, 3'b000}: ctrl.alu_op = ALU_SUB;
          {7'b0000000, 3'b001}: ctrl.alu_op = ALU_SLL;
          {7'b0000000, 3'b010}: ctrl.alu_op = ALU_SLT;
          {7'b0000000, 3'b011}: ctrl.alu_op = ALU_SLTU;
          {7'b0000000, 3'b100}: ctrl.alu_op = ALU_XOR;
          {7'b0000000, 3'b101}: ctrl.alu_op = ALU_SRL;
          {7'b0100000, 3'b101}: ctrl.alu_op = ALU_SRA;
          {7'b0000000, 3'b110}: ctrl.alu_op = ALU_OR;
          {7'b0000000, 3'b111}: ctrl.alu_op = ALU_AND;
          {7'b0110000, 3'b001}: if (ZBKB) ctrl.alu_op = ALU_ROL;   else ctrl = CTRL_NOP;
          {7'b0110000, 3'b101}: if (ZBKB) ctrl.alu_op = ALU_ROR;   else ctrl = CTRL_NOP;
          {7'b0100000, 3'b111}: if (ZBKB) ctrl.alu_op = ALU_ANDN;  else ctrl = CTRL_NOP;
          {7'b0100000, 3'b110}: if (ZBKB) ctrl.alu_op = ALU_ORN;   else ctrl = CTRL_NOP;
          {7'b0100000, 3'b100}: if (ZBKB) ctrl.alu_op = ALU_XNOR;  else ctrl = CTRL_NOP;
          {7'b0000100, 3'b100}: if (ZBKB) ctrl.alu_op = ALU_PACK;  else ctrl = CTRL_NOP;
          {7'b0000100, 3'b111}: if (ZBKB) ctrl.alu_op = ALU_PACKH; else ctrl = CTRL_NOP;
          {7'b0000101, 3'b001}: if (ZBKC) ctrl.alu_op = ALU_CLMUL;  else ctrl = CTRL_NOP;
          {7'b0000101, 3'b011}: if (ZBKC) ctrl.alu_op = ALU_CLMULH; else ctrl = CTRL_NOP;
          default:              ctrl = CTRL_NOP;
        endcase
      end
      OPC_CMOV: if (CMOV && funct3 == 3'b000 && funct7 == 7'b0000000) begin
        ctrl.alu_op = ALU_CMOV; ctrl.reg_write = 1'b1; ctrl.cmov = 1'b1;
      end
      default: ctrl = CTRL_NOP;
    endcase
  end

endmodule
