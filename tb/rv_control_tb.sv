// rv_control_tb -- self-checking testbench for rv_control.
//
// Decodes one encoding of each of a set of instructions, then every instruction
// with 16 random values in its register and immediate fields, and compares the
// whole control word with an expected word written out here by hand, including the
// published load-word control (mem_read=1, mask_mode=2, alu_op=ADD,
// alu_imm=1, reg_write=1, mem_write=0, mem_sign_ext=0, jump=0). A second
// instance with the constant-time ISA (no branches, no Zbkc, CMOV) checks
// that branches and clmul decode to no-ops there and that CMOV is decoded.
module rv_control_tb;
  import rv_pkg::*;

  logic [31:0] instr;
  ctrl_t       ctrl, ctrl_ct;
  int          checks = 0, failures = 0;

  rv_control dut (.instr, .ctrl);
  rv_control #(.ZBKB(1'b1), .ZBKC(1'b0), .BRANCHES(1'b0), .CMOV(1'b1)) dut_ct (.instr, .ctrl(ctrl_ct));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected-word builder: fields given explicitly
  function automatic ctrl_t w(input bit rw, input bit mr, input bit mw, input logic [1:0] mm,
                              input bit se, input alu_op_e op, input bit imm, input bit pcs,
                              input bit j, input bit jr, input bit br, input bit cm);
    ctrl_t c;
    c.reg_write = rw; c.mem_read = mr; c.mem_write = mw; c.mask_mode = mm; c.mem_sign_ext = se;
    c.alu_op = op; c.alu_imm = imm; c.alu_pc = pcs; c.jump = j; c.jalr = jr; c.branch = br;
    c.cmov = cm;
    return c;
  endfunction

  task automatic expect_ctrl(input string name, input logic [31:0] ins, input ctrl_t e,
                             input ctrl_t e_ct);
    instr = ins;
    #1;
    checks += 2;
    if (ctrl !== e) begin
      failures++;
      $display("FAIL %s: got %p expected %p", name, ctrl, e);
    end
    if (ctrl_ct !== e_ct) begin
      failures++;
      $display("FAIL %s (ct ISA): got %p expected %p", name, ctrl_ct, e_ct);
    end
  endtask

  // every variant of an encoding: random values in the bits the decoder must
  // ignore (register numbers, immediates) give the same control word
  task automatic sweep(input string name, input logic [31:0] base, input logic [31:0] free,
                       input ctrl_t e, input ctrl_t e_ct);
    for (int k = 0; k < 16; k++)
      expect_ctrl(name, (base & ~free) | ($urandom & free), e, e_ct);
  endtask

  ctrl_t nop, lw;

  initial begin
    nop = w(0,0,0,2,0,ALU_ADD,0,0,0,0,0,0);
    lw  = w(1,1,0,2,0,ALU_ADD,1,0,0,0,0,0);
    // LW x5, 8(x2): the published control word
    expect_ctrl("lw",    32'h0081_2283, lw, lw);
    expect_ctrl("lb",    32'h0081_0283, w(1,1,0,0,1,ALU_ADD,1,0,0,0,0,0), w(1,1,0,0,1,ALU_ADD,1,0,0,0,0,0));
    expect_ctrl("lhu",   32'h0081_5283, w(1,1,0,1,0,ALU_ADD,1,0,0,0,0,0), w(1,1,0,1,0,ALU_ADD,1,0,0,0,0,0));
    expect_ctrl("sh",    32'h0051_1423, w(0,0,1,1,0,ALU_ADD,1,0,0,0,0,0), w(0,0,1,1,0,ALU_ADD,1,0,0,0,0,0));
    expect_ctrl("add",   32'h0031_00b3, w(1,0,0,2,0,ALU_ADD,0,0,0,0,0,0), w(1,0,0,2,0,ALU_ADD,0,0,0,0,0,0));
    expect_ctrl("sub",   32'h4031_00b3, w(1,0,0,2,0,ALU_SUB,0,0,0,0,0,0), w(1,0,0,2,0,ALU_SUB,0,0,0,0,0,0));
    expect_ctrl("sra",   32'h4031_50b3, w(1,0,0,2,0,ALU_SRA,0,0,0,0,0,0), w(1,0,0,2,0,ALU_SRA,0,0,0,0,0,0));
    expect_ctrl("srai",  32'h4031_5093, w(1,0,0,2,0,ALU_SRA,1,0,0,0,0,0), w(1,0,0,2,0,ALU_SRA,1,0,0,0,0,0));
    expect_ctrl("sltiu", 32'h0031_3093, w(1,0,0,2,0,ALU_SLTU,1,0,0,0,0,0), w(1,0,0,2,0,ALU_SLTU,1,0,0,0,0,0));
    expect_ctrl("lui",   32'h1234_50b7, w(1,0,0,2,0,ALU_PASSB,1,0,0,0,0,0), w(1,0,0,2,0,ALU_PASSB,1,0,0,0,0,0));
    expect_ctrl("auipc", 32'h1234_5097, w(1,0,0,2,0,ALU_ADD,1,1,0,0,0,0), w(1,0,0,2,0,ALU_ADD,1,1,0,0,0,0));
    expect_ctrl("jal",   32'h0080_00ef, w(1,0,0,2,0,ALU_ADD,1,1,1,0,0,0), w(1,0,0,2,0,ALU_ADD,1,1,1,0,0,0));
    expect_ctrl("jalr",  32'h0041_00e7, w(1,0,0,2,0,ALU_ADD,1,0,1,1,0,0), w(1,0,0,2,0,ALU_ADD,1,0,1,1,0,0));
    expect_ctrl("beq",   32'h0020_8463, w(0,0,0,2,0,ALU_ADD,1,1,0,0,1,0), nop);
    expect_ctrl("bgeu",  32'h0020_f463, w(0,0,0,2,0,ALU_ADD,1,1,0,0,1,0), nop);
    expect_ctrl("rol",   32'h6031_10b3, w(1,0,0,2,0,ALU_ROL,0,0,0,0,0,0), w(1,0,0,2,0,ALU_ROL,0,0,0,0,0,0));
    expect_ctrl("ror",   32'h6031_50b3, w(1,0,0,2,0,ALU_ROR,0,0,0,0,0,0), w(1,0,0,2,0,ALU_ROR,0,0,0,0,0,0));
    expect_ctrl("rori",  32'h6071_5093, w(1,0,0,2,0,ALU_ROR,1,0,0,0,0,0), w(1,0,0,2,0,ALU_ROR,1,0,0,0,0,0));
    expect_ctrl("andn",  32'h4031_70b3, w(1,0,0,2,0,ALU_ANDN,0,0,0,0,0,0), w(1,0,0,2,0,ALU_ANDN,0,0,0,0,0,0));
    expect_ctrl("orn",   32'h4031_60b3, w(1,0,0,2,0,ALU_ORN,0,0,0,0,0,0), w(1,0,0,2,0,ALU_ORN,0,0,0,0,0,0));
    expect_ctrl("xnor",  32'h4031_40b3, w(1,0,0,2,0,ALU_XNOR,0,0,0,0,0,0), w(1,0,0,2,0,ALU_XNOR,0,0,0,0,0,0));
    expect_ctrl("rev8",  32'h6981_5093, w(1,0,0,2,0,ALU_REV8,1,0,0,0,0,0), w(1,0,0,2,0,ALU_REV8,1,0,0,0,0,0));
    expect_ctrl("brev8", 32'h6871_5093, w(1,0,0,2,0,ALU_BREV8,1,0,0,0,0,0), w(1,0,0,2,0,ALU_BREV8,1,0,0,0,0,0));
    expect_ctrl("zip",   32'h08f1_1093, w(1,0,0,2,0,ALU_ZIP,1,0,0,0,0,0), w(1,0,0,2,0,ALU_ZIP,1,0,0,0,0,0));
    expect_ctrl("unzip", 32'h08f1_5093, w(1,0,0,2,0,ALU_UNZIP,1,0,0,0,0,0), w(1,0,0,2,0,ALU_UNZIP,1,0,0,0,0,0));
    expect_ctrl("pack",  32'h0831_40b3, w(1,0,0,2,0,ALU_PACK,0,0,0,0,0,0), w(1,0,0,2,0,ALU_PACK,0,0,0,0,0,0));
    expect_ctrl("packh", 32'h0831_70b3, w(1,0,0,2,0,ALU_PACKH,0,0,0,0,0,0), w(1,0,0,2,0,ALU_PACKH,0,0,0,0,0,0));
    expect_ctrl("clmul", 32'h0a31_10b3, w(1,0,0,2,0,ALU_CLMUL,0,0,0,0,0,0), nop);
    expect_ctrl("clmulh",32'h0a31_30b3, w(1,0,0,2,0,ALU_CLMULH,0,0,0,0,0,0), nop);
    expect_ctrl("cmov",  32'h0031_008b, nop, w(1,0,0,2,0,ALU_CMOV,0,0,0,0,0,1));
    expect_ctrl("fence", 32'h0ff0_000f, nop, nop);
    expect_ctrl("ecall", 32'h0000_0073, nop, nop);
    expect_ctrl("bad-op",32'h1031_00b3, nop, nop);
    // all instructions, 16 field variants each
    sweep("lui", 32'h00000037, 32'hFFFF_FF80, w(1,0,0,2,0,ALU_PASSB,1,0,0,0,0,0), w(1,0,0,2,0,ALU_PASSB,1,0,0,0,0,0));
    sweep("auipc", 32'h00000017, 32'hFFFF_FF80, w(1,0,0,2,0,ALU_ADD,1,1,0,0,0,0), w(1,0,0,2,0,ALU_ADD,1,1,0,0,0,0));
    sweep("jal", 32'h0000006f, 32'hFFFF_FF80, w(1,0,0,2,0,ALU_ADD,1,1,1,0,0,0), w(1,0,0,2,0,ALU_ADD,1,1,1,0,0,0));
    sweep("jalr", 32'h00000067, 32'hFFFF_8F80, w(1,0,0,2,0,ALU_ADD,1,0,1,1,0,0), w(1,0,0,2,0,ALU_ADD,1,0,1,1,0,0));
    sweep("beq", 32'h00000063, 32'hFE0F_8F80, w(0,0,0,2,0,ALU_ADD,1,1,0,0,1,0), nop);
    sweep("bne", 32'h00001063, 32'hFE0F_8F80, w(0,0,0,2,0,ALU_ADD,1,1,0,0,1,0), nop);
    sweep("blt", 32'h00004063, 32'hFE0F_8F80, w(0,0,0,2,0,ALU_ADD,1,1,0,0,1,0), nop);
    sweep("bge", 32'h00005063, 32'hFE0F_8F80, w(0,0,0,2,0,ALU_ADD,1,1,0,0,1,0), nop);
    sweep("bltu", 32'h00006063, 32'hFE0F_8F80, w(0,0,0,2,0,ALU_ADD,1,1,0,0,1,0), nop);
    sweep("bgeu", 32'h00007063, 32'hFE0F_8F80, w(0,0,0,2,0,ALU_ADD,1,1,0,0,1,0), nop);
    sweep("lb", 32'h00000003, 32'hFFFF_8F80, w(1,1,0,0,1,ALU_ADD,1,0,0,0,0,0), w(1,1,0,0,1,ALU_ADD,1,0,0,0,0,0));
    sweep("lh", 32'h00001003, 32'hFFFF_8F80, w(1,1,0,1,1,ALU_ADD,1,0,0,0,0,0), w(1,1,0,1,1,ALU_ADD,1,0,0,0,0,0));
    sweep("lw", 32'h00002003, 32'hFFFF_8F80, w(1,1,0,2,0,ALU_ADD,1,0,0,0,0,0), w(1,1,0,2,0,ALU_ADD,1,0,0,0,0,0));
    sweep("lbu", 32'h00004003, 32'hFFFF_8F80, w(1,1,0,0,0,ALU_ADD,1,0,0,0,0,0), w(1,1,0,0,0,ALU_ADD,1,0,0,0,0,0));
    sweep("lhu", 32'h00005003, 32'hFFFF_8F80, w(1,1,0,1,0,ALU_ADD,1,0,0,0,0,0), w(1,1,0,1,0,ALU_ADD,1,0,0,0,0,0));
    sweep("sb", 32'h00000023, 32'hFE0F_8F80, w(0,0,1,0,0,ALU_ADD,1,0,0,0,0,0), w(0,0,1,0,0,ALU_ADD,1,0,0,0,0,0));
    sweep("sh", 32'h00001023, 32'hFE0F_8F80, w(0,0,1,1,0,ALU_ADD,1,0,0,0,0,0), w(0,0,1,1,0,ALU_ADD,1,0,0,0,0,0));
    sweep("sw", 32'h00002023, 32'hFE0F_8F80, w(0,0,1,2,0,ALU_ADD,1,0,0,0,0,0), w(0,0,1,2,0,ALU_ADD,1,0,0,0,0,0));
    sweep("addi", 32'h00000013, 32'hFFFF_8F80, w(1,0,0,2,0,ALU_ADD,1,0,0,0,0,0), w(1,0,0,2,0,ALU_ADD,1,0,0,0,0,0));
    sweep("slti", 32'h00002013, 32'hFFFF_8F80, w(1,0,0,2,0,ALU_SLT,1,0,0,0,0,0), w(1,0,0,2,0,ALU_SLT,1,0,0,0,0,0));
    sweep("sltiu", 32'h00003013, 32'hFFFF_8F80, w(1,0,0,2,0,ALU_SLTU,1,0,0,0,0,0), w(1,0,0,2,0,ALU_SLTU,1,0,0,0,0,0));
    sweep("xori", 32'h00004013, 32'hFFFF_8F80, w(1,0,0,2,0,ALU_XOR,1,0,0,0,0,0), w(1,0,0,2,0,ALU_XOR,1,0,0,0,0,0));
    sweep("ori", 32'h00006013, 32'hFFFF_8F80, w(1,0,0,2,0,ALU_OR,1,0,0,0,0,0), w(1,0,0,2,0,ALU_OR,1,0,0,0,0,0));
    sweep("andi", 32'h00007013, 32'hFFFF_8F80, w(1,0,0,2,0,ALU_AND,1,0,0,0,0,0), w(1,0,0,2,0,ALU_AND,1,0,0,0,0,0));
    sweep("slli", 32'h00001013, 32'h01FF_8F80, w(1,0,0,2,0,ALU_SLL,1,0,0,0,0,0), w(1,0,0,2,0,ALU_SLL,1,0,0,0,0,0));
    sweep("srli", 32'h00005013, 32'h01FF_8F80, w(1,0,0,2,0,ALU_SRL,1,0,0,0,0,0), w(1,0,0,2,0,ALU_SRL,1,0,0,0,0,0));
    sweep("srai", 32'h40005013, 32'h01FF_8F80, w(1,0,0,2,0,ALU_SRA,1,0,0,0,0,0), w(1,0,0,2,0,ALU_SRA,1,0,0,0,0,0));
    sweep("rori", 32'h60005013, 32'h01FF_8F80, w(1,0,0,2,0,ALU_ROR,1,0,0,0,0,0), w(1,0,0,2,0,ALU_ROR,1,0,0,0,0,0));
    sweep("add", 32'h00000033, 32'h01FF_8F80, w(1,0,0,2,0,ALU_ADD,0,0,0,0,0,0), w(1,0,0,2,0,ALU_ADD,0,0,0,0,0,0));
    sweep("sub", 32'h40000033, 32'h01FF_8F80, w(1,0,0,2,0,ALU_SUB,0,0,0,0,0,0), w(1,0,0,2,0,ALU_SUB,0,0,0,0,0,0));
    sweep("sll", 32'h00001033, 32'h01FF_8F80, w(1,0,0,2,0,ALU_SLL,0,0,0,0,0,0), w(1,0,0,2,0,ALU_SLL,0,0,0,0,0,0));
    sweep("slt", 32'h00002033, 32'h01FF_8F80, w(1,0,0,2,0,ALU_SLT,0,0,0,0,0,0), w(1,0,0,2,0,ALU_SLT,0,0,0,0,0,0));
    sweep("sltu", 32'h00003033, 32'h01FF_8F80, w(1,0,0,2,0,ALU_SLTU,0,0,0,0,0,0), w(1,0,0,2,0,ALU_SLTU,0,0,0,0,0,0));
    sweep("xor", 32'h00004033, 32'h01FF_8F80, w(1,0,0,2,0,ALU_XOR,0,0,0,0,0,0), w(1,0,0,2,0,ALU_XOR,0,0,0,0,0,0));
    sweep("srl", 32'h00005033, 32'h01FF_8F80, w(1,0,0,2,0,ALU_SRL,0,0,0,0,0,0), w(1,0,0,2,0,ALU_SRL,0,0,0,0,0,0));
    sweep("sra", 32'h40005033, 32'h01FF_8F80, w(1,0,0,2,0,ALU_SRA,0,0,0,0,0,0), w(1,0,0,2,0,ALU_SRA,0,0,0,0,0,0));
    sweep("or", 32'h00006033, 32'h01FF_8F80, w(1,0,0,2,0,ALU_OR,0,0,0,0,0,0), w(1,0,0,2,0,ALU_OR,0,0,0,0,0,0));
    sweep("and", 32'h00007033, 32'h01FF_8F80, w(1,0,0,2,0,ALU_AND,0,0,0,0,0,0), w(1,0,0,2,0,ALU_AND,0,0,0,0,0,0));
    sweep("rol", 32'h60001033, 32'h01FF_8F80, w(1,0,0,2,0,ALU_ROL,0,0,0,0,0,0), w(1,0,0,2,0,ALU_ROL,0,0,0,0,0,0));
    sweep("ror", 32'h60005033, 32'h01FF_8F80, w(1,0,0,2,0,ALU_ROR,0,0,0,0,0,0), w(1,0,0,2,0,ALU_ROR,0,0,0,0,0,0));
    sweep("andn", 32'h40007033, 32'h01FF_8F80, w(1,0,0,2,0,ALU_ANDN,0,0,0,0,0,0), w(1,0,0,2,0,ALU_ANDN,0,0,0,0,0,0));
    sweep("orn", 32'h40006033, 32'h01FF_8F80, w(1,0,0,2,0,ALU_ORN,0,0,0,0,0,0), w(1,0,0,2,0,ALU_ORN,0,0,0,0,0,0));
    sweep("xnor", 32'h40004033, 32'h01FF_8F80, w(1,0,0,2,0,ALU_XNOR,0,0,0,0,0,0), w(1,0,0,2,0,ALU_XNOR,0,0,0,0,0,0));
    sweep("pack", 32'h08004033, 32'h01FF_8F80, w(1,0,0,2,0,ALU_PACK,0,0,0,0,0,0), w(1,0,0,2,0,ALU_PACK,0,0,0,0,0,0));
    sweep("packh", 32'h08007033, 32'h01FF_8F80, w(1,0,0,2,0,ALU_PACKH,0,0,0,0,0,0), w(1,0,0,2,0,ALU_PACKH,0,0,0,0,0,0));
    sweep("clmul", 32'h0a001033, 32'h01FF_8F80, w(1,0,0,2,0,ALU_CLMUL,0,0,0,0,0,0), nop);
    sweep("clmulh", 32'h0a003033, 32'h01FF_8F80, w(1,0,0,2,0,ALU_CLMULH,0,0,0,0,0,0), nop);
    sweep("rev8", 32'h69805013, 32'h000F_8F80, w(1,0,0,2,0,ALU_REV8,1,0,0,0,0,0), w(1,0,0,2,0,ALU_REV8,1,0,0,0,0,0));
    sweep("brev8", 32'h68705013, 32'h000F_8F80, w(1,0,0,2,0,ALU_BREV8,1,0,0,0,0,0), w(1,0,0,2,0,ALU_BREV8,1,0,0,0,0,0));
    sweep("zip", 32'h08f01013, 32'h000F_8F80, w(1,0,0,2,0,ALU_ZIP,1,0,0,0,0,0), w(1,0,0,2,0,ALU_ZIP,1,0,0,0,0,0));
    sweep("unzip", 32'h08f05013, 32'h000F_8F80, w(1,0,0,2,0,ALU_UNZIP,1,0,0,0,0,0), w(1,0,0,2,0,ALU_UNZIP,1,0,0,0,0,0));
    sweep("cmov", 32'h0000000b, 32'h01FF_8F80, nop, w(1,0,0,2,0,ALU_CMOV,0,0,0,0,0,1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
