// rv_alu_tb -- self-checking testbench for rv_alu.
//
// For every ALU operation, applies directed corner operands (zero, all ones,
// sign bit, shift amounts 0 and 31) and random operands, and compares y and
// cond with a reference computed here bit by bit from the ISA definitions.
module rv_alu_tb;
  import rv_pkg::*;

  alu_op_e     op;
  logic [31:0] a, b, y;
  logic        cond;
  int          checks = 0, failures = 0;

  rv_alu dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] model(input alu_op_e o, input logic [31:0] x, input logic [31:0] z);
    logic [31:0] r;
    logic [63:0] p;
    int s;
    s = int'(z[4:0]);
    r = '0;
    case (o)
      ALU_ADD:   r = x + z;
      ALU_SUB:   r = x + ~z + 1;
      ALU_SLL:   for (int i = 0; i < 32; i++) r[i] = (i >= s) ? x[i - s] : 1'b0;
      ALU_SRL:   for (int i = 0; i < 32; i++) r[i] = (i + s < 32) ? x[i + s] : 1'b0;
      ALU_SRA:   for (int i = 0; i < 32; i++) r[i] = (i + s < 32) ? x[i + s] : x[31];
      ALU_SLT:   r = (x[31] != z[31]) ? {31'b0, x[31]} : {31'b0, x < z};
      ALU_SLTU:  r = {31'b0, x < z};
      ALU_XOR:   r = x ^ z;
      ALU_OR:    r = x | z;
      ALU_AND:   r = x & z;
      ALU_PASSB: r = z;
      ALU_ROL:   for (int i = 0; i < 32; i++) r[(i + s) % 32] = x[i];
      ALU_ROR:   for (int i = 0; i < 32; i++) r[i] = x[(i + s) % 32];
      ALU_ANDN:  r = x & ~z;
      ALU_ORN:   r = x | ~z;
      ALU_XNOR:  r = x ~^ z;
      ALU_REV8:  for (int i = 0; i < 4; i++) r[8*i +: 8] = x[8*(3-i) +: 8];
      ALU_BREV8: for (int i = 0; i < 4; i++) for (int j = 0; j < 8; j++) r[8*i+j] = x[8*i+7-j];
      ALU_ZIP:   for (int i = 0; i < 32; i++) r[i] = x[(i % 2) ? 16 + i / 2 : i / 2];
      ALU_UNZIP: for (int i = 0; i < 32; i++) r[(i % 2) ? 16 + i / 2 : i / 2] = x[i];
      ALU_PACK:  r = {z[15:0], x[15:0]};
      ALU_PACKH: r = {16'h0, z[7:0], x[7:0]};
      ALU_CLMUL, ALU_CLMULH: begin
        p = '0;
        for (int i = 0; i < 32; i++)
          for (int j = 0; j < 32; j++)
            p[i + j] = p[i + j] ^ (x[i] & z[j]);
        r = (o == ALU_CLMUL) ? p[31:0] : p[63:32];
      end
      ALU_CMOV:  r = x;
      default:   r = '0;
    endcase
    return r;
  endfunction

  task automatic apply(input alu_op_e o, input logic [31:0] x, input logic [31:0] z);
    logic [31:0] e;
    op = o; a = x; b = z;
    #1;
    e = model(o, x, z);
    checks++;
    if (y !== e || cond !== (z != 0)) begin
      failures++;
      if (failures < 20) $display("FAIL %s a=%h b=%h y=%h expected %h cond=%b", o.name(), x, z, y, e, cond);
    end
  endtask

  initial begin
    logic [31:0] corner [6];
    corner = '{32'h0, 32'hffff_ffff, 32'h8000_0000, 32'h0000_001f, 32'h1234_5678, 32'h7fff_ffff};
    for (int o = 0; o <= int'(ALU_CMOV); o++) begin
      foreach (corner[i]) foreach (corner[j]) apply(alu_op_e'(o), corner[i], corner[j]);
      repeat (300) apply(alu_op_e'(o), $urandom, $urandom);
    end
    // worked example: clmul of 0b111 by 0b11 = 0b1001
    apply(ALU_CLMUL, 32'h7, 32'h3);
    checks++;
    if (y !== 32'h9) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
