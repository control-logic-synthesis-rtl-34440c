// rv_alu -- arithmetic/logic unit of the RISC-V cores.
//
// Purely combinational. Computes y = op(a, b) for the RV32I register and
// immediate operations, the Zbkb bit-manipulation operations (rotates,
// logic-with-negate, byte and bit-in-byte reversal, zip/unzip, pack/packh)
// and the Zbkc carry-less multiplies (low and high word). For the
// constant-time core's conditional move the ALU passes a through and raises
// cond when b is non-zero; the core uses cond to gate the register write.
// The operation set is the one the cores' ISAs need; how each operation is
// built is this design's choice (each is written from its ISA definition).
module rv_alu
  import rv_pkg::*;
(
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y,
  output logic        cond
);

  logic [4:0]  sh;
  logic [63:0] clprod;

  assign sh = b[4:0];

  // 32x32 carry-less product
  always_comb begin
    clprod = '0;
    for (int i = 0; i < 32; i++)
      if (b[i]) clprod = clprod ^ ({32'b0, a} << i);
  end

  always_comb begin
    y = '0;
    unique case (op)
      ALU_ADD:    y = a + b;
      ALU_SUB:    y = a - b;
      ALU_SLL:    y = a << sh;
      ALU_SLT:    y = {31'b0, $signed(a) < $signed(b)};
      ALU_SLTU:   y = {31'b0, a < b};
      ALU_XOR:    y = a ^ b;
      ALU_SRL:    y = a >> sh;
      ALU_SRA:    y = $unsigned($signed(a) >>> sh);
      ALU_OR:     y = a | b;
      ALU_AND:    y = a & b;
      ALU_PASSB:  y = b;
      ALU_ROL:    y = (a << sh) | (a >> (6'd32 - {1'b0, sh}));
      ALU_ROR:    y = (a >> sh) | (a << (6'd32 - {1'b0, sh}));
      ALU_ANDN:   y = a & ~b;
      ALU_ORN:    y = a | ~b;
      ALU_XNOR:   y = ~(a ^ b);
      ALU_REV8:   y = {a[7:0], a[15:8], a[23:16], a[31:24]};
      ALU_BREV8:  for (int i = 0; i < 32; i++) y[i] = a[(i & ~7) + 7 - (i & 7)];
      ALU_ZIP:    for (int i = 0; i < 16; i++) begin
                    y[2*i]   = a[i];
                    y[2*i+1] = a[i+16];
                  end
      ALU_UNZIP:  for (int i = 0; i < 16; i++) begin
                    y[i]    = a[2*i];
                    y[i+16] = a[2*i+1];
                  end
      ALU_PACK:   y = {b[15:0], a[15:0]};
      ALU_PACKH:  y = {16'b0, b[7:0], a[7:0]};
      ALU_CLMUL:  y = clprod[31:0];
      ALU_CLMULH: y = clprod[63:32];
      ALU_CMOV:   y = a;
      default:    y = '0;
    endcase
  end

  assign cond = (b != 32'd0);

endmodule
