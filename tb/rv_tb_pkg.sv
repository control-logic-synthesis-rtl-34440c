// rv_tb_pkg -- verification helpers for the RISC-V core testbenches.
//
// Holds an instruction encoder, an instruction-set reference model written
// straight from the RV32I / Zbkb / Zbkc definitions (plus the CMOV
// instruction of the constant-time core), and a random program generator.
// A generated program has three parts: a prologue that gives every register
// a random value (lui + addi) and sets the base register x30 = 1024, a random body,
// and an epilogue that stores x1..x31 to bytes 1920..2047 of data memory,
// followed by a jump-to-self at end_pc. The body uses loads/stores in bytes
// 0..1919, forward-only branches and jumps, and jalr to absolute forward targets, so every
// program ends. The reference model also counts the cycles a core needs to
// reach end_pc: one per instruction, plus JUMP_PENALTY per executed jump.
package rv_tb_pkg;

  localparam int MEMW = 512;            // data words a program may touch
  localparam int SAVE_BASE = 1920;      // epilogue register dump (bytes)

  typedef struct {
    bit zbkb;
    bit zbkc;
    bit branches;
    bit cmov;
  } isa_t;

  // ---------------- encoder ----------------
  function automatic logic [31:0] enc_r(input logic [6:0] f7, input int rs2, input int rs1,
                                        input logic [2:0] f3, input int rd, input logic [6:0] opc);
    return {f7, 5'(rs2), 5'(rs1), f3, 5'(rd), opc};
  endfunction
  function automatic logic [31:0] enc_i(input int imm, input int rs1, input logic [2:0] f3,
                                        input int rd, input logic [6:0] opc);
    logic [11:0] i12;
    i12 = 12'(imm);
    return {i12, 5'(rs1), f3, 5'(rd), opc};
  endfunction
  function automatic logic [31:0] enc_s(input int imm, input int rs2, input int rs1,
                                        input logic [2:0] f3);
    logic [11:0] i12;
    i12 = 12'(imm);
    return {i12[11:5], 5'(rs2), 5'(rs1), f3, i12[4:0], 7'b0100011};
  endfunction
  function automatic logic [31:0] enc_b(input int imm, input int rs2, input int rs1,
                                        input logic [2:0] f3);
    logic [12:0] i;
    i = 13'(imm);
    return {i[12], i[10:5], 5'(rs2), 5'(rs1), f3, i[4:1], i[11], 7'b1100011};
  endfunction
  function automatic logic [31:0] enc_u(input logic [19:0] imm20, input int rd, input logic [6:0] opc);
    return {imm20, 5'(rd), opc};
  endfunction
  function automatic logic [31:0] enc_j(input int imm, input int rd);
    logic [20:0] i;
    i = 21'(imm);
    return {i[20], i[10:1], i[11], i[19:12], 5'(rd), 7'b1101111};
  endfunction

  // ---------------- reference model ----------------
  class rv_model;
    isa_t        isa;
    logic [31:0] x   [32];
    logic [31:0] mem [MEMW];
    logic [31:0] prog[];
    logic [31:0] pc;
    int          retired;
    int          jumps;
    // mechanism counters
    int          n_branch_taken;   // conditional branch taken
    int          n_branch_fall;    // conditional branch not taken
    int          n_dep1;           // source written by the instruction just before
    int          n_load_use;       // source loaded by the instruction just before
    int          n_cmov_move;      // CMOV with rs2 != 0
    int          n_cmov_keep;      // CMOV with rs2 == 0
    int          last_rd;          // register written by the previous instruction
    bit          last_load;

    function new(isa_t isa_i);
      isa = isa_i;
    endfunction

    function logic [31:0] ld(input logic [31:0] a, input int size, input bit sgn);
      logic [31:0] w;
      w = mem[a[10:2]] >> (8 * a[1:0]);
      if (size == 1) return sgn ? {{24{w[7]}}, w[7:0]}  : {24'b0, w[7:0]};
      if (size == 2) return sgn ? {{16{w[15]}}, w[15:0]} : {16'b0, w[15:0]};
      return w;
    endfunction

    function void st(input logic [31:0] a, input int size, input logic [31:0] v);
      for (int i = 0; i < size; i++)
        mem[a[10:2]][8*(a[1:0] + i) +: 8] = v[8*i +: 8];
    endfunction

    static function logic [63:0] clmul64(input logic [31:0] a, input logic [31:0] b);
      logic [63:0] r;
      r = 0;
      for (int i = 0; i < 32; i++) if (b[i]) r ^= (64'(a) << i);
      return r;
    endfunction

    // execute one instruction
    function void step();
      logic [31:0] ins, a, b, r, npc, ii, si, bi, ji, ui;
      logic [6:0]  opc, f7;
      logic [2:0]  f3;
      logic [63:0] cl;
      int          rd;
      bit          wr;
      ins = prog[pc[31:2]];
      opc = ins[6:0]; f3 = ins[14:12]; f7 = ins[31:25]; rd = int'(ins[11:7]);
      a = x[ins[19:15]]; b = x[ins[24:20]];
      ii = {{20{ins[31]}}, ins[31:20]};
      si = {{20{ins[31]}}, ins[31:25], ins[11:7]};
      bi = {{19{ins[31]}}, ins[31], ins[7], ins[30:25], ins[11:8], 1'b0};
      ji = {{11{ins[31]}}, ins[31], ins[19:12], ins[20], ins[30:21], 1'b0};
      ui = {ins[31:12], 12'b0};
      npc = pc + 4; wr = 0; r = 0;
      case (opc)
        7'b0110111: begin r = ui; wr = 1; end
        7'b0010111: begin r = pc + ui; wr = 1; end
        7'b1101111: begin r = pc + 4; wr = 1; npc = pc + ji; jumps++; end
        7'b1100111: begin r = pc + 4; wr = 1; npc = (a + ii) & ~32'd1; jumps++; end
        7'b1100011: if (isa.branches) begin
          bit t;
          case (f3)
            3'd0: t = a == b;
            3'd1: t = a != b;
            3'd4: t = $signed(a) < $signed(b);
            3'd5: t = $signed(a) >= $signed(b);
            3'd6: t = a < b;
            default: t = a >= b;
          endcase
          if (t) begin npc = pc + bi; n_branch_taken++; end
          else n_branch_fall++;
        end
        7'b0000011: begin
          wr = 1;
          case (f3)
            3'd0: r = ld(a + ii, 1, 1);
            3'd1: r = ld(a + ii, 2, 1);
            3'd2: r = ld(a + ii, 4, 0);
            3'd4: r = ld(a + ii, 1, 0);
            default: r = ld(a + ii, 2, 0);
          endcase
        end
        7'b0100011: st(a + si, (f3 == 0) ? 1 : (f3 == 1) ? 2 : 4, b);
        7'b0010011: begin
          wr = 1;
          case (f3)
            3'd0: r = a + ii;
            3'd2: r = {31'b0, $signed(a) < $signed(ii)};
            3'd3: r = {31'b0, a < ii};
            3'd4: r = a ^ ii;
            3'd6: r = a | ii;
            3'd7: r = a & ii;
            3'd1: if (f7 == 0) r = a << ins[24:20];
                  else begin // zip
                    for (int i = 0; i < 16; i++) begin r[2*i] = a[i]; r[2*i+1] = a[16+i]; end
                  end
            default:
              if (f7 == 7'b0000000) r = a >> ins[24:20];
              else if (f7 == 7'b0100000) r = $signed(a) >>> ins[24:20];
              else if (f7 == 7'b0110000) r = (a >> ins[24:20]) | (a << (32 - ins[24:20]));
              else if (ins[31:20] == 12'h698) r = {a[7:0], a[15:8], a[23:16], a[31:24]};
              else if (ins[31:20] == 12'h687) begin
                for (int by = 0; by < 4; by++)
                  for (int i = 0; i < 8; i++) r[8*by + i] = a[8*by + 7 - i];
              end else begin // unzip
                for (int i = 0; i < 16; i++) begin r[i] = a[2*i]; r[16+i] = a[2*i+1]; end
              end
          endcase
        end
        7'b0110011: begin
          wr = 1;
          case ({f7, f3})
            {7'h00, 3'd0}: r = a + b;
            {7'h20, 3'd0}: r = a - b;
            {7'h00, 3'd1}: r = a << b[4:0];
            {7'h00, 3'd2}: r = {31'b0, $signed(a) < $signed(b)};
            {7'h00, 3'd3}: r = {31'b0, a < b};
            {7'h00, 3'd4}: r = a ^ b;
            {7'h00, 3'd5}: r = a >> b[4:0];
            {7'h20, 3'd5}: r = $signed(a) >>> b[4:0];
            {7'h00, 3'd6}: r = a | b;
            {7'h00, 3'd7}: r = a & b;
            {7'h30, 3'd1}: r = (a << b[4:0]) | (a >> (32 - b[4:0]));
            {7'h30, 3'd5}: r = (a >> b[4:0]) | (a << (32 - b[4:0]));
            {7'h20, 3'd7}: r = a & ~b;
            {7'h20, 3'd6}: r = a | ~b;
            {7'h20, 3'd4}: r = ~(a ^ b);
            {7'h04, 3'd4}: r = {b[15:0], a[15:0]};
            {7'h04, 3'd7}: r = {16'b0, b[7:0], a[7:0]};
            {7'h05, 3'd1}: begin cl = clmul64(a, b); r = cl[31:0];  end
            {7'h05, 3'd3}: begin cl = clmul64(a, b); r = cl[63:32]; end
            default: wr = 0;
          endcase
        end
        7'b0001011: if (isa.cmov) begin
          r = a; wr = (b != 0);
          if (wr) n_cmov_move++; else n_cmov_keep++;
        end
        default: ;
      endcase
      // an extension that is not in the ISA leaves its encodings without effect
      if (!isa.zbkb && ((opc == 7'b0010011 && f3 == 3'd1 && f7 != 7'h00) ||
                        (opc == 7'b0010011 && f3 == 3'd5 && f7 != 7'h00 && f7 != 7'h20) ||
                        (opc == 7'b0110011 && (f7 == 7'h30 || f7 == 7'h04 ||
                                               (f7 == 7'h20 && f3 != 3'd0 && f3 != 3'd5)))))
        wr = 0;
      if (!isa.zbkc && opc == 7'b0110011 && f7 == 7'h05) wr = 0;
      if (last_rd != 0 && (int'(ins[19:15]) == last_rd || int'(ins[24:20]) == last_rd)) begin
        n_dep1++;
        if (last_load) n_load_use++;
      end
      last_rd = (wr && rd != 0) ? rd : 0;
      last_load = (opc == 7'b0000011);
      if (wr && rd != 0) x[rd] = r;
      pc = npc;
      retired++;
    endfunction
  endclass

  // ---------------- random program generator ----------------
  class rv_progen;
    isa_t        isa;
    logic [31:0] prog[$];
    int          end_pc;

    function new(isa_t isa_i);
      isa = isa_i;
    endfunction

    function int rreg();                 // destination: x1..x15, sometimes x0
      return ($urandom_range(0, 15) == 0) ? 0 : $urandom_range(1, 15);
    endfunction
    function int sreg();
      return $urandom_range(0, 15);
    endfunction

    function void gen(input int n);
      int body_end, k, kind, off, sz;
      prog.delete();
      // prologue: x1..x31 random, x30 = 1024 (data and jalr base)
      for (int i = 1; i < 32; i++) begin
        prog.push_back(enc_u(20'($urandom), i, 7'b0110111));
        prog.push_back(enc_i($urandom_range(0, 4095) - 2048, i, 3'd0, i, 7'b0010011));
      end
      prog.push_back(enc_i(1024, 0, 3'd0, 30, 7'b0010011));
      body_end = prog.size() + n;
      while (prog.size() < body_end) begin
        k = prog.size();
        kind = $urandom_range(0, 99);
        if (kind < 30) begin                            // register-register
          int sel;
          logic [9:0] fs[$];
          fs = '{{7'h00,3'd0},{7'h20,3'd0},{7'h00,3'd1},{7'h00,3'd2},{7'h00,3'd3},
                 {7'h00,3'd4},{7'h00,3'd5},{7'h20,3'd5},{7'h00,3'd6},{7'h00,3'd7}};
          if (isa.zbkb) fs = {fs, {7'h30,3'd1},{7'h30,3'd5},{7'h20,3'd7},{7'h20,3'd6},
                              {7'h20,3'd4},{7'h04,3'd4},{7'h04,3'd7}};
          if (isa.zbkc) fs = {fs, {7'h05,3'd1},{7'h05,3'd3}};
          sel = $urandom_range(0, fs.size() - 1);
          prog.push_back(enc_r(fs[sel][9:3], sreg(), sreg(), fs[sel][2:0], rreg(), 7'b0110011));
        end else if (kind < 52) begin                   // immediate
          int f;
          f = $urandom_range(0, isa.zbkb ? 12 : 8);
          case (f)
            0, 1, 2, 3, 4, 5: begin
              logic [2:0] f3s[6];
              f3s = '{3'd0, 3'd2, 3'd3, 3'd4, 3'd6, 3'd7};
              prog.push_back(enc_i($urandom_range(0, 4095) - 2048, sreg(), f3s[f], rreg(), 7'b0010011));
            end
            6: prog.push_back(enc_r(7'h00, $urandom_range(0, 31), sreg(), 3'd1, rreg(), 7'b0010011));
            7: prog.push_back(enc_r(7'h00, $urandom_range(0, 31), sreg(), 3'd5, rreg(), 7'b0010011));
            8: prog.push_back(enc_r(7'h20, $urandom_range(0, 31), sreg(), 3'd5, rreg(), 7'b0010011));
            9: prog.push_back(enc_r(7'h30, $urandom_range(0, 31), sreg(), 3'd5, rreg(), 7'b0010011));
            10: prog.push_back(enc_i(12'h698, sreg(), 3'd5, rreg(), 7'b0010011));
            11: prog.push_back(enc_i(12'h687, sreg(), 3'd5, rreg(), 7'b0010011));
            default: prog.push_back(enc_i(12'h08F, sreg(), $urandom_range(0, 1) ? 3'd1 : 3'd5,
                                          rreg(), 7'b0010011));
          endcase
        end else if (kind < 56) begin                   // lui / auipc
          prog.push_back(enc_u(20'($urandom), rreg(), $urandom_range(0, 1) ? 7'b0110111 : 7'b0010111));
        end else if (kind < 76) begin                   // load / store
          int base, lo, hi, szsel;
          logic [2:0] f3;
          szsel = $urandom_range(0, 2);
          sz = 1 << szsel;
          base = $urandom_range(0, 1) ? 30 : 0;
          lo = (base == 30) ? -1024 : 0;
          hi = (base == 30) ? SAVE_BASE - 1024 - 4 : SAVE_BASE - 4;
          if (hi > 2047) hi = 2044;
          off = ($urandom_range(0, (hi - lo) / sz) * sz) + lo;
          if (kind < 66) begin
            f3 = 3'(szsel);
            if (szsel < 2 && $urandom_range(0, 1)) f3[2] = 1'b1;
            prog.push_back(enc_i(off, base, f3, rreg(), 7'b0000011));
          end else
            prog.push_back(enc_s(off, sreg(), base, 3'(szsel)));
        end else if (kind < 86 && isa.branches) begin   // forward branch
          logic [2:0] f3s[6];
          f3s = '{3'd0, 3'd1, 3'd4, 3'd5, 3'd6, 3'd7};
          off = 4 * $urandom_range(1, 6);
          if (k + off / 4 > body_end) off = 4 * (body_end - k);
          prog.push_back(enc_b(off, sreg(), sreg(), f3s[$urandom_range(0, 5)]));
        end else if (kind < 92) begin                   // forward jal
          off = 4 * $urandom_range(1, 5);
          if (k + off / 4 > body_end) off = 4 * (body_end - k);
          prog.push_back(enc_j(off, rreg()));
        end else if (kind < 96 && k + 2 <= body_end) begin // jalr over one, base x0 or x30
          if ($urandom_range(0, 1))
            prog.push_back(enc_i(4 * (k + 2), 0, 3'd0, rreg(), 7'b1100111));
          else
            prog.push_back(enc_i(4 * (k + 2) - 1024, 30, 3'd0, rreg(), 7'b1100111));
          prog.push_back(enc_r(7'h00, sreg(), sreg(), 3'd0, rreg(), 7'b0110011));
        end else if (isa.cmov) begin                    // conditional move
          prog.push_back(enc_r(7'h00, sreg(), sreg(), 3'd0, rreg(), 7'b0001011));
        end else begin
          prog.push_back(enc_r(7'h00, sreg(), sreg(), 3'd0, rreg(), 7'b0110011));
        end
      end
      // epilogue: store x1..x31
      for (int i = 1; i < 32; i++) prog.push_back(enc_s(SAVE_BASE + 4 * i, i, 0, 3'd2));
      end_pc = 4 * prog.size();
      prog.push_back(enc_j(0, 0));
    endfunction
  endclass

endpackage
