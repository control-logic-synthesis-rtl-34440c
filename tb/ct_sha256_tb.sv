// ct_sha256_tb -- SHA-256 on the constant-time core, timing against input length.
//
// The constant-time core has no conditional branches, so its programs can only
// loop by choosing a jump target with CMOV (target <- loop start while the
// counter is non-zero, else the exit) and jumping through it with JALR. This
// testbench assembles such a SHA-256 program itself: a message-schedule loop
// (48 iterations), a round loop unrolled eight rounds deep with the working
// variables renamed instead of moved (8 iterations), and straight-line code to
// turn the message bytes into big-endian words (REV8) and to add the result
// into the hash. Rotations use the Zbkb RORI, Ch uses ANDN.
//
// Data memory layout (byte addresses): round constants K at 0x000, hash value
// H at 0x100 (the digest is left there), message schedule W at 0x200 and the
// padded message block at 0x300. The message padding (0x80, zeros, bit length)
// is done by the testbench, so every input of 0..55 bytes is one block.
//
// K and the initial H are not typed in: they are the first 32 fractional bits
// of the cube roots of the first 64 primes and of the square roots of the
// first 8 primes. They are computed here with a floating-point estimate that
// is then corrected with exact integer arithmetic. A reference SHA-256 written
// as a plain function checks itself on the "abc" test vector first.
//
// For every input length from 4 to 32 bytes (random contents) the testbench
// checks the digest the core leaves in memory against the reference function,
// checks the cycle count to the final jump-to-self against the instruction-set
// model (one cycle per instruction, one more per jump), and checks that the
// cycle count is the same for every length. CMOV must both move (loop back) and
// keep (leave the loop) during the runs.
module ct_sha256_tb;
  import rv_pkg::*;
  import rv_tb_pkg::*;

  localparam int LEN_MIN = 4;
  localparam int LEN_MAX = 32;
  localparam int K_BASE = 'h000, H_BASE = 'h100, W_BASE = 'h200, M_BASE = 'h300;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        imem_we = 1'b0;
  logic [9:0]  imem_waddr = '0;
  logic [31:0] imem_wdata = '0;
  logic [9:0]  dbg_addr = '0;
  logic        dbg_we = 1'b0;
  logic [31:0] dbg_wdata = '0;
  logic [31:0] dbg_rdata, pc_o;

  int checks = 0, failures = 0;

  ct_core dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---------------- constants ----------------
  function automatic bit is_prime(input int n);
    for (int d = 2; d * d <= n; d++) if (n % d == 0) return 1'b0;
    return n >= 2;
  endfunction

  // floor(p^(1/r) * 2^32) mod 2^32 for r = 2 or 3, exact
  function automatic logic [31:0] root_frac(input int p, input int r);
    logic [127:0] k, lim;
    real est;
    int ip;
    est = (r == 2) ? $sqrt(real'(p)) : $pow(real'(p), 1.0 / 3.0);
    ip = $rtoi(est);
    k = (128'(ip) << 32) + 128'(longint'((est - real'(ip)) * 4294967296.0));
    lim = 128'(p) << (32 * r);
    if (r == 2) begin
      while (k * k > lim) k--;
      while ((k + 1) * (k + 1) <= lim) k++;
    end else begin
      while (k * k * k > lim) k--;
      while ((k + 1) * (k + 1) * (k + 1) <= lim) k++;
    end
    return k[31:0];
  endfunction

  logic [31:0] K [64];
  logic [31:0] H0 [8];

  function automatic void make_constants();
    int n = 0;
    for (int p = 2; n < 64; p++)
      if (is_prime(p)) begin
        K[n] = root_frac(p, 3);
        if (n < 8) H0[n] = root_frac(p, 2);
        n++;
      end
  endfunction

  // ---------------- reference SHA-256 (one padded block) ----------------
  typedef logic [7:0] block_t [64];
  typedef logic [31:0] digest_t [8];

  function automatic logic [31:0] rotr(input logic [31:0] x, input int n);
    return (x >> n) | (x << (32 - n));
  endfunction

  function automatic block_t pad(input logic [7:0] msg [], input int len);
    block_t b;
    logic [63:0] bits;
    foreach (b[i]) b[i] = 8'h00;
    for (int i = 0; i < len; i++) b[i] = msg[i];
    b[len] = 8'h80;
    bits = 64'(len) * 8;
    for (int i = 0; i < 8; i++) b[56 + i] = bits[63 - 8 * i -: 8];
    return b;
  endfunction

  function automatic digest_t sha256_ref(input block_t b);
    logic [31:0] w [64];
    logic [31:0] v [8];
    logic [31:0] t1, t2;
    digest_t d;
    for (int i = 0; i < 16; i++) w[i] = {b[4*i], b[4*i+1], b[4*i+2], b[4*i+3]};
    for (int i = 16; i < 64; i++)
      w[i] = w[i-16] + (rotr(w[i-15], 7) ^ rotr(w[i-15], 18) ^ (w[i-15] >> 3))
           + w[i-7] + (rotr(w[i-2], 17) ^ rotr(w[i-2], 19) ^ (w[i-2] >> 10));
    for (int i = 0; i < 8; i++) v[i] = H0[i];
    for (int i = 0; i < 64; i++) begin
      t1 = v[7] + (rotr(v[4], 6) ^ rotr(v[4], 11) ^ rotr(v[4], 25))
         + ((v[4] & v[5]) ^ (~v[4] & v[6])) + K[i] + w[i];
      t2 = (rotr(v[0], 2) ^ rotr(v[0], 13) ^ rotr(v[0], 22))
         + ((v[0] & v[1]) ^ (v[0] & v[2]) ^ (v[1] & v[2]));
      v[7] = v[6]; v[6] = v[5]; v[5] = v[4]; v[4] = v[3] + t1;
      v[3] = v[2]; v[2] = v[1]; v[1] = v[0]; v[0] = t1 + t2;
    end
    for (int i = 0; i < 8; i++) d[i] = H0[i] + v[i];
    return d;
  endfunction

  // ---------------- program ----------------
  logic [31:0] prog [$];
  int          end_pc;

  localparam int T1 = 1, T2 = 2, T3 = 3, T4 = 4, CNT = 5, TGT = 6, TLOOP = 7, PTR = 8;

  function automatic void emit(input logic [31:0] w);
    prog.push_back(w);
  endfunction
  function automatic void addi(input int rd, input int rs1, input int imm);
    emit(enc_i(imm, rs1, 3'b000, rd, OPC_OPIMM));
  endfunction
  function automatic void srli(input int rd, input int rs1, input int sh);
    emit(enc_i(sh, rs1, 3'b101, rd, OPC_OPIMM));
  endfunction
  function automatic void rori(input int rd, input int rs1, input int sh);
    emit(enc_i('h600 | sh, rs1, 3'b101, rd, OPC_OPIMM));
  endfunction
  function automatic void rev8(input int rd, input int rs1);
    emit(enc_i('h698, rs1, 3'b101, rd, OPC_OPIMM));
  endfunction
  function automatic void lw(input int rd, input int off, input int rs1);
    emit(enc_i(off, rs1, 3'b010, rd, OPC_LOAD));
  endfunction
  function automatic void sw(input int rs2, input int off, input int rs1);
    emit(enc_s(off, rs2, rs1, 3'b010));
  endfunction
  function automatic void op(input logic [6:0] f7, input logic [2:0] f3, input int rd,
                             input int rs1, input int rs2);
    emit(enc_r(f7, rs2, rs1, f3, rd, OPC_OP));
  endfunction
  function automatic void add(input int rd, input int rs1, input int rs2);
    op(7'b0000000, 3'b000, rd, rs1, rs2);
  endfunction
  function automatic void xor_(input int rd, input int rs1, input int rs2);
    op(7'b0000000, 3'b100, rd, rs1, rs2);
  endfunction
  function automatic void and_(input int rd, input int rs1, input int rs2);
    op(7'b0000000, 3'b111, rd, rs1, rs2);
  endfunction
  function automatic void andn(input int rd, input int rs1, input int rs2);
    op(7'b0100000, 3'b111, rd, rs1, rs2);
  endfunction
  function automatic void cmov(input int rd, input int rs1, input int rs2);
    emit(enc_r(7'b0000000, rs2, rs1, 3'b000, rd, OPC_CMOV));
  endfunction

  // counter step and branch-free loop back: jump to loop_pc while CNT != 0
  function automatic void loop_tail(input int loop_pc);
    addi(CNT, CNT, -1);
    addi(TLOOP, 0, loop_pc);
    addi(TGT, 0, 4 * (prog.size() + 3));     // address after the JALR
    cmov(TGT, TLOOP, CNT);
    emit(enc_i(0, TGT, 3'b000, 0, OPC_JALR));
  endfunction

  // register holding working variable k (a = 0 .. h = 7) in unrolled round j
  function automatic int var_reg(input int k, input int j);
    return 10 + ((k - j + 8) % 8);
  endfunction

  function automatic void build_program();
    int loop_pc;
    prog.delete();
    // message block: little-endian bytes to big-endian words W[0..15]
    for (int j = 0; j < 16; j++) begin
      lw(T1, M_BASE + 4 * j, 0);
      rev8(T1, T1);
      sw(T1, W_BASE + 4 * j, 0);
    end
    // message schedule, W[16..63]
    addi(PTR, 0, W_BASE + 64);
    addi(CNT, 0, 48);
    loop_pc = 4 * prog.size();
    lw(T1, -60, PTR);                          // W[i-15]
    rori(T2, T1, 7); rori(T3, T1, 18); xor_(T2, T2, T3); srli(T3, T1, 3); xor_(T2, T2, T3);
    lw(T1, -8, PTR);                           // W[i-2]
    rori(T3, T1, 17); rori(T4, T1, 19); xor_(T3, T3, T4); srli(T4, T1, 10); xor_(T3, T3, T4);
    add(T2, T2, T3);
    lw(T1, -64, PTR); add(T2, T2, T1);         // W[i-16]
    lw(T1, -28, PTR); add(T2, T2, T1);         // W[i-7]
    sw(T2, 0, PTR);
    addi(PTR, PTR, 4);
    loop_tail(loop_pc);
    // working variables from H
    for (int k = 0; k < 8; k++) lw(10 + k, H_BASE + 4 * k, 0);
    // 64 rounds: 8 iterations of 8 unrolled rounds; PTR walks K (and W at +0x200)
    addi(PTR, 0, K_BASE);
    addi(CNT, 0, 8);
    loop_pc = 4 * prog.size();
    for (int j = 0; j < 8; j++) begin
      int a, b, c, d, e, f, g, h;
      a = var_reg(0, j); b = var_reg(1, j); c = var_reg(2, j); d = var_reg(3, j);
      e = var_reg(4, j); f = var_reg(5, j); g = var_reg(6, j); h = var_reg(7, j);
      rori(T1, e, 6); rori(T2, e, 11); xor_(T1, T1, T2); rori(T2, e, 25); xor_(T1, T1, T2);
      and_(T2, e, f); andn(T3, g, e); xor_(T2, T2, T3);
      add(h, h, T1); add(h, h, T2);
      lw(T1, 4 * j, PTR); add(h, h, T1);                    // K[i]
      lw(T1, W_BASE - K_BASE + 4 * j, PTR); add(h, h, T1);  // W[i]; h = T1
      add(d, d, h);
      rori(T1, a, 2); rori(T2, a, 13); xor_(T1, T1, T2); rori(T2, a, 22); xor_(T1, T1, T2);
      and_(T2, a, b); and_(T3, a, c); xor_(T2, T2, T3); and_(T3, b, c); xor_(T2, T2, T3);
      add(h, h, T1); add(h, h, T2);                         // h = T1 + T2, the new a
    end
    addi(PTR, PTR, 32);
    loop_tail(loop_pc);
    // H += working variables
    for (int k = 0; k < 8; k++) begin
      lw(T1, H_BASE + 4 * k, 0); add(T1, T1, 10 + k); sw(T1, H_BASE + 4 * k, 0);
    end
    end_pc = 4 * prog.size();
    emit(enc_j(0, 0));
  endfunction

  // ---------------- run ----------------
  isa_t        isa;
  rv_model     ref_m;
  logic [31:0] dmem_init [MEMW];
  int          cycles, expect_cycles, first_cycles;
  int          n_cmov_move, n_cmov_keep;

  initial begin
    logic [7:0] msg [];
    block_t     blk;
    digest_t    dg;

    isa = '{zbkb: 1, zbkc: 0, branches: 0, cmov: 1};
    make_constants();

    // reference check: SHA-256("abc")
    msg = new[3];
    msg[0] = "a"; msg[1] = "b"; msg[2] = "c";
    dg = sha256_ref(pad(msg, 3));
    check({dg[0], dg[1], dg[2], dg[3], dg[4], dg[5], dg[6], dg[7]} ==
          256'hba7816bf_8f01cfea_414140de_5dae2223_b00361a3_96177a9c_b410ff61_f20015ad,
          "reference SHA-256 of \"abc\"");

    build_program();
    $display("SHA-256 program: %0d instructions", prog.size());
    n_cmov_move = 0; n_cmov_keep = 0; first_cycles = -1;

    for (int len = LEN_MIN; len <= LEN_MAX; len++) begin
      msg = new[len];
      foreach (msg[i]) msg[i] = 8'($urandom);
      blk = pad(msg, len);
      dg = sha256_ref(blk);

      foreach (dmem_init[i]) dmem_init[i] = '0;
      for (int i = 0; i < 64; i++) dmem_init[K_BASE / 4 + i] = K[i];
      for (int i = 0; i < 8; i++) dmem_init[H_BASE / 4 + i] = H0[i];
      for (int i = 0; i < 16; i++)
        dmem_init[M_BASE / 4 + i] = {blk[4*i+3], blk[4*i+2], blk[4*i+1], blk[4*i]};

      // instruction-set model: expected cycle count
      ref_m = new(isa);
      ref_m.prog = new[prog.size()];
      foreach (prog[i]) ref_m.prog[i] = prog[i];
      for (int i = 0; i < 32; i++) ref_m.x[i] = '0;
      foreach (dmem_init[i]) ref_m.mem[i] = dmem_init[i];
      ref_m.pc = 0; ref_m.retired = 0; ref_m.jumps = 0;
      ref_m.n_cmov_move = 0; ref_m.n_cmov_keep = 0;
      while (ref_m.pc != end_pc && ref_m.retired < 100000) ref_m.step();
      expect_cycles = ref_m.retired + ref_m.jumps;   // one flushed slot per jump
      n_cmov_move += ref_m.n_cmov_move;
      n_cmov_keep += ref_m.n_cmov_keep;

      // load program and data while in reset
      @(negedge clk);
      rst_n = 1'b0;
      foreach (prog[i]) begin
        imem_we = 1'b1; imem_waddr = 10'(i); imem_wdata = prog[i];
        @(negedge clk);
      end
      imem_we = 1'b0;
      foreach (dmem_init[i]) begin
        dbg_we = 1'b1; dbg_addr = 10'(i); dbg_wdata = dmem_init[i];
        @(negedge clk);
      end
      dbg_we = 1'b0;
      @(negedge clk);
      rst_n = 1'b1;
      cycles = 0;
      while (pc_o != 32'(end_pc) && cycles < 20000) begin
        @(posedge clk); #1;
        cycles++;
      end
      check(cycles == expect_cycles,
            $sformatf("len %0d: %0d cycles, model predicts %0d", len, cycles, expect_cycles));
      if (first_cycles < 0) first_cycles = cycles;
      check(cycles == first_cycles,
            $sformatf("len %0d: %0d cycles, but %0d for length %0d", len, cycles, first_cycles, LEN_MIN));
      repeat (4) @(negedge clk);
      for (int i = 0; i < 8; i++) begin
        dbg_addr = 10'(H_BASE / 4 + i);
        #1;
        check(dbg_rdata == dg[i],
              $sformatf("len %0d: H[%0d] = %h, expected %h", len, i, dbg_rdata, dg[i]));
      end
    end
    $display("cycles per hash: %0d for every length %0d..%0d; CMOV moved %0d, kept %0d",
             first_cycles, LEN_MIN, LEN_MAX, n_cmov_move, n_cmov_keep);
    check(n_cmov_move > 0, "CMOV never moved");
    check(n_cmov_keep > 0, "CMOV never kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
