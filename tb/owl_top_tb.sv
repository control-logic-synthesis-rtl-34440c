// owl_top_tb -- end-to-end testbench of owl_top at its default parameters.
//
// Exercises all six designs through the top's ports in the same run:
//  - the three RISC-V cores each run NPROG random programs of their own ISA,
//    loaded through their program ports and checked against the reference
//    model of rv_tb_pkg: cycles to reach the final instruction, then all 512
//    data words (including the dump of x1..x31) read through the debug ports;
//  - the AES accelerator encrypts the FIPS-197 C.1 vector and must finish in
//    10 cycles passing through all three round states;
//  - the ALU machine runs a random instruction stream against an
//    instruction-at-a-time model;
//  - the accumulator machine is driven through its transitions.
// It counts each mechanism the designs have -- taken and untaken branches,
// back-to-back register dependencies and load-use pairs handled by the
// pipelines' forwarding, jumps (a flush in the constant-time core), CMOV
// moving and keeping, the three AES round states, both ALU-machine bypasses,
// and the four accumulator transitions -- and fails for any that never
// happened.
module owl_top_tb;
  import rv_tb_pkg::*;

  localparam int NPROG = 4;
  localparam int NBODY = 300;

  logic clk = 1'b0, rst_n = 1'b0;

  logic [9:0]  imem_waddr = '0;
  logic [31:0] imem_wdata [3];
  logic        imem_we [3];
  logic [9:0]  dbg_addr = '0;
  logic        dbg_we = 1'b0;
  logic [31:0] dbg_wdata [3];
  logic [31:0] dbg_rdata [3];
  logic [31:0] pc [3];

  logic         aes_start = 1'b0, aes_done;
  logic [127:0] aes_key_in = '0, aes_plaintext = '0, aes_ciphertext;
  logic [1:0]   aes_state;

  logic [1:0] am_op = '0, am_src1 = '0, am_src2 = '0, am_dest = '0, am_dbg_addr = '0;
  logic [7:0] am_dbg_data, am_dbg_wdata = '0;
  logic       am_dbg_we = 1'b0;
  logic       am_fwd1, am_fwd2;

  logic       acc_reset = 1'b0, acc_go = 1'b0, acc_stop = 1'b0;
  logic [1:0] acc_val = '0, acc_state;
  logic [7:0] acc_acc;

  int checks = 0, failures = 0;

  owl_top dut (
    .clk, .rst_n,
    .sc_imem_we(imem_we[0]), .sc_imem_waddr(imem_waddr), .sc_imem_wdata(imem_wdata[0]),
    .sc_dbg_addr(dbg_addr), .sc_dbg_we(dbg_we), .sc_dbg_wdata(dbg_wdata[0]),
    .sc_dbg_rdata(dbg_rdata[0]), .sc_pc(pc[0]),
    .p2_imem_we(imem_we[1]), .p2_imem_waddr(imem_waddr), .p2_imem_wdata(imem_wdata[1]),
    .p2_dbg_addr(dbg_addr), .p2_dbg_we(dbg_we), .p2_dbg_wdata(dbg_wdata[1]),
    .p2_dbg_rdata(dbg_rdata[1]), .p2_pc(pc[1]),
    .ct_imem_we(imem_we[2]), .ct_imem_waddr(imem_waddr), .ct_imem_wdata(imem_wdata[2]),
    .ct_dbg_addr(dbg_addr), .ct_dbg_we(dbg_we), .ct_dbg_wdata(dbg_wdata[2]),
    .ct_dbg_rdata(dbg_rdata[2]), .ct_pc(pc[2]),
    .aes_start, .aes_key_in, .aes_plaintext, .aes_ciphertext, .aes_done, .aes_state,
    .am_op, .am_src1, .am_src2, .am_dest, .am_dbg_addr, .am_dbg_we, .am_dbg_wdata, .am_dbg_data, .am_fwd1, .am_fwd2,
    .acc_reset, .acc_go, .acc_stop, .acc_val, .acc_acc, .acc_state);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL %s", s); end
  endtask

  // mechanism counters
  int m_branch_taken, m_branch_fall, m_dep1_p2, m_load_use_p2, m_dep1_ct, m_flush_ct;
  int m_cmov_move, m_cmov_keep, m_aes_first, m_aes_mid, m_aes_final;
  int m_am_fwd1, m_am_fwd2, m_acc [4];

  isa_t      isa [3];
  rv_progen  gen [3];
  rv_model   mdl [3];
  int        penalty [3] = '{0, 0, 1};
  string     cname [3] = '{"single-cycle", "two-stage", "constant-time"};

  // ---------------- the three cores ----------------
  task automatic run_cores(input int p);
    logic [31:0] dinit [3][MEMW];
    int          expect_c [3], got_c [3], maxlen, cyc;
    bit          reached [3];
    for (int c = 0; c < 3; c++) begin
      gen[c].gen(NBODY);
      mdl[c] = new(isa[c]);
      mdl[c].prog = new[gen[c].prog.size()];
      foreach (gen[c].prog[i]) mdl[c].prog[i] = gen[c].prog[i];
      for (int i = 0; i < MEMW; i++) begin
        dinit[c][i] = $urandom;
        mdl[c].mem[i] = dinit[c][i];
      end
      for (int i = 0; i < 32; i++) mdl[c].x[i] = '0;
      mdl[c].pc = 0;
      while (mdl[c].pc != gen[c].end_pc && mdl[c].retired < 100000) mdl[c].step();
      expect_c[c] = mdl[c].retired + penalty[c] * mdl[c].jumps;
    end
    m_branch_taken += mdl[0].n_branch_taken + mdl[1].n_branch_taken;
    m_branch_fall  += mdl[0].n_branch_fall + mdl[1].n_branch_fall;
    m_dep1_p2      += mdl[1].n_dep1;
    m_load_use_p2  += mdl[1].n_load_use;
    m_dep1_ct      += mdl[2].n_dep1;
    m_flush_ct     += mdl[2].jumps;
    m_cmov_move    += mdl[2].n_cmov_move;
    m_cmov_keep    += mdl[2].n_cmov_keep;

    @(negedge clk);
    rst_n = 1'b0;
    maxlen = MEMW;
    for (int c = 0; c < 3; c++) if (gen[c].prog.size() > maxlen) maxlen = gen[c].prog.size();
    for (int i = 0; i < maxlen; i++) begin
      imem_waddr = 10'(i);
      for (int c = 0; c < 3; c++) begin
        imem_we[c] = (i < gen[c].prog.size());
        imem_wdata[c] = imem_we[c] ? gen[c].prog[i] : 32'd0;
        dbg_wdata[c] = dinit[c][i % MEMW];
      end
      dbg_we = (i < MEMW);
      dbg_addr = 10'(i % MEMW);
      @(negedge clk);
    end
    for (int c = 0; c < 3; c++) imem_we[c] = 1'b0;
    dbg_we = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    reached = '{0, 0, 0};
    cyc = 0;
    while (!(reached[0] && reached[1] && reached[2]) && cyc < 20000) begin
      @(posedge clk); #1;
      cyc++;
      for (int c = 0; c < 3; c++)
        if (!reached[c] && pc[c] == 32'(gen[c].end_pc)) begin
          reached[c] = 1'b1;
          got_c[c] = cyc;
        end
    end
    for (int c = 0; c < 3; c++)
      chk(reached[c] && got_c[c] == expect_c[c],
          $sformatf("%s core, program %0d: %0d cycles, expected %0d", cname[c], p, got_c[c], expect_c[c]));
    repeat (4) @(negedge clk);
    for (int i = 0; i < MEMW; i++) begin
      dbg_addr = 10'(i);
      #1;
      for (int c = 0; c < 3; c++)
        chk(dbg_rdata[c] == mdl[c].mem[i],
            $sformatf("%s core, program %0d: word %0d = %h, expected %h", cname[c], p, i,
                      dbg_rdata[c], mdl[c].mem[i]));
    end
  endtask

  // ---------------- AES ----------------
  task automatic run_aes();
    int cyc;
    @(negedge clk);
    aes_key_in = 128'h000102030405060708090a0b0c0d0e0f;
    aes_plaintext = 128'h00112233445566778899aabbccddeeff;
    aes_start = 1'b1;
    cyc = 0;
    #1;
    do begin
      case (aes_state) 2'b00: m_aes_first++; 2'b01: m_aes_mid++; 2'b10: m_aes_final++; default: ; endcase
      @(posedge clk); #1;
      aes_start = 1'b0;
      cyc++;
    end while (!aes_done && cyc < 40);
    chk(cyc == 10, $sformatf("AES latency %0d, expected 10", cyc));
    chk(aes_ciphertext == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "AES FIPS-197 C.1 ciphertext");
  endtask

  // ---------------- ALU machine ----------------
  task automatic run_alu_machine();
    logic [7:0] r [4];
    logic [1:0] o, s1, s2, d;
    @(negedge clk);
    am_op = 2'b00;
    for (int i = 0; i < 4; i++) begin   // random starting values
      am_dbg_we = 1'b1; am_dbg_addr = 2'(i); am_dbg_wdata = 8'($urandom_range(1, 255));
      r[i] = am_dbg_wdata;
      @(negedge clk);
    end
    am_dbg_we = 1'b0;
    for (int t = 0; t < 500 + 3; t++) begin
      @(negedge clk);
      o = (t < 500) ? 2'($urandom) : 2'b00;
      s1 = 2'($urandom); s2 = 2'($urandom); d = 2'($urandom);
      am_op = o; am_src1 = s1; am_src2 = s2; am_dest = d;
      #1;
      if (am_fwd1) m_am_fwd1++;
      if (am_fwd2) m_am_fwd2++;
      case (o)
        2'b01: r[d] = r[s1] + r[s2];
        2'b10: r[d] = r[s1] & r[s2];
        2'b11: r[d] = r[s1] ^ r[s2];
        default: ;
      endcase
    end
    repeat (2) @(negedge clk);
    for (int i = 0; i < 4; i++) begin
      am_dbg_addr = 2'(i);
      #1;
      chk(am_dbg_data == r[i], $sformatf("ALU machine r%0d = %h, expected %h", i, am_dbg_data, r[i]));
    end
  endtask

  // ---------------- accumulator ----------------
  task automatic run_acc();
    logic [1:0] st;
    logic [7:0] a;
    st = 2'd0; a = '0;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      acc_reset = ($urandom_range(0, 3) == 0); acc_go = $urandom_range(0, 1);
      acc_stop = ($urandom_range(0, 7) == 0); acc_val = 2'($urandom);
      case (st)
        2'd0: if (acc_go) begin st = 2'd1; a += 8'(acc_val); m_acc[0]++; end
        2'd1: if (acc_stop) begin st = 2'd2; m_acc[2]++; end
              else begin a += 8'(acc_val); m_acc[1]++; end
        default: if (acc_reset) begin st = 2'd0; a = '0; m_acc[3]++; end
      endcase
      @(posedge clk); #1;
      chk(acc_state == st && acc_acc == a, $sformatf("accumulator t=%0d", t));
    end
  endtask

  initial begin
    isa[0] = '{zbkb: 1, zbkc: 1, branches: 1, cmov: 0};
    isa[1] = '{zbkb: 1, zbkc: 1, branches: 1, cmov: 0};
    isa[2] = '{zbkb: 1, zbkc: 0, branches: 0, cmov: 1};
    for (int c = 0; c < 3; c++) gen[c] = new(isa[c]);
    for (int c = 0; c < 3; c++) begin imem_we[c] = 1'b0; imem_wdata[c] = '0; dbg_wdata[c] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_aes();
    run_alu_machine();
    run_acc();
    for (int p = 0; p < NPROG; p++) run_cores(p);
    run_aes();

    $display("branches taken %0d, not taken %0d", m_branch_taken, m_branch_fall);
    $display("two-stage forwarding: dependencies %0d, load-use %0d", m_dep1_p2, m_load_use_p2);
    $display("constant-time core: dependencies %0d, jump flushes %0d, cmov move %0d keep %0d",
             m_dep1_ct, m_flush_ct, m_cmov_move, m_cmov_keep);
    $display("AES states first %0d, intermediate %0d, final %0d", m_aes_first, m_aes_mid, m_aes_final);
    $display("ALU machine bypasses %0d %0d", m_am_fwd1, m_am_fwd2);
    $display("accumulator transitions %0d %0d %0d %0d", m_acc[0], m_acc[1], m_acc[2], m_acc[3]);
    chk(m_branch_taken > 0, "no branch taken");
    chk(m_branch_fall > 0, "no branch fell through");
    chk(m_dep1_p2 > 0, "two-stage forwarding never used");
    chk(m_load_use_p2 > 0, "two-stage load-use forwarding never used");
    chk(m_dep1_ct > 0, "constant-time core forwarding never used");
    chk(m_flush_ct > 0, "constant-time core never flushed");
    chk(m_cmov_move > 0, "CMOV never moved");
    chk(m_cmov_keep > 0, "CMOV never kept");
    chk(m_aes_first > 0 && m_aes_mid > 0 && m_aes_final > 0, "an AES round state never seen");
    chk(m_am_fwd1 > 0 && m_am_fwd2 > 0, "an ALU-machine bypass never used");
    chk(m_acc[0] > 0 && m_acc[1] > 0 && m_acc[2] > 0 && m_acc[3] > 0, "an accumulator transition never taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
