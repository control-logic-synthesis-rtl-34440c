// rv_isa_variants_tb -- the instruction-set variants of the two RISC-V cores.
//
// Builds the single-cycle and the two-stage core in three ISA variants each:
// RV32I only (ZBKB = 0, ZBKC = 0), RV32I + Zbkb and RV32I + Zbkc. The six
// cores share the program-load and debug-read ports and run the same random
// programs side by side. The programs are drawn from the full RV32I + Zbkb +
// Zbkc instruction set, so in a reduced variant the missing extension's
// instructions must do nothing (no register write), exactly as the
// instruction-set model of that variant predicts. For every core and program
// the testbench checks the cycle count to the final jump-to-self (one per
// instruction) and all 512 data-memory words, which include a dump of
// x1..x31, against the model of the core's own variant.
module rv_isa_variants_tb;
  import rv_tb_pkg::*;

  localparam int NPROG = 6;
  localparam int NBODY = 300;
  localparam int NV = 3;                      // variants
  localparam bit VKB [NV] = '{1'b0, 1'b1, 1'b0};
  localparam bit VKC [NV] = '{1'b0, 1'b0, 1'b1};

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        imem_we = 1'b0;
  logic [9:0]  imem_waddr = '0;
  logic [31:0] imem_wdata = '0;
  logic [9:0]  dbg_addr = '0;
  logic        dbg_we = 1'b0;
  logic [31:0] dbg_wdata = '0;
  logic [31:0] rdata [2 * NV];               // cores 0..2 single-cycle, 3..5 two-stage
  logic [31:0] pc    [2 * NV];

  int checks = 0, failures = 0;

  for (genvar v = 0; v < NV; v++) begin : g_var
    rv_core_single #(.ZBKB(VKB[v]), .ZBKC(VKC[v])) u_sc (
      .clk, .rst_n, .imem_we, .imem_waddr, .imem_wdata,
      .dbg_addr, .dbg_we, .dbg_wdata, .dbg_rdata(rdata[v]), .pc_o(pc[v]));
    rv_core_2stage #(.ZBKB(VKB[v]), .ZBKC(VKC[v])) u_p2 (
      .clk, .rst_n, .imem_we, .imem_waddr, .imem_wdata,
      .dbg_addr, .dbg_we, .dbg_wdata, .dbg_rdata(rdata[NV + v]), .pc_o(pc[NV + v]));
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
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

  rv_progen    gen;
  rv_model     ref_m [NV];
  logic [31:0] dmem_init [MEMW];
  int          cycles, done_at [2 * NV];
  int          n_differ;                      // words where the variants' results differ

  initial begin
    isa_t full, vis;
    full = '{zbkb: 1, zbkc: 1, branches: 1, cmov: 0};
    gen = new(full);
    n_differ = 0;
    for (int p = 0; p < NPROG; p++) begin
      gen.gen(NBODY);
      for (int i = 0; i < MEMW; i++) dmem_init[i] = $urandom;
      for (int v = 0; v < NV; v++) begin
        vis = '{zbkb: VKB[v], zbkc: VKC[v], branches: 1, cmov: 0};
        ref_m[v] = new(vis);
        ref_m[v].prog = new[gen.prog.size()];
        foreach (gen.prog[i]) ref_m[v].prog[i] = gen.prog[i];
        for (int i = 0; i < 32; i++) ref_m[v].x[i] = '0;
        for (int i = 0; i < MEMW; i++) ref_m[v].mem[i] = dmem_init[i];
        ref_m[v].pc = 0; ref_m[v].retired = 0; ref_m[v].jumps = 0;
        while (ref_m[v].pc != gen.end_pc && ref_m[v].retired < 100000) ref_m[v].step();
      end
      for (int i = 0; i < MEMW; i++)
        if (ref_m[0].mem[i] != ref_m[1].mem[i] || ref_m[0].mem[i] != ref_m[2].mem[i]) n_differ++;

      // load program and data into all six cores while in reset
      @(negedge clk);
      rst_n = 1'b0;
      foreach (gen.prog[i]) begin
        imem_we = 1'b1; imem_waddr = 10'(i); imem_wdata = gen.prog[i];
        @(negedge clk);
      end
      imem_we = 1'b0;
      for (int i = 0; i < MEMW; i++) begin
        dbg_we = 1'b1; dbg_addr = 10'(i); dbg_wdata = dmem_init[i];
        @(negedge clk);
      end
      dbg_we = 1'b0;
      @(negedge clk);
      rst_n = 1'b1;
      foreach (done_at[c]) done_at[c] = -1;
      cycles = 0;
      while (cycles < 20000) begin
        bit all_done;
        all_done = 1'b1;
        foreach (done_at[c]) begin
          if (done_at[c] < 0 && pc[c] == 32'(gen.end_pc)) done_at[c] = cycles;
          if (done_at[c] < 0) all_done = 1'b0;
        end
        if (all_done) break;
        @(posedge clk); #1;
        cycles++;
      end
      repeat (4) @(negedge clk);
      for (int c = 0; c < 2 * NV; c++)
        check(done_at[c] == ref_m[c % NV].retired,
              $sformatf("prog %0d core %0d: end after %0d cycles, expected %0d",
                        p, c, done_at[c], ref_m[c % NV].retired));
      for (int i = 0; i < MEMW; i++) begin
        dbg_addr = 10'(i);
        #1;
        for (int c = 0; c < 2 * NV; c++)
          check(rdata[c] == ref_m[c % NV].mem[i],
                $sformatf("prog %0d core %0d: mem[%0d] = %h, expected %h",
                          p, c, i, rdata[c], ref_m[c % NV].mem[i]));
      end
    end
    // the variants must actually compute different things on these programs
    $display("data words that differ between the ISA variants: %0d", n_differ);
    check(n_differ > 0, "the ISA variants never differed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
