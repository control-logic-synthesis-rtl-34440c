// rv_core_2stage_tb -- self-checking testbench for rv_core_2stage.
//
// Runs NPROG random programs (see rv_tb_pkg) through the core and through
// the instruction-set reference model. For each program it checks that the
// core reaches the final jump-to-self after exactly the number of cycles the
// model predicts (one per instruction), then compares all 512 data
// memory words, which include the epilogue's dump of x1..x31, with the model.
// The pipeline never stalls, so it too runs one instruction per cycle.
module rv_core_2stage_tb;
  import rv_tb_pkg::*;

  localparam int NPROG = 12;
  localparam int NBODY = 300;
  localparam int JUMP_PENALTY = 0;

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

  rv_core_2stage  dut (.*);

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

  isa_t      isa;
  rv_progen  gen;
  rv_model   ref_m;
  int        cycles, expect_cycles, total_jumps, total_taken_pc;
  logic [31:0] dmem_init [MEMW];

  initial begin
    isa = '{zbkb: 1, zbkc: 1, branches: 1, cmov: 0};
    gen = new(isa);
    total_jumps = 0;
    for (int p = 0; p < NPROG; p++) begin
      gen.gen(NBODY);
      ref_m = new(isa);
      ref_m.prog = new[gen.prog.size()];
      foreach (gen.prog[i]) ref_m.prog[i] = gen.prog[i];
      for (int i = 0; i < 32; i++) ref_m.x[i] = '0;
      for (int i = 0; i < MEMW; i++) begin
        dmem_init[i] = $urandom;
        ref_m.mem[i] = dmem_init[i];
      end
      ref_m.pc = 0; ref_m.retired = 0; ref_m.jumps = 0;
      while (ref_m.pc != gen.end_pc && ref_m.retired < 100000) ref_m.step();
      expect_cycles = ref_m.retired + JUMP_PENALTY * ref_m.jumps;
      total_jumps += ref_m.jumps;

      // load program and data while in reset
      @(negedge clk);
      rst_n = 1'b0;
      foreach (gen.prog[i]) begin
        imem_we = 1'b1; imem_waddr = 10'(i); imem_wdata = gen.prog[i];
        dbg_we = 1'b1; dbg_addr = 10'(i % MEMW); dbg_wdata = dmem_init[i % MEMW];
        @(negedge clk);
      end
      for (int i = gen.prog.size(); i < MEMW; i++) begin
        imem_we = 1'b0; dbg_we = 1'b1; dbg_addr = 10'(i); dbg_wdata = dmem_init[i];
        @(negedge clk);
      end
      imem_we = 1'b0; dbg_we = 1'b0;
      @(negedge clk);
      rst_n = 1'b1;
      cycles = 0;
      while (pc_o != 32'(gen.end_pc) && cycles < 20000) begin
        @(posedge clk); #1;
        cycles++;
      end
      check(cycles == expect_cycles,
            $sformatf("prog %0d: end reached after %0d cycles, expected %0d", p, cycles, expect_cycles));
      repeat (4) @(negedge clk);
      for (int i = 0; i < MEMW; i++) begin
        dbg_addr = 10'(i);
        #1;
        check(dbg_rdata == ref_m.mem[i],
              $sformatf("prog %0d: mem[%0d] = %h, expected %h", p, i, dbg_rdata, ref_m.mem[i]));
      end
    end
    check(total_jumps > 0, "no jump executed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
