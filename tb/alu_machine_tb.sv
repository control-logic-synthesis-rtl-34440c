// alu_machine_tb -- self-checking testbench for alu_machine.
//
// Feeds one random instruction per cycle (biased towards reusing registers
// so that back-to-back and distance-2 dependencies are frequent) and runs the
// same stream through an instruction-at-a-time model of the architecture:
// regs[dest] <- regs[src1] op regs[src2]. The pipeline writes an instruction's
// result three cycles after it is presented, so after every clock edge the
// four registers must equal the model's registers after all instructions
// presented three or more cycles earlier. Also counts how often each bypass
// mux and the write-through path were needed, and fails if one never was.
// The registers start from random values loaded through the load port.
module alu_machine_tb;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic [1:0] op = '0, src1 = '0, src2 = '0, dest = '0, dbg_addr = '0;
  logic       dbg_we = 1'b0;
  logic [7:0] dbg_wdata = '0;
  logic [7:0] dbg_data;
  logic       fwd1_o, fwd2_o;
  int         checks = 0, failures = 0, n_fwd1 = 0, n_fwd2 = 0, n_dist2 = 0;

  alu_machine dut (.*);

  always #10 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [1:0] op, s1, s2, d; } ins_t;
  localparam int N = 2000;
  ins_t        prog [N + 3];
  logic [7:0]  hist [N + 4][4];   // hist[k] = registers after k instructions

  initial begin
    logic [7:0] r [4];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // load random starting values through the register load port
    for (int i = 0; i < 4; i++) begin
      dbg_we = 1'b1; dbg_addr = 2'(i); dbg_wdata = 8'($urandom_range(1, 255));
      r[i] = dbg_wdata;
      @(negedge clk);
    end
    dbg_we = 1'b0;
    for (int i = 0; i < 4; i++) begin
      dbg_addr = 2'(i);
      #1;
      checks++;
      if (dbg_data !== r[i]) failures++;
    end
    hist[0] = r;
    for (int k = 0; k < N + 3; k++) begin
      ins_t x;
      x.op = (k >= N) ? 2'b00 : 2'($urandom_range(0, 3));
      x.s1 = 2'($urandom); x.s2 = 2'($urandom); x.d = 2'($urandom);
      prog[k] = x;
      if (x.op != 2'b00) begin
        logic [7:0] a, b;
        a = r[x.s1]; b = r[x.s2];
        case (x.op)
          2'b01: r[x.d] = a + b;
          2'b10: r[x.d] = a & b;
          default: r[x.d] = a ^ b;
        endcase
      end
      hist[k + 1] = r;
    end
    @(negedge clk);
    for (int t = 0; t < N + 3; t++) begin
      op = prog[t].op; src1 = prog[t].s1; src2 = prog[t].s2; dest = prog[t].d;
      #1;
      if (fwd1_o) n_fwd1++;
      if (fwd2_o) n_fwd2++;
      if (t >= 2 && prog[t-2].op != 0 && (prog[t-2].d == src1 || prog[t-2].d == src2)
          && !(prog[t-1].op != 0 && prog[t-1].d == prog[t-2].d)) n_dist2++;
      // bypass selects must match the dependency on the instruction one ahead
      checks++;
      if (t >= 1 && (fwd1_o != (prog[t-1].op != 0 && prog[t-1].d == src1))) failures++;
      @(posedge clk); #1;
      // instructions 0..t-2 have now written back
      for (int i = 0; i < 4; i++) begin
        dbg_addr = 2'(i);
        #1;
        checks++;
        if (dbg_data !== hist[(t >= 2) ? t - 1 : 0][i]) begin
          failures++;
          if (failures < 20) $display("FAIL t=%0d r%0d = %h expected %h", t, i, dbg_data, hist[(t >= 2) ? t - 1 : 0][i]);
        end
      end
      @(negedge clk);
    end
    checks += 3;
    if (n_fwd1 == 0) failures++;
    if (n_fwd2 == 0) failures++;
    if (n_dist2 == 0) failures++;
    $display("bypass1=%0d bypass2=%0d distance-2 reads=%0d", n_fwd1, n_fwd2, n_dist2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
