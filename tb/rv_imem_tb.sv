// rv_imem_tb -- self-checking testbench for rv_imem.
//
// Loads random words through the write port, then fetches every word by
// byte address (with random low bits, which must be ignored) and compares.
module rv_imem_tb;
  logic        clk = 1'b0;
  logic [31:0] addr, rdata, wdata;
  logic        we = 1'b0;
  logic [9:0]  waddr;
  logic [31:0] shadow [1024];
  int          checks = 0, failures = 0;

  rv_imem #(.WORDS(1024)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 10'(i); wdata = $urandom; shadow[i] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    for (int i = 0; i < 1024; i++) begin
      addr = {20'd0, 10'(i), 2'($urandom)};
      #1;
      checks++;
      if (rdata !== shadow[i]) begin
        failures++;
        if (failures < 20) $display("FAIL word %0d: %h expected %h", i, rdata, shadow[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
