// rv_regfile_tb -- self-checking testbench for rv_regfile.
//
// Two instances, without and with write bypass, receive the same random
// writes and reads; both are compared each cycle with a shadow array kept
// here. Checks that x0 stays zero, that without bypass a same-cycle read
// returns the old value and with bypass the value being written.
module rv_regfile_tb;
  logic        clk = 1'b0;
  logic [4:0]  raddr1, raddr2, waddr;
  logic [31:0] a1, a2, b1, b2, wdata;
  logic        we;
  logic [31:0] shadow [32];
  int          checks = 0, failures = 0, bypass_seen = 0;

  rv_regfile #(.BYPASS(1'b0)) dut_nb (.clk, .raddr1, .rdata1(a1), .raddr2, .rdata2(a2), .we, .waddr, .wdata);
  rv_regfile #(.BYPASS(1'b1)) dut_b  (.clk, .raddr1, .rdata1(b1), .raddr2, .rdata2(b2), .we, .waddr, .wdata);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end
  endtask

  initial begin
    logic [31:0] e1, e2;
    // initialise every register
    we = 1'b1;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      waddr = 5'(i); wdata = $urandom;
      shadow[i] = (i == 0) ? 32'd0 : wdata;
    end
    @(negedge clk);
    for (int t = 0; t < 3000; t++) begin
      we = $urandom_range(0, 1); waddr = 5'($urandom); wdata = $urandom;
      raddr1 = 5'($urandom); raddr2 = (t % 3 == 0) ? waddr : 5'($urandom);
      #1;
      chk(a1 == shadow[raddr1] && a2 == shadow[raddr2], $sformatf("no-bypass read t=%0d", t));
      e1 = (we && waddr == raddr1 && raddr1 != 0) ? wdata : shadow[raddr1];
      e2 = (we && waddr == raddr2 && raddr2 != 0) ? wdata : shadow[raddr2];
      if (we && waddr == raddr2 && raddr2 != 0) bypass_seen++;
      chk(b1 == e1 && b2 == e2, $sformatf("bypass read t=%0d", t));
      @(negedge clk);
      if (we && waddr != 0) shadow[waddr] = wdata;
    end
    chk(bypass_seen > 0, "bypass never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
