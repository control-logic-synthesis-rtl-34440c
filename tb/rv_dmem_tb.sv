// rv_dmem_tb -- self-checking testbench for rv_dmem.
//
// Random aligned byte, halfword and word stores and loads (signed and
// unsigned) against a byte-array model kept here, plus debug-port reads and
// writes, and the rule that a core store wins over a debug write to the same
// word in the same cycle.
module rv_dmem_tb;
  logic        clk = 1'b0;
  logic [31:0] addr, wdata, rdata, dbg_wdata, dbg_rdata;
  logic        re, we, sign_ext, dbg_we;
  logic [1:0]  mask_mode;
  logic [7:0]  dbg_addr;
  logic [7:0]  bytes [1024];
  int          checks = 0, failures = 0;

  rv_dmem #(.WORDS(256)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end
  endtask

  function automatic logic [31:0] mword(input int w);
    return {bytes[4*w+3], bytes[4*w+2], bytes[4*w+1], bytes[4*w]};
  endfunction

  initial begin
    int sz, a;
    logic [31:0] e;
    re = 0; we = 0; dbg_we = 0; sign_ext = 0; mask_mode = 2; addr = 0; wdata = 0;
    // fill through the debug port
    for (int w = 0; w < 256; w++) begin
      @(negedge clk);
      dbg_we = 1; dbg_addr = 8'(w); dbg_wdata = $urandom;
      {bytes[4*w+3], bytes[4*w+2], bytes[4*w+1], bytes[4*w]} = dbg_wdata;
    end
    @(negedge clk);
    dbg_we = 0;
    for (int t = 0; t < 4000; t++) begin
      mask_mode = 2'($urandom_range(0, 2));
      sz = 1 << mask_mode;
      a = $urandom_range(0, 1024 / sz - 1) * sz;
      addr = 32'(a);
      if ($urandom_range(0, 1)) begin            // store
        we = 1; re = 0; wdata = $urandom;
        @(negedge clk);
        for (int i = 0; i < sz; i++) bytes[a + i] = wdata[8*i +: 8];
        we = 0;
      end else begin                              // load
        re = 1; we = 0; sign_ext = $urandom_range(0, 1);
        #1;
        e = '0;
        for (int i = 0; i < sz; i++) e[8*i +: 8] = bytes[a + i];
        if (sign_ext && sz < 4) for (int i = 8 * sz; i < 32; i++) e[i] = e[8 * sz - 1];
        chk(rdata == e, $sformatf("load size %0d at %0d sext %0d: %h expected %h", sz, a, sign_ext, rdata, e));
        @(negedge clk);
        re = 0;
      end
    end
    // core store and debug write to the same word: core wins
    mask_mode = 2; addr = 32'd40; wdata = 32'hcafe_f00d; we = 1;
    dbg_we = 1; dbg_addr = 8'd10; dbg_wdata = 32'h1111_2222;
    @(negedge clk);
    we = 0; dbg_we = 0;
    {bytes[43], bytes[42], bytes[41], bytes[40]} = 32'hcafe_f00d;
    for (int w = 0; w < 256; w++) begin
      dbg_addr = 8'(w);
      #1;
      chk(dbg_rdata == mword(w), $sformatf("debug read word %0d", w));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
