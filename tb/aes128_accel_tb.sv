// aes128_accel_tb -- self-checking testbench for aes128_accel.
//
// Checks the FIPS-197 known-answer vectors, then random keys and plaintexts
// against a byte-array reference AES written here (S-box by exhaustive
// search for the GF(2^8) inverse, round keys expanded up front). For every
// block it checks the latency (done exactly 10 clock edges after the start
// edge, one round per cycle) and the state sequence: first round once,
// intermediate round eight times, final round once.
module aes128_accel_tb;
  logic         clk = 1'b0, rst_n = 1'b0, start = 1'b0, done;
  logic [127:0] key_in, plaintext, ciphertext;
  logic [1:0]   state_o;
  int           checks = 0, failures = 0;
  logic [7:0]   sb [256];

  aes128_accel dut (.*);

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

  function automatic logic [7:0] mul(input logic [7:0] a, input logic [7:0] b);
    logic [15:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h11b << (i - 8);
    return p[7:0];
  endfunction

  function automatic void build_sbox();
    logic [7:0] inv, s;
    for (int b = 0; b < 256; b++) begin
      inv = 0;
      for (int c = 1; c < 256; c++) if (mul(8'(b), 8'(c)) == 8'h01) inv = 8'(c);
      s = 8'h63;
      for (int i = 0; i < 8; i++)
        s[i] = s[i] ^ inv[i] ^ inv[(i + 4) % 8] ^ inv[(i + 5) % 8] ^ inv[(i + 6) % 8] ^ inv[(i + 7) % 8];
      sb[b] = s;
    end
  endfunction

  function automatic logic [127:0] ref_aes(input logic [127:0] key, input logic [127:0] pt);
    logic [7:0] st [16], t [16], w [176], rc;
    for (int i = 0; i < 16; i++) begin
      w[i] = key[127 - 8*i -: 8];
      st[i] = pt[127 - 8*i -: 8];
    end
    rc = 8'h01;
    for (int i = 16; i < 176; i += 4) begin
      logic [7:0] tmp [4];
      for (int j = 0; j < 4; j++) tmp[j] = w[i - 4 + j];
      if (i % 16 == 0) begin
        logic [7:0] x0;
        x0 = tmp[0];
        tmp[0] = sb[tmp[1]] ^ rc; tmp[1] = sb[tmp[2]]; tmp[2] = sb[tmp[3]]; tmp[3] = sb[x0];
        rc = mul(rc, 8'h02);
      end
      for (int j = 0; j < 4; j++) w[i + j] = w[i - 16 + j] ^ tmp[j];
    end
    for (int i = 0; i < 16; i++) st[i] ^= w[i];
    for (int r = 1; r <= 10; r++) begin
      for (int i = 0; i < 16; i++) st[i] = sb[st[i]];
      for (int c = 0; c < 4; c++) for (int row = 0; row < 4; row++) t[4*c + row] = st[4*((c + row) % 4) + row];
      if (r < 10)
        for (int c = 0; c < 4; c++) begin
          st[4*c]   = mul(t[4*c], 2) ^ mul(t[4*c+1], 3) ^ t[4*c+2] ^ t[4*c+3];
          st[4*c+1] = t[4*c] ^ mul(t[4*c+1], 2) ^ mul(t[4*c+2], 3) ^ t[4*c+3];
          st[4*c+2] = t[4*c] ^ t[4*c+1] ^ mul(t[4*c+2], 2) ^ mul(t[4*c+3], 3);
          st[4*c+3] = mul(t[4*c], 3) ^ t[4*c+1] ^ t[4*c+2] ^ mul(t[4*c+3], 2);
        end
      else st = t;
      for (int i = 0; i < 16; i++) st[i] ^= w[16*r + i];
    end
    for (int i = 0; i < 16; i++) ref_aes[127 - 8*i -: 8] = st[i];
  endfunction

  task automatic run(input logic [127:0] k, input logic [127:0] p, input logic [127:0] expect_ct,
                     input string tag);
    int cyc, n_first, n_mid, n_final;
    @(negedge clk);
    key_in = k; plaintext = p; start = 1'b1;
    n_first = 0; n_mid = 0; n_final = 0;
    #1;
    chk(state_o == 2'b00, {tag, ": first-round state at start"});
    cyc = 0;
    do begin
      case (state_o) 2'b00: n_first++; 2'b01: n_mid++; 2'b10: n_final++; default: ; endcase
      @(posedge clk); #1;
      cyc++;
      start = 1'b0;
      key_in = '1; plaintext = '1;    // inputs need only be valid in the start cycle
    end while (!done && cyc < 50);
    chk(cyc == 10, $sformatf("%s: latency %0d cycles, expected 10", tag, cyc));
    chk(n_first == 1 && n_mid == 8 && n_final == 1,
        $sformatf("%s: states first/mid/final = %0d/%0d/%0d", tag, n_first, n_mid, n_final));
    chk(ciphertext == expect_ct, $sformatf("%s: ct %h expected %h", tag, ciphertext, expect_ct));
    // result holds while idle
    repeat (3) @(posedge clk);
    #1;
    chk(done && ciphertext == expect_ct, {tag, ": result not held"});
  endtask

  initial begin
    logic [127:0] k, p;
    build_sbox();
    chk(sb[8'h00] == 8'h63 && sb[8'h53] == 8'hed && sb[8'hff] == 8'h16, "reference S-box");
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // FIPS-197 Appendix C.1 and Appendix B
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
        128'h69c4e0d86a7b0430d8cdb78070b4c55a, "C.1");
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734,
        128'h3925841d02dc09fbdc118597196a0b32, "B");
    chk(ref_aes(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff)
        == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "reference model");
    for (int i = 0; i < 40; i++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      run(k, p, ref_aes(k, p), $sformatf("random %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
