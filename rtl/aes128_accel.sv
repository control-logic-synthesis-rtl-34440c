// aes128_accel -- multi-cycle AES-128 encryption accelerator.
//
// One AES round per clock cycle, ten cycles per block, with the round keys
// expanded on the fly. A 4-bit round counter drives a three-state machine
// with the published state encoding: 00 first round, 01 intermediate round,
// 10 final round. The first round (counter 0) XORs the plaintext with the
// cipher key and performs AES round 1; intermediate rounds (counter 1..8)
// perform AES rounds 2..9; the final round (counter 9) omits MixColumns.
// Each round replaces the round-key register with the next round key and
// increments the counter. Counter value 10 means done/idle.
//
// Interface: pulse start (accepted when idle, i.e. after reset or when done)
// with key_in and plaintext valid in that same cycle; the first round runs in
// that cycle. done rises nine cycles later, when ciphertext holds the result,
// and stays high until the next start. The state decode follows the ILA
// decode of the intermediate round (counter in 1..8); the start/done
// handshake, idle value and computed S-box are this design's choices.
// rst_n is synchronous and active low.
module aes128_accel
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] key_in,
  input  logic [127:0] plaintext,
  output logic [127:0] ciphertext,
  output logic         done,
  output logic [1:0]   state_o
);

  typedef enum logic [1:0] {
    ST_FIRST = 2'b00,
    ST_MID   = 2'b01,
    ST_FINAL = 2'b10
  } aes_state_e;

  localparam logic [3:0] ROUND_DONE = 4'd10;

  logic [3:0]   round;
  logic [127:0] round_key;
  logic [127:0] key_src, data_src, rk_next, sr, mixed;
  logic         idle, advance;
  aes_state_e   state;

  assign idle = (round == 4'd0) || (round == ROUND_DONE);

  always_comb begin
    if (idle)                               state = ST_FIRST;
    else if (round > 4'd0 && round < 4'd9)  state = ST_MID;
    else                                    state = ST_FINAL;
  end

  assign advance = idle ? start : 1'b1;

  // round datapath
  assign key_src  = (state == ST_FIRST) ? key_in : round_key;
  assign data_src = (state == ST_FIRST) ? (plaintext ^ key_in) : ciphertext;
  assign rk_next  = next_key(key_src, (state == ST_FIRST) ? 4'd1 : round + 4'd1);
  assign sr       = shift_rows(sub_bytes(data_src));
  assign mixed    = (state == ST_FINAL) ? sr : mix_columns(sr);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      round      <= '0;
      round_key  <= '0;
      ciphertext <= '0;
    end else if (advance) begin
      round      <= (state == ST_FIRST) ? 4'd1 : round + 4'd1;
      round_key  <= rk_next;
      ciphertext <= mixed ^ rk_next;
    end
  end

  assign done    = (round == ROUND_DONE);
  assign state_o = state;

endmodule
