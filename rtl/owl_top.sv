// owl_top -- the six example designs side by side.
//
// The designs are independent examples of decoder-style and state-machine
// control and do not exchange data; they share only clk and rst_n, and each
// brings its own ports out under its own prefix:
//   sc_  single-cycle RV32I + Zbkb + Zbkc core (rv_core_single)
//   p2_  two-stage pipelined RV32I + Zbkb + Zbkc core (rv_core_2stage)
//   ct_  three-stage constant-time core with CMOV (ct_core)
//   aes_ multi-cycle AES-128 encryption accelerator (aes128_accel)
//   am_  three-stage pipelined ALU machine (alu_machine)
//   acc_ accumulator state machine (acc_fsm)
// Each core has a program-load port into its instruction memory, a debug
// port onto its data memory and its current PC as output. IMEM_WORDS and
// DMEM_WORDS size the memories of all three cores (1024 words each by
// default; the sizes are this design's choice). Timing of each design is
// described in its own module.
module owl_top #(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  localparam int IAW = $clog2(IMEM_WORDS),
  localparam int DAW = $clog2(DMEM_WORDS)
) (
  input  logic           clk,
  input  logic           rst_n,
  // single-cycle core
  input  logic           sc_imem_we,
  input  logic [IAW-1:0] sc_imem_waddr,
  input  logic [31:0]    sc_imem_wdata,
  input  logic [DAW-1:0] sc_dbg_addr,
  input  logic           sc_dbg_we,
  input  logic [31:0]    sc_dbg_wdata,
  output logic [31:0]    sc_dbg_rdata,
  output logic [31:0]    sc_pc,
  // two-stage core
  input  logic           p2_imem_we,
  input  logic [IAW-1:0] p2_imem_waddr,
  input  logic [31:0]    p2_imem_wdata,
  input  logic [DAW-1:0] p2_dbg_addr,
  input  logic           p2_dbg_we,
  input  logic [31:0]    p2_dbg_wdata,
  output logic [31:0]    p2_dbg_rdata,
  output logic [31:0]    p2_pc,
  // constant-time core
  input  logic           ct_imem_we,
  input  logic [IAW-1:0] ct_imem_waddr,
  input  logic [31:0]    ct_imem_wdata,
  input  logic [DAW-1:0] ct_dbg_addr,
  input  logic           ct_dbg_we,
  input  logic [31:0]    ct_dbg_wdata,
  output logic [31:0]    ct_dbg_rdata,
  output logic [31:0]    ct_pc,
  // AES-128 accelerator
  input  logic           aes_start,
  input  logic [127:0]   aes_key_in,
  input  logic [127:0]   aes_plaintext,
  output logic [127:0]   aes_ciphertext,
  output logic           aes_done,
  output logic [1:0]     aes_state,
  // ALU machine
  input  logic [1:0]     am_op,
  input  logic [1:0]     am_src1,
  input  logic [1:0]     am_src2,
  input  logic [1:0]     am_dest,
  input  logic [1:0]     am_dbg_addr,
  input  logic           am_dbg_we,
  input  logic [7:0]     am_dbg_wdata,
  output logic [7:0]     am_dbg_data,
  output logic           am_fwd1,
  output logic           am_fwd2,
  // accumulator
  input  logic           acc_reset,
  input  logic           acc_go,
  input  logic           acc_stop,
  input  logic [1:0]     acc_val,
  output logic [7:0]     acc_acc,
  output logic [1:0]     acc_state
);

  rv_core_single #(.IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS)) u_sc (
    .clk, .rst_n,
    .imem_we(sc_imem_we), .imem_waddr(sc_imem_waddr), .imem_wdata(sc_imem_wdata),
    .dbg_addr(sc_dbg_addr), .dbg_we(sc_dbg_we), .dbg_wdata(sc_dbg_wdata),
    .dbg_rdata(sc_dbg_rdata), .pc_o(sc_pc));

  rv_core_2stage #(.IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS)) u_p2 (
    .clk, .rst_n,
    .imem_we(p2_imem_we), .imem_waddr(p2_imem_waddr), .imem_wdata(p2_imem_wdata),
    .dbg_addr(p2_dbg_addr), .dbg_we(p2_dbg_we), .dbg_wdata(p2_dbg_wdata),
    .dbg_rdata(p2_dbg_rdata), .pc_o(p2_pc));

  ct_core #(.IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS)) u_ct (
    .clk, .rst_n,
    .imem_we(ct_imem_we), .imem_waddr(ct_imem_waddr), .imem_wdata(ct_imem_wdata),
    .dbg_addr(ct_dbg_addr), .dbg_we(ct_dbg_we), .dbg_wdata(ct_dbg_wdata),
    .dbg_rdata(ct_dbg_rdata), .pc_o(ct_pc));

  aes128_accel u_aes (
    .clk, .rst_n, .start(aes_start), .key_in(aes_key_in), .plaintext(aes_plaintext),
    .ciphertext(aes_ciphertext), .done(aes_done), .state_o(aes_state));

  alu_machine u_am (
    .clk, .rst_n, .op(am_op), .src1(am_src1), .src2(am_src2), .dest(am_dest),
    .dbg_addr(am_dbg_addr), .dbg_we(am_dbg_we), .dbg_wdata(am_dbg_wdata),
    .dbg_data(am_dbg_data), .fwd1_o(am_fwd1), .fwd2_o(am_fwd2));

  acc_fsm u_acc (
    .clk, .rst_n, .reset(acc_reset), .go(acc_go), .stop(acc_stop), .val(acc_val),
    .acc(acc_acc), .state_o(acc_state));

endmodule
