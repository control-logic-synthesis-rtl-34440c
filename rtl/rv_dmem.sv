// rv_dmem -- data memory of the RISC-V cores.
//
// WORDS words of 32 bits, byte addressed. Loads are combinational: the word
// at addr is read, the byte or halfword selected by addr[1:0] and mask_mode
// (0 byte, 1 halfword, 2 word) is moved to the low bits and zero- or
// sign-extended (sign_ext). Stores update only the addressed bytes on the
// rising clock edge. Accesses are assumed aligned. A debug port (word
// address) reads combinationally and writes on the clock edge; a core store
// to the same word in the same cycle wins. Size and debug port are this
// design's choices; mask_mode = 2 for a word follows the published LW control.
module rv_dmem
  import rv_pkg::*;
#(
  parameter int unsigned WORDS = 1024
) (
  input  logic                     clk,
  input  logic [31:0]              addr,
  input  logic                     re,
  input  logic                     we,
  input  logic [1:0]               mask_mode,
  input  logic                     sign_ext,
  input  logic [31:0]              wdata,
  output logic [31:0]              rdata,
  input  logic [$clog2(WORDS)-1:0] dbg_addr,
  input  logic                     dbg_we,
  input  logic [31:0]              dbg_wdata,
  output logic [31:0]              dbg_rdata
);

  localparam int AW = $clog2(WORDS);

  logic [31:0]   mem [WORDS];
  logic [AW-1:0] widx;
  logic [31:0]   word, shifted, wword;
  logic [3:0]    be;

  assign widx    = addr[AW+1:2];
  assign word    = mem[widx];
  assign shifted = word >> {addr[1:0], 3'b000};

  always_comb begin
    rdata = shifted;
    if (re) begin
      unique case (mask_mode)
        MASK_BYTE: rdata = {{24{sign_ext & shifted[7]}},  shifted[7:0]};
        MASK_HALF: rdata = {{16{sign_ext & shifted[15]}}, shifted[15:0]};
        default:   rdata = word;
      endcase
    end
  end

  // byte enables and lane-replicated store data
  always_comb begin
    unique case (mask_mode)
      MASK_BYTE: begin be = 4'b0001 << addr[1:0];           wword = {4{wdata[7:0]}};  end
      MASK_HALF: begin be = 4'b0011 << {addr[1], 1'b0};     wword = {2{wdata[15:0]}}; end
      default:   begin be = 4'b1111;                        wword = wdata;            end
    endcase
  end

  always_ff @(posedge clk) begin
    if (dbg_we && !(we && dbg_addr == widx)) mem[dbg_addr] <= dbg_wdata;
    if (we)
      for (int i = 0; i < 4; i++)
        if (be[i]) mem[widx][8*i +: 8] <= wword[8*i +: 8];
  end

  assign dbg_rdata = mem[dbg_addr];

endmodule
