// acc_fsm_tb -- self-checking testbench for acc_fsm.
//
// A directed walk through every transition (RESET->GO, GO->GO, GO->STOP,
// STOP->RESET and the holding cases), then random inputs against a model
// written from the transition table. Fails if any transition was never taken.
module acc_fsm_tb;
  logic       clk = 1'b0, rst_n = 1'b0, reset = 1'b0, go = 1'b0, stop = 1'b0;
  logic [1:0] val = '0, state_o;
  logic [7:0] acc;
  int         checks = 0, failures = 0;
  int         n_trans [4];   // 0 RESET->GO, 1 GO->GO, 2 GO->STOP, 3 STOP->RESET

  localparam logic [1:0] RESET = 2'd0, GO = 2'd1, STOP = 2'd2;

  acc_fsm dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [1:0] m_state;
  logic [7:0] m_acc;

  task automatic cycle(input bit r, input bit g, input bit s, input logic [1:0] v);
    reset = r; go = g; stop = s; val = v;
    case (m_state)
      RESET: if (g) begin m_state = GO; m_acc += v; n_trans[0]++; end
      GO:    if (s) begin m_state = STOP; n_trans[2]++; end
             else begin m_acc += v; n_trans[1]++; end
      default: if (r) begin m_state = RESET; m_acc = 0; n_trans[3]++; end
    endcase
    @(posedge clk); #1;
    checks++;
    if (state_o != m_state || acc != m_acc) begin
      failures++;
      if (failures < 20) $display("FAIL state %0d acc %0d, expected %0d %0d", state_o, acc, m_state, m_acc);
    end
    @(negedge clk);
  endtask

  initial begin
    m_state = RESET; m_acc = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (state_o != RESET || acc != 0) failures++;
    cycle(0, 0, 0, 3);      // RESET holds without go
    cycle(0, 1, 0, 2);      // RESET -> GO, acc = 2
    cycle(0, 0, 0, 3);      // GO -> GO, acc = 5
    cycle(1, 1, 0, 1);      // GO -> GO, acc = 6 (reset ignored in GO)
    cycle(0, 0, 1, 3);      // GO -> STOP, acc held
    cycle(0, 1, 0, 3);      // STOP holds without reset
    checks++;
    if (acc != 8'd6) failures++;
    cycle(1, 0, 0, 3);      // STOP -> RESET, acc = 0
    for (int i = 0; i < 3000; i++)
      cycle($urandom_range(0, 3) == 0, $urandom_range(0, 1), $urandom_range(0, 7) == 0, 2'($urandom));
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (n_trans[i] == 0) failures++;
    end
    $display("transitions: %0d %0d %0d %0d", n_trans[0], n_trans[1], n_trans[2], n_trans[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
