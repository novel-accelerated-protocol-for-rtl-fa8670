// tb_rsi_control_reg: unit test of the control register. Checks reset to
// zero, that a write shows on q one edge later, that accept clears only the
// start bit, that a write wins over accept in the same cycle, and that the
// register holds its value otherwise (random words).
`timescale 1ns/1ps
module tb_rsi_control_reg;
  import rsi_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic we = 0, accept = 0;
  rsi_ctrl_t d = '0, q, model;

  rsi_control_reg dut (.clk, .rst_n, .we, .d, .accept, .q);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    @(negedge clk);
    check(q == '0, "reset value");
    rst_n = 1;
    model = '0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      we = 1'($urandom % 3 == 0);
      accept = 1'($urandom % 3 == 0);
      d = rsi_ctrl_t'({$urandom, $urandom});
      @(posedge clk);
      if (we) model = d;
      else if (accept) model.start = 1'b0;
      #1;
      check(q == model, $sformatf("cycle %0d: q %h expected %h", i, q, model));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
