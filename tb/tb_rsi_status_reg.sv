// tb_rsi_status_reg: unit test of the status register. Random state updates
// are applied and the register is compared, one edge later, with a model:
// state, bytes and busy follow the update; done and error are sticky from a
// done pulse (error taken from the nack flag) until the next accept.
`timescale 1ns/1ps
module tb_rsi_status_reg;
  import rsi_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  rsi_update_t upd = '0;
  rsi_status_t q, model;

  rsi_status_reg dut (.clk, .rst_n, .upd, .q);

  int checks = 0, failures = 0, n_done = 0, n_err = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    @(negedge clk);
    check(q == '0, "reset value");
    rst_n = 1;
    model = '0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      upd.state  = rsi_state_e'($urandom % 10);
      upd.accept = 1'($urandom % 8 == 0);
      upd.done   = 1'($urandom % 6 == 0);
      upd.nack   = 1'($urandom);
      upd.bytes  = 9'($urandom);
      @(posedge clk);
      model.state = upd.state;
      model.busy  = (upd.state != ST_IDLE);
      model.bytes = upd.bytes;
      if (upd.accept) begin
        model.done = 0; model.error = 0;
      end else if (upd.done) begin
        model.done = 1; model.error = upd.nack;
        n_done++; if (upd.nack) n_err++;
      end
      #1;
      check(q == model, $sformatf("cycle %0d: q %h expected %h", i, q, model));
    end
    check(n_done > 0 && n_err > 0, "done and error updates both applied");
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
