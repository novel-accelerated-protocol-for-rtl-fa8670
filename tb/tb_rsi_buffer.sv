// tb_rsi_buffer: unit test of the dual-port sensor data buffer. Random
// reads and writes on both ports are compared with an array model: one cycle
// read latency on each port, a byte written on one port readable on the
// other, and port A winning when both write one address in the same cycle.
`timescale 1ns/1ps
module tb_rsi_buffer;
  import rsi_pkg::*;

  localparam int unsigned DEPTH = 256;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [7:0] a_addr = 0, b_addr = 0, a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;
  logic a_we = 0, b_we = 0;

  rsi_buffer #(.DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0, collisions = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [7:0] model [DEPTH];
  logic [7:0] ea, eb;

  initial begin
    // fill through port B, read back through port A
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      b_we = 1; b_addr = 8'(i); b_wdata = 8'(i * 7 + 3); model[i] = 8'(i * 7 + 3);
    end
    @(negedge clk);
    b_we = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      a_addr = 8'($urandom % 16); b_addr = 8'($urandom % 16);
      a_we = 1'($urandom); b_we = 1'($urandom);
      a_wdata = 8'($urandom); b_wdata = 8'($urandom);
      ea = model[a_addr]; eb = model[b_addr];
      if (b_we) model[b_addr] = b_wdata;
      if (a_we) model[a_addr] = a_wdata;
      if (a_we && b_we && a_addr == b_addr) collisions++;
      @(posedge clk);
      #1;
      check(a_rdata == ea, $sformatf("port A read %02x expected %02x", a_rdata, ea));
      check(b_rdata == eb, $sformatf("port B read %02x expected %02x", b_rdata, eb));
    end
    check(collisions > 0, "same-address writes exercised");
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
