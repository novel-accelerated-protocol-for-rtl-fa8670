// tb_rsi_256_sensors: the full address space of the RSI bus.
//
// The system is built with 256 sensors at addresses 0x00..0xFF, one register
// each at 0x50, and a short bit period (QUARTER = 3) to keep the run quick.
// Nine sensors spread over the whole address range, including 0x00 and 0xFF,
// are fetched in one accelerator run; each byte must come from the right
// sensor, with no error, and every frame must last 29 SCL periods. A second
// run reads a register that no sensor holds and must report the error.
`timescale 1ns/1ps
module tb_rsi_256_sensors;
  import rsi_pkg::*;

  localparam int unsigned ND = 9, NS = 256, NR = 1, Q = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_we = 0, cfg_len_we = 0, en = 0, irq_ack = 0;
  logic [$clog2(ND)-1:0] cfg_idx = '0;
  rsi_desc_t cfg_desc = '0;
  logic [$clog2(ND+1)-1:0] cfg_len = '0;
  logic irq, busy, err;
  logic [31:0] run_cycles;
  logic [7:0] cpu_addr = 0, cpu_wdata = 0, cpu_rdata;
  logic cpu_we = 0;
  rsi_status_t status;
  logic [NS-1:0] sample_we = '0;
  logic [NS-1:0][NR-1:0][7:0] sample_data, sensor_regs;
  logic scl, sda;

  rsi_system #(.QUARTER(Q), .NUM_SENSORS(NS), .NUM_REGS(NR), .SENSOR_ADDR0(8'h00)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int addrs[ND] = '{8'h00, 8'h01, 8'h3F, 8'h7E, 8'h80, 8'hAA, 8'hBB, 8'hFE, 8'hFF};
  logic [7:0] d;

  task automatic run(input int n);
    @(negedge clk); cfg_len_we = 1; cfg_len = 4'(n);
    @(negedge clk); cfg_len_we = 0; en = 1;
    @(negedge clk); en = 0;
    wait (irq);
    @(negedge clk); irq_ack = 1; @(negedge clk); irq_ack = 0;
  endtask

  initial begin
    // each sensor's register holds a value derived from its address
    for (int s = 0; s < NS; s++) sample_data[s][0] = 8'(s * 37 + 11);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); sample_we = '1;
    @(negedge clk); sample_we = '0;
    foreach (addrs[i]) begin
      @(negedge clk);
      cfg_we = 1; cfg_idx = 4'(i);
      cfg_desc = '{rw: 1'b1, saddr: 8'(addrs[i]), raddr: 7'h50, size: 8'd1, base: 8'(i)};
      @(negedge clk); cfg_we = 0;
    end
    run(ND);
    check(!err, "no error over the address range");
    check(run_cycles >= ND * 29 * 4 * Q && run_cycles <= ND * (29 * 4 * Q + 8),
          $sformatf("run took %0d cycles for %0d frames", run_cycles, ND));
    foreach (addrs[i]) begin
      @(negedge clk); cpu_addr = 8'(i);
      @(negedge clk); d = cpu_rdata;
      check(d == 8'(addrs[i] * 37 + 11),
            $sformatf("sensor %02x: got %02x, expected %02x", addrs[i], d, 8'(addrs[i] * 37 + 11)));
    end
    // register 0x51 does not exist on any sensor
    @(negedge clk);
    cfg_we = 1; cfg_idx = 0;
    cfg_desc = '{rw: 1'b1, saddr: 8'h42, raddr: 7'h51, size: 8'd1, base: 8'd20};
    @(negedge clk); cfg_we = 0;
    run(1);
    check(err, "missing register reported");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
