// tb_rsi_sensor_sweep: the multi-sensor fetch workload at default parameters.
//
// One, two and three sensors, each with three 8-bit registers, are read one
// register per frame (three single-byte frames per sensor), all in a single
// accelerator run per configuration. For each configuration the testbench
// checks every fetched byte against the measurements it loaded, checks that
// only one interrupt was needed, and checks the accelerator time against the
// protocol: 29 SCL periods of 10 us per frame, so 870 us per sensor, plus at
// most a few system clocks of hand-over per frame. It prints the times.
`timescale 1ns/1ps
module tb_rsi_sensor_sweep;
  import rsi_pkg::*;

  localparam int unsigned ND = 9, NS = 3, NR = 3;
  localparam int unsigned CLK_HZ = 50_000_000, SCL_HZ = 100_000;
  localparam int unsigned PERIOD_CLKS = CLK_HZ / SCL_HZ;   // 500

  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;

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
  logic [NS-1:0][NR-1:0][7:0] sample_data = '0, sensor_regs;
  logic scl, sda;

  rsi_system dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int irqs = 0;
  logic irq_d = 0;
  always @(posedge clk) begin irq_d <= irq; if (irq && !irq_d) irqs++; end

  logic [NS-1:0][NR-1:0][7:0] meas;
  logic [7:0] d;
  int frames, lo, hi;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 1; n <= NS; n++) begin
      foreach (meas[s, r]) meas[s][r] = 8'($urandom);
      @(negedge clk); sample_data = meas; sample_we = '1;
      @(negedge clk); sample_we = '0;
      for (int s = 0; s < n; s++)
        for (int r = 0; r < NR; r++) begin
          @(negedge clk);
          cfg_we = 1; cfg_idx = 4'(s * NR + r);
          cfg_desc = '{rw: 1'b1, saddr: 8'hBB + 8'(s), raddr: 7'h50 + 7'(r), size: 8'd1,
                       base: 8'(s * NR + r)};
          @(negedge clk); cfg_we = 0;
        end
      @(negedge clk); cfg_len_we = 1; cfg_len = 4'(n * NR);
      @(negedge clk); cfg_len_we = 0;
      irqs = 0;
      en = 1; @(negedge clk); en = 0;
      wait (irq);
      @(negedge clk);
      irq_ack = 1; @(negedge clk); irq_ack = 0;
      check(irqs == 1, $sformatf("%0d sensors: %0d interrupts, expected 1", n, irqs));
      check(!err, $sformatf("%0d sensors: no error", n));
      frames = n * NR;
      lo = frames * 29 * PERIOD_CLKS;
      hi = lo + frames * 8;
      check(run_cycles >= lo && run_cycles <= hi,
            $sformatf("%0d sensors: %0d cycles, expected %0d..%0d", n, run_cycles, lo, hi));
      $display("%0d sensor(s), %0d registers each: accelerator time %0.1f us (%0d frames x 290 us)",
               n, NR, real'(run_cycles) * 1.0e6 / CLK_HZ, frames);
      for (int s = 0; s < n; s++)
        for (int r = 0; r < NR; r++) begin
          @(negedge clk); cpu_addr = 8'(s * NR + r);
          @(negedge clk); d = cpu_rdata;
          check(d == meas[s][r], $sformatf("sensor %0d reg %0d: %02x, expected %02x", s, r, d, meas[s][r]));
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
