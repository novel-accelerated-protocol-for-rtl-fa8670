// tb_rsi_system: end-to-end test of the whole sensor-fetch system at its
// default parameters (50 MHz system clock, 100 kHz SCL, three sensors with
// three registers each, nine fetch descriptors).
//
// The testbench plays the CPU: it loads measurements into the sensors,
// programs slave details, pulses enable, waits for the interrupt and reads
// the buffer. A bus monitor decodes every frame independently of the design
// (START/STOP and the SCL periods between them) and the expected frame length
// in SCL periods is worked out from the protocol: 20 + 9 * bytes for a
// complete frame, 11 when the slave address is refused and 20 when the
// register address is refused. The single-byte read of sensor 0xBB, register
// 0x50, data 0xAA must take 29 SCL periods. Every mechanism (single read,
// burst read, burst write, register wrap, address NACK, register NACK,
// multi-sensor run, interrupt) is counted and must occur.
`timescale 1ns/1ps
module tb_rsi_system;
  import rsi_pkg::*;

  localparam int unsigned NUM_DESC = 9;
  localparam int unsigned NS = 3, NR = 3;
  localparam int unsigned Q = 50_000_000 / (4 * 100_000);

  logic clk = 1'b0, rst_n = 1'b0;
  always #10 clk = ~clk;   // 50 MHz

  logic                          cfg_we = 0, cfg_len_we = 0, en = 0, irq_ack = 0;
  logic [$clog2(NUM_DESC)-1:0]   cfg_idx = '0;
  rsi_desc_t                     cfg_desc = '0;
  logic [$clog2(NUM_DESC+1)-1:0] cfg_len = '0;
  logic irq, busy, err;
  logic [31:0] run_cycles;
  logic [BADDR_W-1:0] cpu_addr = '0;
  logic cpu_we = 0;
  logic [DATA_W-1:0] cpu_wdata = '0, cpu_rdata;
  rsi_status_t status;
  logic [NS-1:0] sample_we = '0;
  logic [NS-1:0][NR-1:0][DATA_W-1:0] sample_data = '0, sensor_regs;
  logic scl, sda;

  rsi_system dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- bus monitor ----------------
  int  frame_periods[$];
  int  rises;
  bit  in_frame = 0;
  logic scl_d = 1, sda_d = 1;
  always @(posedge clk) begin
    scl_d <= scl;
    sda_d <= sda;
    if (!rst_n) begin
      in_frame = 0;
    end else if (scl && scl_d && sda_d && !sda) begin
      in_frame = 1;
      rises    = 0;
    end else if (scl && scl_d && !sda_d && sda && in_frame) begin
      in_frame = 0;
      frame_periods.push_back(rises + 1);   // START period has no SCL rise
    end else if (scl && !scl_d && in_frame) begin
      rises++;
    end
  end

  // ---------------- CPU tasks ----------------
  task automatic set_desc(input int idx, input bit rw, input logic [7:0] sa,
                          input logic [6:0] ra, input int size, input int base);
    @(negedge clk);
    cfg_we = 1; cfg_idx = idx[$clog2(NUM_DESC)-1:0];
    cfg_desc = '{rw: rw, saddr: sa, raddr: ra, size: size[7:0], base: base[7:0]};
    @(negedge clk);
    cfg_we = 0;
  endtask

  int irq_count = 0;
  task automatic run(input int len);
    @(negedge clk);
    cfg_len_we = 1; cfg_len = len[$clog2(NUM_DESC+1)-1:0];
    @(negedge clk);
    cfg_len_we = 0; en = 1;
    @(negedge clk);
    en = 0;
    wait (irq);
    irq_count++;
    @(negedge clk);
    irq_ack = 1;
    @(negedge clk);
    irq_ack = 0;
    check(!irq && !busy, "interrupt acknowledged, accelerator disabled");
  endtask

  task automatic rd_buf(input int a, output logic [7:0] d);
    @(negedge clk);
    cpu_addr = a[7:0];
    @(negedge clk);
    d = cpu_rdata;
  endtask

  task automatic wr_buf(input int a, input logic [7:0] d);
    @(negedge clk);
    cpu_addr = a[7:0]; cpu_wdata = d; cpu_we = 1;
    @(negedge clk);
    cpu_we = 0;
  endtask

  task automatic expect_frames(input int n[$], input string what);
    check(frame_periods.size() == n.size(),
          $sformatf("%s: %0d frames seen, %0d expected", what, frame_periods.size(), n.size()));
    foreach (n[i])
      if (i < frame_periods.size())
        check(frame_periods[i] == n[i],
              $sformatf("%s: frame %0d took %0d SCL periods, expected %0d",
                        what, i, frame_periods[i], n[i]));
    frame_periods.delete();
  endtask

  // mechanism counters
  int n_single = 0, n_burst_rd = 0, n_burst_wr = 0, n_wrap = 0;
  int n_addr_nack = 0, n_reg_nack = 0, n_multi = 0;

  logic [NS-1:0][NR-1:0][7:0] meas;
  logic [7:0] d;
  int exp_frames[$];
  int t0;

  initial begin
    repeat (5) @(negedge clk);
    rst_n = 1;
    // fresh measurements; sensor 0 register 0x50 holds 0xAA
    foreach (meas[s, r]) meas[s][r] = 8'($urandom);
    meas[0][0] = 8'hAA;
    @(negedge clk);
    sample_data = meas; sample_we = '1;
    @(negedge clk);
    sample_we = '0;

    // 1: single-byte read, slave 0xBB register 0x50 -> 0xAA in 29 SCL periods
    set_desc(0, 1'b1, 8'hBB, 7'h50, 1, 0);
    t0 = $time;
    run(1);
    rd_buf(0, d);
    check(d == 8'hAA, $sformatf("single read got %02x", d));
    check(!err, "single read without error");
    expect_frames('{29}, "single read");
    check(run_cycles >= 29 * 4 * Q && run_cycles <= 29 * 4 * Q + 20,
          $sformatf("accelerator run %0d cycles for one 29-period frame", run_cycles));
    n_single++;

    // 2: three sensors x three registers, one register per frame
    for (int s = 0; s < NS; s++)
      for (int r = 0; r < NR; r++)
        set_desc(s * NR + r, 1'b1, 8'hBB + 8'(s), 7'h50 + 7'(r), 1, 64 + s * NR + r);
    run(NS * NR);
    for (int s = 0; s < NS; s++)
      for (int r = 0; r < NR; r++) begin
        rd_buf(64 + s * NR + r, d);
        check(d == meas[s][r], $sformatf("sensor %0d reg %0d: got %02x want %02x",
                                         s, r, d, meas[s][r]));
      end
    exp_frames = {};
    repeat (NS * NR) exp_frames.push_back(29);
    expect_frames(exp_frames, "multi-sensor run");
    check(!err, "multi-sensor run without error");
    n_multi++;

    // 3: burst read of all three registers of sensor 1
    set_desc(0, 1'b1, 8'hBC, 7'h50, 3, 100);
    run(1);
    for (int r = 0; r < NR; r++) begin
      rd_buf(100 + r, d);
      check(d == meas[1][r], $sformatf("burst read byte %0d: got %02x", r, d));
    end
    expect_frames('{20 + 9 * 3}, "burst read");
    n_burst_rd++;

    // 4: burst read that runs past the last register and wraps
    set_desc(0, 1'b1, 8'hBD, 7'h52, 4, 110);
    run(1);
    for (int k = 0; k < 4; k++) begin
      rd_buf(110 + k, d);
      check(d == meas[2][(2 + k) % NR], $sformatf("wrap read byte %0d: got %02x", k, d));
    end
    expect_frames('{20 + 9 * 4}, "wrapping read");
    n_wrap++;

    // 5: burst write of two bytes into sensor 2 registers 0x51, 0x52
    wr_buf(120, 8'h5A);
    wr_buf(121, 8'hC3);
    set_desc(0, 1'b0, 8'hBD, 7'h51, 2, 120);
    run(1);
    check(sensor_regs[2][1] == 8'h5A && sensor_regs[2][2] == 8'hC3,
          $sformatf("burst write: sensor 2 holds %02x %02x", sensor_regs[2][1], sensor_regs[2][2]));
    check(sensor_regs[2][0] == meas[2][0], "burst write left register 0x50 alone");
    check(!err, "burst write without error");
    expect_frames('{20 + 9 * 2}, "burst write");
    n_burst_wr++;

    // 6: no sensor at address 0x10: address NACK, error, still an interrupt
    set_desc(0, 1'b1, 8'h10, 7'h50, 1, 130);
    run(1);
    check(err, "address NACK flagged");
    check(status.error && status.done, "status register shows the error");
    expect_frames('{11}, "address NACK");
    n_addr_nack++;

    // 7: sensor 0 has no register 0x10: register NACK
    set_desc(0, 1'b1, 8'hBB, 7'h10, 1, 130);
    run(1);
    check(err, "register NACK flagged");
    expect_frames('{20}, "register NACK");
    n_reg_nack++;

    // 8: a good frame after the errors still works
    set_desc(0, 1'b1, 8'hBB, 7'h50, 1, 131);
    run(1);
    rd_buf(131, d);
    check(d == 8'hAA && !err, "read after errors");
    expect_frames('{29}, "read after errors");

    check(irq_count == 8, $sformatf("%0d interrupts", irq_count));
    check(n_single > 0,    "single read happened");
    check(n_burst_rd > 0,  "burst read happened");
    check(n_burst_wr > 0,  "burst write happened");
    check(n_wrap > 0,      "register wrap happened");
    check(n_addr_nack > 0, "address NACK happened");
    check(n_reg_nack > 0,  "register NACK happened");
    check(n_multi > 0,     "multi-sensor run happened");
    $display("mechanisms: single=%0d burst_rd=%0d burst_wr=%0d wrap=%0d addr_nack=%0d reg_nack=%0d multi=%0d irq=%0d",
             n_single, n_burst_rd, n_burst_wr, n_wrap, n_addr_nack, n_reg_nack, n_multi, irq_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
