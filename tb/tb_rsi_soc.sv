// tb_rsi_soc: test of the master SoC (accelerator, control and status
// registers, RSI block, buffer) against a scripted slave.
//
// The testbench is both the CPU and the sensors. As CPU it stores slave
// details, fills the buffer with bytes to write, pulses enable, waits for the
// interrupt and reads the buffer. As the sensors it serves each frame in turn
// and checks the addresses, R/W bit and write data it receives. A run of
// three descriptors (two-byte read, one-byte write, one-byte read from a
// sensor that is absent) must give the bytes in the buffer, the written byte
// on the bus, err set, one interrupt, and an accelerator time close to the
// 38 + 29 + 11 SCL periods of the three frames.
`timescale 1ns/1ps
module tb_rsi_soc;
  import rsi_pkg::*;

  localparam int unsigned Q = 3, ND = 9;
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
  logic scl_o, sda_o, slv_sda = 1;
  wire  sda = sda_o & slv_sda;

  rsi_soc #(.QUARTER(Q), .NUM_DESC(ND)) dut (.*, .sda_i(sda));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic get_byte(output logic [7:0] b);
    for (int i = 7; i >= 0; i--) begin @(posedge scl_o); b[i] = sda; end
  endtask

  task automatic serve(input logic [7:0] sa, input bit present, input logic [6:0] ra,
                       input bit rw, input logic [7:0] data[$]);
    logic [7:0] b;
    @(negedge sda iff scl_o);
    get_byte(b);
    check(b == sa, $sformatf("slave address %02x expected %02x", b, sa));
    @(negedge scl_o); slv_sda = !present; @(negedge scl_o); slv_sda = 1;
    if (!present) return;
    get_byte(b);
    check(b == {ra, rw}, $sformatf("register byte %02x expected %02x", b, {ra, rw}));
    @(negedge scl_o); slv_sda = 0; @(negedge scl_o); slv_sda = 1;
    foreach (data[k]) begin
      if (rw) begin
        for (int i = 7; i >= 0; i--) begin slv_sda = data[k][i]; @(negedge scl_o); end
        slv_sda = 1;
        @(negedge scl_o);
      end else begin
        get_byte(b);
        check(b == data[k], $sformatf("write byte %02x expected %02x", b, data[k]));
        @(negedge scl_o); slv_sda = 0; @(negedge scl_o); slv_sda = 1;
      end
    end
  endtask

  task automatic set_desc(input int i, input bit rw, input logic [7:0] sa,
                          input logic [6:0] ra, input int size, input int base);
    @(negedge clk);
    cfg_we = 1; cfg_idx = 4'(i);
    cfg_desc = '{rw: rw, saddr: sa, raddr: ra, size: size[7:0], base: base[7:0]};
    @(negedge clk);
    cfg_we = 0;
  endtask

  logic [7:0] d;
  int exp_cycles;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // byte to be written to a sensor
    @(negedge clk); cpu_we = 1; cpu_addr = 8'd50; cpu_wdata = 8'h6E;
    @(negedge clk); cpu_we = 0;
    set_desc(0, 1, 8'h20, 7'h05, 2, 10);
    set_desc(1, 0, 8'h21, 7'h11, 1, 50);
    set_desc(2, 1, 8'h99, 7'h00, 1, 60);
    @(negedge clk); cfg_len_we = 1; cfg_len = 4'd3;
    @(negedge clk); cfg_len_we = 0; en = 1;
    @(negedge clk); en = 0;
    check(busy, "accelerator busy after enable");
    serve(8'h20, 1, 7'h05, 1, '{8'h81, 8'h42});
    serve(8'h21, 1, 7'h11, 0, '{8'h6E});
    serve(8'h99, 0, 7'h00, 1, '{});
    wait (irq);
    @(negedge clk);
    check(!busy, "accelerator disabled after the run");
    check(err, "absent sensor reported");
    check(status.done && status.error && !status.busy, "status register after the last frame");
    exp_cycles = (38 + 29 + 11) * 4 * Q;
    check(run_cycles >= exp_cycles && run_cycles <= exp_cycles + 30,
          $sformatf("run took %0d cycles, frames need %0d", run_cycles, exp_cycles));
    @(negedge clk); cpu_addr = 8'd10; @(negedge clk); d = cpu_rdata;
    check(d == 8'h81, $sformatf("buffer[10] = %02x", d));
    @(negedge clk); cpu_addr = 8'd11; @(negedge clk); d = cpu_rdata;
    check(d == 8'h42, $sformatf("buffer[11] = %02x", d));
    irq_ack = 1; @(negedge clk); irq_ack = 0;
    check(!irq, "interrupt acknowledged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
