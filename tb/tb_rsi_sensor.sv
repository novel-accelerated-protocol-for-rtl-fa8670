// tb_rsi_sensor: unit test of the RSI sensor slave.
//
// The testbench is the bus master: it drives SCL and SDA (open drain, wired
// with the slave's output) with a bit period of 16 clock cycles and checks
// what the slave answers: ACK only for its own 8-bit address and for a
// register it holds, the register contents MSB first, the pointer advancing
// and wrapping after each byte, bytes written by the bus, measurements loaded
// through the sample port, and that a STOP or new START resets the slave.
`timescale 1ns/1ps
module tb_rsi_sensor;
  import rsi_pkg::*;

  localparam int unsigned NR = 3;
  localparam int unsigned H = 4;            // clocks per quarter period

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic scl = 1, m_sda = 1;
  logic s_sda;
  wire  sda = m_sda & s_sda;
  logic sample_we = 0;
  logic [NR-1:0][7:0] sample_data = '0, regs_o;

  rsi_sensor #(.SLAVE_ADDR(8'hBB), .REG_BASE(7'h50), .NUM_REGS(NR)) dut (
    .clk, .rst_n, .scl_i(scl), .sda_i(sda), .sda_o(s_sda),
    .sample_we, .sample_data, .regs_o
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wait_q(); repeat (H) @(negedge clk); endtask

  task automatic bus_start();
    scl = 1; m_sda = 1; wait_q(); wait_q();
    m_sda = 0; wait_q(); wait_q();
  endtask

  // repeated START: SCL low first so the slave releases SDA, then START
  task automatic bus_rstart();
    scl = 0; wait_q();
    m_sda = 1; wait_q();
    scl = 1; wait_q();
    m_sda = 0; wait_q(); wait_q();
  endtask

  task automatic bus_stop();
    scl = 0; wait_q();
    m_sda = 0; wait_q();
    scl = 1; wait_q();
    m_sda = 1; wait_q();
  endtask

  // one SCL period; the master drives b and returns SDA as seen at the end
  task automatic bus_bit(input bit b, output bit seen);
    scl = 0; wait_q();
    m_sda = b; wait_q();
    scl = 1; wait_q(); wait_q();
    seen = sda;
  endtask

  task automatic send_byte(input logic [7:0] v, output bit ack);
    bit s;
    for (int i = 7; i >= 0; i--) bus_bit(v[i], s);
    bus_bit(1'b1, s);
    ack = !s;
  endtask

  task automatic recv_byte(input bit give_ack, output logic [7:0] v);
    bit s;
    for (int i = 7; i >= 0; i--) begin bus_bit(1'b1, s); v[i] = s; end
    bus_bit(!give_ack, s);
  endtask

  logic [NR-1:0][7:0] meas;
  logic [7:0] v;
  bit ack;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (meas[r]) meas[r] = 8'($urandom);
    meas[0] = 8'hAA;
    sample_data = meas; sample_we = 1;
    @(negedge clk);
    sample_we = 0;
    @(negedge clk);
    check(regs_o == meas, "sample port loads the registers");

    // single-byte read of register 0x50
    bus_start();
    send_byte(8'hBB, ack);           check(ack, "own address acknowledged");
    send_byte({7'h50, 1'b1}, ack);   check(ack, "register 0x50 acknowledged");
    recv_byte(0, v);                 check(v == 8'hAA, $sformatf("read %02x, expected AA", v));
    bus_stop();
    check(s_sda, "SDA released after the frame");

    // burst read from 0x51 for four bytes: 0x51, 0x52, wrap to 0x50, 0x51
    bus_start();
    send_byte(8'hBB, ack);           check(ack, "address ACK (burst)");
    send_byte({7'h51, 1'b1}, ack);   check(ack, "register 0x51 ACK");
    for (int k = 0; k < 4; k++) begin
      recv_byte(k != 3, v);
      check(v == meas[(1 + k) % NR], $sformatf("burst byte %0d = %02x", k, v));
    end
    bus_stop();

    // other address: no ACK, slave stays silent for the rest of the frame
    bus_start();
    send_byte(8'hBA, ack);           check(!ack, "foreign address not acknowledged");
    send_byte({7'h50, 1'b1}, ack);   check(!ack, "silent after foreign address");
    bus_stop();

    // register the sensor does not hold
    bus_start();
    send_byte(8'hBB, ack);           check(ack, "address ACK (bad register)");
    send_byte({7'h53, 1'b1}, ack);   check(!ack, "register 0x53 not acknowledged");
    bus_stop();
    bus_start();
    send_byte(8'hBB, ack);
    send_byte({7'h4F, 1'b0}, ack);   check(!ack, "register 0x4F not acknowledged");
    bus_stop();

    // burst write of two bytes from 0x52 (wraps to 0x50)
    bus_start();
    send_byte(8'hBB, ack);           check(ack, "address ACK (write)");
    send_byte({7'h52, 1'b0}, ack);   check(ack, "register 0x52 ACK (write)");
    send_byte(8'h3C, ack);           check(ack, "first write byte ACK");
    send_byte(8'hC5, ack);           check(ack, "second write byte ACK");
    bus_stop();
    check(regs_o[2] == 8'h3C && regs_o[0] == 8'hC5 && regs_o[1] == meas[1],
          $sformatf("registers after write %02x %02x %02x", regs_o[0], regs_o[1], regs_o[2]));

    // repeated START in the middle of a frame restarts address matching
    bus_start();
    send_byte(8'hBB, ack);
    bus_rstart();
    send_byte(8'hBB, ack);           check(ack, "address ACK after repeated START");
    send_byte({7'h52, 1'b1}, ack);
    recv_byte(0, v);                 check(v == 8'h3C, $sformatf("read back %02x", v));
    bus_stop();

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
