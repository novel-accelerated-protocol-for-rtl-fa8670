// tb_rsi_master: unit test of the RSI master FSM.
//
// The control word is driven directly and the buffer is a testbench array
// with one cycle of read latency. A scripted slave, written from the protocol
// definition and reacting to the SCL edges, checks each bit the master sends
// (slave address, register address, R/W bit, write data, the master's
// ACK/NACK) and answers with ACKs or data. The test checks the bytes stored
// in the buffer, the state-update pulses, the number of SCL periods of every
// frame (29 for a one-byte read) and the exact number of clock cycles the
// master is busy (4 * QUARTER per SCL period). For the one-byte read it also
// checks the order of states 1..9 and how many SCL periods each lasts.
`timescale 1ns/1ps
module tb_rsi_master;
  import rsi_pkg::*;

  localparam int unsigned Q = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  rsi_ctrl_t   ctrl = '0;
  rsi_update_t upd;
  logic [BADDR_W-1:0] mem_addr;
  logic mem_we;
  logic [7:0] mem_wdata, mem_rdata;
  logic scl_o, sda_o, slv_sda = 1;
  wire  sda = sda_o & slv_sda;

  rsi_master #(.QUARTER(Q)) dut (
    .clk, .rst_n, .ctrl, .upd, .mem_addr, .mem_we, .mem_wdata, .mem_rdata,
    .scl_o, .sda_o, .sda_i(sda)
  );

  logic [7:0] mem [256];
  always_ff @(posedge clk) begin
    if (mem_we) mem[mem_addr] <= mem_wdata;
    mem_rdata <= mem[mem_addr];
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- scripted slave ----
  task automatic get_byte(output logic [7:0] b);
    for (int i = 7; i >= 0; i--) begin
      @(posedge scl_o);
      b[i] = sda;
    end
  endtask

  // answer one slot after the falling edge that begins it
  task automatic drive_ack(input bit ack);
    @(negedge scl_o);
    slv_sda = !ack;
    @(negedge scl_o);
    slv_sda = 1;
  endtask

  // serve one frame; rd_data is sent on a read, wr_data is expected on a write
  task automatic serve(input logic [7:0] sa, input logic [6:0] ra, input bit rw,
                       input bit ack_sa, input bit ack_ra, input int nbytes,
                       input logic [7:0] rd_data[$], input logic [7:0] wr_data[$],
                       input int refuse_at);
    logic [7:0] b;
    bit m_ack;
    @(negedge sda iff scl_o);                  // START
    get_byte(b);
    check(b == sa, $sformatf("slave address %02x, expected %02x", b, sa));
    drive_ack(ack_sa);
    if (!ack_sa) return;
    get_byte(b);
    check(b == {ra, rw}, $sformatf("register byte %02x, expected %02x", b, {ra, rw}));
    // ACK slot; on a read the first data bit follows at the next fall
    @(negedge scl_o);
    slv_sda = !ack_ra;
    @(negedge scl_o);
    slv_sda = 1;
    if (!ack_ra) return;
    for (int k = 0; k < nbytes; k++) begin
      if (rw) begin
        for (int i = 7; i >= 0; i--) begin
          slv_sda = rd_data[k][i];
          @(negedge scl_o);
        end
        slv_sda = 1;
        @(posedge scl_o);
        m_ack = !sda;
        check(m_ack == (k != nbytes - 1),
              $sformatf("master answer after byte %0d: %s", k, m_ack ? "ACK" : "NACK"));
        @(negedge scl_o);
      end else begin
        get_byte(b);
        check(b == wr_data[k], $sformatf("write byte %0d = %02x, expected %02x", k, b, wr_data[k]));
        @(negedge scl_o);
        slv_sda = (k == refuse_at);
        @(negedge scl_o);
        slv_sda = 1;
        if (k == refuse_at) return;
      end
    end
  endtask

  // ---- frame monitor ----
  int periods, rises;
  bit in_frame = 0;
  logic scl_d = 1, sda_d = 1;
  always @(posedge clk) begin
    scl_d <= scl_o;
    sda_d <= sda;
    if (!rst_n) in_frame = 0;
    else if (scl_o && scl_d && sda_d && !sda) begin in_frame = 1; rises = 0; end
    else if (scl_o && scl_d && !sda_d && sda && in_frame) begin in_frame = 0; periods = rises + 1; end
    else if (scl_o && !scl_d && in_frame) rises++;
  end

  // length of every state visit, in SCL periods, for the state-sequence check
  int st_seq[$], st_len[$];
  rsi_state_e st_prev = ST_IDLE;
  int st_cnt = 0;
  always @(posedge clk) if (rst_n) begin
    if (upd.state != st_prev) begin
      if (st_prev != ST_IDLE) begin
        st_seq.push_back(int'(st_prev));
        st_len.push_back(st_cnt / (4 * Q));
      end
      st_cnt = 0;
      st_prev = upd.state;
    end
    st_cnt++;
  end

  int busy_cycles;
  always @(posedge clk) if (rst_n && upd.state != ST_IDLE) busy_cycles++;

  task automatic start(input bit rw, input logic [7:0] sa, input logic [6:0] ra,
                       input int size, input int base);
    @(negedge clk);
    ctrl = '{start: 1'b1, rw: rw, saddr: sa, raddr: ra, size: size[7:0], base: base[7:0]};
    busy_cycles = 0;
    @(posedge clk);
    #1;
    check(upd.accept, "accept pulse");
    @(negedge clk);
    ctrl.start = 0;
  endtask

  task automatic finish(input int exp_periods, input bit exp_nack);
    int n = 0;
    while (!upd.done && n < 100000) begin @(posedge clk); #1; n++; end
    check(upd.done, "done pulse");
    check(upd.nack == exp_nack, $sformatf("nack flag %0d, expected %0d", upd.nack, exp_nack));
    @(negedge clk);
    check(periods == exp_periods, $sformatf("frame took %0d SCL periods, expected %0d", periods, exp_periods));
    check(busy_cycles == exp_periods * 4 * Q,
          $sformatf("busy %0d cycles, expected %0d", busy_cycles, exp_periods * 4 * Q));
  endtask

  logic [7:0] rd[$], wr[$];
  int exp_len[9] = '{1, 8, 1, 7, 1, 1, 8, 1, 1};
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    check(scl_o && sda_o && upd.state == ST_IDLE, "idle bus after reset");

    // one-byte read: slave 0xBB, register 0x50, data 0xAA, 29 SCL periods
    rd = '{8'hAA};
    st_seq.delete(); st_len.delete();
    fork
      serve(8'hBB, 7'h50, 1, 1, 1, 1, rd, wr, -1);
      begin start(1, 8'hBB, 7'h50, 1, 0); finish(29, 0); end
    join
    check(mem[0] == 8'hAA, $sformatf("buffer[0] = %02x", mem[0]));
    check(upd.bytes == 1, "one byte counted");
    // states 1..9 in order, lasting 1, 8, 1, 7, 1, 1, 8, 1, 1 SCL periods
    repeat (2) @(negedge clk);
    check(st_seq.size() == 9, $sformatf("%0d states visited, expected 9", st_seq.size()));
    foreach (exp_len[i])
      if (i < st_seq.size())
        check(st_seq[i] == i + 1 && st_len[i] == exp_len[i],
              $sformatf("visit %0d: state %0d for %0d periods, expected state %0d for %0d",
                        i, st_seq[i], st_len[i], i + 1, exp_len[i]));

    // four-byte burst read into buffer 40..43
    rd = '{8'h12, 8'h34, 8'h56, 8'h78};
    fork
      serve(8'h07, 7'h21, 1, 1, 1, 4, rd, wr, -1);
      begin start(1, 8'h07, 7'h21, 4, 40); finish(20 + 36, 0); end
    join
    foreach (rd[k]) check(mem[40 + k] == rd[k], $sformatf("burst byte %0d = %02x", k, mem[40 + k]));

    // three-byte burst write from buffer 80..82
    wr = '{8'hDE, 8'hAD, 8'h5B};
    foreach (wr[k]) mem[80 + k] = wr[k];
    fork
      serve(8'hFE, 7'h7F, 0, 1, 1, 3, rd, wr, -1);
      begin start(0, 8'hFE, 7'h7F, 3, 80); finish(20 + 27, 0); end
    join

    // slave address not acknowledged: START, 8 bits, NACK, STOP
    fork
      serve(8'h33, 7'h01, 1, 0, 1, 1, rd, wr, -1);
      begin start(1, 8'h33, 7'h01, 1, 0); finish(11, 1); end
    join

    // register address not acknowledged
    fork
      serve(8'h33, 7'h01, 1, 1, 0, 1, rd, wr, -1);
      begin start(1, 8'h33, 7'h01, 1, 0); finish(20, 1); end
    join

    // slave refuses the second byte of a write
    fork
      serve(8'hFE, 7'h10, 0, 1, 1, 3, rd, wr, 1);
      begin start(0, 8'hFE, 7'h10, 3, 80); finish(20 + 18, 1); end
    join

    // size 0 is taken as one byte
    rd = '{8'h99};
    fork
      serve(8'h01, 7'h02, 1, 1, 1, 1, rd, wr, -1);
      begin start(1, 8'h01, 7'h02, 0, 7); finish(29, 0); end
    join
    check(mem[7] == 8'h99, "size 0 read one byte");

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
