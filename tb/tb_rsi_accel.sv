// tb_rsi_accel: unit test of the hardware accelerator.
//
// The control/status side is played by the testbench: every control word the
// accelerator writes is checked against the programmed slave details, in
// order, and answered by a status sequence (busy for a random time, then done,
// sometimes with error). Checked: one control word per descriptor, none
// before the previous fetch is done, the interrupt after the last one and
// held until acknowledged, self-disable, the sticky error, an enable during a
// run being ignored, an empty run interrupting at once, and run_cycles
// matching the cycles from enable to interrupt.
`timescale 1ns/1ps
module tb_rsi_accel;
  import rsi_pkg::*;

  localparam int unsigned ND = 9;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_we = 0, cfg_len_we = 0, en = 0, irq_ack = 0;
  logic [$clog2(ND)-1:0] cfg_idx = '0;
  rsi_desc_t cfg_desc = '0;
  logic [$clog2(ND+1)-1:0] cfg_len = '0;
  logic irq, busy, err, ctrl_we;
  logic [31:0] run_cycles;
  rsi_ctrl_t ctrl_d;
  rsi_status_t status = '0;

  rsi_accel #(.NUM_DESC(ND)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  rsi_desc_t descs [ND];
  bit        fail_at [ND];
  int        seen;          // control words seen in this run
  bit        in_fetch = 0;

  // status side: react to each control word
  always @(posedge clk) begin
    if (rst_n && ctrl_we) begin
      check(!in_fetch, "control word written while a fetch runs");
      if (seen < ND) begin
        check(ctrl_d.start && ctrl_d.rw == descs[seen].rw && ctrl_d.saddr == descs[seen].saddr &&
              ctrl_d.raddr == descs[seen].raddr && ctrl_d.size == descs[seen].size &&
              ctrl_d.base == descs[seen].base,
              $sformatf("control word %0d does not match its descriptor", seen));
      end
      in_fetch = 1;
      fork
        automatic int k = seen;
        begin
          repeat (2) @(posedge clk);
          status <= '{state: ST_START, busy: 1'b1, done: 1'b0, error: 1'b0, bytes: '0};
          repeat ($urandom_range(3, 40)) @(posedge clk);
          status <= '{state: ST_IDLE, busy: 1'b0, done: 1'b1, error: fail_at[k], bytes: 9'd1};
          in_fetch = 0;
        end
      join_none
      seen++;
    end
  end

  task automatic load_descs(input int n);
    for (int i = 0; i < n; i++) begin
      descs[i] = rsi_desc_t'({$urandom, $urandom});
      @(negedge clk);
      cfg_we = 1; cfg_idx = 4'(i); cfg_desc = descs[i];
      @(negedge clk);
      cfg_we = 0;
    end
    @(negedge clk);
    cfg_len_we = 1; cfg_len = 4'(n);
    @(negedge clk);
    cfg_len_we = 0;
  endtask

  task automatic do_run(input int n, input bit exp_err);
    int cyc = 0;
    seen = 0;
    @(negedge clk);
    en = 1;
    @(negedge clk);
    en = 0;
    cyc = 1;
    check(busy == (n != 0), "busy after enable");
    // a second enable during the run is ignored
    if (n != 0) begin
      en = 1; @(negedge clk); en = 0; cyc++;
    end
    while (!irq && cyc < 5000) begin @(negedge clk); cyc++; end
    check(irq, "interrupt raised");
    check(!busy, "accelerator disabled itself");
    check(seen == n, $sformatf("%0d control words for %0d descriptors", seen, n));
    check(err == exp_err, $sformatf("err %0d expected %0d", err, exp_err));
    if (n != 0)
      check(run_cycles == cyc, $sformatf("run_cycles %0d, counted %0d", run_cycles, cyc));
    repeat (3) @(negedge clk);
    check(irq, "interrupt held until acknowledged");
    irq_ack = 1;
    @(negedge clk);
    irq_ack = 0;
    check(!irq, "interrupt cleared by acknowledge");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (fail_at[i]) fail_at[i] = 0;
    load_descs(1);
    do_run(1, 0);
    load_descs(9);
    do_run(9, 0);
    fail_at[4] = 1;
    do_run(9, 1);              // same details, re-enabled only
    fail_at[4] = 0;
    do_run(9, 0);              // error flag cleared by the new run
    load_descs(3);
    do_run(3, 0);
    load_descs(0);
    do_run(0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
