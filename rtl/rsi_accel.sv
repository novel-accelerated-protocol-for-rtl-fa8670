// rsi_accel: the hardware accelerator that runs sensor fetch cycles on behalf
// of the CPU.
//
// The CPU stores slave details once (slave address, register address, data
// size, direction and the buffer address for the data) in a small table of
// NUM_DESC entries and sets how many entries a run covers. After that a
// single enable pulse is all the CPU does: the accelerator writes the
// control word for each entry in turn into the control register, watches the
// status register until the RSI block has taken the command (busy) and then
// finished it (done), and moves to the next entry. When the last entry is
// done it raises the interrupt and disables itself; the interrupt stays high
// until the CPU acknowledges it (irq_ack). An enable while a run is in
// progress is ignored.
//
// From the document: enable from the CPU, slave details sent only on the
// first cycle, control register to start the RSI block, status register to
// monitor it, interrupt at the end of the fetch, self-disable, and the remark
// that an FSM can read several sensors in sequence. This design's own: the
// descriptor table and its size (9 = three sensors of three registers, the
// largest setup measured), that a missing acknowledge does not stop the run
// but sets the sticky err output, and the run_cycles counter, which measures
// the time from enable to interrupt (the accelerator's share of the work).
module rsi_accel
  import rsi_pkg::*;
#(
  parameter int unsigned NUM_DESC = 9
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // CPU side
  input  logic                        cfg_we,     // store one slave detail
  input  logic [$clog2(NUM_DESC)-1:0] cfg_idx,
  input  rsi_desc_t                   cfg_desc,
  input  logic                        cfg_len_we, // set entries per run
  input  logic [$clog2(NUM_DESC+1)-1:0] cfg_len,
  input  logic                        en,         // enable pulse
  output logic                        irq,
  input  logic                        irq_ack,
  output logic                        busy,       // a run is in progress
  output logic                        err,        // a frame of the last run failed
  output logic [31:0]                 run_cycles, // cycles of the last run
  // control and status registers
  output logic                        ctrl_we,
  output rsi_ctrl_t                   ctrl_d,
  input  rsi_status_t                 status
);

  localparam int unsigned IW = $clog2(NUM_DESC);
  localparam int unsigned LW = $clog2(NUM_DESC+1);

  typedef enum logic [1:0] {A_OFF, A_ISSUE, A_ARMED, A_WAIT} accel_state_e;

  accel_state_e  st;
  rsi_desc_t     desc [NUM_DESC];
  logic [LW-1:0] len;
  logic [LW-1:0] idx;

  always_ff @(posedge clk) begin
    if (cfg_we && int'(cfg_idx) < NUM_DESC) desc[cfg_idx] <= cfg_desc;
  end

  always_comb begin
    ctrl_d       = '0;
    ctrl_d.start = 1'b1;
    ctrl_d.rw    = desc[idx[IW-1:0]].rw;
    ctrl_d.saddr = desc[idx[IW-1:0]].saddr;
    ctrl_d.raddr = desc[idx[IW-1:0]].raddr;
    ctrl_d.size  = desc[idx[IW-1:0]].size;
    ctrl_d.base  = desc[idx[IW-1:0]].base;
  end
  assign ctrl_we = (st == A_ISSUE);
  assign busy    = (st != A_OFF);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= A_OFF;
      len        <= '0;
      idx        <= '0;
      irq        <= 1'b0;
      err        <= 1'b0;
      run_cycles <= '0;
    end else begin
      if (cfg_len_we) len <= (cfg_len > LW'(NUM_DESC)) ? LW'(NUM_DESC) : cfg_len;
      if (irq_ack) irq <= 1'b0;
      if (st != A_OFF) run_cycles <= run_cycles + 1'b1;
      unique case (st)
        A_OFF: begin
          if (en) begin
            idx        <= '0;
            err        <= 1'b0;
            run_cycles <= 32'd1;
            irq        <= 1'b0;
            if (len == '0) irq <= 1'b1;     // nothing to fetch
            else           st  <= A_ISSUE;
          end
        end
        A_ISSUE: st <= A_ARMED;             // control word written this cycle
        A_ARMED: if (status.busy) st <= A_WAIT;
        A_WAIT: begin
          if (status.done && !status.busy) begin
            if (status.error) err <= 1'b1;
            if (idx + 1'b1 == len) begin
              st  <= A_OFF;                 // disable and interrupt
              irq <= 1'b1;
            end else begin
              idx <= idx + 1'b1;
              st  <= A_ISSUE;
            end
          end
        end
        default: st <= A_OFF;
      endcase
    end
  end

endmodule
