// rsi_soc: the master side of the accelerated sensor interface, everything
// of the master system-on-chip except the CPU.
//
// The CPU programs slave details into the hardware accelerator (rsi_accel)
// and pulses en. The accelerator writes a control word into the control
// register (rsi_control_reg); the RSI block (rsi_master) takes it, runs one
// RSI frame on the bus and writes the received bytes into the buffer
// (rsi_buffer); its state updates go into the status register
// (rsi_status_reg), which the accelerator watches. When every programmed
// fetch is done the accelerator raises irq, and the CPU reads the sensor data
// from the buffer's second port whenever it likes. The connections are those
// of the published block diagram; the CPU's signals are this module's ports.
//
// Interface: cfg_*/en/irq/irq_ack/busy/err/run_cycles as in rsi_accel;
// cpu_addr/cpu_we/cpu_wdata/cpu_rdata reach the buffer (one cycle read
// latency); status shows the status register; scl_o/sda_o/sda_i are the
// open-drain RSI bus pins (0 = pull low). CLK_HZ is the system clock and
// SCL_HZ the bus clock (100 kHz in the document).
module rsi_soc
  import rsi_pkg::*;
#(
  parameter int unsigned CLK_HZ   = 50_000_000,
  parameter int unsigned SCL_HZ   = 100_000,
  parameter int unsigned QUARTER  = CLK_HZ / (4 * SCL_HZ),
  parameter int unsigned NUM_DESC = 9
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // CPU: accelerator
  input  logic                          cfg_we,
  input  logic [$clog2(NUM_DESC)-1:0]   cfg_idx,
  input  rsi_desc_t                     cfg_desc,
  input  logic                          cfg_len_we,
  input  logic [$clog2(NUM_DESC+1)-1:0] cfg_len,
  input  logic                          en,
  output logic                          irq,
  input  logic                          irq_ack,
  output logic                          busy,
  output logic                          err,
  output logic [31:0]                   run_cycles,
  // CPU: buffer
  input  logic [BADDR_W-1:0]            cpu_addr,
  input  logic                          cpu_we,
  input  logic [DATA_W-1:0]             cpu_wdata,
  output logic [DATA_W-1:0]             cpu_rdata,
  output rsi_status_t                   status,
  // RSI bus
  output logic                          scl_o,
  output logic                          sda_o,
  input  logic                          sda_i
);

  logic              ctrl_we;
  rsi_ctrl_t         ctrl_d, ctrl_q;
  rsi_update_t       upd;
  logic [BADDR_W-1:0] m_addr;
  logic              m_we;
  logic [DATA_W-1:0] m_wdata, m_rdata;

  rsi_accel #(.NUM_DESC(NUM_DESC)) u_accel (
    .clk, .rst_n,
    .cfg_we, .cfg_idx, .cfg_desc, .cfg_len_we, .cfg_len,
    .en, .irq, .irq_ack, .busy, .err, .run_cycles,
    .ctrl_we, .ctrl_d, .status
  );

  rsi_control_reg u_ctrl (
    .clk, .rst_n, .we(ctrl_we), .d(ctrl_d), .accept(upd.accept), .q(ctrl_q)
  );

  rsi_master #(.CLK_HZ(CLK_HZ), .SCL_HZ(SCL_HZ), .QUARTER(QUARTER)) u_rsi (
    .clk, .rst_n, .ctrl(ctrl_q), .upd,
    .mem_addr(m_addr), .mem_we(m_we), .mem_wdata(m_wdata), .mem_rdata(m_rdata),
    .scl_o, .sda_o, .sda_i
  );

  rsi_status_reg u_status (
    .clk, .rst_n, .upd, .q(status)
  );

  rsi_buffer #(.DEPTH(1 << BADDR_W)) u_buf (
    .clk,
    .a_addr(m_addr), .a_we(m_we), .a_wdata(m_wdata), .a_rdata(m_rdata),
    .b_addr(cpu_addr), .b_we(cpu_we), .b_wdata(cpu_wdata), .b_rdata(cpu_rdata)
  );

endmodule
