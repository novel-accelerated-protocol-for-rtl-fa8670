// rsi_system: the complete accelerated sensor-fetch system: the master SoC
// (without its CPU, whose signals are ports here) and NUM_SENSORS slave
// sensors on one shared open-drain RSI bus.
//
// SCL is driven only by the master; SDA is the wired AND of the master's and
// every sensor's open-drain output, as pull-up resistors would make it. The
// sensors get consecutive addresses SENSOR_ADDR0, SENSOR_ADDR0+1, ... and
// each holds NUM_REGS registers from REG_BASE on, refreshed through its
// sample port. The defaults follow the hardware experiments of the document
// (three sensors with three 8-bit registers each); 8-bit slave addresses
// allow up to 256 sensors. The addresses 0xBB and register 0x50 are those of
// the published single-byte read simulation.
//
// Interface: the CPU-side ports of rsi_soc; sample_we[i]/sample_data[i] load
// sensor i's registers; sensor_regs shows them; scl/sda show the bus.
module rsi_system
  import rsi_pkg::*;
#(
  parameter int unsigned        CLK_HZ       = 50_000_000,
  parameter int unsigned        SCL_HZ       = 100_000,
  parameter int unsigned        QUARTER      = CLK_HZ / (4 * SCL_HZ),
  parameter int unsigned        NUM_DESC     = 9,
  parameter int unsigned        NUM_SENSORS  = 3,
  parameter int unsigned        NUM_REGS     = 3,
  parameter logic [SADDR_W-1:0] SENSOR_ADDR0 = 8'hBB,
  parameter logic [RADDR_W-1:0] REG_BASE     = 7'h50
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
  // sensing elements
  input  logic [NUM_SENSORS-1:0]                             sample_we,
  input  logic [NUM_SENSORS-1:0][NUM_REGS-1:0][DATA_W-1:0]   sample_data,
  output logic [NUM_SENSORS-1:0][NUM_REGS-1:0][DATA_W-1:0]   sensor_regs,
  // bus observation
  output logic                          scl,
  output logic                          sda
);

  logic                   m_scl, m_sda;
  logic [NUM_SENSORS-1:0] s_sda;

  assign scl = m_scl;
  assign sda = m_sda & (&s_sda);

  rsi_soc #(
    .CLK_HZ(CLK_HZ), .SCL_HZ(SCL_HZ), .QUARTER(QUARTER), .NUM_DESC(NUM_DESC)
  ) u_soc (
    .clk, .rst_n,
    .cfg_we, .cfg_idx, .cfg_desc, .cfg_len_we, .cfg_len,
    .en, .irq, .irq_ack, .busy, .err, .run_cycles,
    .cpu_addr, .cpu_we, .cpu_wdata, .cpu_rdata, .status,
    .scl_o(m_scl), .sda_o(m_sda), .sda_i(sda)
  );

  for (genvar i = 0; i < NUM_SENSORS; i++) begin : g_sensor
    rsi_sensor #(
      .SLAVE_ADDR(SENSOR_ADDR0 + SADDR_W'(i)),
      .REG_BASE  (REG_BASE),
      .NUM_REGS  (NUM_REGS)
    ) u_sensor (
      .clk, .rst_n,
      .scl_i(scl), .sda_i(sda), .sda_o(s_sda[i]),
      .sample_we(sample_we[i]), .sample_data(sample_data[i]),
      .regs_o(sensor_regs[i])
    );
  end

endmodule
