// rsi_buffer: the memory element that holds fetched sensor data.
//
// A byte-wide dual-port RAM. Port A belongs to the RSI block, which writes
// each received byte (and reads bytes to send on a write frame); port B
// belongs to the CPU, which reads the sensor data after the interrupt and
// may fill bytes to be written to a sensor. Reads are synchronous: rdata
// shows the addressed byte one clock after the address. If both ports write
// the same address in one cycle, port A's byte is kept. The document names
// the memory and its role; its depth (256 bytes, matching the 8-bit buffer
// address) and the port arrangement are this design's own choices.
module rsi_buffer
  import rsi_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  // port A: RSI block
  input  logic [$clog2(DEPTH)-1:0] a_addr,
  input  logic                     a_we,
  input  logic [DATA_W-1:0]        a_wdata,
  output logic [DATA_W-1:0]        a_rdata,
  // port B: CPU
  input  logic [$clog2(DEPTH)-1:0] b_addr,
  input  logic                     b_we,
  input  logic [DATA_W-1:0]        b_wdata,
  output logic [DATA_W-1:0]        b_rdata
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (b_we && !(a_we && a_addr == b_addr)) mem[b_addr] <= b_wdata;
    if (a_we) mem[a_addr] <= a_wdata;
    a_rdata <= mem[a_addr];
    b_rdata <= mem[b_addr];
  end

endmodule
