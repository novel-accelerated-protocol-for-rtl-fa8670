// rsi_control_reg: the control register between the hardware accelerator and
// the RSI block.
//
// The accelerator writes a whole control word (we/d); the register hands it
// to the RSI block, which acts on it while its start bit is set. When the RSI
// block reports that it has taken the command (accept pulse) the start bit is
// cleared, so that one write starts exactly one fetch cycle; the other fields
// stay readable. A write in the same cycle as accept wins. The document names
// the register and its role (the accelerator "modifies the control register
// to command the RSI block"); the self-clearing start bit is this design's
// own choice. Timing: q follows a write on the next clock edge.
module rsi_control_reg
  import rsi_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      we,      // accelerator writes a control word
  input  rsi_ctrl_t d,
  input  logic      accept,  // RSI block took the command
  output rsi_ctrl_t q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      q <= '0;
    else if (we)     q <= d;
    else if (accept) q.start <= 1'b0;
  end

endmodule
