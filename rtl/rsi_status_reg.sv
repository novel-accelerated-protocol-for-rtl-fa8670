// rsi_status_reg: the status register through which the hardware accelerator
// monitors the RSI block.
//
// Every cycle it records the RSI block's state update: the FSM state, busy
// (state not idle) and the number of bytes moved. Two flags are sticky: done
// is set when the RSI block finishes a frame (STOP sent) and error is set if
// that frame ended on a missing acknowledge; both are cleared when the RSI
// block accepts the next command. The document gives the register and its
// purpose ("status of the RSI block is continuously monitored by the hardware
// accelerator with the help of status register"); the fields are this
// design's own. Timing: q reflects an update one clock edge later.
module rsi_status_reg
  import rsi_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  rsi_update_t upd,
  output rsi_status_t q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
    end else begin
      q.state <= upd.state;
      q.busy  <= (upd.state != ST_IDLE);
      q.bytes <= upd.bytes;
      if (upd.accept) begin
        q.done  <= 1'b0;
        q.error <= 1'b0;
      end else if (upd.done) begin
        q.done  <= 1'b1;
        q.error <= upd.nack;
      end
    end
  end

endmodule
