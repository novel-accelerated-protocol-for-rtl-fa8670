// rsi_master: the Robot Sensor Interface (RSI) block, a bus master for the
// RSI protocol.
//
// A fetch cycle is started by the control word (ctrl.start). The master then
// sends, one bit per SCL period and MSB first:
//   START, 8-bit slave address, [slave ACK], 7-bit register address and the
//   R/W bit, [slave ACK], then data bytes. On a read the slave sends each
//   byte and the master answers ACK, or NACK after the last one; on a write
//   the master sends each byte and the slave answers ACK. A STOP ends the
//   frame. If either address is not acknowledged the master goes straight to
//   STOP and reports the error. A one-byte read therefore takes
//   1 + 8 + 1 + 7 + 1 + 1 + 8 + 1 + 1 = 29 SCL periods, ten fewer than the
//   same read in I2C, which needs a second START and a second address byte.
//
// Received bytes are written to the buffer at ctrl.base, ctrl.base+1, ...;
// bytes to send are read from the same addresses (the buffer has one cycle of
// read latency, which the bit timing hides). The FSM states and their numbers
// (0 idle .. 9 stop) follow the published timing of a single-byte read; the
// byte counter that ends the burst follows the published flow chart.
//
// Bit timing (this design's own): every SCL period is four quarters of
// QUARTER clock cycles. SCL is low in quarters 0-1 and high in 2-3; the
// master changes SDA at the start of quarter 1 and samples SDA in the last
// cycle of quarter 3, just before SCL falls. START holds SCL high and pulls
// SDA low at quarter 2; STOP releases SDA at quarter 3 with SCL high. Both
// lines are open drain: scl_o/sda_o = 0 pulls the line low, 1 releases it.
// QUARTER defaults to CLK_HZ / (4 * SCL_HZ); SCL_HZ = 100 kHz is the rate
// used in the document, CLK_HZ is an assumed system clock. A slave that
// synchronises SCL through two flops needs QUARTER >= 2. Clock stretching
// is not supported.
module rsi_master
  import rsi_pkg::*;
#(
  parameter int unsigned CLK_HZ  = 50_000_000,
  parameter int unsigned SCL_HZ  = 100_000,
  parameter int unsigned QUARTER = CLK_HZ / (4 * SCL_HZ)
) (
  input  logic               clk,
  input  logic               rst_n,
  // control word from the control register
  input  rsi_ctrl_t          ctrl,
  // state update to the status register
  output rsi_update_t        upd,
  // buffer port
  output logic [BADDR_W-1:0] mem_addr,
  output logic               mem_we,
  output logic [DATA_W-1:0]  mem_wdata,
  input  logic [DATA_W-1:0]  mem_rdata,
  // RSI bus, open drain
  output logic               scl_o,
  output logic               sda_o,
  input  logic               sda_i
);

  localparam int unsigned QW = (QUARTER > 1) ? $clog2(QUARTER) : 1;

  rsi_state_e         state;
  logic [QW-1:0]      qcnt;      // cycles left in the present quarter
  logic [1:0]         q;         // quarter within the SCL period
  logic [2:0]         bitn;      // bit index within the present field
  rsi_ctrl_t          cmd;       // latched command
  logic [DATA_W-1:0]  shreg;     // transmit / receive shift register
  logic [SIZE_W:0]    left;      // bytes still to move, this one included
  logic [SIZE_W:0]    nbytes;    // bytes moved so far
  logic               nack_err;
  logic               done_p, accept_p;

  wire tick    = (qcnt == '0);           // last cycle of a quarter
  wire bit_end = tick && (q == 2'd3);    // last cycle of an SCL period
  wire last    = (left == 1);

  // value the master puts on SDA for the present bit (1 = released)
  logic drive_bit;
  always_comb begin
    unique case (state)
      ST_SADDR: drive_bit = cmd.saddr[bitn];
      ST_RADDR: drive_bit = cmd.raddr[bitn];
      ST_RW:    drive_bit = cmd.rw;
      ST_DATA:  drive_bit = cmd.rw ? 1'b1 : shreg[bitn];
      ST_DACK:  drive_bit = cmd.rw ? last : 1'b1;  // read: ACK, NACK on last
      default:  drive_bit = 1'b1;                  // ACK slots released
    endcase
  end

  assign mem_addr  = cmd.base + nbytes[BADDR_W-1:0];
  assign mem_wdata = {shreg[DATA_W-2:0], sda_i};
  assign mem_we    = (state == ST_DATA) && cmd.rw && bit_end && (bitn == 3'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= ST_IDLE;
      qcnt     <= '0;
      q        <= '0;
      bitn     <= '0;
      cmd      <= '0;
      shreg    <= '0;
      left     <= '0;
      nbytes   <= '0;
      nack_err <= 1'b0;
      done_p   <= 1'b0;
      accept_p <= 1'b0;
      scl_o    <= 1'b1;
      sda_o    <= 1'b1;
    end else begin
      done_p   <= 1'b0;
      accept_p <= 1'b0;
      if (state == ST_IDLE) begin
        scl_o <= 1'b1;
        sda_o <= 1'b1;
        if (ctrl.start) begin
          cmd      <= ctrl;
          left     <= (ctrl.size == '0) ? (SIZE_W+1)'(1) : {1'b0, ctrl.size};
          nbytes   <= '0;
          nack_err <= 1'b0;
          accept_p <= 1'b1;
          state    <= ST_START;
          q        <= 2'd0;
          qcnt     <= QW'(QUARTER - 1);
        end
      end else begin
        qcnt <= tick ? QW'(QUARTER - 1) : qcnt - 1'b1;
        if (tick) q <= q + 1'b1;

        // end of an SCL period: sample SDA and choose the next state
        if (bit_end) begin
          unique case (state)
            ST_START: begin
              state <= ST_SADDR;
              bitn  <= 3'd7;
            end
            ST_SADDR: begin
              if (bitn == 3'd0) state <= ST_SACK;
              else              bitn  <= bitn - 1'b1;
            end
            ST_SACK: begin
              if (!sda_i) begin
                state <= ST_RADDR;
                bitn  <= 3'd6;
              end else begin
                state    <= ST_STOP;
                nack_err <= 1'b1;
              end
            end
            ST_RADDR: begin
              if (bitn == 3'd0) state <= ST_RW;
              else              bitn  <= bitn - 1'b1;
            end
            ST_RW: state <= ST_RACK;
            ST_RACK: begin
              if (!sda_i) begin
                state <= ST_DATA;
                bitn  <= 3'd7;
                shreg <= mem_rdata;          // first byte to send (write)
              end else begin
                state    <= ST_STOP;
                nack_err <= 1'b1;
              end
            end
            ST_DATA: begin
              shreg <= cmd.rw ? {shreg[DATA_W-2:0], sda_i} : shreg;
              if (bitn == 3'd0) begin
                state  <= ST_DACK;
                nbytes <= nbytes + 1'b1;
              end else begin
                bitn <= bitn - 1'b1;
              end
            end
            ST_DACK: begin
              left <= left - 1'b1;
              if (!cmd.rw && sda_i) begin
                state    <= ST_STOP;           // slave refused the byte
                nack_err <= 1'b1;
              end else if (last) begin
                state <= ST_STOP;
              end else begin
                state <= ST_DATA;
                bitn  <= 3'd7;
                shreg <= mem_rdata;            // next byte to send (write)
              end
            end
            ST_STOP: begin
              state  <= ST_IDLE;
              done_p <= 1'b1;
            end
            default: state <= ST_IDLE;
          endcase
        end

        // drive the lines for the quarter that starts next cycle
        if (tick) begin
          unique case (state)
            ST_START: begin
              // q+1 is the next quarter; at the period end the next state
              // is the first address bit, which starts with SCL low
              if (q == 2'd3) begin
                scl_o <= 1'b0;
              end else begin
                scl_o <= 1'b1;
                sda_o <= (q == 2'd0);   // SDA falls when quarter 2 begins
              end
            end
            ST_STOP: begin
              unique case (q)
                2'd0: sda_o <= 1'b0;                   // into quarter 1
                2'd1: scl_o <= 1'b1;                   // into quarter 2
                2'd2: sda_o <= 1'b1;                   // into quarter 3
                default: begin scl_o <= 1'b1; sda_o <= 1'b1; end
              endcase
            end
            default: begin
              unique case (q)
                2'd0: sda_o <= drive_bit;              // into quarter 1
                2'd1: scl_o <= 1'b1;                   // into quarter 2
                2'd3: scl_o <= 1'b0;                   // into next quarter 0
                default: ;
              endcase
            end
          endcase
        end
      end
    end
  end

  assign upd.state  = state;
  assign upd.accept = accept_p;
  assign upd.done   = done_p;
  assign upd.nack   = nack_err;
  assign upd.bytes  = nbytes;

`ifndef SYNTHESIS
  initial assert (QUARTER >= 1) else $error("QUARTER must be at least 1");
  // SDA may change only while SCL is low, except for START and STOP
  property p_sda_stable;
    @(posedge clk) disable iff (!rst_n)
      (scl_o && $past(scl_o) && state != ST_START && state != ST_STOP &&
       $past(state) != ST_START && $past(state) != ST_STOP) |-> (sda_o == $past(sda_o));
  endproperty
  a_sda_stable: assert property (p_sda_stable);
`endif

endmodule
