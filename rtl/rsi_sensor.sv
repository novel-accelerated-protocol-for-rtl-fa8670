// rsi_sensor: the RSI slave side of a sensor, used to emulate the slave
// sensors on the bus.
//
// The sensor holds NUM_REGS byte registers at register addresses REG_BASE,
// REG_BASE+1, ... The sensing element loads fresh measurements into all of
// them with sample_we. On the bus the slave follows the RSI protocol: after a
// START it shifts in an 8-bit address and acknowledges only if it equals
// SLAVE_ADDR; it then shifts in the 7-bit register address and the R/W bit
// and acknowledges only if it holds that register. On a read it sends the
// register MSB first and continues with the next register for as long as the
// master answers ACK; a NACK ends it. On a write it stores each received byte
// and acknowledges it. A STOP or a new START always returns it to the start.
// From the document: the address widths, the acknowledge rules and the frame
// order. This design's own: the register pointer advances after every byte
// and wraps to the first register, and a bus write wins over a sample load in
// the same cycle.
//
// Timing: SCL and SDA are brought into the clk domain through two flops, so
// the slave sees the bus two to three cycles late; it changes SDA right after
// it sees SCL fall. A master must therefore leave at least four clk cycles
// between SCL falling and sampling SDA. sda_o is open drain (0 pulls low).
module rsi_sensor
  import rsi_pkg::*;
#(
  parameter logic [SADDR_W-1:0] SLAVE_ADDR = 8'hBB,
  parameter logic [RADDR_W-1:0] REG_BASE   = 7'h50,
  parameter int unsigned        NUM_REGS   = 3
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // RSI bus
  input  logic                             scl_i,
  input  logic                             sda_i,
  output logic                             sda_o,
  // sensing element
  input  logic                             sample_we,
  input  logic [NUM_REGS-1:0][DATA_W-1:0]  sample_data,
  output logic [NUM_REGS-1:0][DATA_W-1:0]  regs_o
);

  localparam int unsigned PW = (NUM_REGS > 1) ? $clog2(NUM_REGS) : 1;

  typedef enum logic [3:0] {
    S_IDLE, S_ADDR, S_ADDR_ACK, S_REG, S_REG_ACK, S_TX, S_TX_ACK, S_RX, S_RX_ACK
  } slave_state_e;

  logic [2:0] scl_sync, sda_sync;   // two sync flops plus one history flop
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scl_sync <= '1;
      sda_sync <= '1;
    end else begin
      scl_sync <= {scl_sync[1:0], scl_i};
      sda_sync <= {sda_sync[1:0], sda_i};
    end
  end
  wire scl_s = scl_sync[1], scl_d = scl_sync[2];
  wire sda_s = sda_sync[1], sda_d = sda_sync[2];
  wire rise    = scl_s && !scl_d;
  wire fall    = !scl_s && scl_d;
  wire start_c = scl_s && scl_d && sda_d && !sda_s;
  wire stop_c  = scl_s && scl_d && !sda_d && sda_s;

  slave_state_e       st;
  logic [3:0]         cnt;
  logic [7:0]         sh;
  logic [DATA_W-1:0]  tx;
  logic [PW-1:0]      ptr;
  logic               rw_q, ack_q;
  logic [NUM_REGS-1:0][DATA_W-1:0] regs;

  function automatic logic [PW-1:0] next_ptr(input logic [PW-1:0] p);
    return (int'(p) == NUM_REGS - 1) ? '0 : p + 1'b1;
  endfunction

  wire [RADDR_W-1:0] req_reg = sh[7:1];
  wire               reg_ok  = (req_reg >= REG_BASE) &&
                               (int'(req_reg) - int'(REG_BASE) < NUM_REGS);
  wire [RADDR_W-1:0] req_off = req_reg - REG_BASE;

  assign regs_o = regs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= S_IDLE;
      cnt   <= '0;
      sh    <= '0;
      tx    <= '0;
      ptr   <= '0;
      rw_q  <= 1'b0;
      ack_q <= 1'b1;
      sda_o <= 1'b1;
      regs  <= '0;
    end else begin
      if (sample_we) regs <= sample_data;
      if (start_c) begin
        st    <= S_ADDR;
        cnt   <= '0;
        sda_o <= 1'b1;
      end else if (stop_c) begin
        st    <= S_IDLE;
        sda_o <= 1'b1;
      end else begin
        unique case (st)
          S_IDLE: sda_o <= 1'b1;
          S_ADDR, S_REG, S_RX: begin
            if (rise) begin
              sh  <= {sh[6:0], sda_s};
              cnt <= cnt + 1'b1;
            end else if (fall && cnt == 4'd8) begin
              cnt <= '0;
              if (st == S_ADDR) begin
                if (sh == SLAVE_ADDR) begin
                  sda_o <= 1'b0;
                  st    <= S_ADDR_ACK;
                end else begin
                  st <= S_IDLE;           // not addressed: wait for START
                end
              end else if (st == S_REG) begin
                if (reg_ok) begin
                  sda_o <= 1'b0;
                  ptr   <= req_off[PW-1:0];
                  rw_q  <= sh[0];
                  st    <= S_REG_ACK;
                end else begin
                  st <= S_IDLE;           // no such register: NACK
                end
              end else begin              // S_RX: store the byte, ACK it
                regs[ptr] <= sh;
                ptr       <= next_ptr(ptr);
                sda_o     <= 1'b0;
                st        <= S_RX_ACK;
              end
            end
          end
          S_ADDR_ACK: if (fall) begin
            sda_o <= 1'b1;
            st    <= S_REG;
          end
          S_RX_ACK: if (fall) begin
            sda_o <= 1'b1;
            st    <= S_RX;
          end
          S_REG_ACK: if (fall) begin
            if (rw_q) begin
              tx    <= regs[ptr];
              sda_o <= regs[ptr][DATA_W-1];
              cnt   <= 4'd1;
              st    <= S_TX;
            end else begin
              sda_o <= 1'b1;
              st    <= S_RX;
            end
          end
          S_TX: if (fall) begin
            if (cnt == 4'd8) begin
              sda_o <= 1'b1;              // release for the master's ACK
              st    <= S_TX_ACK;
            end else begin
              sda_o <= tx[DATA_W-2];
              tx    <= tx << 1;
              cnt   <= cnt + 1'b1;
            end
          end
          S_TX_ACK: begin
            if (rise) ack_q <= sda_s;
            if (fall) begin
              if (!ack_q) begin
                tx    <= regs[next_ptr(ptr)];
                sda_o <= regs[next_ptr(ptr)][DATA_W-1];
                ptr   <= next_ptr(ptr);
                cnt   <= 4'd1;
                st    <= S_TX;
              end else begin
                st <= S_IDLE;             // NACK: master is done
              end
            end
          end
          default: st <= S_IDLE;
        endcase
      end
    end
  end

endmodule
