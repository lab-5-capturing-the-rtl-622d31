// i2c_master: write-only I2C bus master for three-byte register writes.
//
// One transfer sends a START condition, the 7-bit device address with the write
// bit, a register address byte and a data byte, then a STOP condition. Every byte
// is sent most significant bit first and followed by an acknowledge clock in which
// the master releases SDA and the addressed device must pull it low. If a byte is
// not acknowledged the transfer is abandoned: the master sends STOP at once and
// reports ack_error.
//
// Bus rules (as in the I2C specification): both lines idle high through pull-ups;
// START is SDA falling while SCL is high, STOP is SDA rising while SCL is high, and
// during data transfer SDA changes only while SCL is low. The lines are open drain:
// scl_low/sda_low high means the master pulls the line low, low means it releases
// it; sda_in is the level on the bus. Clock stretching is not supported.
//
// Timing: every SCL period is four phases of QUARTER system clocks; the default of
// 250 at 100 MHz gives a 100 kHz bus. start is accepted while busy is low; done
// pulses for one clock when the transfer ends (ack_error valid then). The protocol
// follows the I2C bus description; the bus rate, the phase scheme and the
// interface are this design's. Reset asynchronous, active low.
module i2c_master #(
  parameter int unsigned QUARTER = 250
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [6:0] dev_addr,
  input  logic [7:0] reg_addr,
  input  logic [7:0] reg_data,
  output logic       busy,
  output logic       done,
  output logic       ack_error,
  output logic       scl_low,
  output logic       sda_low,
  input  logic       sda_in
);

  typedef enum logic [2:0] {S_IDLE, S_START, S_BIT, S_ACK, S_STOP} state_e;

  localparam int unsigned QW = $clog2(QUARTER + 1);

  state_e        state;
  logic [QW-1:0] tick_cnt;
  logic          tick;
  logic [1:0]    phase;
  logic [2:0]    bit_cnt;
  logic [1:0]    byte_cnt;
  logic [23:0]   shreg;
  logic          scl_r, sda_r;    // 1 = released (high)
  logic          nack;

  assign tick = (tick_cnt == QW'(QUARTER - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      tick_cnt  <= '0;
      phase     <= '0;
      bit_cnt   <= '0;
      byte_cnt  <= '0;
      shreg     <= '0;
      scl_r     <= 1'b1;
      sda_r     <= 1'b1;
      nack      <= 1'b0;
      done      <= 1'b0;
      ack_error <= 1'b0;
    end else begin
      done <= 1'b0;
      if (state == S_IDLE) begin
        tick_cnt <= '0;
        phase    <= '0;
        scl_r    <= 1'b1;
        sda_r    <= 1'b1;
        if (start) begin
          shreg     <= {dev_addr, 1'b0, reg_addr, reg_data};
          bit_cnt   <= 3'd7;
          byte_cnt  <= 2'd0;
          nack      <= 1'b0;
          ack_error <= 1'b0;
          state     <= S_START;
        end
      end else begin
        tick_cnt <= tick ? '0 : tick_cnt + 1'b1;
        if (tick) begin
          phase <= phase + 2'd1;
          unique case (state)
            S_START: begin
              if (phase == 2'd0) sda_r <= 1'b0;          // SDA falls, SCL high
              if (phase == 2'd2) scl_r <= 1'b0;
              if (phase == 2'd3) state <= S_BIT;
            end
            S_BIT: begin
              if (phase == 2'd0) sda_r <= shreg[23];     // change while SCL low
              if (phase == 2'd1) scl_r <= 1'b1;
              if (phase == 2'd3) begin
                scl_r <= 1'b0;
                shreg <= {shreg[22:0], 1'b0};
                if (bit_cnt == 3'd0) state <= S_ACK;
                else                 bit_cnt <= bit_cnt - 3'd1;
              end
            end
            S_ACK: begin
              if (phase == 2'd0) sda_r <= 1'b1;          // release for the slave
              if (phase == 2'd1) scl_r <= 1'b1;
              if (phase == 2'd2) nack  <= sda_in;        // sample while SCL high
              if (phase == 2'd3) begin
                scl_r   <= 1'b0;
                bit_cnt <= 3'd7;
                if (nack || byte_cnt == 2'd2) begin
                  state <= S_STOP;                        // abort or last byte
                end else begin
                  byte_cnt <= byte_cnt + 2'd1;
                  state    <= S_BIT;
                end
              end
            end
            S_STOP: begin
              if (phase == 2'd0) sda_r <= 1'b0;
              if (phase == 2'd1) scl_r <= 1'b1;
              if (phase == 2'd2) sda_r <= 1'b1;          // SDA rises, SCL high
              if (phase == 2'd3) begin
                state     <= S_IDLE;
                done      <= 1'b1;
                ack_error <= nack;
              end
            end
            default: state <= S_IDLE;
          endcase
        end
      end
    end
  end

  assign busy    = (state != S_IDLE);
  assign scl_low = ~scl_r;
  assign sda_low = ~sda_r;

endmodule
