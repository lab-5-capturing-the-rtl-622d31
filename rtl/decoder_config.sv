// decoder_config: writes the composite-video register set into the video decoder.
//
// After reset (or on a go pulse) this sequencer walks through a table of 19
// (register address, value) pairs and has i2c_master write each one to the decoder
// at I2C address DEV_ADDR, in table order: the order matters, since register 0x0e
// switches the decoder between its register maps and is written twice. If any
// transfer is not acknowledged the sequence stops, as a failed write must abort,
// and error is raised with err_index naming the failing entry. done rises when the
// whole table has been written.
//
// The table is the composite-video configuration of the lab specification. The
// device address 0x20 (0x40 as an 8-bit write address, the decoder's address with
// its address-select pin low) and the automatic start after reset are this
// design's choices. Reset asynchronous, active low.
module decoder_config #(
  parameter logic [6:0]  DEV_ADDR = 7'h20,
  parameter int unsigned QUARTER  = 250
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       go,          // restart the sequence (it also runs after reset)
  output logic       done,
  output logic       error,
  output logic [4:0] err_index,
  output logic       scl_low,
  output logic       sda_low,
  input  logic       sda_in
);

  localparam int unsigned N_REGS = 19;

  function automatic logic [15:0] table_entry(input logic [4:0] i);
    unique case (i)
      5'd0:  return 16'h00_04;
      5'd1:  return 16'h15_00;
      5'd2:  return 16'h17_41;
      5'd3:  return 16'h27_58;
      5'd4:  return 16'h3a_16;
      5'd5:  return 16'h50_04;
      5'd6:  return 16'h0e_80;
      5'd7:  return 16'h50_20;
      5'd8:  return 16'h52_18;
      5'd9:  return 16'h58_ed;
      5'd10: return 16'h77_c5;
      5'd11: return 16'h7c_93;
      5'd12: return 16'h7d_00;
      5'd13: return 16'hd0_48;
      5'd14: return 16'hd5_a0;
      5'd15: return 16'hd7_ea;
      5'd16: return 16'he4_3e;
      5'd17: return 16'hea_0f;
      5'd18: return 16'h0e_00;
      default: return 16'h00_00;
    endcase
  endfunction

  typedef enum logic [1:0] {C_START, C_WAIT, C_DONE, C_ERROR} cstate_e;

  cstate_e     state;
  logic [4:0]  index;
  logic        i2c_start, i2c_busy, i2c_done, i2c_err;
  logic [15:0] entry;

  assign entry = table_entry(index);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= C_START;
      index     <= '0;
      err_index <= '0;
    end else if (go) begin
      state     <= C_START;
      index     <= '0;
    end else begin
      unique case (state)
        C_START: if (!i2c_busy) state <= C_WAIT;
        C_WAIT: if (i2c_done) begin
          if (i2c_err) begin
            err_index <= index;
            state     <= C_ERROR;
          end else if (index == 5'(N_REGS - 1)) begin
            state <= C_DONE;
          end else begin
            index <= index + 5'd1;
            state <= C_START;
          end
        end
        C_DONE, C_ERROR: ;
      endcase
    end
  end

  assign i2c_start = (state == C_START) && !i2c_busy && !go;
  assign done      = (state == C_DONE);
  assign error     = (state == C_ERROR);

  i2c_master #(.QUARTER(QUARTER)) u_i2c (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (i2c_start),
    .dev_addr (DEV_ADDR),
    .reg_addr (entry[15:8]),
    .reg_data (entry[7:0]),
    .busy     (i2c_busy),
    .done     (i2c_done),
    .ack_error(i2c_err),
    .scl_low  (scl_low),
    .sda_low  (sda_low),
    .sda_in   (sda_in)
  );

endmodule
