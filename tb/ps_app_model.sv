// ps_app_model - behavioural model (not synthesizable) of the processing-system side:
// the SoC's CAN controller plus the application software on the ARM core, seen at the
// level of whole 8-byte CAN data fields.
//
// Receive path: a frame from the user (rx_valid for one clock, rx_frame) carries the
// command word in byte 0 and the parameter byte (filter high nibble, gain low nibble)
// in byte 1. The model writes both to the EMIO outputs one clock later and holds them
// until the next frame. This byte layout of the user's frame is an assumption.
// Transmit path: the model reads the EMIO inputs every clock. When the PL's
// status-changed flag is set, or when the command the PL reports differs from the one
// in the last frame it sent (a new command took effect), it sends a status frame
// (tx_valid for one clock) and, for a flagged change, pulses the ack bit. Status frame: byte 0 modules inserted, byte 1 module ID, byte 2 command word the
// PL is using, byte 3 its parameter byte, bytes 4-7 zero.
module ps_app_model
  import can_ctrl_pkg::*;
#(
  parameter int unsigned EMIO_W = 64
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 rx_valid,
  input  logic [7:0][7:0]      rx_frame,     // rx_frame[0] is byte 0
  output logic                 tx_valid,
  output logic [7:0][7:0]      tx_frame,
  output logic [EMIO_W-1:0]    emio_gpio_o,
  input  logic [EMIO_W-1:0]    emio_gpio_i
);

  logic [7:0][7:0] last_sent;
  logic [7:0][7:0] status;
  logic            ack_wait;

  always_comb begin
    status    = '0;
    status[0] = 8'(emio_gpio_i[EMIO_I_MODINS_LSB +: 4]);
    status[1] = emio_gpio_i[EMIO_I_MODID_LSB +: 8];
    status[2] = 8'(emio_gpio_i[EMIO_I_CMD_LSB +: DECODE_W]);
    status[3] = emio_gpio_i[EMIO_I_PARAM_LSB +: PARAM_W];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      emio_gpio_o <= '0;
      tx_valid    <= 1'b0;
      tx_frame    <= '0;
      last_sent   <= '0;
      ack_wait    <= 1'b0;
    end else begin
      tx_valid <= 1'b0;
      emio_gpio_o[EMIO_O_ACK_BIT] <= 1'b0;
      if (rx_valid) begin
        emio_gpio_o[EMIO_O_DECODE_LSB +: DECODE_W] <= rx_frame[0][DECODE_W-1:0];
        emio_gpio_o[EMIO_O_PARAM_LSB +: PARAM_W]   <= rx_frame[1];
      end
      if (ack_wait) begin
        ack_wait <= 1'b0;          // let the ack reach the PL before looking again
      end else if (emio_gpio_i[EMIO_I_CHANGED_BIT] || status[3:2] != last_sent[3:2]) begin
        tx_valid  <= 1'b1;
        tx_frame  <= status;
        last_sent <= status;
        emio_gpio_o[EMIO_O_ACK_BIT] <= emio_gpio_i[EMIO_I_CHANGED_BIT];
        ack_wait  <= 1'b1;
      end
    end
  end

endmodule
