// can_ctrl_pkg - types and constants shared by the programmable-logic side of the
// CAN-controlled parameter interface.
//
// The processing system (PS) hands the programmable logic (PL) a 7-bit command word
// ("decode") and an 8-bit parameter byte over the EMIO GPIO bus. The bit layout of the
// command word follows the design description: bit 6 write control, bits 5:4 parameter
// type, bit 3 channel, bits 2:0 module. The one-hot type encoding (01 gain, 10 filter)
// and the EMIO bit positions are this design's own choices.
package can_ctrl_pkg;

  // Command word as sent by the PS (decode[6:0]).
  typedef struct packed {
    logic       write;    // decode[6]   write control: 1 = generate enables and data
    logic [1:0] ptype;    // decode[5:4] parameter type (see ptype_e)
    logic       channel;  // decode[3]   channel within the module
    logic [2:0] module_sel; // decode[2:0] module to enable
  } decode_t;

  // Parameter type field. Each bit drives one type-enable line.
  typedef enum logic [1:0] {
    PTYPE_NONE   = 2'b00,
    PTYPE_GAIN   = 2'b01,  // data_out <= data_in[3:0]
    PTYPE_FILTER = 2'b10,  // data_out <= data_in[7:4]
    PTYPE_BAD    = 2'b11
  } ptype_e;

  // Parameter byte: filter value in the high nibble, gain value in the low nibble.
  typedef struct packed {
    logic [3:0] filter;
    logic [3:0] gain;
  } param_t;

  localparam int unsigned DECODE_W = $bits(decode_t);   // 7
  localparam int unsigned PARAM_W  = $bits(param_t);    // 8
  localparam int unsigned NUM_CH   = 2;                 // decode[3] selects one of two
  localparam int unsigned MODID_W  = 8;                 // module ID read from FMC pins

  // EMIO bit map, PS -> PL (the PS's GPIO outputs)
  localparam int unsigned EMIO_O_DECODE_LSB = 0;   // [6:0]   command word
  localparam int unsigned EMIO_O_PARAM_LSB  = 7;   // [14:7]  parameter byte
  localparam int unsigned EMIO_O_ACK_BIT    = 15;  // [15]    clears the status-changed flag

  // EMIO bit map, PL -> PS (the PS's GPIO inputs)
  localparam int unsigned EMIO_I_MODINS_LSB  = 0;   // [3:0]   modules inserted (switches)
  localparam int unsigned EMIO_I_MODID_LSB   = 8;   // [15:8]  module ID
  localparam int unsigned EMIO_I_CMD_LSB     = 16;  // [22:16] last command applied
  localparam int unsigned EMIO_I_PARAM_LSB   = 24;  // [31:24] parameter byte of that command
  localparam int unsigned EMIO_I_DATA_LSB    = 32;  // [35:32] value now on data_out
  localparam int unsigned EMIO_I_CHANGED_BIT = 40;  // [40]    status changed since last ack

endpackage
