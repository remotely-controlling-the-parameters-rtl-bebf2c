// zc702_pl_top - programmable-logic (PL) side of a CAN-controlled parameter interface
// for a data-acquisition system on a Zynq-7000 SoC.
//
// The user sets gain/filter parameters from a PC; the command reaches the SoC's
// processing system (PS) as a CAN frame, and PS software forwards it to the PL over the
// EMIO GPIO bus (up to 64 bits each way). The PL turns it into module, channel and type
// enable lines plus a 4-bit parameter value for the external modules (brought out on
// the FMC connector), and reports the inserted modules and the module ID back to the PS,
// which sends a CAN frame to the user whenever they change.
//
// Structure: param_decoder (command -> enables and data) and status_monitor (switches
// and module ID -> PS, with a change flag). This module only wires them to the EMIO bus.
// EMIO bit map (own choice, see can_ctrl_pkg):
//   PS -> PL  emio_gpio_o: [6:0] command word, [14:7] parameter byte, [15] status ack
//   PL -> PS  emio_gpio_i: [3:0] modules inserted, [15:8] module ID, [22:16] last command
//             applied, [31:24] its parameter byte, [35:32] data_out, [40] status changed;
//             all other bits read 0.
// The mod_ins input feeding the decoder is the synchronised switch value from the
// status monitor, so a decision always uses the same value the PS reports.
// Timing: a command on emio_gpio_o shows on the enables and data_out one clock later;
// a switch change shows on emio_gpio_i two clocks later.
module zc702_pl_top
  import can_ctrl_pkg::*;
#(
  parameter int unsigned EMIO_W      = 64,  // EMIO width, the PS maximum
  parameter int unsigned NUM_MODULES = 4    // modules / module-inserted switches
) (
  input  logic                   clk,            // PL fabric clock from the PS
  input  logic                   rst_n,          // active-low reset from the PS
  input  logic [EMIO_W-1:0]      emio_gpio_o,    // PS GPIO outputs
  output logic [EMIO_W-1:0]      emio_gpio_i,    // PS GPIO inputs
  input  logic [NUM_MODULES-1:0] sw_mod_ins,     // module-inserted switches
  input  logic [MODID_W-1:0]     fmc_module_id,  // module ID pins on the FMC connector
  output logic [NUM_MODULES-1:0] mod_ena,        // module enables to FMC
  output logic [NUM_CH-1:0]      ch_ena,         // channel enables to FMC
  output logic [1:0]             type_ena,       // [0] gain, [1] filter enable to FMC
  output logic [3:0]             data_out        // parameter value to FMC
);

  // The map needs bits up to EMIO_I_CHANGED_BIT.
  initial assert (EMIO_W > EMIO_I_CHANGED_BIT)
    else $fatal(1, "EMIO_W too small for the EMIO bit map");

  decode_t                decode;
  param_t                 data_in;
  logic                   ack;
  logic [NUM_MODULES-1:0] mod_ins;
  logic [MODID_W-1:0]     module_id;
  logic                   changed;
  decode_t                applied_cmd;
  param_t                 applied_param;

  assign decode  = decode_t'(emio_gpio_o[EMIO_O_DECODE_LSB +: DECODE_W]);
  assign data_in = param_t'(emio_gpio_o[EMIO_O_PARAM_LSB +: PARAM_W]);
  assign ack     = emio_gpio_o[EMIO_O_ACK_BIT];

  status_monitor #(.NUM_MODULES(NUM_MODULES)) u_status (
    .clk, .rst_n,
    .mod_ins_raw   (sw_mod_ins),
    .module_id_raw (fmc_module_id),
    .ack,
    .mod_ins, .module_id, .changed
  );

  param_decoder #(.NUM_MODULES(NUM_MODULES)) u_decoder (
    .clk, .rst_n,
    .decode, .data_in, .mod_ins,
    .mod_ena, .ch_ena, .type_ena, .data_out,
    .applied_cmd, .applied_param
  );

  always_comb begin
    emio_gpio_i = '0;
    emio_gpio_i[EMIO_I_MODINS_LSB +: NUM_MODULES] = mod_ins;
    emio_gpio_i[EMIO_I_MODID_LSB  +: MODID_W]     = module_id;
    emio_gpio_i[EMIO_I_CMD_LSB    +: DECODE_W]    = applied_cmd;
    emio_gpio_i[EMIO_I_PARAM_LSB  +: PARAM_W]     = applied_param;
    emio_gpio_i[EMIO_I_DATA_LSB   +: 4]           = data_out;
    emio_gpio_i[EMIO_I_CHANGED_BIT]               = changed;
  end

endmodule
