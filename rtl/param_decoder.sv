// param_decoder - turns a command word and a parameter byte into the enable lines and
// the parameter value for the data-acquisition modules.
//
// How it works (following the design description):
//   * decode.module_sel is decoded into a one-hot module-enable candidate (mod_ena_sig).
//   * The candidate is ANDed with mod_ins, the modules that are actually inserted. Only
//     if the result equals the candidate (the addressed module is present) and the write
//     control bit is set is the module enable driven out.
//   * Only then are the channel enable (from decode.channel) and the type enable (from
//     decode.ptype) driven, and data_out is loaded with data_in[3:0] for a gain write or
//     data_in[7:4] for a filter write.
// This design's own choices: all outputs are registered (one clock from inputs to
// outputs); enables are held for as long as the accepted command is presented and drop
// when write control is cleared; data_out keeps the last value written so the module
// latch sees a stable bus; a module number at or above NUM_MODULES is treated as absent;
// a type field of 00 or 11 gives no type enable and leaves data_out unchanged.
//
// Interface: clk, rst_n (active-low, synchronous), decode, data_in, mod_ins in;
// mod_ena, ch_ena, type_ena, data_out, plus applied_cmd/applied_param (the last command
// that was accepted, reported back to the PS) out.
module param_decoder
  import can_ctrl_pkg::*;
#(
  parameter int unsigned NUM_MODULES = 4   // one mod_ins bit per module
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  decode_t                decode,
  input  param_t                 data_in,
  input  logic [NUM_MODULES-1:0] mod_ins,
  output logic [NUM_MODULES-1:0] mod_ena,
  output logic [NUM_CH-1:0]      ch_ena,
  output logic [1:0]             type_ena,   // [0] gain, [1] filter
  output logic [3:0]             data_out,
  output decode_t                applied_cmd,
  output param_t                 applied_param
);

  logic [NUM_MODULES-1:0] mod_ena_sig;
  logic [NUM_MODULES-1:0] mod_ins_test;
  logic                   mod_ok;
  logic                   is_gain, is_filter;

  always_comb begin
    mod_ena_sig = '0;
    for (int unsigned m = 0; m < NUM_MODULES; m++)
      if (32'(decode.module_sel) == m) mod_ena_sig[m] = 1'b1;
    mod_ins_test = mod_ena_sig & mod_ins;
    mod_ok    = decode.write && (mod_ena_sig != '0) && (mod_ins_test == mod_ena_sig);
    is_gain   = ptype_e'(decode.ptype) == PTYPE_GAIN;
    is_filter = ptype_e'(decode.ptype) == PTYPE_FILTER;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mod_ena       <= '0;
      ch_ena        <= '0;
      type_ena      <= '0;
      data_out      <= '0;
      applied_cmd   <= '0;
      applied_param <= '0;
    end else begin
      mod_ena  <= mod_ok ? mod_ena_sig : '0;
      ch_ena   <= mod_ok ? NUM_CH'(1) << decode.channel : '0;
      type_ena <= mod_ok ? {is_filter, is_gain} : 2'b00;
      if (mod_ok && is_gain)   data_out <= data_in.gain;
      if (mod_ok && is_filter) data_out <= data_in.filter;
      if (mod_ok) begin
        applied_cmd   <= decode;
        applied_param <= data_in;
      end
    end
  end

  // At most one module, channel and type line is ever active.
  a_onehot_mod:  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(mod_ena));
  a_onehot_ch:   assert property (@(posedge clk) disable iff (!rst_n) $onehot0(ch_ena));
  a_onehot_type: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(type_ena));
  // A channel or type line is only driven together with a module line.
  a_ch_needs_mod: assert property (@(posedge clk) disable iff (!rst_n)
                                   (ch_ena != '0 || type_ena != '0) |-> (mod_ena != '0));

endmodule
