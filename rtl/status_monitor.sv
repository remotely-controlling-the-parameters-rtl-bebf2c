// status_monitor - watches the system signals the PS reports to the user: which
// modules are inserted (mod_ins_raw, one switch per module on the evaluation board)
// and the 8-bit module ID read from the FMC connector.
//
// How it works: both groups of inputs are asynchronous to the PL clock, so each bit
// passes a two-flop synchroniser. The synchronised values are compared with the values
// of the previous clock; any difference sets the sticky flag `changed`, which the PS
// clears by pulsing `ack`. A change in the same clock as the ack wins, so no change is
// lost. The PS reads mod_ins and module_id directly and uses `changed` to decide when
// to send a status frame to the user.
// The design description only says that the PL constantly monitors these signals and
// hands them to the PS, which reports every change; the synchroniser and the sticky
// flag with acknowledge are this design's own choices.
//
// Timing: an input change is visible on mod_ins/module_id 2 clocks later, and `changed`
// is set 3 clocks after the input change. Reset is synchronous, active low.
module status_monitor
  import can_ctrl_pkg::*;
#(
  parameter int unsigned NUM_MODULES = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NUM_MODULES-1:0] mod_ins_raw,
  input  logic [MODID_W-1:0]     module_id_raw,
  input  logic                   ack,
  output logic [NUM_MODULES-1:0] mod_ins,
  output logic [MODID_W-1:0]     module_id,
  output logic                   changed
);

  localparam int unsigned W = NUM_MODULES + MODID_W;

  logic [W-1:0] meta, sync, prev;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      meta    <= '0;
      sync    <= '0;
      prev    <= '0;
      changed <= 1'b0;
    end else begin
      meta <= {module_id_raw, mod_ins_raw};
      sync <= meta;
      prev <= sync;
      if (sync != prev) changed <= 1'b1;
      else if (ack)     changed <= 1'b0;
    end
  end

  assign mod_ins   = sync[NUM_MODULES-1:0];
  assign module_id = sync[W-1:NUM_MODULES];

endmodule
