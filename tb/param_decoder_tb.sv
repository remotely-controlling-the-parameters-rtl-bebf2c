// param_decoder_tb - exhaustive self-checking test of param_decoder.
//
// Every command word (128 values) is applied with every module-inserted pattern
// (16 values) and a random parameter byte. A reference model, written here from the
// rules in the design description, predicts the enables and the held data_out value.
// Outputs are checked exactly one clock after the inputs change (the block's latency).
// Counts how often each case occurs and fails if one never did.
module param_decoder_tb;
  import can_ctrl_pkg::*;

  localparam int unsigned NM = 4;

  logic          clk = 0;
  logic          rst_n;
  decode_t       decode;
  param_t        data_in;
  logic [NM-1:0] mod_ins;
  logic [NM-1:0] mod_ena;
  logic [1:0]    ch_ena, type_ena;
  logic [3:0]    data_out;
  decode_t       applied_cmd;
  param_t        applied_param;

  int checks = 0, failures = 0;
  int n_accept = 0, n_absent = 0, n_nowrite = 0, n_range = 0, n_gain = 0, n_filter = 0;

  param_decoder #(.NUM_MODULES(NM)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h (decode=%b mod_ins=%b data_in=%h)",
               what, got, exp, decode, mod_ins, data_in);
    end
  endtask

  logic [3:0] exp_data = 4'h0;
  decode_t    exp_cmd  = '0;
  param_t     exp_par  = '0;

  initial begin
    logic [3:0] e_mod;
    logic [1:0] e_ch, e_type;
    logic       present;
    rst_n = 0; decode = '0; data_in = '0; mod_ins = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("reset data_out", 32'(data_out), 0);
    check("reset mod_ena", 32'(mod_ena), 0);
    for (int d = 0; d < 128; d++) begin
      for (int mi = 0; mi < 16; mi++) begin
        decode  = decode_t'(d[6:0]);
        mod_ins = mi[3:0];
        data_in = param_t'($urandom_range(0, 255));
        // reference model
        present = 32'(decode.module_sel) < NM && mod_ins[decode.module_sel[1:0]];
        if (decode.write && 32'(decode.module_sel) >= NM) n_range++;
        if (decode.write && 32'(decode.module_sel) < NM && !present) n_absent++;
        if (!decode.write) n_nowrite++;
        if (decode.write && present) begin
          n_accept++;
          e_mod  = 4'b1 << decode.module_sel;
          e_ch   = decode.channel ? 2'b10 : 2'b01;
          e_type = (decode.ptype == 2'b01 || decode.ptype == 2'b10) ? decode.ptype : 2'b00;
          if (decode.ptype == 2'b01) begin exp_data = data_in[3:0]; n_gain++; end
          if (decode.ptype == 2'b10) begin exp_data = data_in[7:4]; n_filter++; end
          exp_cmd = decode;
          exp_par = data_in;
        end else begin
          e_mod = '0; e_ch = '0; e_type = '0;
        end
        // nothing may change before the clock edge
        #1;
        @(negedge clk);
        check("mod_ena", 32'(mod_ena), 32'(e_mod));
        check("ch_ena", 32'(ch_ena), 32'(e_ch));
        check("type_ena", 32'(type_ena), 32'(e_type));
        check("data_out", 32'(data_out), 32'(exp_data));
        check("applied_cmd", 32'(applied_cmd), 32'(exp_cmd));
        check("applied_param", 32'(applied_param), 32'(exp_par));
      end
    end
    // latency: a new accepted command is not visible before the edge, visible after it
    decode = decode_t'({1'b1, 2'b01, 1'b0, 3'd2}); mod_ins = 4'b0100; data_in = 8'h5A;
    @(posedge clk); #1;
    check("latency 1 clock", 32'(data_out), 32'hA);
    check("latency mod_ena", 32'(mod_ena), 32'b0100);
    if (n_accept == 0) begin failures++; $display("FAIL no accepted write"); end
    if (n_absent == 0) begin failures++; $display("FAIL no absent-module write"); end
    if (n_nowrite == 0) begin failures++; $display("FAIL no write-control-low case"); end
    if (n_range == 0) begin failures++; $display("FAIL no out-of-range module"); end
    if (n_gain == 0 || n_filter == 0) begin failures++; $display("FAIL gain/filter not hit"); end
    $display("accepted=%0d absent=%0d nowrite=%0d out_of_range=%0d gain=%0d filter=%0d",
             n_accept, n_absent, n_nowrite, n_range, n_gain, n_filter);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
