// zc702_pl_top_tb - end-to-end test of the PL design at its default parameters
// (64-bit EMIO, 4 modules), driven through a behavioural model of the PS software.
//
// The test plays the user: it sends command frames (byte 0 command word, byte 1
// parameter byte) and checks both the FMC-side lines and the status frames the PS
// sends back. A model of the external gain modules latches data_out into a gain
// register per module and channel when its module, channel and gain-type lines are
// active, and the test checks the output amplitude for a 200 mV input at gains 1, 2, 4
// and 8. It also flips the module-inserted switches and the module ID and checks that
// each change produces a status frame. Every mechanism (gain write, filter write,
// absent module, write control low, module number out of range, unused type code,
// insertion/removal report, module-ID report) is counted, and one that never occurred
// counts as a failure. The PL latency (EMIO change to enable lines) is checked to be
// one clock.
module zc702_pl_top_tb;
  import can_ctrl_pkg::*;

  logic            clk = 0;
  logic            rst_n;
  logic [63:0]     emio_gpio_o, emio_gpio_i;
  logic [3:0]      sw_mod_ins;
  logic [7:0]      fmc_module_id;
  logic [3:0]      mod_ena;
  logic [1:0]      ch_ena, type_ena;
  logic [3:0]      data_out;
  logic            rx_valid;
  logic [7:0][7:0] rx_frame;
  logic            tx_valid;
  logic [7:0][7:0] tx_frame;

  int checks = 0, failures = 0;
  int n_gain = 0, n_filter = 0, n_absent = 0, n_nowrite = 0, n_range = 0, n_badtype = 0;
  int n_swrep = 0, n_idrep = 0, n_cmdrep = 0;

  zc702_pl_top dut (.*);

  ps_app_model #(.EMIO_W(64)) ps (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  // Status frames sent by the PS
  logic [7:0][7:0] txq[$];
  always @(posedge clk) if (rst_n && tx_valid) txq.push_back(tx_frame);

  // External gain/filter modules: latch data_out on their enables.
  logic [3:0] gain_reg   [4][2];
  logic [3:0] filter_reg [4][2];
  always @(posedge clk) begin
    if (!rst_n) begin
      for (int m = 0; m < 4; m++)
        for (int c = 0; c < 2; c++) begin gain_reg[m][c] <= 4'd1; filter_reg[m][c] <= 4'd0; end
    end else begin
      for (int m = 0; m < 4; m++)
        for (int c = 0; c < 2; c++)
          if (mod_ena[m] && ch_ena[c]) begin
            if (type_ena[0]) gain_reg[m][c]   <= data_out;
            if (type_ena[1]) filter_reg[m][c] <= data_out;
          end
    end
  end

  function automatic logic [7:0] cmd(bit wr, logic [1:0] t, bit ch, logic [2:0] m);
    return {1'b0, wr, t, ch, m};
  endfunction

  // Send a user frame and return once the PL outputs reflect it.
  task automatic send(logic [7:0] c, logic [7:0] p);
    @(negedge clk);
    rx_frame = '0; rx_frame[0] = c; rx_frame[1] = p; rx_valid = 1;
    @(negedge clk);
    rx_valid = 0;
    @(negedge clk);   // the PL has taken the command at the edge before this
  endtask

  // Wait for a status frame (up to n clocks) and check it.
  task automatic expect_frame(string what, logic [7:0] b0, logic [7:0] b1,
                              logic [7:0] b2, logic [7:0] b3, int n = 20);
    logic [7:0][7:0] exp;
    int i;
    exp = '0; exp[0] = b0; exp[1] = b1; exp[2] = b2; exp[3] = b3;
    i = 0;
    while (txq.size() == 0 && i < n) begin @(negedge clk); i++; end
    checks++;
    if (txq.size() == 0) begin
      failures++; $display("FAIL %s: no status frame", what);
    end else begin
      check(what, txq.pop_front(), exp);
    end
  endtask

  task automatic expect_no_frame(string what, int n = 20);
    repeat (n) @(negedge clk);
    check({what, ": no frame"}, 64'(txq.size()), 0);
    txq.delete();
  endtask

  logic [3:0] sw;
  logic [7:0] id;
  logic [7:0] cur_cmd, cur_par;
  int         lat;

  initial begin
    rst_n = 0; rx_valid = 0; rx_frame = '0;
    sw = 4'b1011; id = 8'hFF;
    sw_mod_ins = sw; fmc_module_id = id;
    repeat (4) @(negedge clk);
    rst_n = 1;
    // first frame after reset: modules inserted and default module ID
    expect_frame("initial status", 8'(sw), id, 0, 0);
    n_swrep++;
    expect_no_frame("idle");

    // Gain workload: gain 1, 2, 4, 8 on module 1, channel 0, 200 mV square wave in.
    for (int k = 0; k < 4; k++) begin
      logic [3:0] g;
      g = 4'(1 << k);
      cur_cmd = cmd(1, 2'b01, 0, 3'd1); cur_par = {4'h0, g};
      send(cur_cmd, cur_par);
      // PS writes EMIO at the edge after rx; enables follow one clock after that
      check("gain: mod_ena", 64'(mod_ena), 64'b0010);
      check("gain: ch_ena", 64'(ch_ena), 64'b01);
      check("gain: type_ena", 64'(type_ena), 64'b01);
      check("gain: data_out", 64'(data_out), 64'(g));
      @(negedge clk);
      check("gain module register", 64'(gain_reg[1][0]), 64'(g));
      check("gain output amplitude mV", 64'(200 * int'(gain_reg[1][0])), 64'(200 * (1 << k)));
      expect_frame("gain status", 8'(sw), id, cur_cmd, cur_par);
      n_gain++; n_cmdrep++;
    end

    // PL latency: from the EMIO change to the enables, exactly one clock.
    @(negedge clk);
    rx_frame = '0; rx_frame[0] = cmd(1, 2'b01, 1, 3'd0); rx_frame[1] = 8'h07; rx_valid = 1;
    @(posedge clk); #1 rx_valid = 0;        // emio_gpio_o now holds the new command
    check("latency: not before the edge", 64'(mod_ena), 64'b0010);
    @(posedge clk); #1;
    check("latency: one clock", 64'(mod_ena), 64'b0001);
    check("latency: data", 64'(data_out), 64'h7);
    n_gain++;
    expect_frame("latency status", 8'(sw), id, cmd(1, 2'b01, 1, 3'd0), 8'h07);
    check("gain module 0 ch 1", 64'(gain_reg[0][1]), 64'h7);

    // Filter write: module 3, channel 1, filter 9 (gain nibble 3 ignored)
    cur_cmd = cmd(1, 2'b10, 1, 3'd3); cur_par = 8'h93;
    send(cur_cmd, cur_par);
    check("filter: mod_ena", 64'(mod_ena), 64'b1000);
    check("filter: ch_ena", 64'(ch_ena), 64'b10);
    check("filter: type_ena", 64'(type_ena), 64'b10);
    check("filter: data_out", 64'(data_out), 64'h9);
    expect_frame("filter status", 8'(sw), id, cur_cmd, cur_par);
    check("filter module register", 64'(filter_reg[3][1]), 64'h9);
    n_filter++;

    // Absent module: module 2 is not inserted -> nothing driven, data held
    send(cmd(1, 2'b01, 0, 3'd2), 8'h0C);
    check("absent: mod_ena", 64'(mod_ena), 0);
    check("absent: ch_ena", 64'(ch_ena), 0);
    check("absent: type_ena", 64'(type_ena), 0);
    check("absent: data_out held", 64'(data_out), 64'h9);
    expect_no_frame("absent");
    n_absent++;

    // Write control low
    send(cmd(0, 2'b01, 0, 3'd0), 8'h0E);
    check("no write: mod_ena", 64'(mod_ena), 0);
    check("no write: data_out held", 64'(data_out), 64'h9);
    expect_no_frame("no write");
    n_nowrite++;

    // Module number beyond the four modules
    send(cmd(1, 2'b01, 0, 3'd6), 8'h0E);
    check("range: mod_ena", 64'(mod_ena), 0);
    check("range: data_out held", 64'(data_out), 64'h9);
    expect_no_frame("range");
    n_range++;

    // Unused type code: module and channel lines, no type line, data held
    cur_cmd = cmd(1, 2'b11, 0, 3'd0); cur_par = 8'hAB;
    send(cur_cmd, cur_par);
    check("bad type: mod_ena", 64'(mod_ena), 64'b0001);
    check("bad type: ch_ena", 64'(ch_ena), 64'b01);
    check("bad type: type_ena", 64'(type_ena), 0);
    check("bad type: data_out held", 64'(data_out), 64'h9);
    expect_frame("bad type status", 8'(sw), id, cur_cmd, cur_par);
    n_badtype++;

    // Insert module 2 -> status frame; then a write to it succeeds
    sw = 4'b1111; sw_mod_ins = sw;
    expect_frame("insert module 2", 8'(sw), id, cur_cmd, cur_par);
    n_swrep++;
    cur_cmd = cmd(1, 2'b01, 0, 3'd2); cur_par = 8'h0C;
    send(cur_cmd, cur_par);
    check("inserted: mod_ena", 64'(mod_ena), 64'b0100);
    check("inserted: data_out", 64'(data_out), 64'hC);
    expect_frame("inserted status", 8'(sw), id, cur_cmd, cur_par);
    n_gain++;

    // Remove module 2 while its command is still presented: enables drop
    sw = 4'b1011; sw_mod_ins = sw;
    expect_frame("remove module 2", 8'(sw), id, cur_cmd, cur_par);
    check("removed: mod_ena", 64'(mod_ena), 0);
    check("removed: data_out held", 64'(data_out), 64'hC);
    n_swrep++;

    // Module ID change read from the FMC pins
    id = 8'h3C; fmc_module_id = id;
    expect_frame("module id", 8'(sw), id, cur_cmd, cur_par);
    n_idrep++;
    expect_no_frame("idle at end");

    if (n_gain == 0)    begin failures++; $display("FAIL never: gain write"); end
    if (n_filter == 0)  begin failures++; $display("FAIL never: filter write"); end
    if (n_absent == 0)  begin failures++; $display("FAIL never: absent module"); end
    if (n_nowrite == 0) begin failures++; $display("FAIL never: write control low"); end
    if (n_range == 0)   begin failures++; $display("FAIL never: module out of range"); end
    if (n_badtype == 0) begin failures++; $display("FAIL never: unused type code"); end
    if (n_swrep == 0)   begin failures++; $display("FAIL never: switch report"); end
    if (n_idrep == 0)   begin failures++; $display("FAIL never: module id report"); end
    if (n_cmdrep == 0)  begin failures++; $display("FAIL never: command report"); end
    $display("gain=%0d filter=%0d absent=%0d nowrite=%0d range=%0d badtype=%0d swrep=%0d idrep=%0d cmdrep=%0d",
             n_gain, n_filter, n_absent, n_nowrite, n_range, n_badtype, n_swrep, n_idrep, n_cmdrep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
