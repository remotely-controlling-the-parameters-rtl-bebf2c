// status_monitor_tb - self-checking test of status_monitor.
//
// Drives random switch and module-ID values, checks that each shows on the outputs
// exactly two clocks later, that the change flag rises three clocks after a change,
// stays set until acknowledged, clears on ack, and that a change arriving together with
// an ack keeps the flag set.
module status_monitor_tb;
  import can_ctrl_pkg::*;

  logic       clk = 0;
  logic       rst_n;
  logic [3:0] mod_ins_raw;
  logic [7:0] module_id_raw;
  logic       ack;
  logic [3:0] mod_ins;
  logic [7:0] module_id;
  logic       changed;

  int checks = 0, failures = 0;

  status_monitor #(.NUM_MODULES(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  task automatic do_ack();
    ack = 1; @(negedge clk); ack = 0;
  endtask

  initial begin
    logic [3:0] mi, mi_old;
    logic [7:0] id, id_old;
    rst_n = 0; mod_ins_raw = 4'hF; module_id_raw = 8'hFF; ack = 0;
    repeat (3) @(negedge clk);
    check("reset changed", 32'(changed), 0);
    rst_n = 1;
    // the first sampled value differs from the reset value: one change event
    repeat (4) @(negedge clk);
    check("initial mod_ins", 32'(mod_ins), 32'hF);
    check("initial module_id", 32'(module_id), 32'hFF);
    check("initial changed", 32'(changed), 1);
    do_ack();
    check("ack clears", 32'(changed), 0);
    mi_old = 4'hF; id_old = 8'hFF;
    for (int i = 0; i < 200; i++) begin
      mi = 4'($urandom); id = (i % 3 == 0) ? 8'($urandom) : id_old;
      if (i % 7 == 0) begin mi = mi_old; id = id_old; end
      mod_ins_raw = mi; module_id_raw = id;
      @(negedge clk);
      check("1 clock: old mod_ins", 32'(mod_ins), 32'(mi_old));
      @(negedge clk);
      check("2 clocks: mod_ins", 32'(mod_ins), 32'(mi));
      check("2 clocks: module_id", 32'(module_id), 32'(id));
      check("2 clocks: no flag yet", 32'(changed), 0);
      @(negedge clk);
      check("3 clocks: flag", 32'(changed), 32'({mi, id} != {mi_old, id_old}));
      repeat (2) @(negedge clk);
      check("flag sticky", 32'(changed), 32'({mi, id} != {mi_old, id_old}));
      do_ack();
      check("flag cleared", 32'(changed), 0);
      mi_old = mi; id_old = id;
    end
    // change arriving in the same clock as the ack: flag must stay set
    mod_ins_raw = ~mi_old;
    repeat (2) @(negedge clk);   // now sync differs from prev at the next edge
    ack = 1; @(negedge clk); ack = 0;
    check("change beats ack", 32'(changed), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
