// tb_pulse_gen: toggles the trigger at random intervals, in both directions,
// and checks that each toggle gives exactly one pulse of one clock, three
// clocks after the change (two synchroniser stages and the edge register),
// and that no pulse appears while the trigger holds still.
module tb_pulse_gen;
  logic clk = 1'b0, rst_n = 1'b0, trigger = 1'b0;
  logic pulse;
  int checks = 0, failures = 0;
  int cyc = 0;
  int toggle_at [$];
  int pulses = 0;

  pulse_gen dut (.clk, .rst_n, .trigger, .pulse);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  // Reference: a pulse is due exactly 3 cycles after each toggle.
  always @(posedge clk) if (rst_n) begin
    bit due;
    cyc++;
    #1;
    due = (toggle_at.size() > 0) && (cyc - toggle_at[0] == 3);
    if (due) void'(toggle_at.pop_front());
    chk(pulse == due, "pulse exactly 3 cycles after each toggle");
    pulses += int'(pulse);
  end

  initial begin
    static int n_toggles = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 100; n++) begin
      repeat ($urandom_range(4, 40)) @(posedge clk);
      #2 trigger = ~trigger;
      toggle_at.push_back(cyc);
      n_toggles++;
    end
    repeat (10) @(posedge clk);
    #2;
    chk(pulses == n_toggles, "one pulse per toggle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
