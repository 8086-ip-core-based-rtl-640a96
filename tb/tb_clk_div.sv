// tb_clk_div: checks the 12 MHz to 1 kHz divider at its default sizes.
// The divided clock must first rise 6000 input cycles after reset, then have
// a period of exactly 12000 cycles with 6000 high; rise_tick must be high
// exactly in the cycles where clk_out has just risen.
module tb_clk_div;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clk_out, rise_tick;
  int checks = 0, failures = 0;
  int cyc = 0, last_rise = -1, last_fall = -1, rises = 0;
  logic prev = 1'b0;

  localparam int HALF = 12_000_000 / (2 * 1_000);

  clk_div dut (.clk, .rst_n, .clk_out, .rise_tick);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc++;
    #1;
    chk(rise_tick == (clk_out && !prev), "rise_tick matches rising edge");
    if (clk_out && !prev) begin
      if (last_rise < 0) chk(cyc == HALF, "first rise after HALF cycles");
      else               chk(cyc - last_rise == 2 * HALF, "period");
      last_rise = cyc;
      rises++;
    end
    if (!clk_out && prev) begin
      chk(cyc - last_rise == HALF, "high time");
      last_fall = cyc;
    end
    prev = clk_out;
  end

  initial begin
    repeat (3) @(posedge clk);
    #2 rst_n = 1'b1;
    wait (rises == 4);
    @(posedge clk);
    chk(rises == 4, "four rising edges seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * 12 * HALF * 2);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
