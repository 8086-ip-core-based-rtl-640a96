// tb_das_ctrl: checks the DAS sequencer at its default sizes (12 MHz, 16
// channels). Against a timeline worked out from the required delays, it
// checks cycle by cycle, from the first busy cycle t0 on: SOC high exactly in
// [t0+200us*k+100us, +2us), strobe high exactly in [t0+200us*k+142us, +2us),
// the select lines equal to k while SOC and strobe of channel k are high,
// done one cycle at t0+3200us, the state codes in their documented order, a
// start edge during an acquisition ignored, and a second acquisition.
module tb_das_ctrl;
  import eps_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic soc, strobe, busy, done;
  logic [3:0] sel;
  das_state_t state;
  int checks = 0, failures = 0;

  localparam int US = 12;
  localparam int CH = 200 * US;

  das_ctrl dut (.clk, .rst_n, .start, .soc, .strobe, .sel, .busy, .done, .state);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // Run one acquisition; start goes high right after a clock edge.
  task automatic acquisition(input bit poke_mid);
    int t;
    int k, r;
    bit exp_soc, exp_strobe;
    int soc_cnt = 0, stb_cnt = 0, done_cnt = 0;
    @(posedge clk); #1 start = 1'b1;
    @(posedge clk); #1;
    chk(busy && state == S_SOC_GEN1, "busy one cycle after start");
    for (t = 0; t < 16 * CH; t++) begin
      k = t / CH; r = t % CH;
      exp_soc    = (r >= 100 * US) && (r < 102 * US);
      exp_strobe = (r >= 142 * US) && (r < 144 * US);
      chk(soc == exp_soc, "soc timing");
      chk(strobe == exp_strobe, "strobe timing");
      chk(!done, "no early done");
      chk(busy, "busy during acquisition");
      if (exp_soc || exp_strobe) chk(sel == 4'(k), "select line value");
      if (r == 0)           chk(state == S_SOC_GEN1, "state soc_gen1 = 001");
      if (r == 100 * US)    chk(state == S_SOC_GEN0, "state soc_gen0 = 010");
      if (r == 102 * US)    chk(state == S_DELAY,    "state delay = 011");
      if (r == 142 * US)    chk(state == S_STROBE1,  "state strobe1 = 100");
      if (r == 144 * US)    chk(state == S_STROBE0,  "state strobe0 = 101");
      if (r == 144 * US + 1) chk(state == S_INC_SEL, "state inc_sel = 110");
      soc_cnt += int'(soc && exp_soc && r == 100 * US);
      stb_cnt += int'(strobe && exp_strobe && r == 142 * US);
      if (poke_mid && t == 5 * CH + 7) start = 1'b0;
      if (poke_mid && t == 5 * CH + 50) start = 1'b1;  // ignored while busy
      @(posedge clk); #1;
    end
    chk(done && !busy && state == S_DATA_ACQ, "done pulse at 3200 us");
    chk(sel == 4'd0, "select reset after acquisition");
    chk(soc_cnt == 16 && stb_cnt == 16, "16 SOC and 16 strobe pulses");
    start = 1'b0;
    repeat (3 * CH) begin
      @(posedge clk); #1;
      done_cnt += int'(done);
      chk(!busy && !soc && !strobe, "idle after acquisition");
    end
    chk(done_cnt == 0, "done only one cycle");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (20) begin
      @(posedge clk); #1;
      chk(!busy && state == S_DATA_ACQ && !soc && !strobe && sel == 0, "idle after reset");
    end
    acquisition(1'b1);
    acquisition(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * 40 * CH * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
