// tb_das_regfile: drives strobe pulses with random channel numbers and ADC
// words and checks that each entry takes the word present when strobe falls
// (not when it rises), that valid bits follow the writes, that clr empties
// them, and that untouched entries keep their value.
module tb_das_regfile;
  logic clk = 1'b0, rst_n = 1'b0;
  logic strobe = 1'b0, clr = 1'b0;
  logic [3:0] sel = '0;
  logic [9:0] adc_data = '0;
  logic [9:0] data [16];
  logic [15:0] valid;
  logic [9:0] exp_d [16];
  logic [15:0] exp_v;
  int checks = 0, failures = 0;

  das_regfile dut (.clk, .rst_n, .strobe, .sel, .adc_data, .clr, .data, .valid);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic compare_all();
    for (int i = 0; i < 16; i++) chk(data[i] == exp_d[i], "entry value");
    chk(valid == exp_v, "valid bits");
  endtask

  initial begin
    for (int i = 0; i < 16; i++) exp_d[i] = '0;
    exp_v = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1 compare_all();
    for (int n = 0; n < 200; n++) begin
      logic [3:0] ch;
      logic [9:0] w;
      ch = 4'($urandom_range(0, 15));
      w  = 10'($urandom);
      sel = ch;
      adc_data = ~w;        // value at the rising edge, must not be taken
      strobe = 1'b1;
      repeat (3) @(posedge clk);
      #1 compare_all();     // nothing written while strobe high
      adc_data = w;
      @(posedge clk); #1 strobe = 1'b0;
      @(posedge clk); #1;
      adc_data = 10'($urandom);
      exp_d[ch] = w; exp_v[ch] = 1'b1;
      @(posedge clk); #1 compare_all();
      if (n % 50 == 49) begin
        clr = 1'b1; @(posedge clk); #1 clr = 1'b0;
        exp_v = '0;
        compare_all();
      end
    end
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
