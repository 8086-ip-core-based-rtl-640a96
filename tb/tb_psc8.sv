// tb_psc8: loads random words every 8 bit clocks (sometimes after a gap) and
// checks the serial output bit by bit, MSB first, against the loaded word;
// after a word without a new load the output must be zero.
module tb_psc8;
  logic clk = 1'b0, rst_n = 1'b0, bit_en = 1'b0, load = 1'b0;
  logic [7:0] pdata = '0;
  logic sout;
  int checks = 0, failures = 0;

  psc8 dut (.clk, .rst_n, .bit_en, .load, .pdata, .sout);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic tick(input bit ld, input logic [7:0] d);
    repeat (3) @(posedge clk);
    #1 bit_en = 1'b1; load = ld; pdata = d;
    @(posedge clk);
    #1 bit_en = 1'b0; load = 1'b0; pdata = 8'($urandom);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1 chk(sout == 1'b0, "idle low");
    for (int n = 0; n < 100; n++) begin
      logic [7:0] w;
      w = 8'($urandom);
      tick(1'b1, w);
      chk(sout == w[7], "bit 7 right after load");
      for (int i = 6; i >= 0; i--) begin
        // a load pulse without bit_en must be ignored
        if (i == 3) begin load = 1'b1; @(posedge clk); #1 load = 1'b0; end
        tick(1'b0, 8'hFF);
        chk(sout == w[i], "serial bit");
      end
      if (n % 10 == 9) begin
        tick(1'b0, 8'hFF);
        chk(sout == 1'b0, "zero after the word");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
