// tb_spc8: shifts random 8-bit addresses in, MSB first, one bit per bit
// clock enable (every 12th clock here), then latches them and checks the
// parallel address and its strobe; bits shifted after a latch must not change
// the output until the next latch. One word is latched in the same clock as
// its last bit.
module tb_spc8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic bit_en = 1'b0, sdata = 1'b0, latch = 1'b0;
  logic [7:0] paddr;
  logic addr_stb;
  int checks = 0, failures = 0;

  spc8 dut (.clk, .rst_n, .bit_en, .sdata, .latch, .paddr, .addr_stb);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic send_bit(input logic b, input bit with_latch);
    repeat (11) @(posedge clk);
    #1 sdata = b; bit_en = 1'b1; latch = with_latch;
    @(posedge clk);
    #1 bit_en = 1'b0; latch = 1'b0;
  endtask

  initial begin
    static logic [7:0] held = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1 chk(paddr == 8'h00 && !addr_stb, "reset value");
    for (int n = 0; n < 60; n++) begin
      logic [7:0] a;
      bit same_clock;
      a = 8'($urandom);
      same_clock = (n % 4 == 3);
      for (int i = 7; i >= 0; i--) begin
        send_bit(a[i], same_clock && i == 0);
        if (!(same_clock && i == 0)) chk(paddr == held, "output holds while shifting");
      end
      if (!same_clock) begin
        @(posedge clk); #1 latch = 1'b1;
        @(posedge clk); #1 latch = 1'b0;
        chk(addr_stb, "strobe after latch");
      end else begin
        chk(addr_stb, "strobe after latch with last bit");
      end
      chk(paddr == a, "latched address");
      held = a;
      @(posedge clk); #1 chk(!addr_stb, "strobe one clock");
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
