// tb_tm_clk_sync: counts bit clock enables and checks that load comes with
// the first one after reset and then with every 8th, that bit_idx runs 7
// down to 0 within a frame, and that sync makes the next bit clock a load.
module tb_tm_clk_sync;
  logic clk = 1'b0, rst_n = 1'b0, bit_en = 1'b0, sync = 1'b0;
  logic load;
  logic [2:0] bit_idx;
  int checks = 0, failures = 0;

  tm_clk_sync dut (.clk, .rst_n, .bit_en, .sync, .load, .bit_idx);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    static int pos = 0;   // position in the frame of the next bit clock (0 = load)
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      repeat ($urandom_range(2, 6)) begin
        @(posedge clk); #1 chk(!load, "load only with bit_en");
      end
      if (n % 37 == 20) begin
        sync = 1'b1; @(posedge clk); #1 sync = 1'b0;
        pos = 0;
      end
      bit_en = 1'b1;
      #1 chk(load == (pos == 0), "load at frame start");
      @(posedge clk); #1 bit_en = 1'b0;
      chk(bit_idx == 3'(7 - pos), "bit index");
      pos = (pos + 1) % 8;
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
