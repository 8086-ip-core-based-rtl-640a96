// tb_tc_decoder: presents every 8-bit address once, in random order, with
// an update strobe, and checks that exactly the addressed command line is
// set one clock later, that cmd_stb follows the strobe by one clock, and that
// a changing address without a strobe leaves the lines alone.
module tb_tc_decoder;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] addr = '0;
  logic addr_stb = 1'b0;
  logic [255:0] cmd;
  logic cmd_stb;
  int checks = 0, failures = 0;

  tc_decoder dut (.clk, .rst_n, .addr, .addr_stb, .cmd, .cmd_stb);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    int order [256];
    for (int i = 0; i < 256; i++) order[i] = i;
    order.shuffle();
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1 chk(cmd == '0 && !cmd_stb, "no command after reset");
    foreach (order[n]) begin
      logic [255:0] expv;
      expv = '0;
      expv[order[n]] = 1'b1;
      addr = 8'(order[n]); addr_stb = 1'b1;
      @(posedge clk); #1 addr_stb = 1'b0;
      chk(cmd == expv, "one-hot line for address");
      chk(cmd_stb, "cmd_stb with new lines");
      addr = 8'($urandom);
      @(posedge clk); #1;
      chk(cmd == expv && !cmd_stb, "lines hold without strobe");
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
