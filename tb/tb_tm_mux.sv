// tb_tm_mux: fills the 256 telemetry inputs with random bytes and checks the
// output for every select value, then changes inputs and checks again.
module tb_tm_mux;
  logic [7:0] din [256];
  logic [7:0] sel = '0;
  logic [7:0] dout;
  int checks = 0, failures = 0;

  tm_mux dut (.din, .sel, .dout);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s sel=%0d", what, sel); end
  endtask

  initial begin
    for (int round = 0; round < 4; round++) begin
      for (int i = 0; i < 256; i++) din[i] = 8'($urandom);
      for (int s = 0; s < 256; s++) begin
        sel = 8'(s);
        #1 chk(dout == din[s], "selected byte");
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
