// tb_mem_sys: checks the 8086 memory at its default size (1 MB).
// After reset the reset vector FFFF0h must hold the far jump EA 00 04 00 00
// (JMP 0000:0400h) and por must be 0; any other address read before the
// jump target answers from the ROM. Reading 00400h sets por and returns RAM
// contents. Afterwards random RAM writes and reads are compared with an
// associative-array model, ROM writes must be ignored and ROM reads must
// still return the jump. Read data is checked one clock after rd.
module tb_mem_sys;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [19:0] addr = '0;
  logic rd = 1'b0, wr = 1'b0;
  logic [7:0] wdata = '0, rdata;
  logic por;
  logic [7:0] model [logic [19:0]];
  int checks = 0, failures = 0;

  localparam logic [7:0] JMP [16] = '{8'hEA, 8'h00, 8'h04, 8'h00, 8'h00,
    8'hF4, 8'hF4, 8'hF4, 8'hF4, 8'hF4, 8'hF4, 8'hF4, 8'hF4, 8'hF4, 8'hF4, 8'hF4};

  mem_sys dut (.clk, .rst_n, .addr, .rd, .wr, .wdata, .rdata, .por);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t) rdata=%h", what, $time, rdata); end
  endtask

  task automatic write(input logic [19:0] a, input logic [7:0] d);
    addr = a; wdata = d; wr = 1'b1;
    @(posedge clk); #1 wr = 1'b0;
    if (a < 20'hFFFF0) model[a] = d;
  endtask

  task automatic read(input logic [19:0] a, output logic [7:0] d);
    addr = a; rd = 1'b1;
    @(posedge clk); #1 rd = 1'b0;
    addr = 20'($urandom);   // data must not depend on the address afterwards
    d = rdata;
  endtask

  initial begin
    logic [7:0] d;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    chk(por == 1'b0, "por low after reset");
    for (int i = 0; i < 16; i++) begin
      read(20'hFFFF0 + 20'(i), d);
      chk(d == JMP[i], "boot ROM byte");
    end
    // program the RAM while still booting
    write(20'h00400, 8'h90);
    write(20'h00401, 8'hB0);
    write(20'hFFFF0, 8'h11);           // ROM write ignored
    read(20'h12345, d);
    chk(d == JMP[5] && por == 1'b0, "ROM answers before the jump");
    read(20'h00400, d);
    chk(d == 8'h90 && por == 1'b1, "jump target from RAM, por set");
    read(20'h00401, d);
    chk(d == 8'hB0, "RAM after boot");
    for (int n = 0; n < 3000; n++) begin
      logic [19:0] a;
      if ((n % 3 != 0) || model.size() == 0) begin
        a = (n % 5 == 0) ? 20'h003F0 + 20'($urandom_range(0, 63)) : 20'($urandom_range(0, 20'hFFFEF));
        write(a, 8'($urandom));
      end else begin
        // read back a written byte
        int k;
        k = $urandom_range(0, model.size() - 1);
        void'(model.first(a));
        repeat (k) void'(model.next(a));
        read(a, d);
        chk(d == model[a], "RAM read-back");
      end
    end
    for (int i = 0; i < 16; i++) begin
      read(20'hFFFF0 + 20'(i), d);
      chk(d == JMP[i] && por, "ROM after boot");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
