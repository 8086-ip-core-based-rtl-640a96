// tb_eps_das_top: end-to-end test of the whole controller at its default
// sizes (12 MHz clock, 1 kHz serial bit clock, 1 MB memory, 16 channels).
//
//  1. 8086 boot: a bus-level model of the core's first fetches reads the
//     reset vector FFFF0h, decodes the far jump found there and fetches from
//     its target, which must be 00400h and return the program byte placed in
//     RAM; por must go from 0 to 1. RAM is then written and read back.
//  2. Data acquisition: a start edge runs one 16-channel acquisition against
//     the ad571_model front end; it must take 3200 us, convert 16 times and
//     leave every channel's code in the result registers.
//  3. Telecommand and telemetry: 8-bit addresses are sent serially on the
//     1 kHz clock, each followed by a toggle of the trigger (both toggle
//     directions are used). The address must be latched, its command line
//     set, and the telemetry byte at that address (a DAS result byte or an
//     external input) must come out of tm_sout MSB first in the next frame.
// Each mechanism is counted and must have happened at least once.
module tb_eps_das_top;
  import eps_pkg::*;

  localparam int NCH = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic clk_1k;
  logic [19:0] cpu_addr = '0;
  logic cpu_rd = 1'b0, cpu_wr = 1'b0;
  logic [7:0] cpu_wdata = '0, cpu_rdata;
  logic por;
  logic das_start = 1'b0;
  logic [9:0] adc_data;
  logic adc_soc, adc_strobe, das_busy, das_done;
  logic [3:0] adc_sel;
  das_state_t das_state;
  logic [9:0] das_data [NCH];
  logic [NCH-1:0] das_valid;
  logic tc_sdata = 1'b0, tc_trigger = 1'b0;
  logic [7:0] tc_addr;
  logic [255:0] tc_cmd;
  logic tc_cmd_stb;
  logic [7:0] tm_ext [224];
  logic tm_load, tm_sout;
  logic [2:0] tm_bit_idx;

  logic [9:0] level [NCH];
  logic adc_dr_n;
  int conversions;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_boot_jump = 0, n_soc = 0, n_strobe = 0, n_das_done = 0, n_sel_wrap = 0;
  int n_toggle_rise = 0, n_toggle_fall = 0, n_latch = 0, n_cmd = 0;
  int n_tm_load = 0, n_tm_frame_ok = 0, n_tm_das = 0, n_tm_ext = 0;

  eps_das_top dut (.*);

  ad571_model u_adc (.soc(adc_soc), .sel(adc_sel), .level, .data(adc_data),
                     .dr_n(adc_dr_n), .conversions);

  always #41.666ns clk = ~clk;   // 12 MHz

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // event counters
  logic soc_q = 0, stb_q = 0;
  logic [3:0] sel_q = 0;
  always @(posedge clk) if (rst_n) begin
    if (adc_soc && !soc_q) n_soc++;
    if (adc_strobe && !stb_q) n_strobe++;
    if (sel_q == 4'd15 && adc_sel == 4'd0) n_sel_wrap++;
    if (das_done) n_das_done++;
    if (tm_load) n_tm_load++;
    if (tc_cmd_stb) n_cmd++;
    if (dut.tc_latch) n_latch++;
    soc_q <= adc_soc; stb_q <= adc_strobe; sel_q <= adc_sel;
  end

  // --- 8086 bus model -----------------------------------------------------
  task automatic cpu_write(input logic [19:0] a, input logic [7:0] d);
    @(posedge clk); #1 cpu_addr = a; cpu_wdata = d; cpu_wr = 1'b1;
    @(posedge clk); #1 cpu_wr = 1'b0;
  endtask

  task automatic cpu_read(input logic [19:0] a, output logic [7:0] d);
    @(posedge clk); #1 cpu_addr = a; cpu_rd = 1'b1;
    @(posedge clk); #1 cpu_rd = 1'b0;
    d = cpu_rdata;
  endtask

  task automatic cpu_boot();
    logic [7:0] ins [5];
    logic [19:0] target;
    logic [7:0] d;
    chk(por == 1'b0, "por low after reset");
    for (int i = 0; i < 5; i++) cpu_read(20'hFFFF0 + 20'(i), ins[i]);
    chk(ins[0] == 8'hEA, "far jump opcode at reset vector");
    target = {ins[4], ins[3], 4'h0} + {4'h0, ins[2], ins[1]};
    chk(target == 20'h00400, "jump target 0000:0400h");
    chk(por == 1'b0, "por low while fetching from ROM");
    cpu_read(target, d);
    chk(d == 8'hB8 && por == 1'b1, "first program byte from RAM, por set");
    if (d == 8'hB8 && por) n_boot_jump++;
  endtask

  // --- serial telecommand -------------------------------------------------
  task automatic send_command(input logic [7:0] a);
    for (int i = 7; i >= 0; i--) begin
      @(negedge clk_1k);
      tc_sdata = a[i];
    end
    @(posedge clk_1k);
    repeat (100) @(posedge clk);
    if (tc_trigger) n_toggle_fall++; else n_toggle_rise++;
    tc_trigger = ~tc_trigger;
    repeat (10) @(posedge clk);
    #1;
    chk(tc_addr == a, "telecommand address latched");
    chk(tc_cmd[a] && $onehot(tc_cmd), "command line set");
  endtask

  function automatic logic [7:0] expected_tm(input logic [7:0] a);
    if (a < 8'(2 * NCH)) begin
      if (a[0] == 1'b0) return level[a[4:1]][7:0];
      return {1'b1, 5'b0, level[a[4:1]][9:8]};
    end
    return tm_ext[a - 8'(2 * NCH)];
  endfunction

  task automatic receive_telemetry(input logic [7:0] a);
    logic [7:0] got;
    @(posedge clk);
    #1 chk(!tm_load, "no load before the next bit clock");
    @(posedge clk_1k);   // the bit clock that loads the new word
    for (int i = 7; i >= 0; i--) begin
      @(negedge clk_1k);
      got[i] = tm_sout;
      if (i == 7) chk(tm_bit_idx == 3'd7, "frame starts with bit 7");
    end
    chk(got == expected_tm(a), "telemetry byte");
    if (got == expected_tm(a)) begin
      n_tm_frame_ok++;
      if (a < 8'(2 * NCH)) n_tm_das++; else n_tm_ext++;
    end
  endtask

  initial begin
    logic [7:0] d;
    realtime t_start, t_done;
    for (int i = 0; i < NCH; i++) level[i] = 10'($urandom);
    for (int i = 0; i < 224; i++) tm_ext[i] = 8'($urandom);
    repeat (5) @(posedge clk);
    #1 rst_n = 1'b1;

    // 1. boot: program bytes in RAM, then the core's first fetches
    cpu_write(20'h00400, 8'hB8);
    cpu_write(20'h00401, 8'h34);
    cpu_boot();
    for (int i = 0; i < 64; i++) cpu_write(20'h01000 + 20'(i * 977), 8'(i * 7 + 3));
    for (int i = 0; i < 64; i++) begin
      cpu_read(20'h01000 + 20'(i * 977), d);
      chk(d == 8'(i * 7 + 3), "RAM read-back after boot");
    end

    // 2. one full acquisition
    @(posedge clk); #1 das_start = 1'b1;
    t_start = $realtime;
    wait (das_done);
    t_done = $realtime;
    #1 das_start = 1'b0;
    chk((t_done - t_start) > 3199us && (t_done - t_start) < 3201us,
        "acquisition of 16 channels takes 3200 us");
    chk(conversions == NCH, "16 conversions");
    chk(das_valid == '1, "all channels valid");
    for (int i = 0; i < NCH; i++) chk(das_data[i] == level[i], "channel result");

    // 3. telecommand addresses and the telemetry they select
    begin
      static logic [7:0] addrs [5] = '{8'd6, 8'd7, 8'd31, 8'd40, 8'd255};
      foreach (addrs[k]) begin
        send_command(addrs[k]);
        receive_telemetry(addrs[k]);
      end
    end

    // every mechanism must have happened
    chk(n_boot_jump > 0, "boot jump seen");
    chk(n_soc == NCH && n_strobe == NCH, "SOC and strobe pulses");
    chk(n_sel_wrap > 0 && n_das_done == 1, "select wrap and done");
    chk(n_toggle_rise > 0 && n_toggle_fall > 0, "both toggle directions");
    chk(n_latch == 5 && n_cmd == 5, "latch pulses and commands");
    chk(n_tm_load > 0 && n_tm_das > 0 && n_tm_ext > 0, "telemetry loads of both sources");
    $display("mechanisms: boot=%0d soc=%0d strobe=%0d wrap=%0d done=%0d tog_r=%0d tog_f=%0d latch=%0d cmd=%0d load=%0d tm_ok=%0d",
             n_boot_jump, n_soc, n_strobe, n_sel_wrap, n_das_done, n_toggle_rise,
             n_toggle_fall, n_latch, n_cmd, n_tm_load, n_tm_frame_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
