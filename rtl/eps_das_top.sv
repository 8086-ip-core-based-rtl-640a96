// eps_das_top: on-board controller of an electric propulsion system, with
// the memory of an 8086 core, a 16-channel data acquisition system (DAS) and
// the telecommand and telemetry interfaces.
//
// Everything runs on one clock, clk, at CLK_HZ (12 MHz). The parts:
//   * clk_div derives the 1 kHz bit clock of the serial links; its rising
//     edge is used as a clock enable (bit_en).
//   * mem_sys is the 1 MB memory of the 8086 core: a boot ROM with a far jump
//     to 0000:0400h and RAM. The core itself is outside this module; its bus
//     is brought out as the cpu_* ports.
//   * das_ctrl sequences the AD571 converter and the external 16-to-1 analog
//     multiplexer (adc_soc, adc_sel) and das_regfile stores each result when
//     adc_strobe falls. The result registers are cleared of their valid bits
//     when an acquisition starts.
//   * Telecommand: pulse_gen turns every toggle of tc_trigger into a latch
//     pulse; spc8 shifts in the serial address tc_sdata on the 1 kHz clock and
//     latches it on that pulse; tc_decoder turns the address into one-hot
//     command lines.
//   * Telemetry: the same latched address selects one of 256 telemetry bytes
//     in tm_mux; tm_clk_sync loads it into psc8 at each frame start and psc8
//     sends it on tm_sout, MSB first, one bit per 1 kHz period.
//
// Telemetry byte map (this design's choice): address 2*i is bits 7:0 of DAS
// channel i, address 2*i+1 holds its valid bit in bit 7 and result bits 9:8 in
// bits 1:0 (i = 0..15); addresses 32..255 come from the tm_ext inputs, entry k
// of tm_ext being address 32+k.
module eps_das_top
  import eps_pkg::*;
#(
  parameter int unsigned CLK_HZ  = 12_000_000,
  parameter int unsigned BIT_HZ  = 1_000,
  parameter int unsigned ADDR_W  = 20,
  parameter int unsigned N_CH    = 16,
  parameter int unsigned ADC_W   = 10,
  parameter int unsigned TC_W    = 8,
  localparam int unsigned SEL_W  = $clog2(N_CH),
  localparam int unsigned N_TM   = 2 ** TC_W,
  localparam int unsigned N_EXT  = N_TM - 2 * N_CH
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              clk_1k,
  // 8086 bus
  input  logic [ADDR_W-1:0] cpu_addr,
  input  logic              cpu_rd,
  input  logic              cpu_wr,
  input  logic [7:0]        cpu_wdata,
  output logic [7:0]        cpu_rdata,
  output logic              por,
  // data acquisition
  input  logic              das_start,
  input  logic [ADC_W-1:0]  adc_data,
  output logic              adc_soc,
  output logic [SEL_W-1:0]  adc_sel,
  output logic              adc_strobe,
  output logic              das_busy,
  output logic              das_done,
  output das_state_t        das_state,
  output logic [ADC_W-1:0]  das_data  [N_CH],
  output logic [N_CH-1:0]   das_valid,
  // telecommand
  input  logic              tc_sdata,
  input  logic              tc_trigger,
  output logic [TC_W-1:0]   tc_addr,
  output logic [N_TM-1:0]   tc_cmd,
  output logic              tc_cmd_stb,
  // telemetry
  input  logic [7:0]        tm_ext [N_EXT],
  output logic              tm_load,
  output logic [2:0]        tm_bit_idx,
  output logic              tm_sout
);
  logic             bit_en;
  logic             tc_latch;
  logic             tc_addr_stb;
  logic             das_start_q;
  logic [7:0]       tm_din [N_TM];
  logic [7:0]       tm_word;

  clk_div #(.CLK_HZ(CLK_HZ), .OUT_HZ(BIT_HZ)) u_clk_div (
    .clk, .rst_n, .clk_out(clk_1k), .rise_tick(bit_en)
  );

  mem_sys #(.ADDR_W(ADDR_W)) u_mem (
    .clk, .rst_n, .addr(cpu_addr), .rd(cpu_rd), .wr(cpu_wr),
    .wdata(cpu_wdata), .rdata(cpu_rdata), .por
  );

  // ---------------------------------------------------------------- DAS
  das_ctrl #(.CLK_HZ(CLK_HZ), .N_CH(N_CH)) u_das_ctrl (
    .clk, .rst_n, .start(das_start), .soc(adc_soc), .strobe(adc_strobe),
    .sel(adc_sel), .busy(das_busy), .done(das_done), .state(das_state)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) das_start_q <= 1'b0;
    else        das_start_q <= das_start;
  end

  das_regfile #(.N_CH(N_CH), .ADC_W(ADC_W)) u_das_reg (
    .clk, .rst_n, .strobe(adc_strobe), .sel(adc_sel), .adc_data,
    .clr(das_start && !das_start_q && !das_busy),
    .data(das_data), .valid(das_valid)
  );

  // ---------------------------------------------------------- telecommand
  pulse_gen u_pulse (
    .clk, .rst_n, .trigger(tc_trigger), .pulse(tc_latch)
  );

  spc8 #(.W(TC_W)) u_spc (
    .clk, .rst_n, .bit_en, .sdata(tc_sdata), .latch(tc_latch),
    .paddr(tc_addr), .addr_stb(tc_addr_stb)
  );

  tc_decoder #(.ADDR_W(TC_W)) u_tc_dec (
    .clk, .rst_n, .addr(tc_addr), .addr_stb(tc_addr_stb),
    .cmd(tc_cmd), .cmd_stb(tc_cmd_stb)
  );

  // ------------------------------------------------------------ telemetry
  always_comb begin
    for (int i = 0; i < N_CH; i++) begin
      tm_din[2*i]   = das_data[i][7:0];
      tm_din[2*i+1] = {das_valid[i], 5'b0, das_data[i][ADC_W-1:8]};
    end
    for (int k = 0; k < N_EXT; k++) tm_din[2*N_CH+k] = tm_ext[k];
  end

  tm_mux #(.N_IN(N_TM), .W(8)) u_tm_mux (
    .din(tm_din), .sel(tc_addr), .dout(tm_word)
  );

  tm_clk_sync #(.W(8)) u_tm_sync (
    .clk, .rst_n, .bit_en, .sync(tc_addr_stb), .load(tm_load),
    .bit_idx(tm_bit_idx)
  );

  psc8 #(.W(8)) u_psc (
    .clk, .rst_n, .bit_en, .load(tm_load), .pdata(tm_word), .sout(tm_sout)
  );

  initial assert (ADC_W == 10 && N_EXT > 0)
    else $error("eps_das_top: telemetry byte map needs ADC_W == 10 and 2*N_CH < 2**TC_W");
endmodule
