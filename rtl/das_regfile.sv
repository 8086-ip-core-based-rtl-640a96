// das_regfile: result register of the data acquisition system.
//
// Holds one ADC result per analog channel. When the strobe from das_ctrl
// falls, the ADC output is written into the entry picked by the channel
// select lines, which at that moment still address the channel just
// converted; the entry's valid bit is set. clr empties all valid bits (the
// top level clears them when a new acquisition starts).
//
// The design specifies only that the FPGA receives the ADC data in a
// register latched by the strobe; capturing on the falling strobe edge, one
// entry per channel and the valid bits are this design's choices. The data
// width is that of the AD571, a 10-bit converter.
//
// Timing: data and valid appear the cycle after the clock in which strobe is
// seen low after being high.
module das_regfile #(
  parameter int unsigned N_CH  = 16,
  parameter int unsigned ADC_W = 10,
  localparam int unsigned SEL_W = (N_CH > 1) ? $clog2(N_CH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             strobe,
  input  logic [SEL_W-1:0] sel,
  input  logic [ADC_W-1:0] adc_data,
  input  logic             clr,
  output logic [ADC_W-1:0] data  [N_CH],
  output logic [N_CH-1:0]  valid
);
  logic strobe_q;
  logic capture;

  assign capture = strobe_q && !strobe;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      strobe_q <= 1'b0;
      valid    <= '0;
      for (int i = 0; i < N_CH; i++) data[i] <= '0;
    end else begin
      strobe_q <= strobe;
      if (clr) valid <= '0;
      if (capture) begin
        data[sel]  <= adc_data;
        valid[sel] <= 1'b1;
      end
    end
  end
endmodule
