// ad571_model: behavioural model (not synthesizable logic) of the external
// analog front end of the data acquisition system: a 16-to-1 analog
// multiplexer addressed by sel feeding an AD571 10-bit successive
// approximation converter.
//
// The analog inputs are represented by the 10-bit code each would convert
// to (level). A conversion starts on the rising edge of soc; the channel
// selected at that moment is sampled. While converting, the output is
// blanked to 0 and dr_n (data ready, active low) is high; after T_CONV_NS the
// code appears and dr_n goes low. The 25 us default is the converter's typical
// conversion time; the controller allows 40 us. conversions counts the
// conversions done.
module ad571_model #(
  parameter int unsigned N_CH      = 16,
  parameter int unsigned T_CONV_NS = 25_000
) (
  input  logic                    soc,
  input  logic [$clog2(N_CH)-1:0] sel,
  input  logic [9:0]              level [N_CH],
  output logic [9:0]              data,
  output logic                    dr_n,
  output int                      conversions
);
  initial begin
    data = '0;
    dr_n = 1'b1;
    conversions = 0;
  end

  always @(posedge soc) begin
    logic [9:0] sample;
    sample = level[sel];
    data = '0;
    dr_n = 1'b1;
    #(T_CONV_NS * 1ns);
    data = sample;
    dr_n = 1'b0;
    conversions++;
  end
endmodule
