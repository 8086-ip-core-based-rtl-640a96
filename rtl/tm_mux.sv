// tm_mux: telemetry data multiplexer.
//
// N_IN telemetry words of 8 bits, one per health parameter, are selected by
// the parallel address coming from the serial-to-parallel converter. The
// output is combinational; the parallel-to-serial converter samples it when
// the clock synchronisation block gives the load signal.
//
// The 8-bit output and the address as select follow the design's
// specification; N_IN = 2^8 follows from the 8-bit address.
module tm_mux #(
  parameter int unsigned N_IN  = 256,
  parameter int unsigned W     = 8,
  localparam int unsigned SEL_W = (N_IN > 1) ? $clog2(N_IN) : 1
) (
  input  logic [W-1:0]     din [N_IN],
  input  logic [SEL_W-1:0] sel,
  output logic [W-1:0]     dout
);
  always_comb begin
    dout = '0;
    for (int i = 0; i < N_IN; i++)
      if (sel == SEL_W'(i)) dout = din[i];
  end
endmodule
