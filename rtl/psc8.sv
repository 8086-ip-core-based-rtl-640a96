// psc8: parallel-to-serial converter of the telemetry interface.
//
// On a bit clock (bit_en) with load high the W-bit word is written into the
// shift register; on every other bit clock the register shifts by one. The
// serial output is the register's top bit, so a word is sent most
// significant bit first, one bit per bit clock, the first bit right after the
// load. Zeros follow if no new load comes.
//
// Loading from the multiplexer on the synchronisation unit's load signal and
// producing the serial telemetry output follow the design's specification;
// the bit order is this design's choice.
module psc8 #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         bit_en,
  input  logic         load,
  input  logic [W-1:0] pdata,
  output logic         sout
);
  logic [W-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      sr <= '0;
    else if (bit_en) sr <= load ? pdata : {sr[W-2:0], 1'b0};
  end

  assign sout = sr[W-1];
endmodule
