// spc8: serial-to-parallel converter of the telecommand address.
//
// The serial address bit sdata is shifted in, most significant bit first, on
// each rising edge of the 1 kHz bit clock, given here as the one-cycle enable
// bit_en from the clock divider. Once all W bits of a command are in, the
// latch pulse copies the shift register to the parallel address output, which
// then holds until the next latch; addr_stb marks the update for one clock.
// If latch and bit_en arrive in the same clock, the bit shifted in that
// clock is part of the latched word.
//
// The 8-bit width, shifting on the 1 kHz clock and latching by a separate
// latch pulse follow the design's specification; the bit order (MSB first)
// and the clock-enable form of the 1 kHz clock are this design's choices.
module spc8 #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         bit_en,
  input  logic         sdata,
  input  logic         latch,
  output logic [W-1:0] paddr,
  output logic         addr_stb
);
  logic [W-1:0] sr;
  logic [W-1:0] sr_next;

  assign sr_next = bit_en ? {sr[W-2:0], sdata} : sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr       <= '0;
      paddr    <= '0;
      addr_stb <= 1'b0;
    end else begin
      sr       <= sr_next;
      addr_stb <= latch;
      if (latch) paddr <= sr_next;
    end
  end
endmodule
