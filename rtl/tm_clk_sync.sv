// tm_clk_sync: clock synchronisation unit of the telemetry interface.
//
// Counts the bits of the serial telemetry stream on the bit clock enable and
// issues the load signal that writes the multiplexer output into the
// parallel-to-serial converter at the start of every W-bit frame. The sync
// input restarts the frame: the next bit clock then carries a load, so a new
// telemetry word goes out right after the selecting address changes.
//
// Timing: load is a one-clock pulse coinciding with bit_en; loads follow one
// another every W bit clocks. bit_idx is the index of the bit being sent
// (W-1 first). The first bit clock after reset also carries a load.
//
// The design states only that this block synchronises the functions and
// produces the load signal; the frame counter and the restart input are this
// design's choices.
module tm_clk_sync #(
  parameter int unsigned W = 8,
  localparam int unsigned CW = $clog2(W)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          bit_en,
  input  logic          sync,
  output logic          load,
  output logic [CW-1:0] bit_idx
);
  logic [CW-1:0] cnt;   // bits of the current frame still to send after this one
  logic          pend;  // a load is due on the next bit clock

  assign load = bit_en && pend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      pend    <= 1'b1;
      bit_idx <= '0;
    end else begin
      if (bit_en) begin
        if (pend) begin
          cnt     <= CW'(W - 2);
          bit_idx <= CW'(W - 1);
          pend    <= 1'b0;
        end else begin
          bit_idx <= cnt;
          if (cnt == '0) pend <= 1'b1;
          else           cnt  <= cnt - 1'b1;
        end
      end
      if (sync) pend <= 1'b1;
    end
  end
endmodule
