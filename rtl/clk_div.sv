// clk_div: integer clock divider, fin / fout.
//
// A counter runs through half of the scaling factor fin/fout; each time it
// wraps, the output clock toggles, so one full output period lasts the whole
// scaling factor and the duty cycle is 50 %. With the defaults (12 MHz in,
// 1 kHz out) the counter wraps every 6000 input cycles.
//
// Besides the divided clock clk_out, the block gives rise_tick, a one-cycle
// pulse in the input clock domain in the cycle clk_out goes high. The rest of
// the design uses that tick as a clock enable instead of clocking logic on
// clk_out (a design choice: the whole design stays in one clock domain).
//
// Timing: after reset clk_out is low; it first rises HALF input cycles after
// reset is released, and then every 2*HALF cycles.
module clk_div #(
  parameter int unsigned CLK_HZ = 12_000_000,
  parameter int unsigned OUT_HZ = 1_000
) (
  input  logic clk,
  input  logic rst_n,
  output logic clk_out,
  output logic rise_tick
);
  localparam int unsigned HALF = CLK_HZ / (2 * OUT_HZ);
  localparam int unsigned CW   = (HALF > 1) ? $clog2(HALF) : 1;

  logic [CW-1:0] cnt;
  logic          wrap;

  assign wrap = (cnt == CW'(HALF - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      clk_out   <= 1'b0;
      rise_tick <= 1'b0;
    end else begin
      rise_tick <= 1'b0;
      if (wrap) begin
        cnt     <= '0;
        clk_out <= ~clk_out;
        rise_tick <= ~clk_out;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  initial assert (HALF >= 1) else $error("clk_div: CLK_HZ must be at least 2*OUT_HZ");
endmodule
