// tc_decoder: telecommand address decoder.
//
// Turns the latched parallel telecommand address into one-hot command lines:
// when addr_stb marks a new address, line number addr is set and all others
// cleared; the lines then hold until the next address. cmd_stb repeats the
// update strobe one clock later, aligned with the new lines, so that a user
// can form one-clock command pulses (cmd & {N{cmd_stb}}).
//
// The design names an address decoder fed by the serial-to-parallel
// converter and driven by the latch operation; the one-hot, held outputs are
// this design's choice.
module tc_decoder #(
  parameter int unsigned ADDR_W = 8,
  localparam int unsigned N_CMD = 2 ** ADDR_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] addr,
  input  logic              addr_stb,
  output logic [N_CMD-1:0]  cmd,
  output logic              cmd_stb
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd     <= '0;
      cmd_stb <= 1'b0;
    end else begin
      cmd_stb <= addr_stb;
      if (addr_stb) cmd <= N_CMD'(1) << addr;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) cmd_stb |-> $onehot(cmd));
endmodule
