// pulse_gen: mono-pulse generator of the telecommand interface.
//
// The trigger input is a level that the sender toggles once per command.
// It is brought into the clock domain through SYNC_STAGES flip-flops; when
// the synchronised level differs from its previous value (a toggle, either
// direction) the block emits a toggle pulse PULSE_CYCLES clocks wide. The
// pulse starts the latch operation of the telecommand decoder.
//
// Detecting both edges of a toggling bit and producing a single pulse follow
// the design's specification; the synchroniser, the pulse width of one clock
// and the reset value of the trigger (taken as low) are this design's
// choices.
//
// Timing: the pulse begins SYNC_STAGES+1 clocks after the trigger changes.
// A toggle arriving while a pulse is still running restarts the pulse.
module pulse_gen #(
  parameter int unsigned SYNC_STAGES  = 2,
  parameter int unsigned PULSE_CYCLES = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic trigger,
  output logic pulse
);
  localparam int unsigned PW = $clog2(PULSE_CYCLES + 1);

  logic [SYNC_STAGES-1:0] sync;
  logic                   trig_prev;
  logic                   toggle;
  logic [PW-1:0]          left;

  assign toggle = sync[SYNC_STAGES-1] ^ trig_prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync      <= '0;
      trig_prev <= 1'b0;
      left      <= '0;
      pulse     <= 1'b0;
    end else begin
      sync      <= {sync[SYNC_STAGES-2:0], trigger};
      trig_prev <= sync[SYNC_STAGES-1];
      if (toggle) begin
        pulse <= 1'b1;
        left  <= PW'(PULSE_CYCLES - 1);
      end else if (left != '0) begin
        left <= left - 1'b1;
      end else begin
        pulse <= 1'b0;
      end
    end
  end

  initial assert (SYNC_STAGES >= 2 && PULSE_CYCLES >= 1)
    else $error("pulse_gen: SYNC_STAGES >= 2 and PULSE_CYCLES >= 1 required");
endmodule
