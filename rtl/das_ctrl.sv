// das_ctrl: sequencer of the 16-channel data acquisition system (DAS).
//
// A rising edge on start takes the controller out of its idle state
// (data_acq) and through one acquisition per analog channel. For each channel
// it waits T_SETTLE_US, raises SOC (start of conversion) for T_SOC_US, waits
// the ADC conversion time T_CONV_US, raises strobe for T_STROBE_US so that
// the result can be latched, drops strobe, steps the select lines to the next
// channel and waits T_HOLD_US. With the defaults at 12 MHz one channel takes
// exactly 200 us (SOC high 100-102 us, strobe high 142-144 us after the
// channel began) and all 16 channels 3200 us. After the last channel the
// controller returns to data_acq and pulses done for one cycle.
//
// The seven states, their order and encoding (000 upwards), the SOC, strobe
// and conversion timings and the 16 channels follow the design's
// specification. Choices of this design: the select lines step when the
// increment state is entered (so they move 144 us into a channel and the next
// SOC comes 156 us later); the increment state lasts T_HOLD_US = 56 us rather
// than 58 us so that a channel takes 200 us; strobe0 lasts a single clock; the
// start input is taken as synchronous to clk.
//
// Interface: clk at CLK_HZ, active-low asynchronous reset. soc and strobe are
// decoded from the state register; sel and done are registered.
module das_ctrl
  import eps_pkg::*;
#(
  parameter int unsigned CLK_HZ      = 12_000_000,
  parameter int unsigned N_CH        = 16,
  parameter int unsigned T_SETTLE_US = 100,
  parameter int unsigned T_SOC_US    = 2,
  parameter int unsigned T_CONV_US   = 40,
  parameter int unsigned T_STROBE_US = 2,
  parameter int unsigned T_HOLD_US   = 56,
  localparam int unsigned SEL_W      = (N_CH > 1) ? $clog2(N_CH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             soc,
  output logic             strobe,
  output logic [SEL_W-1:0] sel,
  output logic             busy,
  output logic             done,
  output das_state_t       state
);
  localparam int unsigned CYC_US = CLK_HZ / 1_000_000;
  localparam int unsigned C_SETTLE = T_SETTLE_US * CYC_US;
  localparam int unsigned C_SOC    = T_SOC_US * CYC_US;
  localparam int unsigned C_CONV   = T_CONV_US * CYC_US;
  localparam int unsigned C_STROBE = T_STROBE_US * CYC_US;
  localparam int unsigned C_HOLD   = T_HOLD_US * CYC_US - 1;  // strobe0 takes one
  localparam int unsigned TW       = $clog2(C_SETTLE + 1);

  das_state_t  nxt;
  logic [TW-1:0] tmr;
  logic          start_q;
  logic          start_rise;
  logic          last_ch;
  logic          tmr_zero;

  // Cycles spent in each state.
  function automatic int unsigned dur(input das_state_t s);
    case (s)
      S_SOC_GEN1: return C_SETTLE;
      S_SOC_GEN0: return C_SOC;
      S_DELAY:    return C_CONV;
      S_STROBE1:  return C_STROBE;
      S_STROBE0:  return 1;
      S_INC_SEL:  return C_HOLD;
      default:    return 1;
    endcase
  endfunction

  assign start_rise = start && !start_q;
  assign tmr_zero   = (tmr == '0);

  always_comb begin
    nxt = state;
    case (state)
      S_DATA_ACQ: if (start_rise) nxt = S_SOC_GEN1;
      S_SOC_GEN1: if (tmr_zero)   nxt = S_SOC_GEN0;
      S_SOC_GEN0: if (tmr_zero)   nxt = S_DELAY;
      S_DELAY:    if (tmr_zero)   nxt = S_STROBE1;
      S_STROBE1:  if (tmr_zero)   nxt = S_STROBE0;
      S_STROBE0:  if (tmr_zero)   nxt = S_INC_SEL;
      S_INC_SEL:  if (tmr_zero)   nxt = last_ch ? S_DATA_ACQ : S_SOC_GEN1;
      default:                    nxt = S_DATA_ACQ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_DATA_ACQ;
      tmr     <= '0;
      sel     <= '0;
      last_ch <= 1'b0;
      start_q <= 1'b0;
      done    <= 1'b0;
    end else begin
      start_q <= start;
      done    <= 1'b0;
      state   <= nxt;
      if (nxt != state) tmr <= TW'(dur(nxt) - 1);
      else if (!tmr_zero) tmr <= tmr - 1'b1;
      case (state)
        S_DATA_ACQ: begin
          sel     <= '0;
          last_ch <= 1'b0;
        end
        S_STROBE0: if (tmr_zero) begin
          // Entering the increment state: next channel.
          last_ch <= (sel == SEL_W'(N_CH - 1));
          sel     <= (sel == SEL_W'(N_CH - 1)) ? '0 : sel + 1'b1;
        end
        S_INC_SEL: if (tmr_zero && last_ch) done <= 1'b1;
        default: ;
      endcase
    end
  end

  assign soc    = (state == S_SOC_GEN0);
  assign strobe = (state == S_STROBE1);
  assign busy   = (state != S_DATA_ACQ);

  initial assert (CYC_US >= 1 && C_SOC >= 1 && C_STROBE >= 1 && C_HOLD >= 1)
    else $error("das_ctrl: clock too slow for the programmed delays");

  // SOC and strobe are never high together.
  assert property (@(posedge clk) disable iff (!rst_n) !(soc && strobe));
endmodule
