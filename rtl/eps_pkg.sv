// eps_pkg: types and constants shared by the data acquisition, telecommand
// and telemetry blocks of the electric propulsion controller.
//
// The DAS state encoding follows the order in which the controller steps
// through an acquisition (data_acq = 3'b000 up to inc_sel = 3'b110); the
// eighth code, 3'b111, is unused. phys_addr forms an 8086 physical address
// from segment and offset.
package eps_pkg;

  // Data acquisition controller states, in sequence order.
  typedef enum logic [2:0] {
    S_DATA_ACQ = 3'b000,  // idle: select lines reset, waiting for start
    S_SOC_GEN1 = 3'b001,  // settle delay, SOC low
    S_SOC_GEN0 = 3'b010,  // SOC pulse high
    S_DELAY    = 3'b011,  // ADC conversion time
    S_STROBE1  = 3'b100,  // strobe high
    S_STROBE0  = 3'b101,  // strobe low again
    S_INC_SEL  = 3'b110   // next channel, hold-off delay
  } das_state_t;

  // Physical address of segment:offset.
  function automatic logic [19:0] phys_addr(input logic [15:0] seg,
                                            input logic [15:0] off);
    return {seg, 4'h0} + {4'h0, off};
  endfunction

endpackage
