// uwb_pkg: constants and types shared by the energy-detection UWB receiver.
//
// The receiver runs on one sampling clock ("tick"). The symbol period Ts is
// 202 ns and the preamble sweep uses M = 11 offsets spread over Ts/2; with a
// tick of 1.01 ns a symbol is 200 ticks, a half symbol 100 ticks and one sweep
// offset step (Ts/2)/(M-1) is exactly 10 ticks. Ts and M are the published
// figures; the 1.01 ns tick and the 8-bit converter are choices of this design.
package uwb_pkg;

  localparam int unsigned SYM_TICKS_D = 200;  // Ts = 202 ns / 1.01 ns tick
  localparam int unsigned M_SWEEPS_D  = 11;   // preamble repetitions M
  localparam int unsigned ADC_BITS_D  = 8;    // converter resolution
  localparam real         TICK_NS_D   = 1.01; // tick length in ns

  // Receiver operating phases, sequenced by the system controller.
  typedef enum logic [1:0] {
    ST_IDLE    = 2'd0,   // receiver off, waiting for rx_en
    ST_PRESYNC = 2'd1,   // looking for signal energy above noise
    ST_SYNC    = 2'd2,   // preamble sweep of the integration offset
    ST_DEMOD   = 2'd3    // 2-PPM demodulation on the locked clock
  } rx_state_e;

  // Power-enable vector issued by the power manager, one bit per block.
  typedef struct packed {
    logic fe;        // LNA and square-law module
    logic integ;     // integrate-and-dump
    logic adc;       // A/D converter
    logic presync;   // pre-synchronizer
    logic sync;      // maximum-energy search
    logic demod;     // bit decision
    logic ranging;   // ranging block (outside this RTL)
    logic decoder;   // decoding block (outside this RTL)
  } pwr_en_t;

endpackage
