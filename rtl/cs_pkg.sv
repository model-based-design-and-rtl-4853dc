// cs_pkg: types and constants shared by the temperature control system.
//
// The controller works on whole degrees Celsius and whole watts, the
// resolution of the integer model it is derived from. Widths are the
// smallest that hold the ranges the system can reach:
//   set point Ts      100..250 degC         -> 9 bits unsigned
//   environment Te     10..30  degC         -> 6 bits unsigned
//   oven temperature   up to Te + 5000*R0   -> 10 bits unsigned
//   heater temperature up to ~1250 degC     -> 11 bits unsigned
//   heater power        0..5000 W           -> 13 bits unsigned
//   error Ts - Tout                         -> 11 bits signed
// The ranges of Ts and Te, the power limit and the 1/1024 integral scaling
// follow the source design; the bit widths are this design's own choice.
package cs_pkg;

  localparam int TS_W    = 9;
  localparam int TE_W    = 6;
  localparam int TEMP_W  = 10;
  localparam int TH_W    = 11;
  localparam int POWER_W = 13;
  localparam int ERR_W   = 11;
  localparam int ENERGY_W = 24;   // heat stored in a capacitance, joules
  localparam int COMP_W  = 24;    // one PID component, watts

  localparam int POWER_MAX = 5000;
  localparam int TS_MIN    = 100;
  localparam int TS_MAX    = 250;
  localparam int TE_MIN    = 10;
  localparam int TE_MAX    = 30;

  typedef logic [TS_W-1:0]           ts_t;
  typedef logic [TE_W-1:0]           te_t;
  typedef logic [TEMP_W-1:0]         temp_t;
  typedef logic [TH_W-1:0]           th_t;
  typedef logic [POWER_W-1:0]        power_t;
  typedef logic signed [ERR_W-1:0]   err_t;
  typedef logic signed [ENERGY_W-1:0] energy_t;
  typedef logic signed [COMP_W-1:0]  comp_t;

  // What the four-digit display shows, selected by the two slide switches.
  typedef enum logic [1:0] {
    DISP_TS    = 2'd0,   // set point
    DISP_TE    = 2'd1,   // environment temperature (buttons then edit Te)
    DISP_TOUT  = 2'd2,   // oven temperature
    DISP_POWER = 2'd3    // heater power in watts
  } disp_sel_e;

endpackage
