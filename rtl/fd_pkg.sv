// fd_pkg: number formats and state encoding shared by the boost-converter
// controller and the switch fault diagnosis.
//
// All measured and computed quantities are fixed-point integers:
//   current  i_L, i_Lref  signed   16 bit, 8 fraction bits  (1/256 A,  +-128 A)
//   voltage  v_o, v_oref  unsigned 16 bit, 6 fraction bits  (1/64 V,   0..1024 V)
//   energy   e_o, e_oref  signed   24 bit, 12 fraction bits (1/4096 J, +-2048 J)
//   duty     D            unsigned 16 bit, 16 fraction bits (0 .. 1-2^-16)
// These widths are this design's choice; the converter ratings they cover
// (50 V input, a few amperes, about 100 V output) follow the boost converter
// the diagnosis method was demonstrated on.
//
// The FD2 state machine has the four states S0..S3 of the diagnosis method:
// S0 switch off, S1 check for fault, S2 switch on, S3 fault.
package fd_pkg;

  localparam int unsigned I_W    = 16;
  localparam int unsigned I_FRAC = 8;
  localparam int unsigned V_W    = 16;
  localparam int unsigned V_FRAC = 6;
  localparam int unsigned E_W    = 24;
  localparam int unsigned E_FRAC = 12;
  localparam int unsigned D_W    = 16;
  localparam int unsigned D_FRAC = 16;

  typedef logic signed [I_W-1:0] current_t;
  typedef logic        [V_W-1:0] voltage_t;
  typedef logic signed [E_W-1:0] energy_t;
  typedef logic        [D_W-1:0] duty_t;

  typedef enum logic [1:0] {
    FD2_S0_OFF   = 2'd0,
    FD2_S1_CHECK = 2'd1,
    FD2_S2_ON    = 2'd2,
    FD2_S3_FAULT = 2'd3
  } fd2_state_e;

endpackage
