// Shared constants and types of the reset shift block.
//
// The reset shift setting is a 6-bit word: bit 5 selects a half-cycle shift
// of the 625 MHz reset clock (done with a DDR output register), bits 4..0 are
// the step count of the IO delay chain. The configuration FSM runs on a
// 31.25 MHz clock divided from 156.25 MHz; it shifts the 5 delay bits out
// serially and then waits 11 cycles before it applies them. These numbers
// follow the published design; the state encoding is this design's choice.
`timescale 1ps/1ps
package rst_shift_pkg;

  localparam int unsigned CDATA_W  = 6;   // width of the shift setting
  localparam int unsigned DLY_W    = 5;   // delay-chain setting width
  localparam int unsigned N_SEND   = 5;   // serial bits per configuration
  localparam int unsigned N_UPDATE = 11;  // cycles spent in the update state
  localparam int unsigned CLK_DIV  = 5;   // 156.25 MHz / 5 = 31.25 MHz

  typedef enum logic [1:0] {
    FS_IDLE   = 2'd0,
    FS_REC    = 2'd1,
    FS_SEND   = 2'd2,
    FS_UPDATE = 2'd3
  } fsm_state_t;

endpackage
