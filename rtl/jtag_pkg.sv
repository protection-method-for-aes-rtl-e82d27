// jtag_pkg: the sixteen states of the IEEE 1149.1 TAP controller and the
// bundle of control signals it decodes from them.
package jtag_pkg;

  typedef enum logic [3:0] {
    TEST_LOGIC_RESET = 4'hF,
    RUN_TEST_IDLE    = 4'hC,
    SELECT_DR_SCAN   = 4'h7,
    CAPTURE_DR       = 4'h6,
    SHIFT_DR         = 4'h2,
    EXIT1_DR         = 4'h1,
    PAUSE_DR         = 4'h3,
    EXIT2_DR         = 4'h0,
    UPDATE_DR        = 4'h5,
    SELECT_IR_SCAN   = 4'h4,
    CAPTURE_IR       = 4'hE,
    SHIFT_IR         = 4'hA,
    EXIT1_IR         = 4'h9,
    PAUSE_IR         = 4'hB,
    EXIT2_IR         = 4'h8,
    UPDATE_IR        = 4'hD
  } tap_state_t;

  // Control outputs of the TAP controller (names as in the block diagram).
  // The clock outputs are given as clock enables for the TCK domain.
  typedef struct packed {
    logic clock_dr;
    logic shift_dr;
    logic update_dr;
    logic reset_n;
    logic select;
    logic clock_ir;
    logic shift_ir;
    logic update_ir;
    logic enable;
  } tap_ctrl_t;

endpackage
