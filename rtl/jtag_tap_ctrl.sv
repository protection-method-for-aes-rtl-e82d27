// jtag_tap_ctrl: the standard 16-state IEEE 1149.1 TAP controller (a Moore
// machine on TCK and TMS) and a one-bit bypass register for TDO.
//
// The state advances on the rising edge of TCK as the standard prescribes.
// The control outputs are decoded from the present state:
//   clock_dr  Capture-DR or Shift-DR       clock_ir  Capture-IR or Shift-IR
//   shift_dr  Shift-DR                     shift_ir  Shift-IR
//   update_dr Update-DR                    update_ir Update-IR
//   reset_n   0 in Test-Logic-Reset        select    1 in the IR column
//   enable    Shift-DR or Shift-IR (TDO driven)
// The protection logic around the AES core uses only these outputs, so the
// controller itself stays an unmodified, reusable TAP. Giving ClockDR and
// ClockIR as clock enables rather than gated clocks, decoding every output
// from the present state (no falling-edge retiming) and the bypass register
// standing in for the rest of the data-register file are this design's
// simplifications; the instruction register is not modelled, so the IR path
// only moves through its states. trst_n is an asynchronous, active-low reset
// to Test-Logic-Reset. tdo shows the bypass bit while enable is 1, else 0.
module jtag_tap_ctrl
  import jtag_pkg::*;
(
  input  logic       tck,
  input  logic       trst_n,
  input  logic       tms,
  input  logic       tdi,
  output logic       tdo,
  output tap_state_t state,
  output tap_ctrl_t  ctrl
);
  tap_state_t nxt;
  logic       bypass_q;

  always_comb begin
    unique case (state)
      TEST_LOGIC_RESET: nxt = tms ? TEST_LOGIC_RESET : RUN_TEST_IDLE;
      RUN_TEST_IDLE:    nxt = tms ? SELECT_DR_SCAN   : RUN_TEST_IDLE;
      SELECT_DR_SCAN:   nxt = tms ? SELECT_IR_SCAN   : CAPTURE_DR;
      CAPTURE_DR:       nxt = tms ? EXIT1_DR         : SHIFT_DR;
      SHIFT_DR:         nxt = tms ? EXIT1_DR         : SHIFT_DR;
      EXIT1_DR:         nxt = tms ? UPDATE_DR        : PAUSE_DR;
      PAUSE_DR:         nxt = tms ? EXIT2_DR         : PAUSE_DR;
      EXIT2_DR:         nxt = tms ? UPDATE_DR        : SHIFT_DR;
      UPDATE_DR:        nxt = tms ? SELECT_DR_SCAN   : RUN_TEST_IDLE;
      SELECT_IR_SCAN:   nxt = tms ? TEST_LOGIC_RESET : CAPTURE_IR;
      CAPTURE_IR:       nxt = tms ? EXIT1_IR         : SHIFT_IR;
      SHIFT_IR:         nxt = tms ? EXIT1_IR         : SHIFT_IR;
      EXIT1_IR:         nxt = tms ? UPDATE_IR        : PAUSE_IR;
      PAUSE_IR:         nxt = tms ? EXIT2_IR         : PAUSE_IR;
      EXIT2_IR:         nxt = tms ? UPDATE_IR        : SHIFT_IR;
      UPDATE_IR:        nxt = tms ? SELECT_DR_SCAN   : RUN_TEST_IDLE;
      default:          nxt = TEST_LOGIC_RESET;
    endcase
  end

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) state <= TEST_LOGIC_RESET;
    else         state <= nxt;
  end

  always_comb begin
    ctrl.clock_dr  = (state == CAPTURE_DR) || (state == SHIFT_DR);
    ctrl.shift_dr  = (state == SHIFT_DR);
    ctrl.update_dr = (state == UPDATE_DR);
    ctrl.reset_n   = (state != TEST_LOGIC_RESET);
    ctrl.select    = state inside {SELECT_IR_SCAN, CAPTURE_IR, SHIFT_IR, EXIT1_IR,
                                   PAUSE_IR, EXIT2_IR, UPDATE_IR};
    ctrl.clock_ir  = (state == CAPTURE_IR) || (state == SHIFT_IR);
    ctrl.shift_ir  = (state == SHIFT_IR);
    ctrl.update_ir = (state == UPDATE_IR);
    ctrl.enable    = (state == SHIFT_DR) || (state == SHIFT_IR);
  end

  // bypass register: captures 0, shifts TDI
  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n)             bypass_q <= 1'b0;
    else if (ctrl.clock_dr)  bypass_q <= ctrl.shift_dr & tdi;
  end

  assign tdo = ctrl.enable & bypass_q;
endmodule
