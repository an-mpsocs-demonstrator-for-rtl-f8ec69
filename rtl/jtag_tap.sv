// jtag_tap: IEEE 1149.1 test access port of the master CPU, the entry point
// of the P1687 instrument access network.
//
// A 16-state TAP controller advances on every rising clock edge according to
// tms (the clock is used as TCK). A 4-bit instruction register selects the
// data register between tdi and tdo:
//   IJTAG  (4'b1000): the P1687 network; net_sel is high and the Capture-DR,
//                     Shift-DR and Update-DR states become one-clock enables
//                     in net_ctrl (each acts on the edge that leaves the state).
//   BYPASS (4'b1111, and every other code): a one-bit bypass register.
// Capture-IR loads 4'b0001. Test-Logic-Reset and rst_n set the instruction to
// BYPASS. tdo is combinational: the IR's bit 0 in Shift-IR, the selected data
// register's output in Shift-DR, 0 otherwise. The network's scan input is tdi.
// The document only places a TAP in the master CPU; the instruction codes,
// single clock and combinational tdo are this design's choices.
module jtag_tap
  import ijtag_pkg::*;
#(
  parameter int unsigned IR_W = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        tms,
  input  logic        tdi,
  output logic        tdo,
  output logic        net_sel,
  output ijtag_ctrl_t net_ctrl,
  output logic        net_si,
  input  logic        net_so
);

  typedef enum logic [3:0] {
    TLR, RTI,
    SEL_DR, CAP_DR, SH_DR, EX1_DR, PA_DR, EX2_DR, UPD_DR,
    SEL_IR, CAP_IR, SH_IR, EX1_IR, PA_IR, EX2_IR, UPD_IR
  } tap_state_e;

  localparam logic [IR_W-1:0] IR_IJTAG  = IR_W'(4'b1000);
  localparam logic [IR_W-1:0] IR_BYPASS = '1;
  localparam logic [IR_W-1:0] IR_CAPT   = IR_W'(1);

  tap_state_e      state_q, state_d;
  logic [IR_W-1:0] ir_q, ir_sr_q;
  logic            bypass_q;

  always_comb begin
    unique case (state_q)
      TLR:    state_d = tms ? TLR    : RTI;
      RTI:    state_d = tms ? SEL_DR : RTI;
      SEL_DR: state_d = tms ? SEL_IR : CAP_DR;
      CAP_DR: state_d = tms ? EX1_DR : SH_DR;
      SH_DR:  state_d = tms ? EX1_DR : SH_DR;
      EX1_DR: state_d = tms ? UPD_DR : PA_DR;
      PA_DR:  state_d = tms ? EX2_DR : PA_DR;
      EX2_DR: state_d = tms ? UPD_DR : SH_DR;
      UPD_DR: state_d = tms ? SEL_DR : RTI;
      SEL_IR: state_d = tms ? TLR    : CAP_IR;
      CAP_IR: state_d = tms ? EX1_IR : SH_IR;
      SH_IR:  state_d = tms ? EX1_IR : SH_IR;
      EX1_IR: state_d = tms ? UPD_IR : PA_IR;
      PA_IR:  state_d = tms ? EX2_IR : PA_IR;
      EX2_IR: state_d = tms ? UPD_IR : SH_IR;
      UPD_IR: state_d = tms ? SEL_DR : RTI;
      default: state_d = TLR;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= TLR;
    else        state_q <= state_d;
  end

  // Instruction register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ir_q    <= IR_BYPASS;
      ir_sr_q <= '0;
    end else begin
      unique case (state_q)
        TLR:     ir_q    <= IR_BYPASS;
        CAP_IR:  ir_sr_q <= IR_CAPT;
        SH_IR:   ir_sr_q <= {tdi, ir_sr_q[IR_W-1:1]};
        UPD_IR:  ir_q    <= ir_sr_q;
        default: ;
      endcase
    end
  end

  // Bypass register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 bypass_q <= 1'b0;
    else if (state_q == CAP_DR) bypass_q <= 1'b0;
    else if (state_q == SH_DR)  bypass_q <= tdi;
  end

  assign net_sel          = (ir_q == IR_IJTAG);
  assign net_ctrl.capture = (state_q == CAP_DR);
  assign net_ctrl.shift   = (state_q == SH_DR);
  assign net_ctrl.update  = (state_q == UPD_DR);
  assign net_si           = tdi;

  always_comb begin
    if (state_q == SH_IR)      tdo = ir_sr_q[0];
    else if (state_q == SH_DR) tdo = net_sel ? net_so : bypass_q;
    else                       tdo = 1'b0;
  end

endmodule
