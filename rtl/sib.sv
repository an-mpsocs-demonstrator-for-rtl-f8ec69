// sib: Segment Insertion Bit of the P1687 instrument access network.
//
// A SIB is one bit of the scan path that decides whether a lower-level
// segment (a group of SIBs, an instrument or an EIF/mask register) is part of
// the scan path. It has a scan cell and an update cell. While the update cell
// holds 0 the SIB is closed: the path is si -> scan cell -> so, one bit long.
// Writing 1 through Update-DR opens it: the path becomes
// si -> host_si ... hosted segment ... host_so -> scan cell -> so, and the
// hosted segment is selected (host_sel). Capture-DR loads the scan cell with
// the update cell, so reading a SIB returns whether it is open.
//
// Timing: all actions take place on the rising clock edge while sel and the
// matching enable in ctrl are high. so is the scan cell output.
// Reset closes the SIB. The document names SIBs and their role; the cell
// structure is the usual P1687 one and is this design's choice.
module sib
  import ijtag_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sel,
  input  ijtag_ctrl_t ctrl,
  input  logic        si,
  output logic        so,
  output logic        host_sel,
  output logic        host_si,
  input  logic        host_so,
  output logic        is_open
);

  logic scan_q;
  logic upd_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scan_q <= 1'b0;
      upd_q  <= 1'b0;
    end else if (sel) begin
      if (ctrl.capture)     scan_q <= upd_q;
      else if (ctrl.shift)  scan_q <= upd_q ? host_so : si;
      if (ctrl.update)      upd_q  <= scan_q;
    end
  end

  assign so       = scan_q;
  assign host_si  = si;
  assign host_sel = sel & upd_q;
  assign is_open  = upd_q;

endmodule
