// tdr: scan data register through which the P1687 network reads and writes
// an instrument (register file, program counter, general register).
//
// Capture-DR loads cap_val, the instrument's current contents, into a W-bit
// shift register. Shift-DR moves it one bit per clock: si enters at bit W-1
// and bit 0 leaves on so. Update-DR presents the shifted word on upd_val with
// a one-clock upd_we strobe, which the instrument uses as a write. The
// register keeps no copy of its own, so the instrument is the only storage.
// All actions need sel high. This attachment scheme is this design's choice;
// the document only calls the accessed registers instruments.
module tdr
  import ijtag_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sel,
  input  ijtag_ctrl_t  ctrl,
  input  logic         si,
  output logic         so,
  input  logic [W-1:0] cap_val,
  output logic [W-1:0] upd_val,
  output logic         upd_we
);

  logic [W-1:0] sr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   sr_q <= '0;
    else if (sel && ctrl.capture) sr_q <= cap_val;
    else if (sel && ctrl.shift)   sr_q <= {si, sr_q[W-1:1]};
  end

  assign so      = sr_q[0];
  assign upd_val = sr_q;
  assign upd_we  = sel & ctrl.update;

endmodule
