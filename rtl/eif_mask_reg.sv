// eif_mask_reg: an EIF (Error Indication Flag) status register with its mask
// register M, as one scan data register of the P1687 network, plus the FIPI
// output towards the next level up.
//
// Scan layout: a 2N-bit shift register {M, EIF}; bits enter at the M[N-1]
// end and EIF[0] leaves first on so. Capture-DR loads the current EIF and M,
// Update-DR writes M (mask write used for fault marking). At Instrument-Level
// (STICKY=1) Update-DR also clears every EIF bit written with 1 (write 1 to
// clear), so the fault handler can acknowledge an indication, while reading
// the register with zeros shifted in leaves the flags alone.
//
// EIF bits:
//   STICKY=0 (Intra-Component, Component, Component-Type and System levels):
//     eif follows flag_in, the FIPI outputs of the level below.
//   STICKY=1 (Instrument-Level): flops set by flag_in (the instruments'
//     error-detection outputs) and kept until cleared through the network;
//     a detection in the same clock as the clear wins.
// force_en/force_val come from the fault injection manager and override the
// bit: a forced bit reads as force_val whatever the detection input or a
// scan write says. flag_up = OR of unmasked EIF bits (fipi_node).
//
// The EIF/M pairing, the equal sizes and the upward OR follow the document;
// the sticky Instrument-Level flags and the scan layout are this design's
// choice. Reset clears M and the sticky flags.
module eif_mask_reg
  import ijtag_pkg::*;
#(
  parameter int unsigned N      = 2,
  parameter bit          STICKY = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sel,
  input  ijtag_ctrl_t  ctrl,
  input  logic         si,
  output logic         so,
  input  logic [N-1:0] flag_in,
  input  logic [N-1:0] force_en,
  input  logic [N-1:0] force_val,
  output logic [N-1:0] eif,
  output logic [N-1:0] mask,
  output logic         flag_up
);

  logic [2*N-1:0] sr_q;
  logic [N-1:0]   mask_q;
  logic [N-1:0]   eif_raw;

  // Scan register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     sr_q <= '0;
    else if (sel && ctrl.capture)   sr_q <= {mask_q, eif};
    else if (sel && ctrl.shift)     sr_q <= {si, sr_q[2*N-1:1]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     mask_q <= '0;
    else if (sel && ctrl.update)    mask_q <= sr_q[2*N-1:N];
  end

  if (STICKY) begin : g_sticky
    // Forcing also acts on the stored flag, so a soft stuck-at-1 stays
    // recorded after its one clock and a soft stuck-at-0 clears it once.
    logic [N-1:0] flag_q;
    logic [N-1:0] flag_d;
    always_comb begin
      if (sel && ctrl.update) flag_d = (flag_q & ~sr_q[N-1:0]) | flag_in;
      else                    flag_d = flag_q | flag_in;
      flag_d = (flag_d & ~force_en) | (force_val & force_en);
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) flag_q <= '0;
      else        flag_q <= flag_d;
    end
    assign eif_raw = flag_q;
  end else begin : g_follow
    assign eif_raw = flag_in;
  end

  assign eif  = (eif_raw & ~force_en) | (force_val & force_en);
  assign mask = mask_q;
  assign so   = sr_q[0];

  fipi_node #(.N(N)) u_fipi (
    .eif    (eif),
    .mask   (mask_q),
    .flag_up(flag_up)
  );

endmodule
