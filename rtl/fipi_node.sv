// fipi_node: one propagation step of the Fault Indication and Propagation
// Infrastructure (FIPI).
//
// The FIPI carries fault indications from an EIF (Error Indication Flag)
// register to one bit of the EIF one level up, like an interrupt line:
// flag_up is the OR of all EIF bits whose mask bit is 0. Setting a mask bit
// (fault marking) stops that bit from reaching the upper levels while it
// stays visible in its own EIF. Purely combinational, so an indication
// reaches the System-Level EIF in the same clock it appears. The OR and the
// mask follow the document; per-bit masking is read from its example.
module fipi_node #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0] eif,
  input  logic [N-1:0] mask,
  output logic         flag_up
);

  always_comb flag_up = |(eif & ~mask);

endmodule
