// scan_chain: the test scan chain instrument of a work-horse CPU's ALU.
//
// LEN flops linked into one shift path. While the chain is selected by its
// SIB and Shift-DR is active, each clock moves the chain one place: si enters
// at bit LEN-1 and bit 0 leaves on so. Otherwise the flops keep their value;
// q shows the chain contents to the block that owns them. There is no capture
// or update stage: the chain flops are shifted directly, as in a scan test.
// force_en/force_val come from the fault injection manager and override the
// value stored into a flop (held: stuck-at; one clock: a flipped or set bit
// that then stays until shifted out). The document names the scan chain;
// its length and reset value (0) are this design's choice.
module scan_chain
  import ijtag_pkg::*;
#(
  parameter int unsigned LEN = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           sel,
  input  ijtag_ctrl_t    ctrl,
  input  logic           si,
  output logic           so,
  input  logic [LEN-1:0] force_en,
  input  logic [LEN-1:0] force_val,
  output logic [LEN-1:0] q
);

  logic [LEN-1:0] chain_q, chain_d;

  always_comb begin
    chain_d = (sel && ctrl.shift) ? {si, chain_q[LEN-1:1]} : chain_q;
    chain_d = (chain_d & ~force_en) | (force_val & force_en);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) chain_q <= '0;
    else        chain_q <= chain_d;
  end

  assign so = chain_q[0];
  assign q  = chain_q;

endmodule
