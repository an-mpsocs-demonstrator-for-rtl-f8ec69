// alu_block: the ALU block of a work-horse CPU as seen from the instrument
// access network. It holds two instruments, a test scan chain and a register
// file, and the block's Instrument-Level EIF with its mask register.
//
// Scan path inside the block (si to so), each SIB hosting one segment:
//   SIB -> scan chain (SC_LEN bits, shifted directly)
//   SIB -> register file (RF_REGS*DATA_W bits, register 0 leaves first)
//   SIB -> EIF/M (2+2 bits)
// EIF bit 0 belongs to the scan chain and bit 1 to the register file. They are
// sticky flags set by instr_err (the instruments' error detection, outside
// this design) or by the fault injection manager through force_en/force_val;
// flag_up is their masked OR towards the CPU's Intra-Component-Level EIF.
// The register file is written as a whole by Update-DR of its register.
// dforce_en/dforce_val force data bits of the instruments for fault
// injection: bits [SC_LEN-1:0] the scan chain, the next RF_REGS*DATA_W bits
// the register file (register 0 first); a forced value is stored into the
// flop, so a one-clock force leaves a corrupted bit behind.
// The ALU datapath is not described by the document and is not built: the
// block holds only the parts that the network reaches. The instrument set and
// the EIF bit of the register file follow the document; sizes are this
// design's choice.
module alu_block
  import ijtag_pkg::*;
#(
  parameter int unsigned DATA_W  = 16,
  parameter int unsigned RF_REGS = 4,
  parameter int unsigned SC_LEN  = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      sel,
  input  ijtag_ctrl_t               ctrl,
  input  logic                      si,
  output logic                      so,
  input  logic [1:0]                instr_err,
  input  logic [1:0]                force_en,
  input  logic [1:0]                force_val,
  input  logic [SC_LEN+RF_REGS*DATA_W-1:0] dforce_en,
  input  logic [SC_LEN+RF_REGS*DATA_W-1:0] dforce_val,
  output logic                      flag_up,
  output logic [1:0]                eif,
  output logic [RF_REGS*DATA_W-1:0] rf_q,
  output logic [SC_LEN-1:0]         sc_q
);

  localparam int unsigned RF_W = RF_REGS * DATA_W;

  logic sc_sel, sc_si, sc_so, sib0_so;
  logic rf_sel, rf_si, rf_so, sib1_so;
  logic ef_sel, ef_si, ef_so;
  logic sc_open, rf_open, ef_open;

  // Scan chain instrument.
  sib u_sib_sc (
    .clk, .rst_n, .sel, .ctrl, .si, .so(sib0_so),
    .host_sel(sc_sel), .host_si(sc_si), .host_so(sc_so), .is_open(sc_open)
  );
  scan_chain #(.LEN(SC_LEN)) u_sc (
    .clk, .rst_n, .sel(sc_sel), .ctrl, .si(sc_si), .so(sc_so),
    .force_en(dforce_en[SC_LEN-1:0]), .force_val(dforce_val[SC_LEN-1:0]), .q(sc_q)
  );

  // Register file instrument.
  logic [DATA_W-1:0] rf_mem [RF_REGS];
  logic [RF_W-1:0]   rf_upd, rf_d;
  logic              rf_we;

  sib u_sib_rf (
    .clk, .rst_n, .sel, .ctrl, .si(sib0_so), .so(sib1_so),
    .host_sel(rf_sel), .host_si(rf_si), .host_so(rf_so), .is_open(rf_open)
  );
  tdr #(.W(RF_W)) u_rf_tdr (
    .clk, .rst_n, .sel(rf_sel), .ctrl, .si(rf_si), .so(rf_so),
    .cap_val(rf_q), .upd_val(rf_upd), .upd_we(rf_we)
  );

  always_comb begin
    rf_d = rf_we ? rf_upd : rf_q;
    rf_d = (rf_d & ~dforce_en[SC_LEN +: RF_W]) | (dforce_val[SC_LEN +: RF_W] & dforce_en[SC_LEN +: RF_W]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < RF_REGS; r++) rf_mem[r] <= '0;
    end else begin
      for (int r = 0; r < RF_REGS; r++) rf_mem[r] <= rf_d[r*DATA_W +: DATA_W];
    end
  end

  always_comb begin
    for (int r = 0; r < RF_REGS; r++) rf_q[r*DATA_W +: DATA_W] = rf_mem[r];
  end

  // Instrument-Level EIF and mask.
  sib u_sib_eif (
    .clk, .rst_n, .sel, .ctrl, .si(sib1_so), .so,
    .host_sel(ef_sel), .host_si(ef_si), .host_so(ef_so), .is_open(ef_open)
  );
  eif_mask_reg #(.N(2), .STICKY(1'b1)) u_eif (
    .clk, .rst_n, .sel(ef_sel), .ctrl, .si(ef_si), .so(ef_so),
    .flag_in(instr_err), .force_en, .force_val,
    .eif, .mask(), .flag_up
  );

endmodule
