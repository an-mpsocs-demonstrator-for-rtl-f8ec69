// workhorse_cpu: one work-horse CPU of the MPSoC, made of an ALU block and a
// CTRL block, with its Intra-Component-Level EIF and mask register.
//
// Scan path inside the CPU (si to so):
//   SIB -> ALU block segment
//   SIB -> CTRL block segment
//   SIB -> Intra-Component-Level EIF/M (2+2 bits)
// EIF bit 0 is the ALU block's FIPI output and bit 1 the CTRL block's; the
// bits follow those outputs combinationally. flag_up, the masked OR of the
// two, goes to the Component-Level EIF. instr_err/force_en/force_val carry
// one bit per instrument: [0] scan chain, [1] register file, [2] PC,
// [3] REGISTER. dforce_en/dforce_val (DATA_BITS wide) force instrument data
// bits: scan chain, register file, then PC and REGISTER, each from bit 0.
// Jobs are run by the CTRL block's PC. The structure follows
// the document; the bit orders are this design's choice.
module workhorse_cpu
  import ijtag_pkg::*;
#(
  parameter int unsigned DATA_W  = 16,
  parameter int unsigned RF_REGS = 4,
  parameter int unsigned SC_LEN  = 16,
  parameter int unsigned PC_W    = 16,
  localparam int unsigned ALU_BITS  = SC_LEN + RF_REGS * DATA_W,
  localparam int unsigned DATA_BITS = ALU_BITS + PC_W + DATA_W
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      sel,
  input  ijtag_ctrl_t               ctrl,
  input  logic                      si,
  output logic                      so,
  input  logic                      job_start,
  input  logic [PC_W-1:0]           job_len,
  output logic                      job_busy,
  output logic                      job_done,
  output logic [PC_W-1:0]           pc,
  input  logic [POINTS_PER_CPU-1:0] instr_err,
  input  logic [POINTS_PER_CPU-1:0] force_en,
  input  logic [POINTS_PER_CPU-1:0] force_val,
  input  logic [DATA_BITS-1:0]      dforce_en,
  input  logic [DATA_BITS-1:0]      dforce_val,
  output logic                      flag_up,
  output logic [1:0]                eif
);

  logic alu_sel, alu_si, alu_so, sib0_so;
  logic ctl_sel, ctl_si, ctl_so, sib1_so;
  logic ef_sel, ef_si, ef_so;
  logic alu_open, ctl_open, ef_open;
  logic alu_flag, ctl_flag;

  logic [RF_REGS*DATA_W-1:0] rf_q;
  logic [SC_LEN-1:0]         sc_q;
  logic [DATA_W-1:0]         reg_q;
  logic [1:0]                alu_eif, ctl_eif;

  sib u_sib_alu (
    .clk, .rst_n, .sel, .ctrl, .si, .so(sib0_so),
    .host_sel(alu_sel), .host_si(alu_si), .host_so(alu_so), .is_open(alu_open)
  );
  alu_block #(.DATA_W(DATA_W), .RF_REGS(RF_REGS), .SC_LEN(SC_LEN)) u_alu (
    .clk, .rst_n, .sel(alu_sel), .ctrl, .si(alu_si), .so(alu_so),
    .instr_err(instr_err[1:0]), .force_en(force_en[1:0]), .force_val(force_val[1:0]),
    .dforce_en(dforce_en[ALU_BITS-1:0]), .dforce_val(dforce_val[ALU_BITS-1:0]),
    .flag_up(alu_flag), .eif(alu_eif), .rf_q, .sc_q
  );

  sib u_sib_ctl (
    .clk, .rst_n, .sel, .ctrl, .si(sib0_so), .so(sib1_so),
    .host_sel(ctl_sel), .host_si(ctl_si), .host_so(ctl_so), .is_open(ctl_open)
  );
  ctrl_block #(.DATA_W(DATA_W), .PC_W(PC_W)) u_ctrl (
    .clk, .rst_n, .sel(ctl_sel), .ctrl, .si(ctl_si), .so(ctl_so),
    .job_start, .job_len, .job_busy, .job_done, .pc, .reg_q,
    .instr_err(instr_err[3:2]), .force_en(force_en[3:2]), .force_val(force_val[3:2]),
    .dforce_en(dforce_en[DATA_BITS-1:ALU_BITS]), .dforce_val(dforce_val[DATA_BITS-1:ALU_BITS]),
    .flag_up(ctl_flag), .eif(ctl_eif)
  );

  sib u_sib_eif (
    .clk, .rst_n, .sel, .ctrl, .si(sib1_so), .so,
    .host_sel(ef_sel), .host_si(ef_si), .host_so(ef_so), .is_open(ef_open)
  );
  eif_mask_reg #(.N(2), .STICKY(1'b0)) u_eif (
    .clk, .rst_n, .sel(ef_sel), .ctrl, .si(ef_si), .so(ef_so),
    .flag_in({ctl_flag, alu_flag}), .force_en(2'b00), .force_val(2'b00),
    .eif, .mask(), .flag_up
  );

endmodule
