// cpu_cluster: the Component-Level segment of the work-horse CPUs.
//
// Scan path (si to so): one SIB per CPU, each hosting that CPU's segment, in
// the order CPU 0 (CPU1 in the document's numbering) to CPU N_CPU-1, then a
// SIB hosting the Component-Level EIF/M of N_CPU+N_CPU bits. EIF bit i
// follows CPU i's FIPI output; flag_up, their masked OR, goes to the CPU bit
// of the Component-Type-Level EIF. Writing mask bit i (fault marking) keeps
// CPU i's faults from reaching the upper levels. Per-CPU signals are packed
// with CPU i at bits [i*4 +: 4] (instrument flag bits), [i*DATA_BITS +:
// DATA_BITS] (instrument data bits) or [i] (job signals).
// The structure follows the document; the packing is this design's choice.
module cpu_cluster
  import ijtag_pkg::*;
#(
  parameter int unsigned N_CPU   = 10,
  parameter int unsigned DATA_W  = 16,
  parameter int unsigned RF_REGS = 4,
  parameter int unsigned SC_LEN  = 16,
  parameter int unsigned PC_W    = 16,
  localparam int unsigned DATA_BITS = SC_LEN + RF_REGS * DATA_W + PC_W + DATA_W
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               sel,
  input  ijtag_ctrl_t                        ctrl,
  input  logic                               si,
  output logic                               so,
  input  logic [N_CPU-1:0]                   job_start,
  input  logic [PC_W-1:0]                    job_len,
  output logic [N_CPU-1:0]                   job_busy,
  output logic [N_CPU-1:0]                   job_done,
  input  logic [N_CPU*POINTS_PER_CPU-1:0]    instr_err,
  input  logic [N_CPU*POINTS_PER_CPU-1:0]    force_en,
  input  logic [N_CPU*POINTS_PER_CPU-1:0]    force_val,
  input  logic [N_CPU*DATA_BITS-1:0]         dforce_en,
  input  logic [N_CPU*DATA_BITS-1:0]         dforce_val,
  output logic [N_CPU-1:0]                   cpu_flag,
  output logic [N_CPU-1:0]                   eif,
  output logic [N_CPU-1:0]                   mask,
  output logic                               flag_up
);

  logic [N_CPU:0]   chain;   // chain[i]: scan input of CPU i's SIB
  logic [N_CPU-1:0] c_sel, c_si, c_so, c_open;
  logic             ef_sel, ef_si, ef_so, ef_open;

  assign chain[0] = si;

  for (genvar i = 0; i < N_CPU; i++) begin : g_cpu
    logic [PC_W-1:0] pc;
    logic [1:0]      cpu_eif;

    sib u_sib (
      .clk, .rst_n, .sel, .ctrl, .si(chain[i]), .so(chain[i+1]),
      .host_sel(c_sel[i]), .host_si(c_si[i]), .host_so(c_so[i]), .is_open(c_open[i])
    );
    workhorse_cpu #(.DATA_W(DATA_W), .RF_REGS(RF_REGS), .SC_LEN(SC_LEN), .PC_W(PC_W)) u_cpu (
      .clk, .rst_n, .sel(c_sel[i]), .ctrl, .si(c_si[i]), .so(c_so[i]),
      .job_start(job_start[i]), .job_len, .job_busy(job_busy[i]), .job_done(job_done[i]),
      .pc,
      .instr_err(instr_err[i*POINTS_PER_CPU +: POINTS_PER_CPU]),
      .force_en (force_en [i*POINTS_PER_CPU +: POINTS_PER_CPU]),
      .force_val(force_val[i*POINTS_PER_CPU +: POINTS_PER_CPU]),
      .dforce_en (dforce_en [i*DATA_BITS +: DATA_BITS]),
      .dforce_val(dforce_val[i*DATA_BITS +: DATA_BITS]),
      .flag_up(cpu_flag[i]), .eif(cpu_eif)
    );
  end

  sib u_sib_eif (
    .clk, .rst_n, .sel, .ctrl, .si(chain[N_CPU]), .so,
    .host_sel(ef_sel), .host_si(ef_si), .host_so(ef_so), .is_open(ef_open)
  );
  eif_mask_reg #(.N(N_CPU), .STICKY(1'b0)) u_eif (
    .clk, .rst_n, .sel(ef_sel), .ctrl, .si(ef_si), .so(ef_so),
    .flag_in(cpu_flag), .force_en('0), .force_val('0),
    .eif, .mask, .flag_up
  );

endmodule
