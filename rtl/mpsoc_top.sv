// mpsoc_top: MPSoC fault-handling demonstrator. Work-horse CPUs carry
// fault-detection instruments; an IEEE P1687 (IJTAG) network of Segment
// Insertion Bits (SIBs) gives the master CPU's TAP reconfigurable access to
// every instrument; a Fault Indication and Propagation Infrastructure (FIPI)
// ORs fault flags level by level up to one System-Level flag; and a Fault
// Injection Manager (FIM) plays a list of faults into the instruments: their
// fault flags and their data bits.
//
// Network hierarchy (scan order from tdi to tdo at each level):
//   System-Level:         SIB(type level) -> SIB(System EIF/M, 1+1 bits)
//   Component-Type-Level: SIB(CPUs) -> SIB(DSP segment) -> SIB(EIF/M, 2+2;
//                         bit 0 = CPUs, bit 1 = DSP)
//   Component-Level:      SIB(CPU 0) .. SIB(CPU N_CPU-1) -> SIB(EIF/M)
//   Intra-Component-Level, Instrument-Level: inside workhorse_cpu.
// Opening the first System-Level SIB exposes the next level down; the System
// EIF needs only its own SIB. Each EIF has a mask register of equal size; a
// set mask bit stops that bit's faults from propagating upward (fault
// marking). The Instrument-Level EIF bits are sticky; the upper ones follow
// the level below combinationally, so sys_flag rises in the clock the
// instrument flag is set.
//
// The master CPU with its resource-manager and instrument-manager software
// drives tms/tdi and the job ports; the DSPs and the instruments' error
// detection are outside this design and connect through the dsp_* and
// instr_err ports. Everything runs on clk, which is also TCK.
// The hierarchy, EIF/mask scheme, FIPI and FIM follow the document; the
// ordering of bits, sizes of the data instruments and the single clock are
// this design's choices.
module mpsoc_top
  import ijtag_pkg::*;
#(
  parameter int unsigned N_CPU    = 10,
  parameter int unsigned DATA_W   = 16,
  parameter int unsigned RF_REGS  = 4,
  parameter int unsigned SC_LEN   = 16,
  parameter int unsigned PC_W     = 16,
  parameter int unsigned N_FAULTS = 8
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // JTAG port of the master CPU
  input  logic                            tms,
  input  logic                            tdi,
  output logic                            tdo,
  // jobs on the work-horse CPUs
  input  logic [N_CPU-1:0]                job_start,
  input  logic [PC_W-1:0]                 job_len,
  output logic [N_CPU-1:0]                job_busy,
  output logic [N_CPU-1:0]                job_done,
  // instruments' error-detection outputs, CPU i at [i*4 +: 4]
  input  logic [N_CPU*POINTS_PER_CPU-1:0] instr_err,
  // DSP subsystem: its scan segment and its fault flag
  output logic                            dsp_sel,
  output ijtag_ctrl_t                     dsp_ctrl,
  output logic                            dsp_si,
  input  logic                            dsp_so,
  input  logic                            dsp_flag,
  // fault injection manager
  input  logic                            fim_run,
  input  logic                            fim_we,
  input  logic [$clog2(N_FAULTS)-1:0]     fim_waddr,
  input  fault_entry_t                    fim_wentry,
  output logic                            fim_fired,
  output logic [7:0]                      fim_n_fired,
  output logic [31:0]                     fim_now,
  // fault indications, for observation
  output logic                            sys_flag,
  output logic                            sys_eif,
  output logic [1:0]                      type_eif,
  output logic [N_CPU-1:0]                comp_eif,
  output logic [N_CPU-1:0]                comp_mask
);

  localparam int unsigned N_FLAGS   = N_CPU * POINTS_PER_CPU;
  localparam int unsigned DATA_BITS = SC_LEN + RF_REGS * DATA_W + PC_W + DATA_W;
  localparam int unsigned N_POINTS  = N_FLAGS + N_CPU * DATA_BITS;

  ijtag_ctrl_t ctrl;
  logic        net_sel, net_si, net_so;

  // System-Level
  logic ty_sel, ty_si, ty_so, sib_ty_so, ty_open;
  logic se_sel, se_si, se_so, se_open;
  logic type_flag;
  // Component-Type-Level
  logic cl_sel, cl_si, cl_so, sib_cl_so, cl_open;
  logic sib_dsp_so, dsp_open;
  logic te_sel, te_si, te_so, te_open;
  logic cluster_flag;
  logic [N_CPU-1:0] cpu_flag;
  // Fault injection
  logic [N_POINTS-1:0] force_en, force_val;

  assign dsp_ctrl = ctrl;

  jtag_tap u_tap (
    .clk, .rst_n, .tms, .tdi, .tdo,
    .net_sel, .net_ctrl(ctrl), .net_si, .net_so
  );

  // ---- System-Level -------------------------------------------------------
  sib u_sib_type (
    .clk, .rst_n, .sel(net_sel), .ctrl, .si(net_si), .so(sib_ty_so),
    .host_sel(ty_sel), .host_si(ty_si), .host_so(ty_so), .is_open(ty_open)
  );
  sib u_sib_syseif (
    .clk, .rst_n, .sel(net_sel), .ctrl, .si(sib_ty_so), .so(net_so),
    .host_sel(se_sel), .host_si(se_si), .host_so(se_so), .is_open(se_open)
  );
  eif_mask_reg #(.N(1), .STICKY(1'b0)) u_sys_eif (
    .clk, .rst_n, .sel(se_sel), .ctrl, .si(se_si), .so(se_so),
    .flag_in(type_flag), .force_en(1'b0), .force_val(1'b0),
    .eif(sys_eif), .mask(), .flag_up(sys_flag)
  );

  // ---- Component-Type-Level -------------------------------------------------
  sib u_sib_cpus (
    .clk, .rst_n, .sel(ty_sel), .ctrl, .si(ty_si), .so(sib_cl_so),
    .host_sel(cl_sel), .host_si(cl_si), .host_so(cl_so), .is_open(cl_open)
  );
  sib u_sib_dsp (
    .clk, .rst_n, .sel(ty_sel), .ctrl, .si(sib_cl_so), .so(sib_dsp_so),
    .host_sel(dsp_sel), .host_si(dsp_si), .host_so(dsp_so), .is_open(dsp_open)
  );
  sib u_sib_typeeif (
    .clk, .rst_n, .sel(ty_sel), .ctrl, .si(sib_dsp_so), .so(ty_so),
    .host_sel(te_sel), .host_si(te_si), .host_so(te_so), .is_open(te_open)
  );
  eif_mask_reg #(.N(2), .STICKY(1'b0)) u_type_eif (
    .clk, .rst_n, .sel(te_sel), .ctrl, .si(te_si), .so(te_so),
    .flag_in({dsp_flag, cluster_flag}), .force_en(2'b00), .force_val(2'b00),
    .eif(type_eif), .mask(), .flag_up(type_flag)
  );

  // ---- Component-Level and below -------------------------------------------
  cpu_cluster #(
    .N_CPU(N_CPU), .DATA_W(DATA_W), .RF_REGS(RF_REGS), .SC_LEN(SC_LEN), .PC_W(PC_W)
  ) u_cpus (
    .clk, .rst_n, .sel(cl_sel), .ctrl, .si(cl_si), .so(cl_so),
    .job_start, .job_len, .job_busy, .job_done,
    .instr_err,
    .force_en(force_en[N_FLAGS-1:0]), .force_val(force_val[N_FLAGS-1:0]),
    .dforce_en(force_en[N_POINTS-1:N_FLAGS]), .dforce_val(force_val[N_POINTS-1:N_FLAGS]),
    .cpu_flag, .eif(comp_eif), .mask(comp_mask), .flag_up(cluster_flag)
  );

  // ---- Fault Injection Manager ---------------------------------------------
  fim #(.N_FAULTS(N_FAULTS), .N_POINTS(N_POINTS)) u_fim (
    .clk, .rst_n, .run(fim_run), .we(fim_we), .waddr(fim_waddr), .wentry(fim_wentry),
    .force_en, .force_val, .fired(fim_fired), .n_fired(fim_n_fired), .now(fim_now)
  );

endmodule
