// ctrl_block: the CTRL block of a work-horse CPU. Its program counter (PC)
// emulates the execution of jobs; the PC and a general REGISTER are
// instruments reachable through the network, next to the block's
// Instrument-Level EIF with its mask register.
//
// Job emulation: a job_start pulse (when no job is running, or to restart)
// clears the PC and sets job_busy. The PC then advances by one per clock; in
// the clock where it equals job_len-1 the job ends, job_busy falls and
// job_done pulses. A job of length 0 or 1 ends after one clock.
//
// Scan path inside the block (si to so):
//   SIB -> PC register (PC_W bits; Update-DR loads the PC)
//   SIB -> REGISTER (DATA_W bits; Update-DR writes it)
//   SIB -> EIF/M (2+2 bits; EIF bit 0 = PC, bit 1 = REGISTER, sticky)
// dforce_en/dforce_val force data bits for fault injection: bits [PC_W-1:0]
// the PC, the next DATA_W bits the REGISTER; the forced value is stored, so
// a held force is a stuck-at and a one-clock force a corrupted bit.
// The block structure follows the document; the job protocol, sizes and EIF
// bit order are this design's choice.
module ctrl_block
  import ijtag_pkg::*;
#(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned PC_W   = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sel,
  input  ijtag_ctrl_t       ctrl,
  input  logic              si,
  output logic              so,
  input  logic              job_start,
  input  logic [PC_W-1:0]   job_len,
  output logic              job_busy,
  output logic              job_done,
  output logic [PC_W-1:0]   pc,
  output logic [DATA_W-1:0] reg_q,
  input  logic [1:0]        instr_err,
  input  logic [1:0]        force_en,
  input  logic [1:0]        force_val,
  input  logic [PC_W+DATA_W-1:0] dforce_en,
  input  logic [PC_W+DATA_W-1:0] dforce_val,
  output logic              flag_up,
  output logic [1:0]        eif
);

  logic pc_sel, pc_si, pc_so, sib0_so;
  logic rg_sel, rg_si, rg_so, sib1_so;
  logic ef_sel, ef_si, ef_so;
  logic pc_open, rg_open, ef_open;

  logic [PC_W-1:0]   pc_q, pc_upd, len_q;
  logic              pc_we, busy_q, done_q;
  logic [DATA_W-1:0] reg_mem, reg_upd;
  logic              reg_we;

  // Job emulation.
  logic [PC_W-1:0] pc_d;
  logic            busy_d, done_d;

  always_comb begin
    pc_d   = pc_q;
    busy_d = busy_q;
    done_d = 1'b0;
    if (job_start) begin
      pc_d   = '0;
      busy_d = 1'b1;
    end else if (pc_we) begin
      pc_d = pc_upd;
    end else if (busy_q) begin
      if (pc_q + PC_W'(1) >= len_q) begin
        busy_d = 1'b0;
        done_d = 1'b1;
      end else begin
        pc_d = pc_q + PC_W'(1);
      end
    end
    pc_d = (pc_d & ~dforce_en[PC_W-1:0]) | (dforce_val[PC_W-1:0] & dforce_en[PC_W-1:0]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q   <= '0;
      len_q  <= '0;
      busy_q <= 1'b0;
      done_q <= 1'b0;
    end else begin
      pc_q   <= pc_d;
      busy_q <= busy_d;
      done_q <= done_d;
      if (job_start) len_q <= job_len;
    end
  end

  assign pc       = pc_q;
  assign job_busy = busy_q;
  assign job_done = done_q;

  sib u_sib_pc (
    .clk, .rst_n, .sel, .ctrl, .si, .so(sib0_so),
    .host_sel(pc_sel), .host_si(pc_si), .host_so(pc_so), .is_open(pc_open)
  );
  tdr #(.W(PC_W)) u_pc_tdr (
    .clk, .rst_n, .sel(pc_sel), .ctrl, .si(pc_si), .so(pc_so),
    .cap_val(pc_q), .upd_val(pc_upd), .upd_we(pc_we)
  );

  // General register instrument.
  logic [DATA_W-1:0] reg_d;
  always_comb begin
    reg_d = reg_we ? reg_upd : reg_mem;
    reg_d = (reg_d & ~dforce_en[PC_W +: DATA_W]) | (dforce_val[PC_W +: DATA_W] & dforce_en[PC_W +: DATA_W]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) reg_mem <= '0;
    else        reg_mem <= reg_d;
  end
  assign reg_q = reg_mem;

  sib u_sib_rg (
    .clk, .rst_n, .sel, .ctrl, .si(sib0_so), .so(sib1_so),
    .host_sel(rg_sel), .host_si(rg_si), .host_so(rg_so), .is_open(rg_open)
  );
  tdr #(.W(DATA_W)) u_reg_tdr (
    .clk, .rst_n, .sel(rg_sel), .ctrl, .si(rg_si), .so(rg_so),
    .cap_val(reg_mem), .upd_val(reg_upd), .upd_we(reg_we)
  );

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
