// tb_workhorse_cpu: self-checking test of one work-horse CPU (small sizes).
// Checks the three-SIB closed path, that the Intra-Component-Level EIF
// follows the ALU and CTRL flags in the same clock, tracing a register-file
// fault down through the ALU SIB to the ALU's Instrument-Level EIF, masking
// at the intra-component level, job execution on the CTRL block's PC, and
// that the data-force bits after the ALU's reach the PC.
module tb_workhorse_cpu;
  import ijtag_pkg::*;

  localparam int DW = 4, NR = 2, SL = 3, PW = 8;
  logic clk = 1'b0, rst_n = 1'b0, sel = 1'b0, si = 1'b0, so;
  ijtag_ctrl_t ctrl = '0;
  logic job_start = 1'b0, job_busy, job_done;
  logic [PW-1:0] job_len = '0, pc;
  logic [3:0] instr_err = '0, force_en = '0, force_val = '0;
  logic [1:0] eif;
  logic flag_up;
  localparam int ALU_BITS = SL + NR * DW;
  logic [ALU_BITS+PW+DW-1:0] dforce_en = '0, dforce_val = '0;
  int busy_cycles = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  workhorse_cpu #(.DATA_W(DW), .RF_REGS(NR), .SC_LEN(SL), .PC_W(PW)) dut (
    .clk, .rst_n, .sel, .ctrl, .si, .so, .job_start, .job_len, .job_busy, .job_done, .pc,
    .instr_err, .force_en, .force_val,
    .dforce_en, .dforce_val, .flag_up, .eif);

  always_ff @(posedge clk) if (job_busy) busy_cycles <= busy_cycles + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic scan(input int n, input logic [255:0] din, output logic [255:0] dout);
    dout = '0;
    @(negedge clk) ctrl = '{capture: 1'b1, shift: 1'b0, update: 1'b0};
    @(negedge clk) ctrl = '{capture: 1'b0, shift: 1'b1, update: 1'b0};
    for (int k = 0; k < n; k++) begin
      si = din[k];
      dout[k] = so;
      @(negedge clk);
    end
    ctrl = '{capture: 1'b0, shift: 1'b0, update: 1'b1};
    @(negedge clk) ctrl = '0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [255:0] r;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    sel = 1'b1;
    scan(3, 256'b000, r);
    check(r[2:0] == 3'b000, "closed CPU segment is three SIBs");
    // register-file fault in the ALU: bit 1 of the CPU's instrument vector
    @(negedge clk) instr_err = 4'b0010;
    #1 check(eif == 2'b00 && !flag_up, "detection is registered at Instrument-Level");
    @(negedge clk) instr_err = 4'b0000;
    check(eif == 2'b01 && flag_up, "ALU flag reaches CPU EIF one clock later");
    check(eif == 2'b01 && flag_up, "sticky instrument flag keeps CPU flag");
    // open CPU EIF SIB (bit 0) and ALU SIB (bit 2)
    scan(3, 256'b101, r);
    // path so-first: SIB_eif, EIF0, EIF1, M0, M1, SIB_ctrl, SIB_alu,
    //                ALU: SIB_eif, SIB_rf, SIB_sc
    scan(10, 256'b00_1_1_0_0000_1, r);  // keep both open, open ALU EIF SIB
    check(r[0] == 1'b1 && r[2:1] == 2'b01 && r[6] == 1'b1, "CPU EIF reads ALU");
    // now ALU segment: SIB_eif(7), ALU EIF0(8), EIF1(9), M0(10), M1(11), SIB_rf(12), SIB_sc(13)
    scan(14, 256'b00_0000_1_1_0_0000_1, r);
    check(r[7] == 1'b1 && r[9:8] == 2'b10, "ALU Instrument-Level EIF shows register file");
    // mask ALU bit at the CPU level
    scan(14, 256'b00_0000_1_1_0_0100_1, r);
    check(!flag_up && eif == 2'b01, "CPU mask blocks ALU fault");
    @(negedge clk) instr_err = 4'b0100;  // PC flag in CTRL
    @(negedge clk) instr_err = 4'b0000;
    check(eif == 2'b11 && flag_up, "unmasked CTRL fault propagates");
    @(negedge clk) begin force_en = 4'b1000; force_val = 4'b0000; end
    check(flag_up, "stuck-at-0 on REGISTER flag leaves PC flag");
    @(negedge clk) force_en = 4'b0000;
    // job
    @(negedge clk) begin job_start = 1'b1; job_len = 8'd7; end
    @(negedge clk) job_start = 1'b0;
    repeat (12) @(negedge clk);
    check(busy_cycles == 7 && pc == 8'd6 && !job_busy, "job of 7 clocks");
    // one-clock stuck-at-1 on PC bit 4
    dforce_en[ALU_BITS + 4] = 1'b1;
    dforce_val[ALU_BITS + 4] = 1'b1;
    @(negedge clk) dforce_en = '0;
    @(negedge clk);
    check(pc == 8'h16, "soft data fault reaches PC bit 4");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
