// tb_cpu_cluster: self-checking test of the Component-Level segment with
// three CPUs (small sizes). Checks the closed path, the Component-Level EIF
// following each CPU's flag, masking one CPU, that another CPU's fault still
// propagates, opening one CPU's SIB inserts that CPU's segment at the right
// place, jobs of different lengths on the CPUs, and that a stuck-at-1 data
// fault on a high PC bit of CPU 1 cuts its job short.
module tb_cpu_cluster;
  import ijtag_pkg::*;

  localparam int NC = 3, DW = 4, NR = 2, SL = 3, PW = 8;
  logic clk = 1'b0, rst_n = 1'b0, sel = 1'b0, si = 1'b0, so;
  ijtag_ctrl_t ctrl = '0;
  logic [NC-1:0] job_start = '0, job_busy, job_done, cpu_flag, eif, mask;
  logic [PW-1:0] job_len = '0;
  logic [NC*4-1:0] instr_err = '0, force_en = '0, force_val = '0;
  logic flag_up;
  localparam int DBITS = SL + NR * DW + PW + DW;
  logic [NC*DBITS-1:0] dforce_en = '0, dforce_val = '0;
  int busy_cycles [NC];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cpu_cluster #(.N_CPU(NC), .DATA_W(DW), .RF_REGS(NR), .SC_LEN(SL), .PC_W(PW)) dut (
    .clk, .rst_n, .sel, .ctrl, .si, .so, .job_start, .job_len, .job_busy, .job_done,
    .instr_err, .force_en, .force_val,
    .dforce_en, .dforce_val, .cpu_flag, .eif, .mask, .flag_up);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) for (int i = 0; i < NC; i++) busy_cycles[i] <= 0;
    else for (int i = 0; i < NC; i++) if (job_busy[i]) busy_cycles[i] <= busy_cycles[i] + 1;

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
    // closed, so-first: SIB_eif, SIB_cpu2, SIB_cpu1, SIB_cpu0
    scan(4, 256'b0001, r);
    check(r[3:0] == 4'b0000, "closed Component-Level path is four SIBs");
    // fault in CPU1's register file (instrument 1 of CPU 1)
    @(negedge clk) instr_err[fault_loc(1, 0, 1)] = 1'b1;
    @(negedge clk) instr_err = '0;
    check(cpu_flag == 3'b010 && eif == 3'b010 && flag_up, "CPU1 fault at Component-Level");
    // open: SIB_eif(0) EIF(1..3) M(4..6) SIB_cpu2(7) SIB_cpu1(8) SIB_cpu0(9)
    scan(10, {246'd0, 3'b000, 3'b010, 3'b000, 1'b1}, r);
    check(r[3:1] == 3'b010 && r[6:4] == 3'b000, "Component-Level EIF read");
    check(mask == 3'b010 && !flag_up && eif == 3'b010, "CPU1 masked");
    @(negedge clk) begin force_en[fault_loc(2, 1, 0)] = 1'b1; force_val[fault_loc(2, 1, 0)] = 1'b1; end
    @(negedge clk) force_en = '0;
    check(eif == 3'b110 && flag_up, "CPU2 fault still propagates");
    // open SIB_cpu1: its 3-bit CPU segment goes before SIB_cpu1's cell
    scan(10, {246'd0, 3'b010, 3'b010, 3'b000, 1'b1}, r);
    check(r[6:4] == 3'b010 && r[3:1] == 3'b110, "EIF and mask read back");
    scan(13, {243'd0, 1'b0, 3'b000, 1'b1, 1'b0, 3'b010, 3'b000, 1'b1}, r);
    check(r[8] == 1'b1 && r[11:9] == 3'b000, "CPU1 SIB open and its closed segment inserted");
    // jobs
    @(negedge clk) begin job_start = 3'b001; job_len = 8'd4; end
    @(negedge clk) begin job_start = 3'b100; job_len = 8'd9; end
    @(negedge clk) job_start = '0;
    repeat (15) @(negedge clk);
    check(busy_cycles[0] == 4 && busy_cycles[1] == 0 && busy_cycles[2] == 9, "jobs run on their CPUs");
    // PC bit 7 of CPU 1 stuck at 1: the PC jumps past the job length at once
    dforce_en[DBITS + SL + NR * DW + 7] = 1'b1;
    dforce_val[DBITS + SL + NR * DW + 7] = 1'b1;
    @(negedge clk) begin job_start = 3'b010; job_len = 8'd9; end
    @(negedge clk) job_start = '0;
    repeat (12) @(negedge clk);
    check(busy_cycles[1] == 1 && busy_cycles[0] == 4 && busy_cycles[2] == 9,
          "PC data fault ends CPU1's job early, other CPUs untouched");
    dforce_en = '0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
