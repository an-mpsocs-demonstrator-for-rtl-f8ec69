// tb_ctrl_block: self-checking test of the CTRL block (8-bit PC, 4-bit
// register). Runs jobs and checks that a job of length L keeps job_busy for
// exactly L clocks and ends with one job_done pulse, reads the PC through
// the network, loads the PC and the register through it, and checks the
// Instrument-Level EIF for the PC and register flags with masking. Finally
// data faults: a held stuck-at-1 on a PC bit survives a job start, and a
// one-clock force leaves a corrupted register bit.
module tb_ctrl_block;
  import ijtag_pkg::*;

  localparam int DW = 4, PW = 8;
  localparam int OPEN_LEN = 3 + 4 + DW + PW;
  logic clk = 1'b0, rst_n = 1'b0, sel = 1'b0, si = 1'b0, so;
  ijtag_ctrl_t ctrl = '0;
  logic job_start = 1'b0, job_busy, job_done;
  logic [PW-1:0] job_len = '0, pc;
  logic [DW-1:0] reg_q;
  logic [1:0] instr_err = '0, force_en = '0, force_val = '0, eif;
  logic flag_up;
  logic [PW+DW-1:0] dforce_en = '0, dforce_val = '0;
  logic [DW-1:0] reg_before;
  int busy_cycles = 0, done_pulses = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ctrl_block #(.DATA_W(DW), .PC_W(PW)) dut (
    .clk, .rst_n, .sel, .ctrl, .si, .so, .job_start, .job_len, .job_busy, .job_done, .pc,
    .reg_q, .instr_err, .force_en, .force_val,
    .dforce_en, .dforce_val, .flag_up, .eif);

  always_ff @(posedge clk) begin
    if (job_busy) busy_cycles <= busy_cycles + 1;
    if (job_done) done_pulses <= done_pulses + 1;
  end

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

  task automatic run_job(input int len);
    int b0, d0;
    b0 = busy_cycles; d0 = done_pulses;
    @(negedge clk) begin job_start = 1'b1; job_len = PW'(len); end
    @(negedge clk) job_start = 1'b0;
    repeat (len + 5) @(negedge clk);
    check(busy_cycles - b0 == len, $sformatf("job of %0d clocks busy %0d", len, busy_cycles - b0));
    check(done_pulses - d0 == 1, "one done pulse");
    check(pc == PW'(len - 1), "PC stops at the last step");
  endtask

  function automatic logic [255:0] open_vec(logic [PW-1:0] p, logic s_pc, logic [DW-1:0] rg,
                                            logic s_rg, logic [1:0] m, logic [1:0] e, logic s_ef);
    return 256'({p, s_pc, rg, s_rg, m, e, s_ef});
  endfunction

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
    run_job(5);
    run_job(12);
    run_job(2);
    sel = 1'b1;
    scan(3, 256'b111, r);
    check(r[2:0] == 3'b000, "closed segment is three SIBs");
    scan(OPEN_LEN, open_vec(8'h3C, 1, 4'h9, 1, 2'b00, 2'b00, 1), r);
    check(r[OPEN_LEN-1:OPEN_LEN-PW] == 8'd1, "PC captured through the network");
    check(pc == 8'h3C, "PC loaded through the network");
    check(reg_q == 4'h9, "register written");
    scan(OPEN_LEN, open_vec(8'h3C, 1, 4'h9, 1, 2'b00, 2'b00, 1), r);
    check(r[OPEN_LEN-1:0] == OPEN_LEN'(open_vec(8'h3C, 1, 4'h9, 1, 2'b00, 2'b00, 1)), "read back");
    @(negedge clk) instr_err = 2'b01;
    @(negedge clk) instr_err = 2'b00;
    check(eif == 2'b01 && flag_up, "PC flag set");
    scan(OPEN_LEN, open_vec(8'h3C, 1, 4'h9, 1, 2'b01, 2'b00, 1), r);
    check(r[2:1] == 2'b01, "PC flag read");
    check(!flag_up && eif == 2'b01, "PC flag masked");
    @(negedge clk) begin force_en = 2'b10; force_val = 2'b10; end
    #1 check(flag_up && eif == 2'b11, "forced register flag propagates");
    @(negedge clk) force_en = 2'b00;
    // permanent stuck-at-1 on PC bit 7, then a job start
    dforce_en[7] = 1'b1;
    dforce_val[7] = 1'b1;
    job_len = 8'd3;
    job_start = 1'b1;
    @(negedge clk) job_start = 1'b0;
    check(pc == 8'h80, "PC stuck-at-1 survives the job start");
    repeat (3) @(negedge clk);
    check(pc[7], "PC bit stays stuck");
    dforce_en = '0;
    // one-clock inversion of register bit 2
    reg_before = reg_q;
    dforce_en[PW + 2] = 1'b1;
    dforce_val[PW + 2] = ~reg_q[2];
    @(negedge clk) dforce_en = '0;
    @(negedge clk);
    check(reg_q == (reg_before ^ DW'(4)), "register bit corrupted by a soft data fault");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
