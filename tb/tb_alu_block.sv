// tb_alu_block: self-checking test of the ALU block segment (small sizes:
// 4-bit data, 2 registers, 4-bit scan chain). Opens the three SIBs, writes
// and reads back the register file and the scan chain, raises a detection
// on the register file, reads it from the Instrument-Level EIF, masks it,
// forces the scan-chain bit, clears the flags and closes the SIBs again.
// Finally one-clock data forces corrupt a register-file and a scan-chain bit.
// Expected scan vectors are assembled from the documented scan order.
module tb_alu_block;
  import ijtag_pkg::*;

  localparam int DW = 4, NR = 2, SL = 4, RW = DW * NR;
  localparam int OPEN_LEN = 3 + 4 + RW + SL;
  logic clk = 1'b0, rst_n = 1'b0, sel = 1'b0, si = 1'b0, so;
  ijtag_ctrl_t ctrl = '0;
  logic [1:0] instr_err = '0, force_en = '0, force_val = '0, eif;
  logic flag_up;
  logic [RW-1:0] rf_q;
  logic [SL-1:0] sc_q;
  logic [SL+RW-1:0] dforce_en = '0, dforce_val = '0;
  logic [RW-1:0] rf_before;
  logic [SL-1:0] sc_before;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  alu_block #(.DATA_W(DW), .RF_REGS(NR), .SC_LEN(SL)) dut (
    .clk, .rst_n, .sel, .ctrl, .si, .so, .instr_err, .force_en, .force_val,
    .dforce_en, .dforce_val, .flag_up, .eif, .rf_q, .sc_q);

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

  // Open-path vector, bit 0 nearest so.
  function automatic logic [255:0] open_vec(logic [SL-1:0] sc, logic s_sc, logic [RW-1:0] rf,
                                            logic s_rf, logic [1:0] m, logic [1:0] e, logic s_ef);
    return 256'({sc, s_sc, rf, s_rf, m, e, s_ef});
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [255:0] r;
  logic [RW-1:0] rf_w;
  logic [SL-1:0] sc_w;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    sel = 1'b1;
    scan(3, 256'b111, r);
    check(r[2:0] == 3'b000, "closed segment is three SIBs");
    rf_w = RW'($urandom);
    sc_w = SL'($urandom);
    scan(OPEN_LEN, open_vec(sc_w, 1, rf_w, 1, 2'b00, 2'b00, 1), r);
    check(r[OPEN_LEN-1:0] == OPEN_LEN'(open_vec('0, 1, '0, 1, 2'b00, 2'b00, 1)),
          "open path: SIBs read 1, registers 0");
    check(rf_q == rf_w, "register file written");
    check(sc_q == sc_w, "scan chain loaded");
    scan(OPEN_LEN, open_vec(sc_w, 1, rf_w, 1, 2'b00, 2'b00, 1), r);
    check(r[OPEN_LEN-1:0] == OPEN_LEN'(open_vec(sc_w, 1, rf_w, 1, 2'b00, 2'b00, 1)),
          "register file and scan chain read back");
    // detection on the register file (EIF bit 1)
    @(negedge clk) instr_err = 2'b10;
    @(negedge clk) instr_err = 2'b00;
    check(eif == 2'b10 && flag_up, "register-file fault flagged and propagated");
    scan(OPEN_LEN, open_vec(sc_w, 1, rf_w, 1, 2'b10, 2'b00, 1), r);
    check(r[2:1] == 2'b10, "EIF read through the network");
    check(eif == 2'b10 && !flag_up, "mask blocks propagation");
    @(negedge clk) begin force_en = 2'b01; force_val = 2'b01; end
    #1 check(eif == 2'b11 && flag_up, "forced scan-chain flag propagates");
    @(negedge clk) force_en = 2'b00;
    scan(OPEN_LEN, open_vec(sc_w, 1, rf_w, 1, 2'b00, 2'b11, 1), r);
    check(r[4:1] == 4'b1011, "both flags and mask read");
    check(eif == 2'b00 && !flag_up, "flags and mask cleared");
    scan(OPEN_LEN, open_vec(sc_w, 0, rf_w, 0, 2'b00, 2'b00, 0), r);
    scan(3, 256'b000, r);
    check(r[2:0] == 3'b000, "SIBs closed again");
    // data faults: register-file bit 5 and scan-chain bit 1 inverted for one clock
    rf_before = rf_q;
    sc_before = sc_q;
    @(negedge clk) begin
      dforce_en = '0;
      dforce_en[SL + 5] = 1'b1;
      dforce_en[1] = 1'b1;
      dforce_val[SL + 5] = ~rf_q[5];
      dforce_val[1] = ~sc_q[1];
    end
    @(negedge clk) dforce_en = '0;
    repeat (2) @(negedge clk);
    check(rf_q == (rf_before ^ RW'(32)), "register-file bit corrupted by a soft data fault");
    check(sc_q == (sc_before ^ SL'(2)), "scan-chain bit corrupted by a soft data fault");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
