// tb_eif_mask_reg: self-checking test of the EIF/mask register in both
// forms. dut_a (N=3, follows its inputs, as at the upper levels) checks
// capture of flags and mask, mask writes, per-bit blocking of the FIPI
// output and forcing. dut_b (N=2, sticky, as at Instrument-Level) checks
// that a one-clock indication is held, survives a read, is cleared by
// writing 1, and how
// permanent and soft forced values act on the stored flag.
module tb_eif_mask_reg;
  import ijtag_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic sel, si, so;
  logic sel_a = 1'b0, sel_b = 1'b0;
  logic so_a, so_b;
  ijtag_ctrl_t ctrl = '0;
  logic [2:0] fin_a = '0, fen_a = '0, fval_a = '0, eif_a, mask_a;
  logic [1:0] fin_b = '0, fen_b = '0, fval_b = '0, eif_b, mask_b;
  logic up_a, up_b;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  eif_mask_reg #(.N(3), .STICKY(1'b0)) dut_a (
    .clk, .rst_n, .sel(sel_a), .ctrl, .si, .so(so_a), .flag_in(fin_a),
    .force_en(fen_a), .force_val(fval_a), .eif(eif_a), .mask(mask_a), .flag_up(up_a));
  eif_mask_reg #(.N(2), .STICKY(1'b1)) dut_b (
    .clk, .rst_n, .sel(sel_b), .ctrl, .si, .so(so_b), .flag_in(fin_b),
    .force_en(fen_b), .force_val(fval_b), .eif(eif_b), .mask(mask_b), .flag_up(up_b));

  assign so = sel_a ? so_a : so_b;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic scan(input int n, input logic [63:0] din, output logic [63:0] dout);
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
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] r;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // ---- follow-type register ----
    sel_a = 1'b1;
    fin_a = 3'b010;
    #1 check(eif_a == 3'b010 && up_a, "flag propagates up");
    scan(6, {58'd0, 3'b000, 3'b000}, r);
    check(r[2:0] == 3'b010, "EIF captured");
    check(r[5:3] == 3'b000, "mask captured as 0");
    scan(6, {58'd0, 3'b010, 3'b000}, r);
    check(mask_a == 3'b010, "mask written");
    check(eif_a == 3'b010 && !up_a, "masked bit stays in EIF but is blocked");
    fin_a = 3'b011;
    #1 check(up_a, "unmasked bit still propagates");
    scan(6, {58'd0, 3'b010, 3'b000}, r);
    check(r[2:0] == 3'b011 && r[5:3] == 3'b010, "EIF and mask read back");
    fen_a = 3'b001; fval_a = 3'b000;
    #1 check(eif_a == 3'b010 && !up_a, "forced stuck-at-0 hides flag");
    fen_a = 3'b100; fval_a = 3'b100; fin_a = 3'b000;
    #1 check(eif_a == 3'b100 && up_a, "forced stuck-at-1 raises flag");
    fen_a = '0;
    #1 check(!up_a && eif_a == 3'b000, "force released");
    sel_a = 1'b0;
    // ---- sticky register ----
    sel_b = 1'b1;
    @(negedge clk) fin_b = 2'b10;
    @(negedge clk) fin_b = 2'b00;
    repeat (3) @(negedge clk);
    check(eif_b == 2'b10 && up_b, "sticky flag holds a one-clock indication");
    scan(4, {60'd0, 2'b00, 2'b00}, r);
    check(r[1:0] == 2'b10, "sticky flag captured");
    check(eif_b == 2'b10 && up_b, "reading with zeros leaves the flag");
    scan(4, {60'd0, 2'b00, 2'b10}, r);
    check(eif_b == 2'b00 && !up_b, "writing 1 clears sticky flag");
    // permanent stuck-at-1 cannot be cleared
    @(negedge clk) begin fen_b = 2'b01; fval_b = 2'b01; end
    scan(4, {60'd0, 2'b00, 2'b01}, r);
    check(eif_b == 2'b01 && up_b, "forced flag survives a clearing write");
    scan(4, {60'd0, 2'b01, 2'b00}, r);
    check(r[1:0] == 2'b01 && mask_b == 2'b01 && !up_b, "mask blocks forced flag");
    fen_b = 2'b00;
    scan(4, {60'd0, 2'b00, 2'b01}, r);
    check(eif_b == 2'b00 && mask_b == 2'b00, "after release the flag clears");
    // soft stuck-at-1 for one clock stays recorded
    @(negedge clk) begin fen_b = 2'b10; fval_b = 2'b10; end
    @(negedge clk) fen_b = 2'b00;
    repeat (2) @(negedge clk);
    check(eif_b == 2'b10 && up_b, "soft stuck-at-1 recorded");
    // soft stuck-at-0 clears it
    @(negedge clk) begin fen_b = 2'b10; fval_b = 2'b00; end
    @(negedge clk) fen_b = 2'b00;
    repeat (2) @(negedge clk);
    check(eif_b == 2'b00 && !up_b, "soft stuck-at-0 clears flag");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
