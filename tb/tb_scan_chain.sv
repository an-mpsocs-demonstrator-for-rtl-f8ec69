// tb_scan_chain: self-checking test of the scan chain instrument: random
// data shifted through the chain comes out LEN clocks later in order, the
// chain holds its contents when not shifting or not selected, and q shows
// the contents. Finally a one-clock force of a bit leaves the forced value
// stored, and a held force pins the bit while the chain shifts.
module tb_scan_chain;
  import ijtag_pkg::*;

  localparam int LEN = 8;
  logic clk = 1'b0, rst_n = 1'b0, sel = 1'b0, si = 1'b0, so;
  ijtag_ctrl_t ctrl = '0;
  logic [LEN-1:0] q, force_en = '0, force_val = '0, before_q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  scan_chain #(.LEN(LEN)) dut (.clk, .rst_n, .sel, .ctrl, .si, .so, .force_en, .force_val, .q);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] stream;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(q == '0, "chain reset to 0");
    stream = {$urandom, $urandom};
    sel = 1'b1;
    ctrl = '{capture: 1'b0, shift: 1'b1, update: 1'b0};
    for (int k = 0; k < 64; k++) begin
      si = stream[k];
      if (k >= LEN) check(so == stream[k-LEN], $sformatf("bit %0d delayed by LEN", k));
      @(negedge clk);
    end
    check(q == stream[63:64-LEN], "q holds the last LEN bits");
    ctrl = '0;
    repeat (5) @(negedge clk);
    check(q == stream[63:64-LEN], "chain holds without shift");
    sel = 1'b0;
    ctrl = '{capture: 1'b0, shift: 1'b1, update: 1'b0};
    repeat (5) @(negedge clk);
    check(q == stream[63:64-LEN], "chain holds while deselected");
    ctrl = '0;
    // one-clock force of bit 2 to its inverse
    before_q = q;
    force_en[2] = 1'b1;
    force_val[2] = ~q[2];
    @(negedge clk);
    force_en = '0;
    @(negedge clk);
    check(q == (before_q ^ LEN'(4)), "one-clock force stored in the flop");
    // held stuck-at-1 on bit 0 while shifting zeros in
    force_en[0] = 1'b1;
    force_val[0] = 1'b1;
    sel = 1'b1;
    si = 1'b0;
    ctrl = '{capture: 1'b0, shift: 1'b1, update: 1'b0};
    repeat (LEN + 2) @(negedge clk);
    check(q == LEN'(1), "held force pins bit 0, other bits shifted to 0");
    ctrl = '0;
    force_en = '0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
