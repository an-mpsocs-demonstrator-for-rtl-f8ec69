// tb_sib: self-checking test of the Segment Insertion Bit. A behavioural
// 3-bit shift register stands in for the hosted segment. Checks the closed
// path (1 bit), opening through Update-DR, capture of the open state, the
// 4-bit open path with data passing through the hosted segment, closing
// again, and that nothing happens while the SIB is not selected.
module tb_sib;
  import ijtag_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, sel = 1'b0, si = 1'b0;
  logic so, host_sel, host_si, host_so, is_open;
  ijtag_ctrl_t ctrl = '0;
  logic [2:0] seg_q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sib dut (.clk, .rst_n, .sel, .ctrl, .si, .so, .host_sel, .host_si, .host_so, .is_open);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) seg_q <= 3'b101;
    else if (host_sel && ctrl.shift) seg_q <= {host_si, seg_q[2:1]};
  assign host_so = seg_q[0];

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
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] r;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    sel = 1'b1;
    check(!is_open && !host_sel, "closed after reset");
    // closed: one bit, captures 0, write 1 to open
    scan(1, 64'h1, r);
    check(r[0] == 1'b0, "closed SIB captures 0");
    check(is_open && host_sel, "SIB open after writing 1");
    // open: path is host segment (3) then SIB cell: so-first = SIB, seg[0..2]
    scan(4, 64'b0110_1, r);  // keep open (bit0=1), push 3 bits into segment
    check(r[0] == 1'b1, "open SIB captures 1");
    check(r[3:1] == 3'b101, "hosted segment contents appear after SIB bit");
    check(seg_q == 3'b110, "hosted segment received shifted data");
    // close it again with a 4-bit scan (still open during the shift)
    scan(4, 64'b0000, r);
    check(!is_open && !host_sel, "SIB closed after writing 0");
    check(seg_q == 3'b000, "segment shifted while open");
    // deselected: update must not act
    sel = 1'b0;
    scan(1, 64'h1, r);
    check(!is_open, "deselected SIB ignores update");
    sel = 1'b1;
    scan(1, 64'h1, r);
    check(is_open, "reselected SIB opens");
    check(seg_q == 3'b000, "closed SIB does not shift its segment");
    scan(4, 64'hF, r);
    check(r[3:0] == 4'b0001, "segment data, not scan input, follows the open SIB");
    check(seg_q == 3'b111, "segment loaded with ones");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
