// tb_jtag_tap: self-checking test of the TAP controller. A behavioural
// 6-bit scan register stands in for the P1687 network. Checks the BYPASS
// path after reset, the value captured into the instruction register, the
// selection of the network by the IJTAG instruction, the exact number of
// capture, shift and update enables per data scan, that Pause-DR does not
// shift, and that Test-Logic-Reset returns to BYPASS.
module tb_jtag_tap;
  import ijtag_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, tms = 1'b1, tdi = 1'b0, tdo;
  logic net_sel, net_si, net_so;
  ijtag_ctrl_t net_ctrl;
  logic [5:0] net_q;
  int n_cap = 0, n_shift = 0, n_upd = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  jtag_tap dut (.clk, .rst_n, .tms, .tdi, .tdo, .net_sel, .net_ctrl, .net_si, .net_so);

  // network model: captures 6'h2D, shifts towards bit 0
  always_ff @(posedge clk) begin
    if (net_sel && net_ctrl.capture) begin net_q <= 6'h2D; n_cap <= n_cap + 1; end
    else if (net_sel && net_ctrl.shift) begin net_q <= {net_si, net_q[5:1]}; n_shift <= n_shift + 1; end
    if (net_sel && net_ctrl.update) n_upd <= n_upd + 1;
  end
  assign net_so = net_q[0];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic step(input bit t, input bit d, output bit o);
    @(negedge clk);
    tms = t;
    tdi = d;
    #1 o = tdo;
  endtask

  // From Run-Test/Idle through an IR scan back to Run-Test/Idle.
  task automatic ir_scan(input logic [3:0] ir, output logic [3:0] cap);
    bit o;
    step(1, 0, o); step(1, 0, o); step(0, 0, o); step(0, 0, o);
    for (int k = 0; k < 4; k++) begin
      step(k == 3, ir[k], o);
      cap[k] = o;
    end
    step(1, 0, o); step(0, 0, o);
    @(negedge clk);  // let the last edge take effect
  endtask

  // From Run-Test/Idle through a DR scan (optionally pausing after bit 2).
  task automatic dr_scan(input int n, input logic [63:0] din, input bit pause,
                         output logic [63:0] dout);
    bit o;
    dout = '0;
    step(1, 0, o); step(0, 0, o); step(0, 0, o);
    for (int k = 0; k < n; k++) begin
      if (pause && k == 3) begin
        // Exit1-DR, Pause-DR x3, Exit2-DR, back to Shift-DR
        step(0, 0, o); step(0, 0, o); step(0, 0, o); step(1, 0, o); step(0, 0, o);
      end
      step((k == n - 1) || (pause && k == 2), din[k], o);
      dout[k] = o;
    end
    step(1, 0, o); step(0, 0, o);
    @(negedge clk);  // let the last edge take effect
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] r;
  logic [3:0] c;
  bit o;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    step(0, 0, o);  // to Run-Test/Idle
    check(!net_sel, "BYPASS after reset");
    dr_scan(8, 64'hA5, 1'b0, r);
    check(r[7:1] == 7'h25 && r[0] == 1'b0, "bypass delays by one bit");
    check(n_cap == 0 && n_shift == 0, "network idle in BYPASS");
    ir_scan(4'b1000, c);
    check(c == 4'b0001, "Capture-IR value");
    check(net_sel, "IJTAG instruction selects the network");
    dr_scan(6, 64'h15, 1'b0, r);
    check(r[5:0] == 6'h2D, "network capture read on tdo");
    check(net_q == 6'h15, "shifted data reaches the network");
    check(n_cap == 1 && n_shift == 6 && n_upd == 1, "one capture, six shifts, one update");
    dr_scan(6, 64'h2A, 1'b1, r);
    check(r[5:0] == 6'h2D && net_q == 6'h2A, "scan with Pause-DR");
    check(n_cap == 2 && n_shift == 12 && n_upd == 2, "Pause-DR does not shift");
    repeat (5) step(1, 0, o);
    @(negedge clk);
    check(!net_sel, "Test-Logic-Reset restores BYPASS");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
