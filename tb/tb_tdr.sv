// tb_tdr: self-checking test of the instrument scan register: capture of
// the parallel value, serial order (bit 0 first), write strobe and value at
// Update-DR, and no action while deselected. Uses random words.
module tb_tdr;
  import ijtag_pkg::*;

  localparam int W = 12;
  logic clk = 1'b0, rst_n = 1'b0, sel = 1'b0, si = 1'b0, so;
  ijtag_ctrl_t ctrl = '0;
  logic [W-1:0] cap_val = '0, upd_val, written;
  logic upd_we;
  int n_we = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tdr #(.W(W)) dut (.clk, .rst_n, .sel, .ctrl, .si, .so, .cap_val, .upd_val, .upd_we);

  always_ff @(posedge clk) if (upd_we) begin written <= upd_val; n_we <= n_we + 1; end

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
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] r;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    sel = 1'b1;
    for (int t = 0; t < 20; t++) begin
      logic [W-1:0] c, d;
      int n0;
      c = W'($urandom);
      d = W'($urandom);
      cap_val = c;
      n0 = n_we;
      scan(W, 64'(d), r);
      check(r[W-1:0] == c, $sformatf("captured %h expected %h", r[W-1:0], c));
      check(written == d && n_we == n0 + 1, "one write with the shifted word");
    end
    sel = 1'b0;
    begin
      int n0;
      n0 = n_we;
      scan(W, 64'h5, r);
      check(n_we == n0, "no write while deselected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
