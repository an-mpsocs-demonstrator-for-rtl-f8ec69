// tb_fipi_node: exhaustive check of the FIPI masked OR for N=3: every EIF
// and mask combination against an independently computed expectation.
module tb_fipi_node;
  logic [2:0] eif, mask;
  logic flag_up;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  fipi_node #(.N(3)) dut (.eif, .mask, .flag_up);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 8; e++) begin
      for (int m = 0; m < 8; m++) begin
        bit exp;
        eif = 3'(e);
        mask = 3'(m);
        #1;
        exp = 1'b0;
        for (int b = 0; b < 3; b++) if (e[b] && !m[b]) exp = 1'b1;
        checks++;
        if (flag_up !== exp) begin
          failures++;
          $display("FAIL eif=%b mask=%b flag_up=%b", eif, mask, flag_up);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
