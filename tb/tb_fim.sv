// tb_fim: self-checking test of the Fault Injection Manager. Loads a
// FaultList with permanent and soft faults, stuck-at-0 and stuck-at-1, two
// faults at the same time, a soft fault on a permanently forced bit and an
// invalid entry, then compares force_en/force_val on every injection point in
// every clock with an expectation computed from the list: a fault with time
// stamp T acts from the clock where now = T+1, for one clock if soft.
module tb_fim;
  import ijtag_pkg::*;

  localparam int NF = 8;
  localparam int NP = 40;
  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0, we = 1'b0;
  logic [$clog2(NF)-1:0] waddr = '0;
  fault_entry_t wentry = '0;
  logic [NP-1:0] force_en, force_val;
  logic fired;
  logic [7:0] n_fired;
  logic [31:0] now;
  fault_entry_t list [NF];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fim #(.N_FAULTS(NF), .N_POINTS(NP)) dut (
    .clk, .rst_n, .run, .we, .waddr, .wentry, .force_en, .force_val, .fired, .n_fired, .now);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_fired;
    for (int f = 0; f < NF; f++) list[f] = '0;
    list[0] = '{valid: 1'b1, time_stamp: 32'd10, location: 16'(fault_loc(1, 0, 1)), effect: 1'b1, ftype: FAULT_PERMANENT};
    list[1] = '{valid: 1'b1, time_stamp: 32'd20, location: 16'd7,  effect: 1'b1, ftype: FAULT_SOFT};
    list[2] = '{valid: 1'b1, time_stamp: 32'd20, location: 16'd3,  effect: 1'b0, ftype: FAULT_SOFT};
    list[3] = '{valid: 1'b1, time_stamp: 32'd30, location: 16'd5,  effect: 1'b0, ftype: FAULT_SOFT};
    list[4] = '{valid: 1'b0, time_stamp: 32'd15, location: 16'd9,  effect: 1'b1, ftype: FAULT_PERMANENT};
    list[5] = '{valid: 1'b1, time_stamp: 32'd33, location: 16'd39, effect: 1'b0, ftype: FAULT_PERMANENT};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < NF; f++) begin
      @(negedge clk);
      we = 1'b1; waddr = f[$clog2(NF)-1:0]; wentry = list[f];
    end
    @(negedge clk) we = 1'b0;
    repeat (5) @(negedge clk);
    check(force_en == '0 && now == 0, "nothing forced before run");
    run = 1'b1;
    exp_fired = 0;
    for (int c = 0; c < 45; c++) begin
      @(negedge clk);
      // now == c+1 here
      check(now == 32'(c + 1), "time base counts clocks");
      for (int p = 0; p < NP; p++) begin
        bit e_en, e_val, perm;
        e_en = 0; e_val = 0; perm = 0;
        for (int f = 0; f < NF; f++) begin
          if (list[f].valid && list[f].location == 16'(p) && list[f].ftype == FAULT_PERMANENT &&
              int'(now) >= int'(list[f].time_stamp) + 1) begin
            e_en = 1; e_val = list[f].effect; perm = 1;
          end
        end
        for (int f = 0; f < NF; f++) begin
          if (!perm && list[f].valid && list[f].location == 16'(p) && list[f].ftype == FAULT_SOFT &&
              int'(now) == int'(list[f].time_stamp) + 1) begin
            e_en = 1; e_val = list[f].effect;
          end
        end
        if (force_en[p] != e_en || (e_en && force_val[p] != e_val)) begin
          checks++; failures++;
          $display("FAIL: now=%0d point %0d en=%b val=%b expected %b %b", now, p,
                   force_en[p], force_val[p], e_en, e_val);
        end
      end
      checks++;
      if (int'(now) == 11 || int'(now) == 21 || int'(now) == 31 || int'(now) == 34) begin
        if (!fired) begin failures++; $display("FAIL: fired missing at now=%0d", now); end
      end else if (fired) begin
        failures++; $display("FAIL: spurious fired at now=%0d", now);
      end
    end
    check(n_fired == 8'd5, $sformatf("five valid faults applied (got %0d)", n_fired));
    check(force_en == ((NP'(1) << 5) | (NP'(1) << 39)), "only permanent faults remain");
    run = 1'b0;
    @(negedge clk);
    check(now == 0, "time base cleared when stopped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
