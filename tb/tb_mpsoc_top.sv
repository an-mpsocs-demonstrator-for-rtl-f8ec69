// tb_mpsoc_top: end-to-end test of the MPSoC demonstrator at its default
// sizes (10 work-horse CPUs). The testbench plays the master CPU's software:
//
//  * Instrument manager model: holds the network's tree (SIBs and registers
//    in scan order) and the state of every SIB. To reach a register it
//    opens the SIBs on the way to it, closes all others, and runs TAP data
//    scans until the register is in the path; every scan also checks that
//    each SIB in the path reads back the state the model expects.
//  * Resource manager model: polls the System-Level EIF, traces a fault
//    level by level down to the instrument, tries to clear it there, and if
//    it stays (permanent fault) marks the component in its health map,
//    writes the mask bit and moves the component's job to an idle healthy
//    CPU. A fault that clears is treated as transient. A DSP fault is read
//    out through the DSP segment and masked at Component-Type-Level.
//
// The FaultList is read from tb/fault_list.hex, one fault per line.
// Scenario: (1) the FaultList puts a permanent stuck-at-1 on the register
// file flag of CPU 0 at time 44 while CPU 0 runs a job; (2) a soft
// stuck-at-1 on the REGISTER flag of CPU 5; (3) a fault flag from the DSP
// subsystem (a small behavioural scan register here); (4) a soft stuck-at-1
// on a register-file data bit of CPU 7, found by writing a pattern through
// the network and reading it back (no error detector is modelled, so the
// fault flags stay quiet). Each mechanism is
// counted and must occur: fault injection, same-clock propagation to the
// System-Level flag, SIB opening, detection by polling, identification,
// clearing, fault marking by mask, blocking of a later fault on the masked
// CPU, job re-execution, DSP segment access, Component-Type masking and
// data-bit corruption.
module tb_mpsoc_top;
  import ijtag_pkg::*;

  localparam int N_CPU = 10;   // the top's defaults
  localparam int PC_W = 16;
  localparam int JOB_LEN = 1500;
  localparam int T_SOFT = 8000;
  localparam int T_DATA = 40000;
  localparam int DBITS = 16 + 4 * 16 + PC_W + 16;  // data injection points per CPU
  localparam int DATA_CPU = 7, DATA_BIT = 9;         // register-file bit 9 of CPU 7

  logic clk = 1'b0, rst_n = 1'b0, tms = 1'b1, tdi = 1'b0, tdo;
  logic [N_CPU-1:0] job_start = '0, job_busy, job_done;
  logic [PC_W-1:0] job_len = '0;
  logic [N_CPU*4-1:0] instr_err = '0;
  logic dsp_sel, dsp_si, dsp_so, dsp_flag = 1'b0;
  ijtag_ctrl_t dsp_ctrl;
  logic fim_run = 1'b0, fim_we = 1'b0, fim_fired;
  logic [2:0] fim_waddr = '0;
  fault_entry_t fim_wentry = '0;
  fault_entry_t fault_list [8];
  logic [7:0] fim_n_fired;
  logic [31:0] fim_now;
  logic sys_flag, sys_eif;
  logic [1:0] type_eif;
  logic [N_CPU-1:0] comp_eif, comp_mask;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mpsoc_top dut (
    .clk, .rst_n, .tms, .tdi, .tdo, .job_start, .job_len, .job_busy, .job_done, .instr_err,
    .dsp_sel, .dsp_ctrl, .dsp_si, .dsp_so, .dsp_flag,
    .fim_run, .fim_we, .fim_waddr, .fim_wentry, .fim_fired, .fim_n_fired, .fim_now,
    .sys_flag, .sys_eif, .type_eif, .comp_eif, .comp_mask);

  // ---- DSP subsystem stand-in: 8-bit status register {7'h6A, dsp_flag} ----
  logic [7:0] dsp_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) dsp_q <= '0;
    else if (dsp_sel && dsp_ctrl.capture) dsp_q <= {7'h6A, dsp_flag};
    else if (dsp_sel && dsp_ctrl.shift) dsp_q <= {dsp_si, dsp_q[7:1]};
  assign dsp_so = dsp_q[0];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // ---- mechanism counters ----
  int n_inject = 0, n_sys_rise = 0, n_same_clock = 0, n_sib_open = 0, n_detect = 0;
  int n_identify = 0, n_clear = 0, n_mark = 0, n_blocked = 0, n_reexec = 0;
  int n_dsp_access = 0, n_type_mask = 0, n_scans = 0, n_scan_bits = 0, n_data_corrupt = 0;
  int busy_cycles [N_CPU];
  logic sys_flag_d = 1'b0;

  always @(posedge clk) begin
    if (rst_n && fim_fired) begin
      n_inject++;
      if (n_inject == 1) check(fim_now == 32'd45, "first fault applied one clock after time 44");
    end
    if (rst_n && sys_flag && !sys_flag_d) begin
      n_sys_rise++;
      if (fim_fired) n_same_clock++;
    end
    sys_flag_d <= sys_flag;
    for (int i = 0; i < N_CPU; i++) if (job_busy[i]) busy_cycles[i]++;
  end

  // ---- TAP access ----
  task automatic step(input bit t, input bit d, output bit o);
    @(negedge clk);
    tms = t;
    tdi = d;
    #1 o = tdo;
  endtask

  task automatic ir_scan(input logic [3:0] ir);
    bit o;
    step(1, 0, o); step(1, 0, o); step(0, 0, o); step(0, 0, o);
    for (int k = 0; k < 4; k++) step(k == 3, ir[k], o);
    step(1, 0, o); step(0, 0, o);
  endtask

  // ---- instrument manager model: network tree ----
  localparam int MAXN = 256;
  localparam int MAXP = 2048;
  localparam int ROOT = 0;
  typedef enum logic { K_SIB, K_REG } kind_e;
  kind_e kind [MAXN];
  int len [MAXN], first_c [MAXN], last_c [MAXN], next_s [MAXN], parent [MAXN];
  bit is_open [MAXN], want_open [MAXN];
  logic [127:0] wval [MAXN], rval [MAXN];
  int n_nodes = 0;
  int pn [MAXP], pb [MAXP];  // path in si-to-so order
  int path_len;

  function automatic int add(kind_e k, int l, int par);
    int id;
    id = n_nodes;
    n_nodes++;
    kind[id] = k; len[id] = (k == K_SIB) ? 1 : l;
    first_c[id] = -1; last_c[id] = -1; next_s[id] = -1; parent[id] = par;
    is_open[id] = 1'b0; want_open[id] = 1'b0; wval[id] = '0; rval[id] = '0;
    if (par >= 0) begin
      if (first_c[par] == -1) first_c[par] = id;
      else next_s[last_c[par]] = id;
      last_c[par] = id;
    end
    return id;
  endfunction

  // A SIB hosting one register; returns the register's id.
  function automatic int sib_reg(int par, int l);
    int s;
    s = add(K_SIB, 1, par);
    return add(K_REG, l, s);
  endfunction

  function automatic void push(int node, int b);
    pn[path_len] = node;
    pb[path_len] = b;
    path_len++;
  endfunction

  // Active scan path, si to so, from the SIB states.
  function automatic void build_path();
    int stk [16];
    int depth, c;
    path_len = 0;
    depth = 0;
    stk[0] = first_c[ROOT];
    while (depth >= 0) begin
      c = stk[depth];
      if (c == -1) begin
        depth--;
        if (depth >= 0) begin
          push(stk[depth], 0);
          stk[depth] = next_s[stk[depth]];
        end
      end else if (kind[c] == K_SIB && is_open[c]) begin
        depth++;
        stk[depth] = first_c[c];
      end else begin
        if (kind[c] == K_SIB) push(c, 0);
        else for (int b = len[c] - 1; b >= 0; b--) push(c, b);
        stk[depth] = next_s[c];
      end
    end
  endfunction

  function automatic bit in_path(int node);
    for (int k = 0; k < path_len; k++) if (pn[k] == node) return 1'b1;
    return 1'b0;
  endfunction

  // One DR scan over the current path.
  task automatic dr_scan();
    bit o, d;
    int n, k;
    build_path();
    n = path_len;
    step(1, 0, o); step(0, 0, o); step(0, 0, o);
    for (int j = 0; j < n; j++) begin
      k = n - 1 - j;  // j counts from the tdo end
      d = (kind[pn[k]] == K_SIB) ? want_open[pn[k]] : wval[pn[k]][pb[k]];
      step(j == n - 1, d, o);
      if (kind[pn[k]] == K_SIB) begin
        if (o != is_open[pn[k]]) begin
          checks++; failures++;
          $display("FAIL: SIB %0d read %b, model %b", pn[k], o, is_open[pn[k]]);
        end
      end else begin
        rval[pn[k]][pb[k]] = o;
      end
    end
    step(1, 0, o); step(0, 0, o);
    @(negedge clk);
    for (k = 0; k < n; k++) begin
      if (kind[pn[k]] == K_SIB) begin
        if (want_open[pn[k]] && !is_open[pn[k]]) n_sib_open++;
        is_open[pn[k]] = want_open[pn[k]];
      end
    end
    n_scans++;
    n_scan_bits += n;
  endtask

  // Bring 'target' into the path (opening its SIBs, closing all others) and
  // run the scan that captures and writes it. Returns the number of scans.
  task automatic im_access(input int target, output int scans);
    for (int i = 0; i < n_nodes; i++) want_open[i] = 1'b0;
    for (int a = parent[target]; a != ROOT; a = parent[a]) want_open[a] = 1'b1;
    scans = 0;
    build_path();
    while (!in_path(target) && scans < 12) begin
      dr_scan();
      scans++;
      build_path();
    end
    dr_scan();
    scans++;
  endtask

  // ---- the network of the top (scan order as built in the RTL) ----
  int sys_reg, type_reg, ceif_reg, dsp_reg;
  int ieif [N_CPU], aeif [N_CPU], teif [N_CPU], rf [N_CPU];

  task automatic build_tree();
    int s_type, s_cpus, s_cpu, s_alu, s_ctrl, r;
    r = add(K_SIB, 1, -1);  // ROOT
    s_type = add(K_SIB, 1, ROOT);
    sys_reg = sib_reg(ROOT, 2);
    s_cpus = add(K_SIB, 1, s_type);
    dsp_reg = sib_reg(s_type, 8);
    type_reg = sib_reg(s_type, 4);
    for (int i = 0; i < N_CPU; i++) begin
      s_cpu = add(K_SIB, 1, s_cpus);
      s_alu = add(K_SIB, 1, s_cpu);
      r = sib_reg(s_alu, 16);      // scan chain
      rf[i] = sib_reg(s_alu, 64);  // register file
      aeif[i] = sib_reg(s_alu, 4);
      s_ctrl = add(K_SIB, 1, s_cpu);
      r = sib_reg(s_ctrl, 16);     // PC
      r = sib_reg(s_ctrl, 16);     // REGISTER
      teif[i] = sib_reg(s_ctrl, 4);
      ieif[i] = sib_reg(s_cpu, 4);
    end
    ceif_reg = sib_reg(s_cpus, 2 * N_CPU);
  endtask

  // ---- resource manager model ----
  bit shm [N_CPU];     // system health map: 1 = defective
  int cpu_job_len [N_CPU];

  function automatic int lowest(logic [127:0] v, int n, int skip_from);
    for (int i = 0; i < n; i++) if (v[i] && !(skip_from >= 0 && shm[i])) return i;
    return -1;
  endfunction

  task automatic start_job(input int cpu, input int l);
    @(negedge clk);
    job_start[cpu] = 1'b1;
    job_len = PC_W'(l);
    cpu_job_len[cpu] = l;
    @(negedge clk);
    job_start = '0;
  endtask

  task automatic poll_until_fault(input int max_polls);
    int sc;
    for (int p = 0; p < max_polls; p++) begin
      im_access(sys_reg, sc);
      if (rval[sys_reg][0]) begin
        n_detect++;
        return;
      end
    end
    check(1'b0, "fault never detected by polling");
  endtask

  // Trace a CPU fault down to the instrument; clear it; mark if it stays.
  task automatic handle_cpu_fault(input int exp_cpu, input int exp_blk, input int exp_instr,
                                  input bit exp_permanent);
    int sc, cpu, blk, ins, reg_id;
    im_access(ceif_reg, sc);
    cpu = lowest(rval[ceif_reg], N_CPU, 0);
    check(cpu == exp_cpu, $sformatf("Component-Level EIF names CPU %0d (expected %0d)", cpu, exp_cpu));
    if (cpu < 0) return;
    im_access(ieif[cpu], sc);
    blk = lowest(rval[ieif[cpu]], 2, -1);
    check(blk == exp_blk, "Intra-Component-Level EIF names the block");
    if (blk < 0) return;
    reg_id = (blk == 0) ? aeif[cpu] : teif[cpu];
    im_access(reg_id, sc);
    ins = lowest(rval[reg_id], 2, -1);
    check(ins == exp_instr, "Instrument-Level EIF names the instrument");
    if (ins < 0) return;
    n_identify++;
    // try to clear the indication (write 1 to clear), then read it again
    wval[reg_id][ins] = 1'b1;
    im_access(reg_id, sc);
    wval[reg_id][ins] = 1'b0;
    im_access(reg_id, sc);
    if (!rval[reg_id][ins]) begin
      n_clear++;
      check(!exp_permanent, "transient fault cleared");
    end else begin
      // permanent: mark the CPU, mask it at Component-Level, move its job
      check(exp_permanent, "permanent fault stays after clearing");
      shm[cpu] = 1'b1;
      wval[ceif_reg][N_CPU + cpu] = 1'b1;
      im_access(ceif_reg, sc);
      n_mark++;
      if (job_busy[cpu]) begin
        int dst;
        dst = -1;
        for (int i = 0; i < N_CPU; i++) if (dst < 0 && !shm[i] && !job_busy[i]) dst = i;
        check(dst >= 0, "idle fault-free CPU found");
        if (dst >= 0) begin
          start_job(dst, cpu_job_len[cpu]);
          n_reexec++;
        end
      end
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sc;
    bit o;
    for (int i = 0; i < N_CPU; i++) begin busy_cycles[i] = 0; shm[i] = 1'b0; cpu_job_len[i] = 0; end
    build_tree();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    step(0, 0, o);
    ir_scan(4'b1000);
    // FaultList: read from its file and written into the FIM, one line per fault
    for (int f = 0; f < 8; f++) fault_list[f] = '0;
    $readmemh("tb/fault_list.hex", fault_list);
    check(fault_list[0] == '{1'b1, 32'd44, 16'(fault_loc(0, BLK_ALU, 1)), 1'b1, FAULT_PERMANENT},
          "FaultList line 1: permanent Sa1 on CPU 0's register-file flag at 44");
    check(fault_list[1] == '{1'b1, 32'(T_SOFT), 16'(fault_loc(5, BLK_CTRL, 1)), 1'b1, FAULT_SOFT},
          "FaultList line 2: soft Sa1 on CPU 5's REGISTER flag");
    check(fault_list[2] == '{1'b1, 32'(T_DATA), 16'(data_loc(N_CPU, DBITS, DATA_CPU, 16 + DATA_BIT)),
                             1'b1, FAULT_SOFT},
          "FaultList line 3: soft Sa1 on a register-file data bit of CPU 7");
    for (int f = 0; f < 8; f++) begin
      @(negedge clk);
      fim_we = fault_list[f].valid;
      fim_waddr = 3'(f);
      fim_wentry = fault_list[f];
    end
    @(negedge clk) fim_we = 1'b0;
    fim_run = 1'b1;
    start_job(0, JOB_LEN);
    start_job(3, 300);

    // ---- (1) permanent fault in the register file of CPU 0 ----
    im_access(sys_reg, sc);
    check(sc == 2, "System-Level EIF reached through two SIBs");
    build_path();
    check(path_len == 4, "poll path is two SIBs and the EIF/M pair");
    check(!rval[sys_reg][0], "no fault before injection");
    poll_until_fault(200);
    check(fim_now > 32'd45, "detected after injection");
    im_access(type_reg, sc);
    check(rval[type_reg][1:0] == 2'b01, "Component-Type-Level EIF: CPUs");
    check(rval[type_reg][3:2] == 2'b00, "Component-Type-Level mask clear");
    im_access(ceif_reg, sc);
    check(rval[ceif_reg][N_CPU-1:0] == 10'b1 && rval[ceif_reg][2*N_CPU-1:N_CPU] == '0,
          "Component-Level EIF 1..0, mask 0..0");
    handle_cpu_fault(0, 0, 1, 1'b1);
    check(comp_mask == 10'b1 && comp_eif[0], "Component-Level EIF 1..0 and mask 1..0");
    check(!sys_flag && !sys_eif && type_eif == 2'b00, "upper EIFs clear after marking");
    im_access(ceif_reg, sc);
    check(rval[ceif_reg][0] && rval[ceif_reg][N_CPU], "mask read back through the network");
    // a further fault on the marked CPU stays hidden
    @(negedge clk) instr_err[fault_loc(0, BLK_CTRL, 0)] = 1'b1;
    @(negedge clk) instr_err = '0;
    repeat (3) @(negedge clk);
    check(!sys_flag, "fault on masked CPU blocked");
    if (!sys_flag && comp_eif[0]) n_blocked++;
    im_access(sys_reg, sc);
    check(!rval[sys_reg][0], "polling reads no fault after marking");
    // wait for the re-executed job
    wait (job_done[1]);
    @(negedge clk);
    check(busy_cycles[1] == JOB_LEN, $sformatf("re-executed job ran %0d clocks", busy_cycles[1]));
    check(busy_cycles[3] == 300, "unrelated job completed");

    // ---- (2) soft fault on CPU 5's REGISTER flag ----
    poll_until_fault(5000);
    check(fim_now > 32'(T_SOFT), "soft fault detected after its time");
    im_access(type_reg, sc);
    check(rval[type_reg][1:0] == 2'b01, "soft fault: CPUs");
    handle_cpu_fault(5, 1, 1, 1'b0);
    im_access(sys_reg, sc);
    check(!rval[sys_reg][0] && !sys_flag, "no fault after clearing the transient");
    check(comp_eif == 10'b1, "only the marked CPU still flags");

    // ---- (3) DSP fault ----
    @(negedge clk) dsp_flag = 1'b1;
    poll_until_fault(20);
    im_access(type_reg, sc);
    check(rval[type_reg][1:0] == 2'b10, "Component-Type-Level EIF: DSP");
    im_access(dsp_reg, sc);
    check(rval[dsp_reg][7:0] == 8'hD5, "DSP status read through its segment");
    n_dsp_access++;
    wval[type_reg][3] = 1'b1;
    im_access(type_reg, sc);
    n_type_mask++;
    check(!sys_flag && type_eif == 2'b10, "DSP masked at Component-Type-Level");
    im_access(sys_reg, sc);
    check(!rval[sys_reg][0], "polling clear after DSP masking");

    // ---- (4) soft data fault in CPU 7's register file ----
    check(fim_now < 32'(T_DATA), $sformatf("data fault still ahead (now %0d)", fim_now));
    wval[rf[DATA_CPU]] = 128'h0000_0000_0000_0000_A5A5_0000_3C3C_F00F;
    im_access(rf[DATA_CPU], sc);
    wait (fim_now > 32'(T_DATA + 2));
    check(!sys_flag, "a data fault with no detector raises no flag");
    im_access(rf[DATA_CPU], sc);
    check((rval[rf[DATA_CPU]] ^ wval[rf[DATA_CPU]]) == (128'd1 << DATA_BIT),
          $sformatf("register file read back %h", rval[rf[DATA_CPU]][63:0]));
    if (rval[rf[DATA_CPU]][DATA_BIT] && !wval[rf[DATA_CPU]][DATA_BIT]) n_data_corrupt++;

    // ---- every mechanism happened ----
    check(n_inject == 3, $sformatf("fault injections: %0d", n_inject));
    check(n_sys_rise >= 3, $sformatf("System-Level flag rises: %0d", n_sys_rise));
    check(n_same_clock == 2, "injected faults reach the System-Level flag in the injection clock");
    check(n_sib_open > 0, "SIBs opened");
    check(n_detect == 3, "faults detected by polling");
    check(n_identify == 2, "CPU faults traced to the instrument");
    check(n_clear == 1, "transient fault cleared");
    check(n_mark == 1, "permanent fault marked");
    check(n_blocked == 1, "masked CPU blocked");
    check(n_reexec == 1, "job re-executed");
    check(n_dsp_access == 1 && n_type_mask == 1, "DSP accessed and masked");
    check(n_data_corrupt == 1, "data bit corrupted by injection");
    check(fim_n_fired == 8'd3, "FIM counted three faults");
    $display("scans=%0d scan_bits=%0d sib_opens=%0d end_time=%0d", n_scans, n_scan_bits,
             n_sib_open, fim_now);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
