// ijtag_pkg: types and constants shared by the IEEE P1687 (IJTAG) instrument
// access network, the fault indication and propagation logic and the fault
// injection manager of the MPSoC fault-handling demonstrator.
//
// The scan network runs on one clock. The TAP turns its Capture-DR, Shift-DR
// and Update-DR states into one-clock enables, carried to every SIB and
// scan register in an ijtag_ctrl_t. Each network element also receives its
// own select line, which is high only while the element is part of the
// active scan path; it acts on the enables only when selected.
//
// Fault locations are flat indices. The first n_cpu*4 address the
// Instrument-Level EIF bits: index = cpu * 4 + block * 2 + instrument, where
// block 0 is the ALU (instrument 0 scan chain, 1 register file) and block 1
// is CTRL (instrument 0 program counter, 1 register). The rest address the
// instruments' data bits: index = n_cpu*4 + cpu * bits_per_cpu + offset, the
// offset counting the scan chain, the register file (register 0 first), the
// PC and the REGISTER, each from bit 0. The register file as bit 1 of the
// ALU EIF follows the document; the rest of the encoding is this design's
// choice.
package ijtag_pkg;

  typedef struct packed {
    logic capture;  // Capture-DR: load parallel values into scan cells
    logic shift;    // Shift-DR: shift one bit towards the TDO end
    logic update;   // Update-DR: move scan cells into update cells
  } ijtag_ctrl_t;

  localparam int unsigned BLOCKS_PER_CPU = 2;
  localparam int unsigned INSTR_PER_BLOCK = 2;
  localparam int unsigned POINTS_PER_CPU = BLOCKS_PER_CPU * INSTR_PER_BLOCK;

  typedef enum logic {
    BLK_ALU  = 1'b0,
    BLK_CTRL = 1'b1
  } block_e;

  // One line of the FaultList.
  typedef enum logic {
    FAULT_SOFT      = 1'b0,  // applied for one clock
    FAULT_PERMANENT = 1'b1   // held from its time stamp on ("ReadOnly")
  } fault_type_e;

  typedef struct packed {
    logic        valid;
    logic [31:0] time_stamp;  // clock cycles after the FIM is started
    logic [15:0] location;    // flat injection point index
    logic        effect;      // forced value: 0 = stuck-at-0, 1 = stuck-at-1
    fault_type_e ftype;
  } fault_entry_t;

  function automatic int unsigned fault_loc(input int unsigned cpu,
                                            input int unsigned blk,
                                            input int unsigned instr);
    return cpu * POINTS_PER_CPU + blk * INSTR_PER_BLOCK + instr;
  endfunction

  function automatic int unsigned data_loc(input int unsigned n_cpu,
                                           input int unsigned bits_per_cpu,
                                           input int unsigned cpu,
                                           input int unsigned offset);
    return n_cpu * POINTS_PER_CPU + cpu * bits_per_cpu + offset;
  endfunction

endpackage
