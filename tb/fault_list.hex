// FaultList for tb_mpsoc_top: one fault per line, 51 bits as
// ijtag_pkg::fault_entry_t = {valid, time_stamp[31:0], location[15:0],
// effect, type}. Location: fault_loc(cpu, block, instrument) for an
// Instrument-Level EIF bit, data_loc(10, 112, cpu, offset) for a data bit.
// effect 1 = stuck-at-1; type 1 = permanent, 0 = soft.
4000000b00007  // t=44:    CPU 0, ALU, register-file EIF bit (1), Sa1, permanent
400007d00005e  // t=8000:  CPU 5, CTRL, REGISTER EIF bit (23), Sa1, soft
4000271000d46  // t=40000: CPU 7, register-file data bit 9 (location 849), Sa1, soft
