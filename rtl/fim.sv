// fim: Fault Injection Manager. It holds a FaultList and, at each entry's
// time, injects the entry's fault into an injection point: an
// Instrument-Level EIF bit or an instrument data bit.
//
// FaultList: N_FAULTS entries of ijtag_pkg::fault_entry_t, written through
// we/waddr/wentry (the list is loaded before the run). Each entry gives a
// time stamp, a location (flat injection-point index: ijtag_pkg::fault_loc
// for EIF bits, ijtag_pkg::data_loc for data bits), an effect
// (the forced value: stuck-at-0 or stuck-at-1) and a type.
//
// Time base: now counts clock cycles while run is high and is held at 0
// while run is low. In the clock where now equals an entry's time stamp the
// entry fires. From the next clock (when fired pulses and n_fired counts):
//   soft fault      -> force_en/force_val drive the bit for one clock;
//   permanent fault -> force_en/force_val drive it until reset.
// A permanent fault wins over a soft one on the same bit. Entries need not
// be sorted. The list contents follow the document; the time unit, the
// table with a write port in place of a file and the location encoding are
// this design's choice.
module fim
  import ijtag_pkg::*;
#(
  parameter int unsigned N_FAULTS = 8,
  parameter int unsigned N_POINTS = 1160
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        run,
  input  logic                        we,
  input  logic [$clog2(N_FAULTS)-1:0] waddr,
  input  fault_entry_t                wentry,
  output logic [N_POINTS-1:0]         force_en,
  output logic [N_POINTS-1:0]         force_val,
  output logic                        fired,
  output logic [7:0]                  n_fired,
  output logic [31:0]                 now
);

  localparam int unsigned LOC_W = (N_POINTS > 1) ? $clog2(N_POINTS) : 1;

  fault_entry_t        list_q [N_FAULTS];
  logic [LOC_W-1:0]    loc;
  logic [31:0]         now_q;
  logic [N_POINTS-1:0] perm_en_q, perm_val_q, soft_en_q, soft_val_q;
  logic [N_POINTS-1:0] perm_hit, perm_set, soft_hit, soft_set;
  logic                any_hit;
  logic [7:0]          n_fired_q;
  logic [7:0]          n_hits;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int f = 0; f < N_FAULTS; f++) list_q[f] <= '0;
    end else if (we) begin
      list_q[waddr] <= wentry;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   now_q <= '0;
    else if (run) now_q <= now_q + 32'd1;
    else          now_q <= '0;
  end

  // Entries whose time has come, sorted onto the injection points.
  always_comb begin
    perm_hit = '0;
    perm_set = '0;
    soft_hit = '0;
    soft_set = '0;
    any_hit  = 1'b0;
    n_hits   = '0;
    loc      = '0;
    for (int f = 0; f < N_FAULTS; f++) begin
      if (run && list_q[f].valid && list_q[f].time_stamp == now_q &&
          32'(list_q[f].location) < N_POINTS) begin
        any_hit = 1'b1;
        n_hits  = n_hits + 8'd1;
        loc     = LOC_W'(list_q[f].location);
        if (list_q[f].ftype == FAULT_PERMANENT) begin
          perm_hit[loc] = 1'b1;
          perm_set[loc] = list_q[f].effect;
        end else begin
          soft_hit[loc] = 1'b1;
          soft_set[loc] = list_q[f].effect;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      perm_en_q  <= '0;
      perm_val_q <= '0;
      soft_en_q  <= '0;
      soft_val_q <= '0;
      n_fired_q  <= '0;
      fired      <= 1'b0;
    end else begin
      perm_en_q  <= perm_en_q | perm_hit;
      perm_val_q <= (perm_val_q & ~perm_hit) | (perm_set & perm_hit);
      soft_en_q  <= soft_hit;
      soft_val_q <= soft_set;
      n_fired_q  <= n_fired_q + n_hits;
      fired      <= any_hit;
    end
  end

  assign force_en  = perm_en_q | soft_en_q;
  assign force_val = (perm_val_q & perm_en_q) | (soft_val_q & soft_en_q & ~perm_en_q);
  assign n_fired   = n_fired_q;
  assign now       = now_q;

endmodule
