// ltable: the locked-range table (LTable) of the range-lock unit.
//
// Each entry is one range lock: its exact bounds [Lo, Hi], its type (shared
// or exclusive) and a bitmap of the tiles that hold it. One update needs one
// entry, so N_ENTRIES = N_TILES guarantees the table never overflows. The
// table is monolithic: every entry has its own range comparator and all are
// checked in the same cycle against the probe range.
//
// Probe side (combinational, from p_*): for a requesting tile and range the
// table reports
//   conflict   - the lock cannot be granted now: an entry of another tile
//                overlaps it and either both are exclusive, or one is shared
//                and does not cover the exclusive one. A shared lock on a
//                wider range (a node higher in the structure) is compatible
//                with exclusive locks on sub-ranges inside it: those
//                mutations stay inside their safe sub-range.
//   any/ex_overlap - the probe overlaps an entry held by another tile
//                (any / exclusive), used by lock-free readers to validate
//   join_hit/idx  - a shared entry with exactly this range exists
//   free_hit/idx  - the lowest free entry
// Entry p_excl_idx is left out of all checks when p_excl_en is set (a
// contraction does not conflict with the entry it contracts).
// Read side (combinational): the entry at rd_idx and whether p_tile holds it
// alone.
// Command side (one command per clock, applied at the rising edge):
// LT_ALLOC, LT_JOIN, LT_UPDATE (trim in place), LT_LEAVE (drop a tile; the
// entry frees when its bitmap empties). Reset clears every entry.
// The fields and checks follow the document; the compatibility of shared
// and exclusive entries is this design's reading of its lock rules.
module ltable
  import rblox_pkg::*;
#(
  parameter int N_ENTRIES = 128,
  parameter int N_TILES   = 128
) (
  input  logic    clk,
  input  logic    rst_n,
  // probe
  input  key_t    p_lo,
  input  key_t    p_hi,
  input  tile_t   p_tile,
  input  lock_e   p_type,
  input  logic    p_excl_en,
  input  ltidx_t  p_excl_idx,
  output logic    conflict,
  output logic    any_overlap,
  output logic    ex_overlap,
  output logic    join_hit,
  output ltidx_t  join_idx,
  output logic    free_hit,
  output ltidx_t  free_idx,
  // read
  input  ltidx_t  rd_idx,
  output logic    rd_valid,
  output key_t    rd_lo,
  output key_t    rd_hi,
  output lock_e   rd_type,
  output logic    rd_held,   // p_tile is in the entry's bitmap
  output logic    rd_sole,   // p_tile is the only holder
  // command
  input  lt_cmd_e cmd,
  input  ltidx_t  cmd_idx,
  input  key_t    cmd_lo,
  input  key_t    cmd_hi,
  input  lock_e   cmd_type,
  input  tile_t   cmd_tile,
  output logic [$clog2(N_ENTRIES+1)-1:0] occupancy
);
  typedef struct packed {
    logic               valid;
    key_t               lo;
    key_t               hi;
    lock_e              ltype;
    logic [N_TILES-1:0] sharers;
  } lt_entry_t;

  localparam int IW = (N_ENTRIES > 1) ? $clog2(N_ENTRIES) : 1;

  lt_entry_t ent [N_ENTRIES];
  logic [IW-1:0] rd_i, cmd_i;
  assign rd_i  = IW'(rd_idx);
  assign cmd_i = IW'(cmd_idx);

  logic [N_TILES-1:0] p_bit, c_bit;
  assign p_bit = N_TILES'(1) << p_tile;
  assign c_bit = N_TILES'(1) << cmd_tile;

  logic [N_ENTRIES-1:0] ov, covers, covered, eq;

  for (genvar i = 0; i < N_ENTRIES; i++) begin : g_cmp
    range_cmp u_cmp (
      .e_lo(ent[i].lo), .e_hi(ent[i].hi), .p_lo(p_lo), .p_hi(p_hi),
      .overlap(ov[i]), .e_covers_p(covers[i]), .p_covers_e(covered[i]), .equal(eq[i])
    );
  end

  always_comb begin
    conflict    = 1'b0;
    any_overlap = 1'b0;
    ex_overlap  = 1'b0;
    join_hit    = 1'b0;
    join_idx    = '0;
    free_hit    = 1'b0;
    free_idx    = '0;
    for (int i = N_ENTRIES - 1; i >= 0; i--) begin
      logic live, others;
      live   = ent[i].valid && !(p_excl_en && (ltidx_t'(i) == p_excl_idx));
      others = |(ent[i].sharers & ~p_bit);
      if (live && ov[i] && others) begin
        any_overlap = 1'b1;
        if (ent[i].ltype == LK_EX) ex_overlap = 1'b1;
        unique case ({ent[i].ltype, p_type})
          {LK_EX, LK_EX}: conflict = 1'b1;
          {LK_SH, LK_EX}: if (!covers[i])  conflict = 1'b1;
          {LK_EX, LK_SH}: if (!covered[i]) conflict = 1'b1;
          default: ;
        endcase
      end
      if (live && eq[i] && ent[i].ltype == LK_SH && p_type == LK_SH) begin
        join_hit = 1'b1;
        join_idx = ltidx_t'(i);
      end
      if (!ent[i].valid) begin
        free_hit = 1'b1;
        free_idx = ltidx_t'(i);
      end
    end
  end

  always_comb begin
    rd_valid = ent[rd_i].valid;
    rd_lo    = ent[rd_i].lo;
    rd_hi    = ent[rd_i].hi;
    rd_type  = ent[rd_i].ltype;
    rd_held  = ent[rd_i].valid && |(ent[rd_i].sharers & p_bit);
    rd_sole  = ent[rd_i].valid && (ent[rd_i].sharers == p_bit);
  end

  always_comb begin
    occupancy = '0;
    for (int i = 0; i < N_ENTRIES; i++) occupancy += ($bits(occupancy))'(ent[i].valid);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_ENTRIES; i++) ent[i] <= '0;
    end else begin
      unique case (cmd)
        LT_ALLOC: ent[cmd_i] <= '{valid: 1'b1, lo: cmd_lo, hi: cmd_hi, ltype: cmd_type, sharers: c_bit};
        LT_JOIN:  ent[cmd_i].sharers <= ent[cmd_i].sharers | c_bit;
        LT_UPDATE: begin
          ent[cmd_i].lo    <= cmd_lo;
          ent[cmd_i].hi    <= cmd_hi;
          ent[cmd_i].ltype <= cmd_type;
        end
        LT_LEAVE: begin
          ent[cmd_i].sharers <= ent[cmd_i].sharers & ~c_bit;
          if ((ent[cmd_i].sharers & ~c_bit) == '0) ent[cmd_i].valid <= 1'b0;
        end
        default: ;
      endcase
    end
  end

  // A tile may only join, update or leave an entry that is valid.
  assert property (@(posedge clk) disable iff (!rst_n)
    (cmd inside {LT_JOIN, LT_UPDATE, LT_LEAVE}) |-> ent[cmd_i].valid)
    else $error("ltable: command on a free entry");
  assert property (@(posedge clk) disable iff (!rst_n)
    (cmd == LT_ALLOC) |-> !ent[cmd_i].valid)
    else $error("ltable: allocation over a live entry");
endmodule
