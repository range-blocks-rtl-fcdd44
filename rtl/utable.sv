// utable: the unlocked-range table (UTable) of the range-lock unit.
//
// Holds recently unlocked ranges so that a later update can lock one of them
// at once instead of walking the data structure from its root. It is best
// effort: losing an entry only costs the slow path, so entries are replaced
// silently. The table is NBANKS banks of NSETS sets of NWAYS ways
// (default 4 x 128 x 8 = 4096 entries). A range is placed in every aligned
// key segment it spans (seg_map); each copy keeps the exact range. A range
// spanning more than NBANKS segments is not stored.
//
// Commands (start with cmd, one at a time, while !busy):
//   UT_LOOKUP [key in lo]  narrowest safe range that holds the key; only the
//                          key's own segment (one bank, one set) is probed
//   UT_INSERT [lo,hi,ptr,safe]  store in each segment spanned
//   UT_INVAL  [lo,hi]      drop every entry overlapping the range from the
//                          sets of the segments the range spans
// Timing: a command accepted at clock t reads the sets at t+1, compares and
// writes at t+2 and raises done (one clock) at t+LAT, LAT >= 3; the result
// outputs are stable from done until the next start. LAT defaults to the
// document's 5 cycles per bank access.
module utable
  import rblox_pkg::*;
#(
  parameter int NBANKS   = 4,
  parameter int NSETS    = 128,
  parameter int NWAYS    = 8,
  parameter int SEG_BITS = 8,
  parameter int LAT      = 5
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  ut_cmd_e cmd,
  input  key_t    lo,
  input  key_t    hi,
  input  ptr_t    ptr,
  input  logic    safe,
  output logic    busy,
  output logic    done,
  output logic    hit,      // UT_LOOKUP found a range / UT_INSERT stored it
  output key_t    hit_lo,
  output key_t    hit_hi,
  output ptr_t    hit_ptr
);
  localparam int SET_W = (NSETS > 1) ? $clog2(NSETS) : 1;
  localparam int WAY_W = (NWAYS > 1) ? $clog2(NWAYS) : 1;
  localparam int BK_W  = (NBANKS > 1) ? $clog2(NBANKS) : 1;

  typedef enum logic [1:0] {S_IDLE, S_RD, S_CMP, S_WAIT} state_e;
  state_e  state;
  ut_cmd_e cmd_q;
  key_t    lo_q, hi_q;
  ptr_t    ptr_q;
  logic    safe_q;
  logic [$clog2(LAT+1)-1:0] cnt;

  // segment map of the probe: a lookup probes the key alone
  key_t                 sm_hi;
  logic                 fits;
  logic [NBANKS-1:0]    bank_en;
  logic [SET_W-1:0]     bank_set [NBANKS];
  key_t                 piece_lo [NBANKS];
  key_t                 piece_hi [NBANKS];
  assign sm_hi = (cmd_q == UT_LOOKUP) ? lo_q : hi_q;

  seg_map #(.SEG_BITS(SEG_BITS), .NBANKS(NBANKS), .NSETS(NSETS)) u_seg (
    .lo(lo_q), .hi(sm_hi), .fits(fits), .bank_en(bank_en), .bank_set(bank_set),
    .piece_lo(piece_lo), .piece_hi(piece_hi)
  );

  logic [NBANKS-1:0]  b_hit;
  logic [WAY_W-1:0]   b_hit_way [NBANKS];
  key_t               b_hit_lo  [NBANKS];
  key_t               b_hit_hi  [NBANKS];
  ptr_t               b_hit_ptr [NBANKS];
  logic [NWAYS-1:0]   b_ov      [NBANKS];
  logic [WAY_W-1:0]   b_victim  [NBANKS];

  logic do_rd, do_cmp;
  assign do_rd  = (state == S_RD);
  assign do_cmp = (state == S_CMP);

  for (genvar b = 0; b < NBANKS; b++) begin : g_bank
    utable_bank #(.NSETS(NSETS), .NWAYS(NWAYS)) u_bank (
      .clk(clk), .rst_n(rst_n),
      .rd_en(do_rd && bank_en[b]), .rd_set(bank_set[b]),
      .p_lo(lo_q), .p_hi(sm_hi),
      .hit(b_hit[b]), .hit_way(b_hit_way[b]), .hit_lo(b_hit_lo[b]), .hit_hi(b_hit_hi[b]),
      .hit_ptr(b_hit_ptr[b]), .ov_mask(b_ov[b]), .victim_way(b_victim[b]),
      .wr_en(do_cmp && cmd_q == UT_INSERT && bank_en[b]), .wr_set(bank_set[b]),
      .wr_way(b_victim[b]), .wr_lo(lo_q), .wr_hi(hi_q), .wr_ptr(ptr_q), .wr_safe(safe_q),
      .inv_en(do_cmp && cmd_q == UT_INVAL && bank_en[b]), .inv_set(bank_set[b]),
      .inv_mask(b_ov[b])
    );
  end

  // the bank a key lookup lands in
  logic [BK_W-1:0] kbank;
  always_comb begin
    kbank = '0;
    for (int b = 0; b < NBANKS; b++) if (bank_en[b]) kbank = BK_W'(b);
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      cmd_q   <= UT_LOOKUP;
      lo_q    <= '0;
      hi_q    <= '0;
      ptr_q   <= '0;
      safe_q  <= 1'b0;
      cnt     <= '0;
      done    <= 1'b0;
      hit     <= 1'b0;
      hit_lo  <= '0;
      hit_hi  <= '0;
      hit_ptr <= '0;
    end else begin
      done <= 1'b0;
      if (state != S_IDLE) cnt <= cnt + 1'b1;
      unique case (state)
        S_IDLE: if (start) begin
          state  <= S_RD;
          cmd_q  <= cmd;
          lo_q   <= lo;
          hi_q   <= hi;
          ptr_q  <= ptr;
          safe_q <= safe;
          cnt    <= 1;
        end
        S_RD: state <= S_CMP;
        S_CMP: begin
          state <= S_WAIT;
          unique case (cmd_q)
            UT_LOOKUP: begin
              hit     <= b_hit[kbank];
              hit_lo  <= b_hit_lo[kbank];
              hit_hi  <= b_hit_hi[kbank];
              hit_ptr <= b_hit_ptr[kbank];
            end
            UT_INSERT: hit <= fits;
            default:   hit <= 1'b0;
          endcase
        end
        S_WAIT: ;
        default: state <= S_IDLE;
      endcase
      if (state != S_IDLE && cnt == ($bits(cnt))'(LAT - 1)) begin
        state <= S_IDLE;
        done  <= 1'b1;
      end
    end
  end

  initial assert (LAT >= 3) else $error("utable: LAT must be at least 3");
endmodule
