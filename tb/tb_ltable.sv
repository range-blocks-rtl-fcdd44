// tb_ltable: random legal command sequences on a small LTable (8 entries,
// 8 tiles) with a behavioural model of the entries kept in the testbench.
// Every clock the probe outputs (conflict, overlaps, join, free) and the
// read port are compared with values the model computes from the lock rules.
module tb_ltable;
  import rblox_pkg::*;
  localparam int NE = 8, NT = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  key_t p_lo, p_hi; tile_t p_tile; lock_e p_type; logic p_excl_en; ltidx_t p_excl_idx;
  logic conflict, any_overlap, ex_overlap, join_hit, free_hit;
  ltidx_t join_idx, free_idx, rd_idx;
  logic rd_valid, rd_held, rd_sole; key_t rd_lo, rd_hi; lock_e rd_type;
  lt_cmd_e cmd; ltidx_t cmd_idx; key_t cmd_lo, cmd_hi; lock_e cmd_type; tile_t cmd_tile;
  logic [3:0] occupancy;

  ltable #(.N_ENTRIES(NE), .N_TILES(NT)) dut (.*);

  // model
  logic m_v [NE]; key_t m_lo [NE], m_hi [NE]; lock_e m_t [NE]; logic [NT-1:0] m_sh [NE];
  int checks = 0, failures = 0;
  int n_conf = 0, n_join = 0;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic compare();
    logic e_conf, e_any, e_ex, e_join, e_free; int e_ji, e_fi, occ;
    e_conf = 0; e_any = 0; e_ex = 0; e_join = 0; e_free = 0; e_ji = 0; e_fi = 0; occ = 0;
    for (int i = 0; i < NE; i++) begin
      logic live, ov, others, cov, covd;
      occ += m_v[i];
      live = m_v[i] && !(p_excl_en && p_excl_idx == ltidx_t'(i));
      ov = (m_lo[i] <= p_hi) && (p_lo <= m_hi[i]);
      cov = (m_lo[i] <= p_lo) && (p_hi <= m_hi[i]);
      covd = (p_lo <= m_lo[i]) && (m_hi[i] <= p_hi);
      others = (m_sh[i] & ~(NT'(1) << p_tile)) != 0;
      if (live && ov && others) begin
        e_any = 1;
        if (m_t[i] == LK_EX) e_ex = 1;
        if (m_t[i] == LK_EX && p_type == LK_EX) e_conf = 1;
        if (m_t[i] == LK_SH && p_type == LK_EX && !cov) e_conf = 1;
        if (m_t[i] == LK_EX && p_type == LK_SH && !covd) e_conf = 1;
      end
      if (live && m_t[i] == LK_SH && p_type == LK_SH && m_lo[i] == p_lo && m_hi[i] == p_hi && !e_join) begin
        e_join = 1; e_ji = i;
      end
      if (!m_v[i] && !e_free) begin e_free = 1; e_fi = i; end
    end
    chk(conflict == e_conf, "conflict");
    chk(any_overlap == e_any && ex_overlap == e_ex, "overlap");
    chk(join_hit == e_join && (!e_join || join_idx == ltidx_t'(e_ji)), "join");
    chk(free_hit == e_free && (!e_free || free_idx == ltidx_t'(e_fi)), "free");
    chk(occupancy == 4'(occ), "occupancy");
    chk(rd_valid == m_v[rd_idx] && (!m_v[rd_idx] || (rd_lo == m_lo[rd_idx] && rd_hi == m_hi[rd_idx]
        && rd_type == m_t[rd_idx])), "read");
    chk(rd_held == (m_v[rd_idx] && m_sh[rd_idx][p_tile]), "held");
    chk(rd_sole == (m_v[rd_idx] && m_sh[rd_idx] == (NT'(1) << p_tile)), "sole");
    if (e_conf) n_conf++;
    if (e_join) n_join++;
  endtask

  initial begin
    for (int i = 0; i < NE; i++) begin m_v[i] = 0; m_lo[i] = 0; m_hi[i] = 0; m_t[i] = LK_EX; m_sh[i] = 0; end
    cmd = LT_NOP; cmd_idx = 0; cmd_lo = 0; cmd_hi = 0; cmd_type = LK_EX; cmd_tile = 0;
    p_lo = 0; p_hi = 0; p_tile = 0; p_type = LK_EX; p_excl_en = 0; p_excl_idx = 0; rd_idx = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 8000; it++) begin
      @(negedge clk);
      // random probe
      p_lo = $urandom_range(0, 60); p_hi = p_lo + $urandom_range(0, 15);
      p_tile = tile_t'($urandom_range(0, NT - 1));
      p_type = lock_e'($urandom_range(0, 1));
      p_excl_en = $urandom_range(0, 1); p_excl_idx = ltidx_t'($urandom_range(0, NE - 1));
      rd_idx = ltidx_t'($urandom_range(0, NE - 1));
      // random legal command
      cmd = LT_NOP;
      cmd_idx = ltidx_t'($urandom_range(0, NE - 1));
      cmd_tile = tile_t'($urandom_range(0, NT - 1));
      cmd_lo = $urandom_range(0, 60); cmd_hi = cmd_lo + $urandom_range(0, 15);
      cmd_type = lock_e'($urandom_range(0, 1));
      case ($urandom_range(0, 3))
        0: if (!m_v[cmd_idx]) cmd = LT_ALLOC;
        1: if (m_v[cmd_idx]) cmd = LT_JOIN;
        2: if (m_v[cmd_idx]) cmd = LT_UPDATE;
        default: if (m_v[cmd_idx]) cmd = LT_LEAVE;
      endcase
      #1;
      compare();
      @(posedge clk);
      #1;
      case (cmd)
        LT_ALLOC: begin m_v[cmd_idx] = 1; m_lo[cmd_idx] = cmd_lo; m_hi[cmd_idx] = cmd_hi;
                        m_t[cmd_idx] = cmd_type; m_sh[cmd_idx] = NT'(1) << cmd_tile; end
        LT_JOIN:   m_sh[cmd_idx] |= NT'(1) << cmd_tile;
        LT_UPDATE: begin m_lo[cmd_idx] = cmd_lo; m_hi[cmd_idx] = cmd_hi; m_t[cmd_idx] = cmd_type; end
        LT_LEAVE: begin m_sh[cmd_idx] &= ~(NT'(1) << cmd_tile); if (m_sh[cmd_idx] == 0) m_v[cmd_idx] = 0; end
        default: ;
      endcase
    end
    chk(n_conf > 100 && n_join > 10, "coverage of conflicts and joins");
    $display("conflicts seen %0d, joins seen %0d", n_conf, n_join);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
