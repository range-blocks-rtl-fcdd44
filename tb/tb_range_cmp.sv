// tb_range_cmp: random and corner-case ranges against a reference that
// computes overlap as max(lo) <= min(hi) and containment from the bounds.
module tb_range_cmp;
  import rblox_pkg::*;
  key_t e_lo, e_hi, p_lo, p_hi;
  logic overlap, e_covers_p, p_covers_e, equal;
  int checks = 0, failures = 0;

  range_cmp dut (.*);

  task automatic one(input key_t a, b, c, d);
    key_t mx, mn;
    e_lo = a; e_hi = b; p_lo = c; p_hi = d;
    #1;
    mx = (a > c) ? a : c;
    mn = (b < d) ? b : d;
    checks++;
    if (overlap !== (mx <= mn) || e_covers_p !== (a <= c && d <= b) ||
        p_covers_e !== (c <= a && b <= d) || equal !== (a == c && b == d)) begin
      failures++;
      $display("FAIL e=[%0d,%0d] p=[%0d,%0d] ov=%b ec=%b pc=%b eq=%b", a, b, c, d,
               overlap, e_covers_p, p_covers_e, equal);
    end
  endtask

  initial begin
    // the document's examples: [7,14] vs [12,24] overlap; [1,6] inside [0,7]
    one(7, 14, 12, 24);
    one(7, 14, 15, 24);
    one(0, 7, 1, 6);
    one(15, 31, 21, 21);
    one(15, 31, 32, 32);
    one(4, 42, 4, 42);
    for (int i = 0; i < 2000; i++) begin
      key_t a, b, c, d, t;
      a = $urandom_range(0, 100); b = $urandom_range(0, 100);
      c = $urandom_range(0, 100); d = $urandom_range(0, 100);
      if (a > b) begin t = a; a = b; b = t; end
      if (c > d) begin t = c; c = d; d = t; end
      one(a, b, c, d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
