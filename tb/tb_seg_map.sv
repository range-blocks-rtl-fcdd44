// tb_seg_map: segment splitting and bank/set mapping against a reference
// that walks the segments of the range one by one. Uses 8-key segments as in
// the document's example ([1,12] -> [1,7] bank 0, [8,12] bank 1).
module tb_seg_map;
  import rblox_pkg::*;
  localparam int SB = 3, NB = 4, NS = 16;
  key_t lo, hi;
  logic fits;
  logic [NB-1:0] bank_en;
  logic [3:0] bank_set [NB];
  key_t piece_lo [NB], piece_hi [NB];
  int checks = 0, failures = 0;

  seg_map #(.SEG_BITS(SB), .NBANKS(NB), .NSETS(NS)) dut (.*);

  task automatic one(input key_t a, b);
    logic [NB-1:0] en_r;
    int nseg;
    lo = a; hi = b;
    #1;
    nseg = int'(b >> SB) - int'(a >> SB) + 1;
    checks++;
    if (fits !== (nseg <= NB)) begin
      failures++; $display("FAIL fits [%0d,%0d]", a, b);
    end
    en_r = '0;
    if (nseg <= NB) begin
      for (int s = int'(a >> SB); s <= int'(b >> SB); s++) begin
        int bk;
        key_t plo, phi;
        bk = s % NB;
        en_r[bk] = 1'b1;
        plo = (s == int'(a >> SB)) ? a : key_t'(s << SB);
        phi = (s == int'(b >> SB)) ? b : key_t'(((s + 1) << SB) - 1);
        checks++;
        if (bank_set[bk] !== 4'((s / NB) % NS) || piece_lo[bk] !== plo || piece_hi[bk] !== phi) begin
          failures++;
          $display("FAIL [%0d,%0d] seg %0d bank %0d set %0d piece [%0d,%0d]", a, b, s, bk,
                   bank_set[bk], piece_lo[bk], piece_hi[bk]);
        end
      end
    end
    checks++;
    if (bank_en !== en_r) begin
      failures++; $display("FAIL en [%0d,%0d] %b vs %b", a, b, bank_en, en_r);
    end
  endtask

  initial begin
    one(1, 12);
    checks++;
    if (!(bank_en == 4'b0011 && piece_lo[0] == 1 && piece_hi[0] == 7 && piece_lo[1] == 8 && piece_hi[1] == 12)) begin
      failures++; $display("FAIL document example [1,12]");
    end
    one(4, 9);
    one(2, 4);
    one(0, 31);
    one(0, 32);
    for (int i = 0; i < 3000; i++) begin
      key_t a, b;
      a = $urandom_range(0, 600);
      b = a + $urandom_range(0, 40);
      one(a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
