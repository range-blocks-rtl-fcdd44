// tb_utable: directed tests of the banked UTable with 8-key segments,
// 4 banks x 4 sets x 2 ways: a range crossing a segment boundary is found
// from keys on both sides; the narrowest safe range wins; a range spanning
// more than 4 segments is not stored; invalidation drops overlapping copies;
// segments 16 apart alias in the same bank and set. Every command must
// finish exactly LAT clocks after it starts.
module tb_utable;
  import rblox_pkg::*;
  localparam int LAT = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start; ut_cmd_e cmd; key_t lo, hi; ptr_t ptr; logic safe;
  logic busy, done, hit; key_t hit_lo, hit_hi; ptr_t hit_ptr;
  int checks = 0, failures = 0;

  utable #(.NBANKS(4), .NSETS(4), .NWAYS(2), .SEG_BITS(3), .LAT(LAT)) dut (.*);

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic op(input ut_cmd_e c, input key_t l, h, input ptr_t p, input logic s);
    int n;
    @(negedge clk);
    start = 1; cmd = c; lo = l; hi = h; ptr = p; safe = s;
    @(negedge clk);
    start = 0;
    n = 1;
    while (!done) begin @(negedge clk); n++; end
    chk(n == LAT, $sformatf("latency %0d", n));
  endtask

  task automatic look(input key_t k, input logic eh, input key_t el, eh2, input ptr_t ep);
    op(UT_LOOKUP, k, 0, 0, 0);
    chk(hit == eh && (!eh || (hit_lo == el && hit_hi == eh2 && hit_ptr == ep)),
        $sformatf("lookup %0d -> hit %b [%0d,%0d] %h", k, hit, hit_lo, hit_hi, hit_ptr));
  endtask

  initial begin
    start = 0; cmd = UT_LOOKUP; lo = 0; hi = 0; ptr = 0; safe = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    look(12, 0, 0, 0, 0);
    op(UT_INSERT, 4, 9, 32'hA, 1);           // crosses 7|8
    chk(hit, "insert stored");
    look(5, 1, 4, 9, 32'hA);
    look(9, 1, 4, 9, 32'hA);
    look(10, 0, 0, 0, 0);
    op(UT_INSERT, 8, 9, 32'hB, 1);           // narrower
    look(9, 1, 8, 9, 32'hB);
    look(4, 1, 4, 9, 32'hA);
    op(UT_INSERT, 0, 40, 32'hC, 1);          // 6 segments: not stored
    chk(!hit, "too wide: not stored");
    look(20, 0, 0, 0, 0);
    op(UT_INSERT, 16, 31, 32'hD, 0);         // unsafe: stored but never returned
    look(20, 0, 0, 0, 0);
    op(UT_INSERT, 130, 135, 32'hE, 1);       // segment 16: bank 0 set 0, like segment 0
    look(133, 1, 130, 135, 32'hE);
    look(5, 1, 4, 9, 32'hA);
    op(UT_INVAL, 9, 9, 0, 0);                // drops [4,9] and [8,9] from segment 1 only
    look(9, 0, 0, 0, 0);
    look(5, 1, 4, 9, 32'hA);                 // the copy in segment 0 is untouched
    op(UT_INVAL, 0, 15, 0, 0);
    look(5, 0, 0, 0, 0);
    look(133, 1, 130, 135, 32'hE);
    // fill one set past its 2 ways: segment 0 ranges
    op(UT_INSERT, 0, 1, 32'h1, 1);
    op(UT_INSERT, 2, 3, 32'h2, 1);
    op(UT_INSERT, 4, 5, 32'h3, 1);
    look(4, 1, 4, 5, 32'h3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
