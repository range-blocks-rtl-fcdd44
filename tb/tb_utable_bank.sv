// tb_utable_bank: directed tests of one UTable bank (4 sets x 4 ways):
// narrowest-safe selection, unsafe entries ignored, overlap mask, victim
// choice (same range, then invalid, then round robin) and invalidation.
module tb_utable_bank;
  import rblox_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rd_en; logic [1:0] rd_set; key_t p_lo, p_hi;
  logic hit; logic [1:0] hit_way; key_t hit_lo, hit_hi; ptr_t hit_ptr;
  logic [3:0] ov_mask; logic [1:0] victim_way;
  logic wr_en; logic [1:0] wr_set, wr_way; key_t wr_lo, wr_hi; ptr_t wr_ptr; logic wr_safe;
  logic inv_en; logic [1:0] inv_set; logic [3:0] inv_mask;
  int checks = 0, failures = 0;

  utable_bank #(.NSETS(4), .NWAYS(4)) dut (.*);

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic write(input int s, w, input key_t lo, hi, input ptr_t p, input logic sf);
    @(negedge clk);
    wr_en = 1; wr_set = 2'(s); wr_way = 2'(w); wr_lo = lo; wr_hi = hi; wr_ptr = p; wr_safe = sf;
    @(negedge clk);
    wr_en = 0;
  endtask

  task automatic probe(input int s, input key_t lo, hi);
    @(negedge clk);
    rd_en = 1; rd_set = 2'(s); p_lo = lo; p_hi = hi;
    @(negedge clk);
    rd_en = 0;
    #1;
  endtask

  initial begin
    rd_en = 0; wr_en = 0; inv_en = 0; rd_set = 0; p_lo = 0; p_hi = 0;
    wr_set = 0; wr_way = 0; wr_lo = 0; wr_hi = 0; wr_ptr = 0; wr_safe = 0; inv_set = 0; inv_mask = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    probe(1, 20, 20);
    chk(!hit && victim_way == 0 && ov_mask == 0, "empty set");
    write(1, 0, 4, 31, 32'h400, 1);
    write(1, 1, 15, 31, 32'h1500, 1);
    write(1, 2, 16, 20, 32'h1600, 0);   // narrower but unsafe
    probe(1, 21, 21);
    chk(hit && hit_lo == 15 && hit_hi == 31 && hit_ptr == 32'h1500 && hit_way == 1, "narrowest safe wins");
    chk(ov_mask == 4'b0011, "overlap mask key 21");
    chk(victim_way == 3, "victim is the invalid way");
    probe(1, 5, 5);
    chk(hit && hit_lo == 4 && hit_ptr == 32'h400, "only the wide range holds key 5");
    probe(1, 15, 31);
    chk(victim_way == 1, "victim is the way with the same range");
    probe(1, 40, 40);
    chk(!hit && ov_mask == 0, "miss above all ranges");
    probe(2, 21, 21);
    chk(!hit, "other set is empty");
    write(1, 3, 50, 60, 32'h50, 1);
    probe(1, 70, 70);
    chk(victim_way == dut.rr, "full set: round-robin victim");
    @(negedge clk); inv_en = 1; inv_set = 1; inv_mask = 4'b0010; @(negedge clk); inv_en = 0;
    probe(1, 21, 21);
    chk(hit && hit_lo == 4 && hit_hi == 31, "after invalidating [15,31] the wide range is left");
    chk(victim_way == 1, "invalidated way is reused");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
