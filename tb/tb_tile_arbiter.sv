// tb_tile_arbiter: 8 requesters with random requests and random back
// pressure. Checks that the grant is the first requester at or after the
// round-robin pointer (reference computed here), that exactly the granted
// requester sees ready, that the tile field is stamped, and that with all 8
// always requesting each is served once in every 8 grants.
module tb_tile_arbiter;
  import rblox_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] req_valid, req_ready;
  rb_req_t req [N];
  logic out_valid, out_ready;
  rb_req_t out_req;
  int checks = 0, failures = 0;
  int rr = 0;

  tile_arbiter #(.N(N)) dut (.*);

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    int served [N];
    req_valid = 0; out_ready = 0;
    for (int i = 0; i < N; i++) begin req[i] = '0; req[i].lo = key_t'(100 + i); req[i].tile = 8'hFF; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      int exp_i; logic any;
      @(negedge clk);
      req_valid = (it < 1500) ? N'($urandom) : '1;
      out_ready = (it < 1500) ? ($urandom_range(0, 3) != 0) : 1'b1;
      #1;
      any = 0; exp_i = 0;
      for (int k = 0; k < N; k++) if (!any && req_valid[(rr + k) % N]) begin any = 1; exp_i = (rr + k) % N; end
      chk(out_valid == any, "valid");
      if (any) begin
        chk(out_req.lo == key_t'(100 + exp_i) && out_req.tile == tile_t'(exp_i), "round-robin choice");
        chk(req_ready == (out_ready ? N'(1) << exp_i : '0), "ready to the winner only");
        if (out_ready) begin
          rr = (exp_i + 1) % N;
          if (it >= 1500) served[exp_i]++;
        end
      end
      if (it == 1499) for (int i = 0; i < N; i++) served[i] = 0;
    end
    for (int i = 0; i < N; i++) chk(served[i] == 1500 / N || served[i] == 1500 / N + 1, "fair share");
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
