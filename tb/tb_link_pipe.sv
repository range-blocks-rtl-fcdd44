// tb_link_pipe: sends a numbered stream through a 2-stage link with random
// stalls on both sides; checks order, no loss or duplication, and that with
// the receiver always ready a word takes exactly DEPTH clocks.
module tb_link_pipe;
  localparam int DEPTH = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [31:0] in_data, out_data;
  int checks = 0, failures = 0;
  int sent = 0, got = 0;

  link_pipe #(.DEPTH(DEPTH), .T(logic [31:0])) dut (.*);

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask


  initial begin
    int t0;
    logic taken;
    in_valid = 0; in_data = 0; out_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // latency
    @(negedge clk); in_valid = 1; in_data = 0;
    @(negedge clk); in_valid = 0; sent = 1; t0 = 1;
    while (!out_valid) begin @(negedge clk); t0++; end
    chk(t0 == DEPTH, $sformatf("latency %0d", t0));
    got = 1;
    @(negedge clk);
    // random stream
    while (sent < 2000) begin
      if (!in_valid) in_valid = ($urandom_range(0, 3) != 0);  // hold until taken
      in_data = 32'(sent);
      out_ready = ($urandom_range(0, 2) != 0);
      #1;
      if (out_valid && out_ready) begin
        chk(out_data == 32'(got), $sformatf("order: got %0d expected %0d", out_data, got));
        got++;
      end
      taken = in_valid && in_ready;
      @(negedge clk);  // inputs change only at the falling edge
      if (taken) begin
        sent++;
        in_valid = 0;
      end
    end
    in_valid = 0; out_ready = 1;
    repeat (10) begin
      #1;
      if (out_valid) begin
        chk(out_data == 32'(got), "order (drain)");
        got++;
      end
      @(negedge clk);
    end
    chk(got == sent, $sformatf("all words delivered %0d of %0d", got, sent));
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
