// link_pipe: the on-chip link between the tiles and the range-lock tables.
//
// An elastic pipeline of DEPTH register stages (default 2, the document's
// 2-cycle link). Each stage holds one payload of type T with a valid bit;
// a stage accepts a new payload when it is empty or its content moves on in
// the same clock, so the link carries one payload per clock and stalls
// without loss when the far side is not ready. With the far side ready, a
// payload presented at clock t leaves at clock t+DEPTH.
// Handshake: a payload moves when valid and ready are both high.
module link_pipe #(
  parameter int  DEPTH = 2,
  parameter type T     = logic [31:0]
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data
);
  logic [DEPTH:0] v;
  logic [DEPTH:0] rdy;
  T               d [DEPTH+1];

  assign v[0]      = in_valid;
  assign d[0]      = in_data;
  assign in_ready  = rdy[0];
  assign rdy[DEPTH] = out_ready;

  for (genvar i = 1; i <= DEPTH; i++) begin : g_stage
    assign rdy[i-1] = !v[i] || rdy[i];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v[i] <= 1'b0;
      end else if (rdy[i-1]) begin
        v[i] <= v[i-1];
      end
    end
    always_ff @(posedge clk) begin
      if (rdy[i-1] && v[i-1]) d[i] <= d[i-1];
    end
  end

  assign out_valid = v[DEPTH];
  assign out_data  = d[DEPTH];

  // a payload offered must stay until taken
  assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && !in_ready) |=> in_valid)
    else $error("link_pipe: payload withdrawn before it was taken");
endmodule
