// sync_fifo: single-clock first-word-fall-through FIFO.
//
// Used in front of each ring buffer and on every router output. `out_data`
// shows the oldest entry while `out_valid` is high; it leaves on a cycle with
// `out_ready`. Writes are accepted while `in_ready` (not full). Depth is a
// parameter; the document names these FIFOs without giving sizes.
module sync_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rd_q, wr_q;
  logic          push, pop;

  assign in_ready  = (count != DEPTH[$bits(count)-1:0]);
  assign out_valid = (count != '0);
  assign out_data  = mem[rd_q];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      count <= '0;
    end else begin
      if (push) wr_q <= (wr_q == AW'(DEPTH-1)) ? '0 : wr_q + 1'b1;
      if (pop)  rd_q <= (rd_q == AW'(DEPTH-1)) ? '0 : rd_q + 1'b1;
      count <= count + $bits(count)'(push) - $bits(count)'(pop);
    end
  end

  always_ff @(posedge clk) if (push) mem[wr_q] <= in_data;

  assert property (@(posedge clk) disable iff (!rst_n) count <= DEPTH[$bits(count)-1:0]);
endmodule
