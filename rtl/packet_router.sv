// packet_router: the node router for the row/column-connected cluster.
//
// Each node at (my_x, my_y) has one link to every other node of its row
// (NX-1 ports, indices 0..NX-2) and of its column (NY-1 ports, indices
// NX-1..NX+NY-3), plus the local port (LOC) toward the node logic and an
// input-only host port (HST) for the host bridge. Ports toward a row
// neighbour at x' use index x' (x' < my_x) or x'-1 (x' > my_x); likewise for
// columns.
// Routing by packet type:
//  * spike, generated here: every row and column link, and the local port
//    (stage 1 of the two-step xy broadcast);
//  * spike from a node in the same column: local port and all row links,
//    marked forwarded (stage 2);
//  * spike from any other node: local port only;
//  * sync from the local port: every link (all direct neighbours); sync from
//    a link: local port;
//  * config: unicast xy routing, first along the row, then the column, then
//    consumed locally.
// Every input keeps its head packet until all its destinations have taken
// it, so packets of one input leave in order on every output; this keeps a
// sync message behind the spikes sent before it. Each output has a
// prioritized round-robin arbiter (sync packets first) and an output FIFO.
// Routing rules, broadcast stages, packet types and the arbiter follow the
// document; port numbering, FIFO depth and the head-of-line structure are
// this design's. Only the emulation mode is built.
module packet_router
  import neuroaix_pkg::*;
#(
  parameter int unsigned NX    = 5,
  parameter int unsigned NY    = 7,
  parameter int unsigned OUT_D = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  my_x,
  input  logic [3:0]  my_y,
  input  logic        in_valid [NX+NY],
  output logic        in_ready [NX+NY],
  input  packet_t     in_pkt   [NX+NY],
  output logic        out_valid [NX+NY-1],
  input  logic        out_ready [NX+NY-1],
  output packet_t     out_pkt   [NX+NY-1],
  output logic [31:0] n_forwarded
);
  localparam int unsigned NL  = NX + NY - 2;   // link ports
  localparam int unsigned LOC = NL;
  localparam int unsigned NI  = NX + NY;       // inputs: links, local, host
  localparam int unsigned NO  = NX + NY - 1;   // outputs: links, local

  logic [NL-1:0] row_mask, col_mask;
  always_comb begin
    row_mask = '0;
    col_mask = '0;
    for (int unsigned i = 0; i < NL; i++) begin
      row_mask[i] = (i < NX - 1);
      col_mask[i] = (i >= NX - 1);
    end
  end

  function automatic logic [NO-1:0] route(input packet_t p, input int unsigned src_port,
                                         input logic [3:0] mx, input logic [3:0] my,
                                         input logic [NL-1:0] rm, input logic [NL-1:0] cm);
    logic [NO-1:0] d;
    d = '0;
    unique case (p.typ)
      PKT_SPIKE: begin
        d[LOC] = 1'b1;
        if (p.src_x == mx && p.src_y == my) d[NL-1:0] = rm | cm;
        else if (p.src_x == mx && !p.fwd)   d[NL-1:0] = rm;
      end
      PKT_SYNC: begin
        if (src_port == LOC) d[NL-1:0] = rm | cm;
        else                 d[LOC]    = 1'b1;
      end
      PKT_CONFIG: begin
        if (p.dst_x != mx)
          d[(p.dst_x < mx) ? int'(p.dst_x) : int'(p.dst_x) - 1] = 1'b1;
        else if (p.dst_y != my)
          d[NX - 1 + ((p.dst_y < my) ? int'(p.dst_y) : int'(p.dst_y) - 1)] = 1'b1;
        else
          d[LOC] = 1'b1;
      end
      default: d = '0;
    endcase
    return d;
  endfunction

  logic [NO-1:0] dest   [NI];
  logic [NO-1:0] served_q [NI];
  logic [NO-1:0] need   [NI];
  logic [NI-1:0] req    [NO];
  logic [NI-1:0] prio;
  logic [NI-1:0] grant  [NO];
  logic [NO-1:0] gvld;
  logic [NO-1:0] fifo_ready;
  packet_t       sel    [NO];
  logic [NO-1:0] got    [NI];

  always_comb begin
    for (int unsigned i = 0; i < NI; i++) begin
      dest[i] = in_valid[i] ? route(in_pkt[i], i, my_x, my_y, row_mask, col_mask) : '0;
      need[i] = dest[i] & ~served_q[i];
      prio[i] = in_valid[i] && (in_pkt[i].typ == PKT_SYNC);
    end
    for (int unsigned o = 0; o < NO; o++)
      for (int unsigned i = 0; i < NI; i++)
        req[o][i] = need[i][o] && fifo_ready[o];
  end

  for (genvar o = 0; o < NO; o++) begin : g_out
    rr_arbiter #(.N(NI)) u_arb (
      .clk, .rst_n, .req(req[o]), .prio(prio), .advance(1'b1),
      .grant(grant[o]), .valid(gvld[o])
    );
    always_comb begin
      sel[o] = '0;
      for (int unsigned i = 0; i < NI; i++)
        if (grant[o][i]) sel[o] = in_pkt[i];
      if (sel[o].typ == PKT_SPIKE && o < NL && sel[o].src_x == my_x && sel[o].src_y != my_y)
        sel[o].fwd = 1'b1;
    end
    logic [$clog2(OUT_D+1)-1:0] unused_cnt;
    sync_fifo #(.W(PKT_W), .DEPTH(OUT_D)) u_q (
      .clk, .rst_n,
      .in_valid(gvld[o]), .in_ready(fifo_ready[o]), .in_data(sel[o]),
      .out_valid(out_valid[o]), .out_ready(out_ready[o]), .out_data(out_pkt[o]),
      .count(unused_cnt)
    );
  end

  always_comb
    for (int unsigned i = 0; i < NI; i++) begin
      for (int unsigned o = 0; o < NO; o++) got[i][o] = grant[o][i];
      in_ready[i] = in_valid[i] && ((need[i] & ~got[i]) == '0);
    end

  // forwarded copies leaving for the links in this cycle (statistics)
  logic [31:0] fwd_now;
  always_comb begin
    fwd_now = '0;
    for (int unsigned o = 0; o < NL; o++)
      if (gvld[o] && fifo_ready[o] && sel[o].fwd) fwd_now++;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NI; i++) served_q[i] <= '0;
      n_forwarded <= '0;
    end else begin
      for (int unsigned i = 0; i < NI; i++)
        served_q[i] <= in_ready[i] ? '0 : (served_q[i] | got[i]);
      n_forwarded <= n_forwarded + fwd_now;
    end
  end
endmodule
