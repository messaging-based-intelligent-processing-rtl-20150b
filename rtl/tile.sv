// tile: Tile, an array of SiteMs (4 x 4 by default, 256 SiteOs).
//
// SiteMs are tiled exactly like SiteOs inside a SiteM: right edge outputs of
// one SiteM feed the left edge inputs of its right neighbour, bottom edge
// outputs feed the top edge inputs of the SiteM below. The Tile is thus a
// 4*MR by 4*MC grid of SiteOs in which a message hops down to its global row
// and then right to its SiteO, following the same-row-right/else-down rule of
// every SiteO. The edges of the Tile are brought out one port per SiteO row
// (left, right) and per SiteO column (top, bottom).
//
// Vertical buses: Tile bus port c (one per SiteO column) reaches the SiteMs of
// column c/4 in one cycle; the SiteM row is selected by the message's
// destination bits [7:6] and the message goes onto vertical bus c%4 of that
// SiteM, which broadcasts it to the programmed SiteOs of that column. A bus
// message for a SiteM row this Tile does not have is accepted and dropped.
//
// SiteM (mr,mc) has base address {base_addr[11:8], mr[1:0], mc[1:0], 4'b0}.
// The Tile as a group of 16 SiteMs follows the m-IPU description; the
// Tile-level bus routing is this design's choice (see the README).
module tile
  import mipu_pkg::*;
#(
  parameter int MR         = 4,   // SiteM rows
  parameter int MC         = 4,   // SiteM columns
  parameter int FIFO_DEPTH = 4,
  parameter int IBUF_DEPTH = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  addr_t             base_addr,
  input  logic     [4*MC-1:0] top_valid_i,
  input  msg_t     [4*MC-1:0] top_msg_i,
  output logic     [4*MC-1:0] top_ready_o,
  input  logic     [4*MR-1:0] left_valid_i,
  input  msg_t     [4*MR-1:0] left_msg_i,
  output logic     [4*MR-1:0] left_ready_o,
  input  logic     [4*MC-1:0] vbus_valid_i,
  input  msg_t     [4*MC-1:0] vbus_msg_i,
  output logic     [4*MC-1:0] vbus_ready_o,
  output logic     [4*MR-1:0] right_valid_o,
  output msg_t     [4*MR-1:0] right_msg_o,
  input  logic     [4*MR-1:0] right_ready_i,
  output logic     [4*MC-1:0] down_valid_o,
  output msg_t     [4*MC-1:0] down_msg_o,
  input  logic     [4*MC-1:0] down_ready_i
);

  logic [3:0] b_valid [MR][MC];
  logic [3:0] b_ready [MR][MC];

  // vertical bus routing: SiteM row from destination bits [7:6]
  for (genvar c = 0; c < 4*MC; c++) begin : g_bus
    logic [1:0] sel;
    assign sel = vbus_msg_i[c].dest[7:6];
    for (genvar r = 0; r < MR; r++) begin : g_sel
      assign b_valid[r][c/4][c%4] = vbus_valid_i[c] && (sel == 2'(r));
    end
    always_comb begin
      vbus_ready_o[c] = 1'b1;  // no such SiteM row: taken and dropped
      for (int r = 0; r < MR; r++)
        if (sel == 2'(r)) vbus_ready_o[c] = b_ready[r][c/4][c%4];
    end
  end

  // Each SiteM owns the signals of its left and top inputs (*_in) and of its
  // right and bottom outputs (*_out); neighbours are joined by name.
  for (genvar r = 0; r < MR; r++) begin : g_row
    for (genvar c = 0; c < MC; c++) begin : g_col
      logic [3:0] l_valid, l_ready, t_valid, t_ready;
      msg_t [3:0] l_msg, t_msg;
      logic [3:0] r_valid, r_ready, d_valid, d_ready;
      msg_t [3:0] r_msg, d_msg;

      if (c == 0) begin : g_ledge
        assign l_valid                = left_valid_i[4*r +: 4];
        assign l_msg                  = left_msg_i[4*r +: 4];
        assign left_ready_o[4*r +: 4] = l_ready;
      end else begin : g_lnb
        assign l_valid = g_col[c-1].r_valid;
        assign l_msg   = g_col[c-1].r_msg;
      end
      if (c == MC - 1) begin : g_redge
        assign right_valid_o[4*r +: 4] = r_valid;
        assign right_msg_o[4*r +: 4]   = r_msg;
        assign r_ready                 = right_ready_i[4*r +: 4];
      end else begin : g_rnb
        assign r_ready = g_col[c+1].l_ready;
      end
      if (r == 0) begin : g_tedge
        assign t_valid               = top_valid_i[4*c +: 4];
        assign t_msg                 = top_msg_i[4*c +: 4];
        assign top_ready_o[4*c +: 4] = t_ready;
      end else begin : g_tnb
        assign t_valid = g_row[r-1].g_col[c].d_valid;
        assign t_msg   = g_row[r-1].g_col[c].d_msg;
      end
      if (r == MR - 1) begin : g_dedge
        assign down_valid_o[4*c +: 4] = d_valid;
        assign down_msg_o[4*c +: 4]   = d_msg;
        assign d_ready                = down_ready_i[4*c +: 4];
      end else begin : g_dnb
        assign d_ready = g_row[r+1].g_col[c].t_ready;
      end

      sitem #(.FIFO_DEPTH(FIFO_DEPTH), .IBUF_DEPTH(IBUF_DEPTH)) u_sitem (
        .clk, .rst_n,
        .base_addr({base_addr[11:8], 2'(r), 2'(c), 4'b0}),
        .top_valid_i(t_valid),  .top_msg_i(t_msg),  .top_ready_o(t_ready),
        .left_valid_i(l_valid), .left_msg_i(l_msg), .left_ready_o(l_ready),
        .vbus_valid_i(b_valid[r][c]), .vbus_msg_i(vbus_msg_i[4*c +: 4]), .vbus_ready_o(b_ready[r][c]),
        .right_valid_o(r_valid), .right_msg_o(r_msg), .right_ready_i(r_ready),
        .down_valid_o(d_valid),  .down_msg_o(d_msg),  .down_ready_i(d_ready));
    end
  end

endmodule
