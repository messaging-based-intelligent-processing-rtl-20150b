// mipu: the m-IPU engine, one Block of 4 x 4 Tiles (4096 SiteOs).
//
// The m-IPU is a grid of small floating-point compute sites (SiteOs) that are
// programmed and driven only by 64-bit messages. A message carries an opcode,
// a 12-bit destination, a 32-bit value and a "next" opcode/destination; a
// SiteO executes the messages addressed to it and passes the others on, so
// computations are mapped onto the grid at run time by the host simply by
// sending messages. Hierarchy: SiteM = 4x4 SiteOs, Tile = 4x4 SiteMs,
// Block = 4x4 Tiles. The 12-bit destination addresses exactly the 4096 SiteOs
// of one Block, which this module is.
//
// Structure: Tiles are joined edge to edge, so the Block is a 64 x 64 grid of
// SiteOs in which a message hops down to its row, then right to its SiteO
// (one cycle per SiteO when the FIFOs are empty). The host injects messages on
// the top edge (one port per SiteO column), the left edge (one per SiteO row)
// and the vertical buses (one per SiteO column); a bus message reaches the
// SiteM selected by destination bits [11:10] (Tile row) and [7:6] (SiteM row)
// in one cycle and is broadcast to the programmed SiteOs of that column.
// Results and messages for which there is no SiteO further right or below
// leave on the right edge (one port per row) and the bottom edge (one port per
// column), where the host collects them. Every port is valid/ready.
//
// TR and TC set the number of Tile rows and columns, MR and MC the SiteMs of
// each Tile (all 4 by default: 4096 SiteOs, the size the m-IPU is evaluated
// at); smaller values give a partial Block with the same address map. Edge
// port k serves the k-th SiteO column (or row) present, so with MC = 4 port k
// is global SiteO column k, and in a reduced Block port k is column
// 16*(k / (4*MC)) + k % (4*MC). The Block/Tile/SiteM/SiteO
// hierarchy, the message format and the 4096-site size follow the m-IPU
// description; the edge ports, the hop topology and the bus routing are this
// design's reading of it.
module mipu
  import mipu_pkg::*;
#(
  parameter int TR         = 4,   // Tile rows
  parameter int TC         = 4,   // Tile columns
  parameter int MR         = 4,   // SiteM rows per Tile
  parameter int MC         = 4,   // SiteM columns per Tile
  parameter int FIFO_DEPTH = 4,
  parameter int IBUF_DEPTH = 8,
  localparam int TW = 4 * MC,     // SiteO columns per Tile
  localparam int TH = 4 * MR,     // SiteO rows per Tile
  localparam int NC = TW * TC,    // SiteO columns of the Block
  localparam int NR = TH * TR     // SiteO rows of the Block
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [NC-1:0]   top_valid_i,
  input  msg_t [NC-1:0]   top_msg_i,
  output logic [NC-1:0]   top_ready_o,
  input  logic [NR-1:0]   left_valid_i,
  input  msg_t [NR-1:0]   left_msg_i,
  output logic [NR-1:0]   left_ready_o,
  input  logic [NC-1:0]   vbus_valid_i,
  input  msg_t [NC-1:0]   vbus_msg_i,
  output logic [NC-1:0]   vbus_ready_o,
  output logic [NR-1:0]   right_valid_o,
  output msg_t [NR-1:0]   right_msg_o,
  input  logic [NR-1:0]   right_ready_i,
  output logic [NC-1:0]   down_valid_o,
  output msg_t [NC-1:0]   down_msg_o,
  input  logic [NC-1:0]   down_ready_i
);

  logic [TW-1:0] b_valid [TR][TC];
  logic [TW-1:0] b_ready [TR][TC];

  // vertical bus routing: Tile row from destination bits [11:10]
  for (genvar c = 0; c < NC; c++) begin : g_bus
    logic [1:0] sel;
    assign sel = vbus_msg_i[c].dest[11:10];
    for (genvar r = 0; r < TR; r++) begin : g_sel
      assign b_valid[r][c/TW][c%TW] = vbus_valid_i[c] && (sel == 2'(r));
    end
    always_comb begin
      vbus_ready_o[c] = 1'b1;  // no such Tile row: taken and dropped
      for (int r = 0; r < TR; r++)
        if (sel == 2'(r)) vbus_ready_o[c] = b_ready[r][c/TW][c%TW];
    end
  end

  // Each Tile owns the signals of its left and top inputs (*_in) and of its
  // right and bottom outputs (*_out); neighbours are joined by name.
  for (genvar r = 0; r < TR; r++) begin : g_row
    for (genvar c = 0; c < TC; c++) begin : g_col
      logic [TH-1:0] l_valid, l_ready, r_valid, r_ready;
      msg_t [TH-1:0] l_msg, r_msg;
      logic [TW-1:0] t_valid, t_ready, d_valid, d_ready;
      msg_t [TW-1:0] t_msg, d_msg;

      if (c == 0) begin : g_ledge
        assign l_valid                = left_valid_i[TH*r +: TH];
        assign l_msg                  = left_msg_i[TH*r +: TH];
        assign left_ready_o[TH*r +: TH] = l_ready;
      end else begin : g_lnb
        assign l_valid = g_col[c-1].r_valid;
        assign l_msg   = g_col[c-1].r_msg;
      end
      if (c == TC - 1) begin : g_redge
        assign right_valid_o[TH*r +: TH] = r_valid;
        assign right_msg_o[TH*r +: TH]   = r_msg;
        assign r_ready                 = right_ready_i[TH*r +: TH];
      end else begin : g_rnb
        assign r_ready = g_col[c+1].l_ready;
      end
      if (r == 0) begin : g_tedge
        assign t_valid               = top_valid_i[TW*c +: TW];
        assign t_msg                 = top_msg_i[TW*c +: TW];
        assign top_ready_o[TW*c +: TW] = t_ready;
      end else begin : g_tnb
        assign t_valid = g_row[r-1].g_col[c].d_valid;
        assign t_msg   = g_row[r-1].g_col[c].d_msg;
      end
      if (r == TR - 1) begin : g_dedge
        assign down_valid_o[TW*c +: TW] = d_valid;
        assign down_msg_o[TW*c +: TW]   = d_msg;
        assign d_ready                = down_ready_i[TW*c +: TW];
      end else begin : g_dnb
        assign d_ready = g_row[r+1].g_col[c].t_ready;
      end

      tile #(.MR(MR), .MC(MC), .FIFO_DEPTH(FIFO_DEPTH), .IBUF_DEPTH(IBUF_DEPTH)) u_tile (
        .clk, .rst_n,
        .base_addr({2'(r), 2'(c), 8'b0}),
        .top_valid_i(t_valid),  .top_msg_i(t_msg),  .top_ready_o(t_ready),
        .left_valid_i(l_valid), .left_msg_i(l_msg), .left_ready_o(l_ready),
        .vbus_valid_i(b_valid[r][c]), .vbus_msg_i(vbus_msg_i[TW*c +: TW]), .vbus_ready_o(b_ready[r][c]),
        .right_valid_o(r_valid), .right_msg_o(r_msg), .right_ready_i(r_ready),
        .down_valid_o(d_valid),  .down_msg_o(d_msg),  .down_ready_i(d_ready));
    end
  end

endmodule
