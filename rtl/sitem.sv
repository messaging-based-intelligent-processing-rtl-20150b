// sitem: SiteM, a 4 x 4 array of SiteOs with one vertical bus per column.
//
// SiteOs are joined right-to-left and top-to-bottom by hop links: each
// SiteO's right output feeds the Left FIFO of its right neighbour and its
// bottom output the Top FIFO of the SiteO below. Messages entering on the top
// edge (one port per column) or the left edge (one port per row) therefore
// reach their SiteO by hopping: down the column until the destination row,
// then right along the row. Messages that are not destined inside the SiteM,
// and results sent on, leave through the right edge (one port per row) or the
// bottom edge (one port per column), one message per port and cycle.
//
// Each column also has a vertical bus (vbus_*): a message placed on it reaches
// all four SiteOs of the column in one cycle instead of hopping, and every
// programmed SiteO of the column executes it (broadcast of streamed data such
// as a column of matrix B). The bus takes the message when all programmed
// SiteOs of the column can accept it.
//
// SiteO (r,c) has the address {base_addr[11:4], r[1:0], c[1:0]}.
// All ports are valid/ready; a transfer happens when both are high at a
// rising clock edge. The 16-SiteO SiteM and its per-column vertical buses
// follow the m-IPU description, and so do the row buses below; how they are
// arbitrated and the broadcast rule of the column buses are this design's.
//
// Each row also has a horizontal bus (one transfer per cycle): a result that
// a SiteO streams to a SiteO further right in the same row is delivered over
// it into that SiteO's Left FIFO in one cycle instead of hopping. Products of
// a matrix-vector step thus reach the row's adder directly. A hop from the
// left neighbour has priority over the bus for the Left FIFO; competing
// senders are served in rotating order.
module sitem
  import mipu_pkg::*;
#(
  parameter int FIFO_DEPTH = 4,
  parameter int IBUF_DEPTH = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  addr_t          base_addr,
  // top edge hop inputs, one per column
  input  logic     [3:0] top_valid_i,
  input  msg_t     [3:0] top_msg_i,
  output logic     [3:0] top_ready_o,
  // left edge hop inputs, one per row
  input  logic     [3:0] left_valid_i,
  input  msg_t     [3:0] left_msg_i,
  output logic     [3:0] left_ready_o,
  // vertical buses, one per column
  input  logic     [3:0] vbus_valid_i,
  input  msg_t     [3:0] vbus_msg_i,
  output logic     [3:0] vbus_ready_o,
  // right edge outputs, one per row
  output logic     [3:0] right_valid_o,
  output msg_t     [3:0] right_msg_o,
  input  logic     [3:0] right_ready_i,
  // bottom edge outputs, one per column
  output logic     [3:0] down_valid_o,
  output msg_t     [3:0] down_msg_o,
  input  logic     [3:0] down_ready_i
);

  // hop links: h_* enters SiteO (r,c) from the left (index c, c = 4 is the
  // right edge), v_* enters from the top (index r, r = 4 is the bottom edge)
  logic h_valid [4][5];
  msg_t h_msg   [4][5];
  logic h_ready [4][5];
  logic v_valid [5][4];
  msg_t v_msg   [5][4];
  logic v_ready [5][4];
  logic bus_rdy [4][4];
  // horizontal buses: per row, requests and results of the four SiteOs,
  // readiness of each SiteO to receive, grant and delivery
  logic       hb_req   [4][4];
  msg_t       hb_msg   [4][4];
  logic       hb_rdy   [4][4];
  logic       hb_grant [4][4];
  logic       hb_valid [4][4];
  msg_t       hb_data  [4];
  logic [1:0] hb_ptr   [4];

  for (genvar i = 0; i < 4; i++) begin : g_edge
    assign h_valid[i][0]    = left_valid_i[i];
    assign h_msg[i][0]      = left_msg_i[i];
    assign left_ready_o[i]  = h_ready[i][0];
    assign right_valid_o[i] = h_valid[i][4];
    assign right_msg_o[i]   = h_msg[i][4];
    assign h_ready[i][4]    = right_ready_i[i];

    assign v_valid[0][i]    = top_valid_i[i];
    assign v_msg[0][i]      = top_msg_i[i];
    assign top_ready_o[i]   = v_ready[0][i];
    assign down_valid_o[i]  = v_valid[4][i];
    assign down_msg_o[i]    = v_msg[4][i];
    assign v_ready[4][i]    = down_ready_i[i];

    // vertical bus of column i: ready when every SiteO of the column is
    assign vbus_ready_o[i] = bus_rdy[0][i] && bus_rdy[1][i] && bus_rdy[2][i] && bus_rdy[3][i];
  end

  // Horizontal bus of row r: one transfer per cycle. Among the SiteOs that
  // offer a result, the first at or after hb_ptr (rotating priority) wins;
  // its result goes to the SiteO of this row named by dest[1:0] if that one
  // can take it. The pointer moves past the winner after each transfer.
  for (genvar r = 0; r < 4; r++) begin : g_hbus
    logic       found, fire;
    logic [1:0] win, idx, tgt;
    always_comb begin
      found = 1'b0;
      win   = '0;
      for (int k = 0; k < 4; k++) begin
        idx = hb_ptr[r] + 2'(k);
        if (!found && hb_req[r][idx]) begin
          found = 1'b1;
          win   = idx;
        end
      end
      tgt        = hb_msg[r][win].dest[1:0];
      fire       = found && hb_rdy[r][tgt];
      hb_data[r] = hb_msg[r][win];
      for (int k = 0; k < 4; k++) begin
        hb_grant[r][k] = fire && (win == 2'(k));
        hb_valid[r][k] = fire && (tgt == 2'(k));
      end
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)    hb_ptr[r] <= '0;
      else if (fire) hb_ptr[r] <= win + 2'd1;
    end
  end

  for (genvar r = 0; r < 4; r++) begin : g_row
    for (genvar c = 0; c < 4; c++) begin : g_col
      siteo #(.FIFO_DEPTH(FIFO_DEPTH), .IBUF_DEPTH(IBUF_DEPTH)) u_siteo (
        .clk, .rst_n,
        .my_addr({base_addr[11:4], 2'(r), 2'(c)}),
        .left_valid_i(h_valid[r][c]), .left_msg_i(h_msg[r][c]), .left_ready_o(h_ready[r][c]),
        .top_valid_i(v_valid[r][c]),  .top_msg_i(v_msg[r][c]),  .top_ready_o(v_ready[r][c]),
        .bus_msg_i(vbus_msg_i[c]), .bus_ready_o(bus_rdy[r][c]),
        .bus_fire_i(vbus_valid_i[c] && vbus_ready_o[c]),
        .hbus_req_o(hb_req[r][c]), .hbus_msg_o(hb_msg[r][c]), .hbus_grant_i(hb_grant[r][c]),
        .hbus_valid_i(hb_valid[r][c]), .hbus_msg_i(hb_data[r]), .hbus_ready_o(hb_rdy[r][c]),
        .right_valid_o(h_valid[r][c+1]), .right_msg_o(h_msg[r][c+1]), .right_ready_i(h_ready[r][c+1]),
        .down_valid_o(v_valid[r+1][c]),  .down_msg_o(v_msg[r+1][c]),  .down_ready_i(v_ready[r+1][c]));
    end
  end

endmodule
