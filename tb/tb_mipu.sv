// tb_mipu: end-to-end test of the m-IPU Block (reduced to 1 x 2 Tiles of 2 x 2 SiteMs).
//
// The Block here is 8 SiteO rows by 16 SiteO columns (global columns 0-7 in
// Tile 0 and 16-23 in Tile 1). The test runs:
//  1. C = A x B with A 4x3 and B 3x3 on three SiteMs in parallel, one per
//     column of B (the {(N x M) + N} x P mapping). The three SiteMs sit in
//     SiteM row 1 at global SiteO columns 4, 16 and 20, so they straddle the boundary between
//     Tile 0 and Tile 1: programming hops across the Tile edge and the B
//     columns use the vertical buses of both Tiles in the same cycle. Results
//     of the left SiteMs hop through the right ones to the Block's right edge.
//     Inside each SiteM the products reach the row adders over the row buses.
//  2. A SiteO (row 0, column 22) with two next-instruction entries (PROG + UPDATE) divides and
//     sends its two quotients to two different edges.
//  3. The right edge of one row is held not-ready while 150 messages are sent
//     along that row: the FIFOs fill, the left input stalls, and after it has
//     stalled for 20 cycles the edge is released, and then
//     every message must come out once and in order.
// Each mechanism is counted; a mechanism that never happened is a failure.
// The matrix-multiply latency from the B broadcast to the last result is
// checked against the cycle count worked out for this design's schedule.
module tb_mipu;
  import mipu_pkg::*;
  import tb_fp_pkg::*;

  localparam int TR = 1, TC = 2, MR = 2, MC = 2;
  localparam int NC = 4 * MC * TC, NR = 4 * MR * TR;

  logic clk = 0, rst_n = 0;
  logic [NC-1:0] tv, tr, bv, br, dv, dr;
  logic [NR-1:0] lv, lr, rv, rr;
  msg_t [NC-1:0] tm, bm, dm;
  msg_t [NR-1:0] lm, rm;
  int checks = 0, failures = 0, cyc = 0;

  mipu #(.TR(TR), .TC(TC), .MR(MR), .MC(MC)) dut (.clk, .rst_n,
    .top_valid_i(tv), .top_msg_i(tm), .top_ready_o(tr),
    .left_valid_i(lv), .left_msg_i(lm), .left_ready_o(lr),
    .vbus_valid_i(bv), .vbus_msg_i(bm), .vbus_ready_o(br),
    .right_valid_o(rv), .right_msg_o(rm), .right_ready_i(rr),
    .down_valid_o(dv), .down_msg_o(dm), .down_ready_i(dr));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- monitors
  msg_t rq[NR][$], dq[NC][$];
  int   rt[NR][$];
  int   n_hop_in = 0, n_bus = 0, n_bus_t1 = 0, n_out = 0, n_in_stall = 0, n_out_stall = 0;
  int   n_cross_tile = 0, n_hbus = 0;
  // horizontal bus transfers in the three SiteMs of the matrix multiply
  for (genvar k = 0; k < 4; k++) begin : g_hcnt
    always @(posedge clk) if (rst_n) begin
      if (dut.g_row[0].g_col[0].u_tile.g_row[1].g_col[1].u_sitem.g_hbus[k].fire) n_hbus++;
      if (dut.g_row[0].g_col[1].u_tile.g_row[1].g_col[0].u_sitem.g_hbus[k].fire) n_hbus++;
      if (dut.g_row[0].g_col[1].u_tile.g_row[1].g_col[1].u_sitem.g_hbus[k].fire) n_hbus++;
    end
  end
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < NR; i++) begin
      if (rv[i] && rr[i]) begin rq[i].push_back(rm[i]); rt[i].push_back(cyc); n_out++; end
      if (rv[i] && !rr[i]) n_out_stall++;
      if (lv[i] && lr[i]) n_hop_in++;
      if (lv[i] && !lr[i]) n_in_stall++;
    end
    for (int c = 0; c < NC; c++) begin
      if (dv[c] && dr[c]) begin dq[c].push_back(dm[c]); n_out++; end
      if (tv[c] && tr[c]) n_hop_in++;
      if (tv[c] && !tr[c]) n_in_stall++;
      if (bv[c] && br[c]) begin n_bus++; if (c >= 4 * MC) n_bus_t1++; end
    end
    for (int i = 0; i < 4 * MR; i++)
      if (dut.g_row[0].g_col[1].l_valid[i] && dut.g_row[0].g_col[1].l_ready[i]) n_cross_tile++;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  int A[4][3], B[3][3], C[4][3];
  int t_b, t_last, n_mm_ok = 0, n_div = 0, n_rr = 0;

  function automatic int cb(int j);  // first global SiteO column of the SiteM for column j of B
    return (j == 0) ? 4 : 12 + 4 * j;
  endfunction
  function automatic int pt(int gc);  // edge port of a global SiteO column
    return (gc / 16) * 4 * MC + gc % 16;
  endfunction

  initial begin
    tv = '0; lv = '0; bv = '0; tm = '0; lm = '0; bm = '0; rr = '1; dr = '1;
    for (int i = 0; i < 4; i++) for (int k = 0; k < 3; k++) A[i][k] = int'($urandom_range(19)) - 9;
    for (int k = 0; k < 3; k++) for (int j = 0; j < 3; j++) B[k][j] = int'($urandom_range(19)) - 9;
    for (int i = 0; i < 4; i++) for (int j = 0; j < 3; j++) begin
      C[i][j] = 0;
      for (int k = 0; k < 3; k++) C[i][j] += A[i][k] * B[k][j];
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---- 1. matrix multiplication on three SiteMs -------------------------
    for (int i = 3; i >= 0; i--) begin
      tv = '0;
      for (int j = 0; j < 3; j++) begin
        for (int k = 0; k < 3; k++) begin
          tv[pt(cb(j) + k)] = 1'b1;
          tm[pt(cb(j) + k)] = make_msg(OP_PROG, make_addr(6'(4 + i), 6'(cb(j) + k)),
                                   r2f(real'(A[i][k])), OP_A_ADD, make_addr(6'(4 + i), 6'(cb(j) + 3)));
        end
        tv[pt(cb(j) + 3)] = 1'b1;
        tm[pt(cb(j) + 3)] = make_msg(OP_PROG, make_addr(6'(4 + i), 6'(cb(j) + 3)), 32'h0,
                                 OP_A_ADD, make_addr(6'(4 + i), 6'(cb(j))));
      end
      @(negedge clk);
    end
    tv = '0;
    repeat (20) @(negedge clk);
    // all columns of B at once, one vertical bus per column of A
    bv = '0;
    for (int j = 0; j < 3; j++) for (int k = 0; k < 3; k++) begin
      bv[pt(cb(j) + k)] = 1'b1;
      bm[pt(cb(j) + k)] = make_msg(OP_A_MULS, make_addr(6'd4, 6'(cb(j) + k)), r2f(real'(B[k][j])), OP_PROG, '0);
    end
    #1 chk(&(br | ~bv), "all buses ready");
    t_b = cyc;
    @(negedge clk); bv = '0;
    repeat (4) @(negedge clk);
    for (int j = 0; j < 3; j++) begin
      bv[pt(cb(j) + 3)] = 1'b1;
      bm[pt(cb(j) + 3)] = make_msg(OP_A_ADDS, make_addr(6'd4, 6'(cb(j) + 3)), 32'h0, OP_PROG, '0);
    end
    @(negedge clk);
    for (int j = 0; j < 3; j++)
      bm[pt(cb(j) + 3)] = make_msg(OP_A_MUL, make_addr(6'd4, 6'(cb(j) + 3)), 32'h0, OP_PROG, '0);
    @(negedge clk); bv = '0;
    repeat (30) @(negedge clk);
    t_last = 0;
    for (int i = 0; i < 4; i++) begin
      chk(rq[4 + i].size() == 3, $sformatf("three results on row %0d", 4 + i));
      while (rq[4 + i].size() > 0) begin
        msg_t m; int t, j;
        m = rq[4 + i].pop_front(); t = rt[4 + i].pop_front();
        j = (int'(global_col(m.dest)) == 4) ? 0 : (int'(global_col(m.dest)) - 12) / 4;
        if (t > t_last) t_last = t;
        if (j >= 0 && j < 3 && m.value == r2f(real'(C[i][j]))) n_mm_ok++;
        else begin failures++; $display("FAIL result row %0d dest %h value %h", i, m.dest, m.value); end
        checks++;
      end
    end
    $display("matrix multiply: %0d of 12 results, last %0d cycles after the B broadcast",
             n_mm_ok, t_last - t_b);
    chk(t_last - t_b == 15, "matrix multiply latency");

    // ---- 2. two next-instruction entries and division ---------------------
    lv = '0;
    @(negedge clk);
    tv[pt(22)] = 1; tm[pt(22)] = make_msg(OP_PROG, make_addr(6'd0, 6'd22), 32'h4120_0000, OP_A_ADD, make_addr(6'd0, 6'd0));
    @(negedge clk);
    tm[pt(22)] = make_msg(OP_UPDATE, make_addr(6'd0, 6'd22), 32'h0, OP_A_SUB, make_addr(6'd7, 6'd0));
    @(negedge clk);
    tm[pt(22)] = make_msg(OP_A_DIVS, make_addr(6'd0, 6'd22), 32'h4080_0000, OP_PROG, '0);
    @(negedge clk);
    tm[pt(22)] = make_msg(OP_A_DIVS, make_addr(6'd0, 6'd22), 32'h4000_0000, OP_PROG, '0);
    @(negedge clk); tv = '0;
    repeat (80) @(negedge clk);
    if (rq[0].size() == 1) begin
      msg_t m; m = rq[0].pop_front(); void'(rt[0].pop_front());
      chk(m.value == r2f(2.5) && m.op == OP_A_ADD, "first quotient to entry 0");
      n_div++; n_rr++;
    end else chk(0, "first quotient missing");
    if (rq[7].size() == 1) begin
      msg_t m; m = rq[7].pop_front(); void'(rt[7].pop_front());
      chk(m.value == r2f(5.0) && m.op == OP_A_SUB, "second quotient to entry 1");
      n_div++; n_rr++;
    end else chk(0, "second quotient missing");

    // ---- 3. back-pressure along row 2 --------------------------------------
    rr[2] = 1'b0;
    for (int n = 0; n < 150; ) begin
      @(negedge clk);
      lv[2] = 1'b1;
      lm[2] = make_msg(OP_A_ADD, make_addr(6'd2, 6'd40), 32'(n), OP_PROG, '0);
      if (n_in_stall > 20) rr[2] = 1'b1;   // release once the input has stalled a while
      @(posedge clk);
      if (lr[2]) n++;
    end
    @(negedge clk);
    lv[2] = 1'b0;
    repeat (60) @(negedge clk);
    chk(rq[2].size() == 150, $sformatf("all 150 messages out (%0d)", rq[2].size()));
    for (int n = 0; n < rq[2].size(); n++) chk(rq[2][n].value == 32'(n), "in order");

    // ---- mechanisms ---------------------------------------------------------
    $display("hop inputs %0d, bus transfers %0d (Tile 1: %0d), row-bus transfers %0d, cross-Tile hops %0d, outputs %0d",
             n_hop_in, n_bus, n_bus_t1, n_hbus, n_cross_tile, n_out);
    $display("input stall cycles %0d, output stall cycles %0d, accumulations checked %0d, divisions %0d, round-robin %0d",
             n_in_stall, n_out_stall, n_mm_ok, n_div, n_rr);
    chk(n_hop_in > 0, "hop programming happened");
    chk(n_bus > 0, "vertical bus broadcast happened");
    chk(n_bus_t1 > 0, "bus routed into a second Tile");
    chk(n_hbus > 0, "horizontal bus carried products to the adders");
    chk(n_cross_tile > 0, "messages crossed a Tile boundary");
    chk(n_in_stall > 0, "FIFO-full back-pressure reached an input");
    chk(n_out_stall > 0, "output stall happened");
    chk(n_mm_ok == 12, "stream + accumulate + offload gave all of C");
    chk(n_div == 2, "division happened");
    chk(n_rr == 2, "round-robin next instructions happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
