// tb_sitem: matrix-matrix multiplication in one SiteM.
//
// C = A x B with A 4x3 and B 3x3, the single-SiteM mapping: SiteO (i,k),
// k < 3, holds A[i][k] and SiteO (i,3) accumulates row i. A is programmed
// once by hopping from the top edge; then, for each column j of B, element
// B[k][j] is broadcast on vertical bus k (A_MULS), the products go over the
// row's horizontal bus to its adder (A_ADD), and the host offloads the four
// sums with one A_ADDS 0 broadcast on bus 3 and clears them with A_MUL 0.
// Results leave on the right edge (row i) and are compared with C computed
// here; all 36 products must have taken a horizontal bus. Operands are
// small integers so every sum is exact whatever the order of accumulation.
// The cycle count from a B broadcast to its results is checked against the
// schedule worked out for this design (7 cycles).
module tb_sitem;
  import mipu_pkg::*;
  import tb_fp_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [3:0] tv, tr, lv, lr, bv, br, rv, rr, dv, dr;
  msg_t [3:0] tm, lm, bm, rm, dm;
  int checks = 0, failures = 0, cyc = 0;
  addr_t base;

  sitem dut (.clk, .rst_n, .base_addr(base),
    .top_valid_i(tv), .top_msg_i(tm), .top_ready_o(tr),
    .left_valid_i(lv), .left_msg_i(lm), .left_ready_o(lr),
    .vbus_valid_i(bv), .vbus_msg_i(bm), .vbus_ready_o(br),
    .right_valid_o(rv), .right_msg_o(rm), .right_ready_i(rr),
    .down_valid_o(dv), .down_msg_o(dm), .down_ready_i(dr));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  msg_t rq[4][$];
  int   rt[4][$];
  int   stray = 0;
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 4; i++) begin
      if (rv[i] && rr[i]) begin rq[i].push_back(rm[i]); rt[i].push_back(cyc); end
      if (dv[i] && dr[i]) stray++;
    end
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  function automatic addr_t sa(int r, int c);
    return {base[11:4], 2'(r), 2'(c)};
  endfunction

  int A[4][3], B[3][3], C[4][3];
  int t_b, t_prog0;
  // cycles between the B broadcast and the offload broadcast
  localparam int OFFLOAD_WAIT = 4;
  // horizontal bus transfers (products to the row adders)
  int n_hbus = 0;
  for (genvar r = 0; r < 4; r++) begin : g_cnt
    always @(posedge clk) if (rst_n && dut.g_hbus[r].fire) n_hbus++;
  end

  initial begin
    tv = 0; lv = 0; bv = 0; tm = '0; lm = '0; bm = '0; rr = '1; dr = '1;
    base = 12'h5a0;  // any SiteM of the Block
    for (int i = 0; i < 4; i++) for (int k = 0; k < 3; k++) A[i][k] = int'($urandom_range(19)) - 9;
    for (int k = 0; k < 3; k++) for (int j = 0; j < 3; j++) B[k][j] = int'($urandom_range(19)) - 9;
    for (int i = 0; i < 4; i++) for (int j = 0; j < 3; j++) begin
      C[i][j] = 0;
      for (int k = 0; k < 3; k++) C[i][j] += A[i][k] * B[k][j];
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // Step a: program A and the adders, one message per column and cycle
    t_prog0 = cyc;
    for (int i = 3; i >= 0; i--) begin
      for (int c = 0; c < 4; c++) begin
        tv[c] = 1;
        if (c < 3) tm[c] = make_msg(OP_PROG, sa(i, c), r2f(real'(A[i][c])), OP_A_ADD, sa(i, 3));
        else       tm[c] = make_msg(OP_PROG, sa(i, c), 32'h0, OP_A_ADD, sa(i, 0));
      end
      @(negedge clk);
      chk(tr == 4'hf, "top inputs accept programming");
    end
    tv = 0;
    repeat (8) @(negedge clk);
    chk(dut.g_row[3].g_col[2].u_siteo.r_q == r2f(real'(A[3][2])), "A[3][2] programmed by hopping");

    // Steps b-d for each column of B
    for (int j = 0; j < 3; j++) begin
      bv = 4'b0111;
      for (int k = 0; k < 3; k++) bm[k] = make_msg(OP_A_MULS, sa(0, k), r2f(real'(B[k][j])), OP_PROG, '0);
      #1 chk(br[2:0] == 3'b111, "vertical buses ready");
      t_b = cyc;
      @(negedge clk); bv = 0;
      repeat (OFFLOAD_WAIT) @(negedge clk);
      bv = 4'b1000; bm[3] = make_msg(OP_A_ADDS, sa(0, 3), 32'h0, OP_PROG, '0);   // offload
      @(negedge clk);
      bm[3] = make_msg(OP_A_MUL, sa(0, 3), 32'h0, OP_PROG, '0);                  // clear
      @(negedge clk); bv = 0;
      repeat (6) @(negedge clk);
      for (int i = 0; i < 4; i++) begin
        chk(rq[i].size() == 1, $sformatf("one result from row %0d", i));
        if (rq[i].size() > 0) begin
          msg_t m; int t;
          m = rq[i].pop_front(); t = rt[i].pop_front();
          chk(m.value == r2f(real'(C[i][j])), $sformatf("C[%0d][%0d] = %0d (got %h)", i, j, C[i][j], m.value));
          chk(t - t_b == OFFLOAD_WAIT + 3, $sformatf("B column to result latency %0d", t - t_b));
        end
      end
    end
    chk(stray == 0, "no message left through the bottom edge");
    chk(n_hbus == 36, $sformatf("all 36 products took the horizontal bus (%0d)", n_hbus));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
