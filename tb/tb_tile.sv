// tb_tile: 2D convolution across three SiteMs of a Tile.
//
// A 5x5 image is convolved with a 3x3 filter (padding 0, stride 1) giving a
// 3x3 result, with the three-SiteM mapping: SiteM s holds filter row s in
// each of its SiteO rows 0..2 and one adder per row in SiteO column 3. For
// each output column x the host streams, through the Tile's top edge, pixel
// I[i+s][x+k] to SiteO (i,k) of SiteM s (A_MULS). Products go over the row
// buses to the row adders; the adders of SiteMs 0 and 1 are offloaded over their
// vertical buses and their sums hop right into the adders of SiteM 2, whose
// offload then leaves on the Tile's right edge as column x of the result.
// The Tile is 2 x 3 SiteMs and the three used SiteMs are in SiteM row 1, so
// programming and pixels hop through the SiteMs of row 0 first and the bus
// routing must pick SiteM row 1. Integer data keeps every sum exact.
module tb_tile;
  import mipu_pkg::*;
  import tb_fp_pkg::*;

  localparam int MR = 2, MC = 3;
  localparam int NC = 4 * MC, NR = 4 * MR;

  logic clk = 0, rst_n = 0;
  logic [NC-1:0] tv, tr, bv, br, dv, dr;
  logic [NR-1:0] lv, lr, rv, rr;
  msg_t [NC-1:0] tm, bm, dm;
  msg_t [NR-1:0] lm, rm;
  int checks = 0, failures = 0, cyc = 0;

  tile #(.MR(MR), .MC(MC)) dut (.clk, .rst_n, .base_addr(12'h000),
    .top_valid_i(tv), .top_msg_i(tm), .top_ready_o(tr),
    .left_valid_i(lv), .left_msg_i(lm), .left_ready_o(lr),
    .vbus_valid_i(bv), .vbus_msg_i(bm), .vbus_ready_o(br),
    .right_valid_o(rv), .right_msg_o(rm), .right_ready_i(rr),
    .down_valid_o(dv), .down_msg_o(dm), .down_ready_i(dr));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  msg_t rq[NR][$];
  int   stray = 0;
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < NR; i++) if (rv[i] && rr[i]) rq[i].push_back(rm[i]);
    for (int i = 0; i < NC; i++) if (dv[i] && dr[i]) stray++;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  // SiteO (i,k) of SiteM s: global row 4 + i, global column 4s + k
  function automatic addr_t sa(int s, int i, int k);
    return make_addr(6'(4 + i), 6'(4 * s + k));
  endfunction

  // put one message per listed top port, waiting for ready
  task automatic top_send(msg_t m [NC], logic [NC-1:0] use_port);
    @(negedge clk);
    tv = use_port;
    for (int c = 0; c < NC; c++) tm[c] = m[c];
    @(posedge clk);
    while ((tr & use_port) != use_port) @(posedge clk);
    @(negedge clk);
    tv = '0;
  endtask

  task automatic bus_send(int port, msg_t m);
    @(negedge clk);
    bv = '0; bv[port] = 1'b1; bm[port] = m;
    @(posedge clk);
    while (!br[port]) @(posedge clk);
    @(negedge clk);
    bv = '0;
  endtask

  int I[5][5], F[3][3], O[3][3];
  msg_t pm [NC];
  int t0;

  initial begin
    tv = '0; lv = '0; bv = '0; tm = '0; lm = '0; bm = '0; rr = '1; dr = '1;
    for (int y = 0; y < 5; y++) for (int x = 0; x < 5; x++) I[y][x] = int'($urandom_range(15));
    for (int y = 0; y < 3; y++) for (int x = 0; x < 3; x++) F[y][x] = int'($urandom_range(8)) - 4;
    for (int y = 0; y < 3; y++) for (int x = 0; x < 3; x++) begin
      O[y][x] = 0;
      for (int s = 0; s < 3; s++) for (int k = 0; k < 3; k++) O[y][x] += F[s][k] * I[y + s][x + k];
    end
    repeat (3) @(negedge clk);
    rst_n = 1;

    // a bus message for a SiteM row the Tile does not have is taken and dropped
    @(negedge clk);
    bm[0] = make_msg(OP_A_MULS, make_addr(6'd12, 6'd0), 32'h3f80_0000, OP_PROG, '0);
    #1 chk(br[0], "bus to a missing SiteM row is ready");

    // program filter rows and adders
    for (int i = 0; i < 3; i++) begin
      for (int c = 0; c < NC; c++) pm[c] = '0;
      for (int s = 0; s < 3; s++) begin
        for (int k = 0; k < 3; k++)
          pm[4*s + k] = make_msg(OP_PROG, sa(s, i, k), r2f(real'(F[s][k])), OP_A_ADD, sa(s, i, 3));
        pm[4*s + 3] = make_msg(OP_PROG, sa(s, i, 3), 32'h0, OP_A_ADD,
                               (s < 2) ? sa(2, i, 3) : sa(0, i, 0));
      end
      top_send(pm, '1);
    end
    repeat (12) @(negedge clk);

    for (int x = 0; x < 3; x++) begin
      t0 = cyc;
      // stream the three data chunks
      for (int i = 0; i < 3; i++) begin
        for (int c = 0; c < NC; c++) pm[c] = '0;
        for (int s = 0; s < 3; s++) for (int k = 0; k < 3; k++)
          pm[4*s + k] = make_msg(OP_A_MULS, sa(s, i, k), r2f(real'(I[i + s][x + k])), OP_PROG, '0);
        top_send(pm, 12'b0111_0111_0111);
      end
      repeat (12) @(negedge clk);
      // row sums of SiteMs 0 and 1 go to SiteM 2, then clear
      bus_send(3, make_msg(OP_A_ADDS, sa(0, 0, 3), 32'h0, OP_PROG, '0));
      bus_send(7, make_msg(OP_A_ADDS, sa(1, 0, 3), 32'h0, OP_PROG, '0));
      bus_send(3, make_msg(OP_A_MUL, sa(0, 0, 3), 32'h0, OP_PROG, '0));
      bus_send(7, make_msg(OP_A_MUL, sa(1, 0, 3), 32'h0, OP_PROG, '0));
      repeat (14) @(negedge clk);
      // final sums leave SiteM 2
      bus_send(11, make_msg(OP_A_ADDS, sa(2, 0, 3), 32'h0, OP_PROG, '0));
      bus_send(11, make_msg(OP_A_MUL, sa(2, 0, 3), 32'h0, OP_PROG, '0));
      repeat (10) @(negedge clk);
      for (int i = 0; i < 3; i++) begin
        chk(rq[4 + i].size() == 1, $sformatf("one result on right-edge row %0d", 4 + i));
        if (rq[4 + i].size() > 0) begin
          msg_t m;
          m = rq[4 + i].pop_front();
          chk(m.value == r2f(real'(O[i][x])),
              $sformatf("O[%0d][%0d] = %0d, got %h", i, x, O[i][x], m.value));
        end
      end
      $display("output column %0d done in %0d cycles", x, cyc - t0);
    end
    for (int i = 0; i < NR; i++) chk(rq[i].size() == 0, "no extra results");
    chk(stray == 0, "nothing left through the bottom edge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
