// tb_siteo: self-checking test of one SiteO.
//
// The SiteO sits at global row 1, column 1. The test forwards messages in both
// directions and checks the one-cycle turnout, programs the site, streams
// multiply results through a two-entry next-instruction list, accumulates in
// place and offloads with A_ADDS 0, divides (checking the 26-cycle FPU
// occupancy), drives the vertical bus to a programmed and an unprogrammed
// site, and stalls the right output to check the full back-pressure and that
// no message is lost or reordered. Last, the horizontal bus: a result for a
// SiteO further right in the same SiteM row is offered on it and held until
// granted, a result for one to the left still hops, and a bus delivery waits
// while a left hop arrives and is then executed.
module tb_siteo;
  import mipu_pkg::*;
  import tb_fp_pkg::*;

  logic  clk = 0, rst_n = 0;
  addr_t me;
  logic  lv, lr, tv, tr, bready, bfire, rv, rready, dv, dready;
  logic  hreq, hgrant, hvalid, hready;
  msg_t  lm, tm, bm, rm, dm, hm, hin;
  int    checks = 0, failures = 0;
  int    cyc = 0;

  siteo dut (.clk, .rst_n, .my_addr(me),
    .left_valid_i(lv), .left_msg_i(lm), .left_ready_o(lr),
    .top_valid_i(tv), .top_msg_i(tm), .top_ready_o(tr),
    .bus_msg_i(bm), .bus_ready_o(bready), .bus_fire_i(bfire),
    .hbus_req_o(hreq), .hbus_msg_o(hm), .hbus_grant_i(hgrant),
    .hbus_valid_i(hvalid), .hbus_msg_i(hin), .hbus_ready_o(hready),
    .right_valid_o(rv), .right_msg_o(rm), .right_ready_i(rready),
    .down_valid_o(dv), .down_msg_o(dm), .down_ready_i(dready));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output monitor
  msg_t rq[$], dq[$];
  int   rt[$], dt[$];
  always @(posedge clk) begin
    if (rst_n && rv && rready) begin rq.push_back(rm); rt.push_back(cyc); end
    if (rst_n && dv && dready) begin dq.push_back(dm); dt.push_back(cyc); end
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  // send one message on the left or top input; returns the cycle it was taken
  task automatic send(bit from_top, msg_t m, output int taken);
    @(negedge clk);
    if (from_top) begin tv = 1; tm = m; end else begin lv = 1; lm = m; end
    @(posedge clk);
    while (!(from_top ? tr : lr)) @(posedge clk);
    taken = cyc;
    @(negedge clk);
    tv = 0; lv = 0;
  endtask

  task automatic wait_out(bit right, output msg_t m, output int t);
    int n = 0;
    while ((right ? rq.size() : dq.size()) == 0 && n < 200) begin @(posedge clk); n++; end
    #1;
    if (right) begin m = rq.pop_front(); t = rt.pop_front(); end
    else begin m = dq.pop_front(); t = dt.pop_front(); end
  endtask

  localparam logic [31:0] F0 = 32'h0000_0000, F1_5 = 32'h3fc0_0000, F2 = 32'h4000_0000,
                          F3 = 32'h4040_0000, F7 = 32'h40e0_0000;
  msg_t m, o;
  int   t_in, t_out;
  addr_t same_row, other_row, xdst, ydst;

  initial begin
    lv = 0; tv = 0; bfire = 0; lm = '0; tm = '0; bm = '0; rready = 1; dready = 1;
    hgrant = 0; hvalid = 0; hin = '0;
    me        = make_addr(6'd1, 6'd1);
    same_row  = make_addr(6'd1, 6'd9);
    other_row = make_addr(6'd5, 6'd0);
    xdst      = make_addr(6'd1, 6'd13);
    ydst      = make_addr(6'd7, 6'd2);
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. forwarding and one-cycle turnout
    m = make_msg(OP_A_ADD, same_row, 32'h1234_5678, OP_PROG, '0);
    send(0, m, t_in); wait_out(1, o, t_out);
    chk(o == m, "forward right unchanged");
    chk(t_out == t_in + 1, $sformatf("turnout %0d cycles", t_out - t_in));
    m = make_msg(OP_A_MUL, other_row, 32'h0bad_cafe, OP_PROG, '0);
    send(1, m, t_in); wait_out(0, o, t_out);
    chk(o == m, "forward down unchanged");
    chk(t_out == t_in + 1, "turnout down");

    // 2. bus before programming: ignored, always ready
    @(negedge clk);
    chk(bready, "unprogrammed site ready for bus");
    bm = make_msg(OP_A_MULS, '0, F2, OP_PROG, '0); bfire = 1;
    @(negedge clk); bfire = 0;
    repeat (3) @(negedge clk);
    chk(rq.size() == 0 && dq.size() == 0, "bus ignored when unprogrammed");

    // 3. programming: R = 3.0, next = {A_ADD, xdst}
    send(1, make_msg(OP_PROG, me, F3, OP_A_ADD, xdst), t_in);
    // 4. stream a product: 3 * 2 -> {A_ADD, xdst, 6}
    send(0, make_msg(OP_A_MULS, me, F2, OP_PROG, '0), t_in);
    wait_out(1, o, t_out);
    chk(o.op == OP_A_ADD && o.dest == xdst && o.value == r2f(6.0), "A_MULS result message");
    chk(t_out == t_in + 2, "stream latency 2 cycles");
    // 5. second next-instruction entry, then round-robin destinations
    send(1, make_msg(OP_UPDATE, me, F0, OP_A_SUB, ydst), t_in);
    send(0, make_msg(OP_A_MULS, me, F7, OP_PROG, '0), t_in);
    send(0, make_msg(OP_A_MULS, me, F1_5, OP_PROG, '0), t_in);
    send(0, make_msg(OP_A_SUBS, me, F1_5, OP_PROG, '0), t_in);
    wait_out(1, o, t_out);
    chk(o.op == OP_A_ADD && o.dest == xdst && o.value == r2f(21.0), "entry 0 used first");
    wait_out(0, o, t_out);
    chk(o.op == OP_A_SUB && o.dest == ydst && o.value == r2f(4.5), "entry 1 used second (down)");
    wait_out(1, o, t_out);
    chk(o.dest == xdst && o.value == r2f(1.5), "wraps back to entry 0, R stationary");
    // 6. accumulate in place and offload
    send(0, make_msg(OP_A_ADD, me, F1_5, OP_PROG, '0), t_in);
    send(1, make_msg(OP_A_MUL, me, F2, OP_PROG, '0), t_in);
    send(0, make_msg(OP_A_SUB, me, F1_5, OP_PROG, '0), t_in);
    chk(rq.size() == 0 && dq.size() == 0, "in-place ops send nothing");
    send(0, make_msg(OP_A_ADDS, me, F0, OP_PROG, '0), t_in);
    wait_out(0, o, t_out);  // entry 1 (ydst, other row)
    chk(o.value == r2f((3.0 + 1.5) * 2.0 - 1.5), "accumulated value offloaded");
    // 7. division: R = 7.5 / 2 streamed; 26 cycles in the FPU
    send(0, make_msg(OP_A_DIVS, me, F2, OP_PROG, '0), t_in);
    wait_out(1, o, t_out);
    chk(o.value == r2f(7.5 / 2.0), "A_DIVS value");
    chk(t_out == t_in + 28, $sformatf("divide latency %0d", t_out - t_in));
    send(0, make_msg(OP_A_DIV, me, F3, OP_PROG, '0), t_in);
    send(0, make_msg(OP_A_ADDS, me, F0, OP_PROG, '0), t_in);
    wait_out(0, o, t_out);
    chk(o.value == r2f(7.5 / 3.0), "A_DIV in place");
    // 8. bus broadcast to the programmed site: executed with R
    @(negedge clk);
    chk(bready, "programmed site ready for bus");
    bm = make_msg(OP_A_MULS, make_addr(6'd3, 6'd1), F2, OP_PROG, '0); bfire = 1;
    @(negedge clk); bfire = 0;
    wait_out(1, o, t_out);
    chk(o.value == r2f(5.0) && o.dest == xdst, "bus message executed");
    // 9. back-pressure: right output stalled, FIFO fills, nothing lost
    rready = 0;
    @(negedge clk);
    for (int i = 0; i < 4; i++) begin
      lv = 1; lm = make_msg(OP_A_ADD, same_row, 32'(i), OP_PROG, '0);
      @(negedge clk);
    end
    lv = 0;
    chk(!lr, "left input full after FIFO_DEPTH messages");
    repeat (3) @(negedge clk);
    chk(rq.size() == 0, "nothing leaves while stalled");
    rready = 1;
    for (int i = 0; i < 4; i++) begin
      wait_out(1, o, t_out);
      chk(o.value == 32'(i), $sformatf("in-order release %0d", i));
    end
    // 10. horizontal bus, send side: a result for SiteO (1,3) of the same
    //     SiteM row is offered on the bus and held until granted
    send(1, make_msg(OP_PROG, me, F3, OP_A_ADD, make_addr(6'd1, 6'd3)), t_in);
    send(0, make_msg(OP_A_MULS, me, F2, OP_PROG, '0), t_in);
    @(negedge clk);
    chk(hreq && hm.op == OP_A_ADD && hm.dest == make_addr(6'd1, 6'd3) && hm.value == r2f(6.0),
        "result offered on the horizontal bus");
    repeat (3) @(negedge clk);
    chk(hreq && rq.size() == 0 && dq.size() == 0, "held until granted, not hopped");
    hgrant = hreq;   // the bus only grants a pending request
    @(negedge clk); hgrant = 0;
    chk(!hreq, "request dropped after the grant");
    //     a result for a SiteO to the left in the same row still hops right
    send(1, make_msg(OP_PROG, me, F3, OP_A_ADD, make_addr(6'd1, 6'd0)), t_in);
    send(0, make_msg(OP_A_MULS, me, F2, OP_PROG, '0), t_in);
    wait_out(1, o, t_out);
    chk(!hreq && o.dest == make_addr(6'd1, 6'd0) && o.value == r2f(6.0), "leftward result hops");
    // 11. horizontal bus, receive side: a left hop has priority
    @(negedge clk);
    lv = 1; lm = make_msg(OP_A_ADD, same_row, 32'h55, OP_PROG, '0);
    #1 chk(!hready, "bus not ready while a left hop arrives");
    @(negedge clk);
    lv = 0;
    #1 chk(hready, "bus ready without a left hop");
    hvalid = 1; hin = make_msg(OP_A_ADDS, me, F1_5, OP_PROG, '0);
    @(negedge clk); hvalid = 0;
    wait_out(1, o, t_out);
    chk(o.value == 32'h55, "left hop forwarded");
    wait_out(1, o, t_out);
    chk(o.value == r2f(4.5), "bus message executed (3 + 1.5)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
