// siteo: SiteO, the message-driven compute site of the m-IPU.
//
// A SiteO holds one stationary 32-bit value R (loaded by programming), a
// next-instruction buffer (site_ibuf), an FP32 unit (fpu) and two message
// FIFOs, Left and Top. Messages arrive from the left neighbour, from the top
// neighbour, or from the vertical bus of its column; they leave to the right
// or bottom neighbour.
//
// Each cycle the head of each FIFO is examined:
//  * destination == my_addr: the message is decoded and executed
//      PROG    R <= value; next-instruction list <= {next_op, next_dest}
//      UPDATE  append {next_op, next_dest} to the next-instruction list
//      A_x     R <= R x value              (x = ADD, SUB, MUL, DIV)
//      A_xS    new message {op, dest from the list, value = R x value}
//              is streamed out; R is kept (stationary operand)
//  * otherwise the message is forwarded unchanged: to the right when its
//    destination is in the same global row as this SiteO, downward if not.
// A generated (streamed) message is routed by the same row rule. At most one
// message is executed per cycle; the left FIFO's head and the top FIFO's head
// may both be forwarded in the same cycle if they leave by different sides.
// The streamed result waits in a one-message output register and has priority
// over forwarded traffic; between the two FIFOs the priority alternates every
// cycle. With empty FIFOs a message needs one cycle from input to output.
// add/sub/mul execute in the cycle the message is taken; divide occupies the
// FPU for 26 cycles, during which execution stalls but forwarding goes on.
//
// A message on the vertical bus is taken by every programmed SiteO of the
// column (broadcast) and executed as if addressed to it; unprogrammed SiteOs
// ignore the bus. bus_ready_o tells the SiteM whether this SiteO can take a
// bus message this cycle; bus_fire_i says the transfer happens. A hop message
// from the top has priority over the bus for the Top FIFO. Compute messages
// reaching a SiteO that was never programmed, and reserved opcodes, are
// consumed and dropped.
//
// A streamed result for a SiteO further right in the same SiteM row is not
// hopped but offered on the row's horizontal bus (hbus_req_o/hbus_msg_o) and
// held until the SiteM grants it (hbus_grant_i). A result the bus delivers to
// this SiteO (hbus_valid_i) enters the Left FIFO; a hop from the left
// neighbour has priority, so hbus_ready_o is low while one arrives.
//
// Follows the m-IPU description: the message fields, the ten instructions,
// the Left/Top FIFOs with full back-pressure, the one-cycle turnout, execution
// on address match and forwarding otherwise, the same-row-right/else-down
// rule, results sent to the row adder over the horizontal bus, the FPU and the
// 8-word instruction buffer. This design's own choices: the meaning of each
// opcode (R op value, "S" = stream the result), the broadcast rule of the
// vertical bus, which results take the horizontal bus, the output priorities
// and FIFO depth.
module siteo
  import mipu_pkg::*;
#(
  parameter int FIFO_DEPTH = 4,
  parameter int IBUF_DEPTH = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  addr_t my_addr,
  // hop input from the left neighbour
  input  logic  left_valid_i,
  input  msg_t  left_msg_i,
  output logic  left_ready_o,
  // hop input from the top neighbour
  input  logic  top_valid_i,
  input  msg_t  top_msg_i,
  output logic  top_ready_o,
  // vertical bus of this column
  input  msg_t  bus_msg_i,
  output logic  bus_ready_o,
  input  logic  bus_fire_i,
  // horizontal bus of this row: send side (a streamed result) ...
  output logic  hbus_req_o,
  output msg_t  hbus_msg_o,
  input  logic  hbus_grant_i,
  // ... and receive side (a result addressed to this SiteO)
  input  logic  hbus_valid_i,
  input  msg_t  hbus_msg_i,
  output logic  hbus_ready_o,
  // hop outputs
  output logic  right_valid_o,
  output msg_t  right_msg_o,
  input  logic  right_ready_i,
  output logic  down_valid_o,
  output msg_t  down_msg_o,
  input  logic  down_ready_i
);

  // ------------------------------------------------------------ input FIFOs
  logic lf_valid, tf_valid, tf_in_ready, tf_push, lf_in_ready;
  msg_t lf_head, tf_head, tf_in;
  logic lf_pop, tf_pop;
  logic programmed;

  msg_fifo #(.DEPTH(FIFO_DEPTH)) u_left (
    .clk, .rst_n,
    .in_valid_i(left_valid_i || hbus_valid_i),
    .in_msg_i(left_valid_i ? left_msg_i : hbus_msg_i), .in_ready_o(lf_in_ready),
    .valid_o(lf_valid), .head_o(lf_head), .pop_i(lf_pop), .count_o());

  always_comb begin
    tf_in = top_msg_i;
    if (!top_valid_i) begin
      tf_in      = bus_msg_i;
      tf_in.dest = my_addr;   // a broadcast copy is addressed to this SiteO
    end
  end
  // a hop from the left has priority over the horizontal bus, and a hop
  // from the top over the vertical bus
  assign left_ready_o = lf_in_ready;
  assign hbus_ready_o = lf_in_ready && !left_valid_i;

  assign tf_push     = top_valid_i || (bus_fire_i && programmed);
  assign top_ready_o = tf_in_ready;
  assign bus_ready_o = !programmed || (tf_in_ready && !top_valid_i);

  msg_fifo #(.DEPTH(FIFO_DEPTH)) u_top (
    .clk, .rst_n,
    .in_valid_i(tf_push), .in_msg_i(tf_in), .in_ready_o(tf_in_ready),
    .valid_o(tf_valid), .head_o(tf_head), .pop_i(tf_pop), .count_o());

  // ------------------------------------------------------------ state
  logic [31:0] r_q;           // stationary / accumulator register
  logic        res_v;         // streamed message waiting to leave
  msg_t        res_q;
  logic        div_pend;      // a division is in the FPU
  logic        div_stream;    // its result is streamed (A_DIVS)
  logic        rr;            // alternating Left/Top priority

  ibuf_entry_t ib_entry, ib_in;
  logic        ib_prog, ib_append, ib_next;

  site_ibuf #(.DEPTH(IBUF_DEPTH)) u_ibuf (
    .clk, .rst_n,
    .prog_i(ib_prog), .append_i(ib_append), .entry_i(ib_in), .next_i(ib_next),
    .entry_o(ib_entry), .programmed_o(programmed), .full_o());

  // ------------------------------------------------------------ decode
  function automatic logic goes_right(addr_t d, addr_t me);
    return global_row(d) == global_row(me);
  endfunction

  logic l_me, t_me;
  assign l_me = lf_valid && (lf_head.dest == my_addr);
  assign t_me = tf_valid && (tf_head.dest == my_addr);

  // pick the message to execute
  logic exec_ok, exec_l, exec_t, exec;
  msg_t xm;
  assign exec_ok = !res_v && !div_pend;
  assign exec_l  = exec_ok && l_me && (rr || !t_me);
  assign exec_t  = exec_ok && t_me && !exec_l;
  assign exec    = exec_l || exec_t;
  assign xm      = exec_l ? lf_head : tf_head;

  logic    is_compute, is_stream, is_div;
  fpu_op_e fop;
  always_comb begin
    is_compute = (xm.op >= OP_A_ADD) && (xm.op <= OP_A_DIVS);
    is_stream  = is_compute && xm.op[0];
    case (xm.op)
      OP_A_ADD, OP_A_ADDS: fop = FPU_ADD;
      OP_A_SUB, OP_A_SUBS: fop = FPU_SUB;
      OP_A_MUL, OP_A_MULS: fop = FPU_MUL;
      default:             fop = FPU_DIV;
    endcase
    is_div = is_compute && (fop == FPU_DIV);
  end

  // ------------------------------------------------------------ FPU
  logic        fpu_start, fpu_busy, fpu_done;
  logic [31:0] fpu_res;
  assign fpu_start = exec && is_compute && programmed;

  fpu u_fpu (
    .clk, .rst_n,
    .start_i(fpu_start), .op_i(fop), .a_i(r_q), .b_i(xm.value),
    .busy_o(fpu_busy), .done_o(fpu_done), .result_o(fpu_res));

  // a result is ready now: combinational op this cycle, or the division ends
  logic wb, wb_stream;
  assign wb        = (fpu_start && !is_div) || (div_pend && fpu_done);
  assign wb_stream = div_pend ? div_stream : is_stream;

  assign ib_prog   = exec && (xm.op == OP_PROG);
  assign ib_append = exec && (xm.op == OP_UPDATE);
  assign ib_in     = '{op: xm.next_op, dest: xm.next_dest};
  assign ib_next   = wb && wb_stream;

  // ------------------------------------------------------------ output arbitration
  logic res_r, res_hb, l_fwd, t_fwd, l_r, t_r;
  assign res_r = goes_right(res_q.dest, my_addr);
  // a result for a SiteO further right in this SiteM row takes the bus
  assign res_hb = (res_q.dest[ADDR_W-1:2] == my_addr[ADDR_W-1:2]) &&
                  (res_q.dest[1:0] > my_addr[1:0]);
  assign hbus_req_o = res_v && res_hb;
  assign hbus_msg_o = res_q;
  assign l_fwd = lf_valid && !l_me;
  assign t_fwd = tf_valid && !t_me;
  assign l_r   = goes_right(lf_head.dest, my_addr);
  assign t_r   = goes_right(tf_head.dest, my_addr);

  typedef enum logic [1:0] {SRC_NONE, SRC_RES, SRC_L, SRC_T} src_e;
  src_e src_right, src_down;

  always_comb begin
    src_right = SRC_NONE;
    src_down  = SRC_NONE;
    if (res_v && res_r && !res_hb)       src_right = SRC_RES;
    else if (l_fwd && l_r && (rr || !(t_fwd && t_r))) src_right = SRC_L;
    else if (t_fwd && t_r)               src_right = SRC_T;
    if (res_v && !res_r)                 src_down = SRC_RES;
    else if (l_fwd && !l_r && (rr || !(t_fwd && !t_r))) src_down = SRC_L;
    else if (t_fwd && !t_r)              src_down = SRC_T;
  end

  always_comb begin
    right_valid_o = (src_right != SRC_NONE);
    down_valid_o  = (src_down != SRC_NONE);
    case (src_right)
      SRC_RES: right_msg_o = res_q;
      SRC_L:   right_msg_o = lf_head;
      default: right_msg_o = tf_head;
    endcase
    case (src_down)
      SRC_RES: down_msg_o = res_q;
      SRC_L:   down_msg_o = lf_head;
      default: down_msg_o = tf_head;
    endcase
  end

  logic right_fire, down_fire;
  assign right_fire = right_valid_o && right_ready_i;
  assign down_fire  = down_valid_o && down_ready_i;

  assign lf_pop = exec_l || (right_fire && src_right == SRC_L) || (down_fire && src_down == SRC_L);
  assign tf_pop = exec_t || (right_fire && src_right == SRC_T) || (down_fire && src_down == SRC_T);

  // ------------------------------------------------------------ registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_q        <= '0;
      res_v      <= 1'b0;
      res_q      <= '0;
      div_pend   <= 1'b0;
      div_stream <= 1'b0;
      rr         <= 1'b0;
    end else begin
      rr <= ~rr;
      if ((right_fire && src_right == SRC_RES) || (down_fire && src_down == SRC_RES) ||
          hbus_grant_i)
        res_v <= 1'b0;
      if (exec && xm.op == OP_PROG) r_q <= xm.value;
      if (fpu_start && is_div) begin
        div_pend   <= 1'b1;
        div_stream <= is_stream;
      end
      if (div_pend && fpu_done) div_pend <= 1'b0;
      if (wb) begin
        if (wb_stream) begin
          res_v <= 1'b1;
          res_q <= make_msg(ib_entry.op, ib_entry.dest, fpu_res, OP_PROG, '0);
        end else begin
          r_q <= fpu_res;
        end
      end
    end
  end

  // The horizontal bus only takes a result this SiteO offers.
  assert property (@(posedge clk) disable iff (!rst_n) hbus_grant_i |-> hbus_req_o)
    else $error("siteo: horizontal bus grant without request");

  // The FPU is never started while it is dividing.
  assert property (@(posedge clk) disable iff (!rst_n) fpu_start |-> !fpu_busy)
    else $error("siteo: FPU started while busy");

endmodule
