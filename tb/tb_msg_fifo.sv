// tb_msg_fifo: self-checking test of the SiteO message FIFO.
//
// Random pushes and pops are applied against a queue model: the head, the
// valid and ready flags and the occupancy are compared every cycle, a push
// while full must be refused, and a pushed message must be at the head one
// cycle after it was written into an empty FIFO.
module tb_msg_fifo;
  import mipu_pkg::*;

  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, valid, pop;
  msg_t in_msg, head;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  msg_t model[$];

  msg_fifo #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .in_valid_i(in_valid), .in_msg_i(in_msg),
    .in_ready_o(in_ready), .valid_o(valid), .head_o(head), .pop_i(pop), .count_o(count));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  int n_full = 0;
  initial begin
    in_valid = 0; pop = 0; in_msg = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!valid && in_ready && count == 0, "empty after reset");
    // one-cycle visibility
    in_valid = 1; in_msg = 64'hdead_beef_0000_0001;
    @(negedge clk);
    in_valid = 0;
    chk(valid && head == 64'hdead_beef_0000_0001, "visible one cycle after the push");
    pop = 1; @(negedge clk); pop = 0;
    chk(!valid, "empty after the pop");
    for (int i = 0; i < 5000; i++) begin
      logic do_push, do_pop;
      // phases: fill-biased, drain-biased, balanced
      int bias;
      bias = ((i / 500) % 3 == 0) ? 80 : ((i / 500) % 3 == 1) ? 20 : 50;
      do_push = ($urandom_range(99) < bias);
      do_pop  = ($urandom_range(99) >= bias) && valid;
      in_valid = do_push;
      in_msg   = {$urandom, $urandom};
      pop      = do_pop;
      #1;
      chk(valid == (model.size() != 0), "valid");
      chk(in_ready == (model.size() < DEPTH), "ready");
      chk(count == model.size(), "count");
      if (model.size() != 0) chk(head == model[0], "head order");
      if (model.size() == DEPTH) n_full++;
      @(posedge clk);
      if (do_pop) void'(model.pop_front());
      if (do_push && model.size() + (do_pop ? 1 : 0) < DEPTH + (do_pop ? 1 : 0)
          && in_ready) model.push_back(in_msg);
      @(negedge clk);
    end
    chk(n_full > 0, "the FIFO was full at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
