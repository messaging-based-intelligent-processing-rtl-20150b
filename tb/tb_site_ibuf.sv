// tb_site_ibuf: self-checking test of the SiteO next-instruction buffer.
//
// Programs one entry, appends up to and past the 8-entry limit, and checks
// that the read pointer walks round-robin over exactly the written entries,
// that PROG restarts the list, and that the full flag stops further appends.
module tb_site_ibuf;
  import mipu_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        prog, append, nxt;
  ibuf_entry_t ein, eout;
  logic        programmed, full;
  int          checks = 0, failures = 0;
  ibuf_entry_t model [$];

  site_ibuf dut (.clk, .rst_n, .prog_i(prog), .append_i(append), .entry_i(ein),
                 .next_i(nxt), .entry_o(eout), .programmed_o(programmed), .full_o(full));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic step(logic p, logic a, logic n, ibuf_entry_t e);
    @(negedge clk); prog = p; append = a; nxt = n; ein = e;
    @(negedge clk); prog = 0; append = 0; nxt = 0;
  endtask

  ibuf_entry_t e;
  initial begin
    prog = 0; append = 0; nxt = 0; ein = '0;
    repeat (2) @(negedge clk);
    chk(!programmed, "empty after reset");
    rst_n = 1;
    for (int round = 0; round < 3; round++) begin
      int n;
      n = (round == 0) ? 1 : (round == 1) ? 5 : 11;
      model.delete();
      for (int i = 0; i < n; i++) begin
        e.op = 4'($urandom); e.dest = 12'($urandom);
        if (i == 0) step(1, 0, 0, e); else step(0, 1, 0, e);
        if (model.size() < 8) model.push_back(e);
      end
      chk(programmed, "programmed");
      chk(full == (model.size() == 8), "full flag");
      for (int k = 0; k < 3 * model.size(); k++) begin
        chk(eout == model[k % model.size()], $sformatf("entry %0d of round %0d", k, round));
        step(0, 0, 1, '0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
