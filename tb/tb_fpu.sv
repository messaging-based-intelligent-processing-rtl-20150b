// tb_fpu: self-checking test of the SiteO FPU.
//
// Random operands are added, subtracted, multiplied and divided and each
// result is compared bit for bit with a double-precision reference rounded to
// single (tb_fp_pkg). Special values (zero, infinity, NaN) are checked against
// the IEEE rules, and the divider's latency against its specified
// DIV_CYCLES + 1 cycles from start to done.
module tb_fpu;
  import mipu_pkg::*;
  import tb_fp_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        start;
  fpu_op_e     op;
  logic [31:0] a, b, res;
  logic        busy, done;
  int          checks = 0, failures = 0;

  fpu dut (.clk, .rst_n, .start_i(start), .op_i(op), .a_i(a), .b_i(b),
           .busy_o(busy), .done_o(done), .result_o(res));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_op(fpu_op_e o, logic [31:0] x, logic [31:0] y);
    case (o)
      FPU_ADD: return r2f(f2r(x) + f2r(y));
      FPU_SUB: return r2f(f2r(x) - f2r(y));
      FPU_MUL: return r2f(f2r(x) * f2r(y));
      default: return r2f(f2r(x) / f2r(y));
    endcase
  endfunction

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: a=%h b=%h got=%h exp=%h", what, a, b, got, exp);
    end
  endtask

  // run one operation and return its result; combinational ops finish at once
  task automatic run(fpu_op_e o, logic [31:0] x, logic [31:0] y, output logic [31:0] r,
                     output int lat);
    @(negedge clk);
    op = o; a = x; b = y; start = 1;
    lat = 0;
    if (o != FPU_DIV) begin
      #1;
      if (!done) begin failures++; $display("FAIL: no done for op %0d", o); end
      r = res;
      @(negedge clk); start = 0;
    end else begin
      @(negedge clk); start = 0; lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      r = res;
    end
  endtask

  logic [31:0] r;
  int lat;
  initial begin
    start = 0; op = FPU_ADD; a = 0; b = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // random normal operands, moderate exponent range
    for (int i = 0; i < 3000; i++) begin
      fpu_op_e o;
      logic [31:0] x, y;
      o = fpu_op_e'(i % 4);
      x = rand_f(20);
      y = (i % 7 == 0) ? {~x[31], x[30:0]} ^ 32'(($urandom_range(3))) : rand_f(20);
      run(o, x, y, r, lat);
      check($sformatf("op%0d", o), r, ref_op(o, x, y));
      if (o == FPU_DIV) begin
        checks++;
        if (lat != 26) begin failures++; $display("FAIL div latency %0d", lat); end
      end
    end
    // exact cancellation and special values
    run(FPU_SUB, 32'h3f80_0000, 32'h3f80_0000, r, lat); check("x-x", r, 32'h0000_0000);
    run(FPU_ADD, 32'h7f80_0000, 32'hff80_0000, r, lat); check("inf-inf", r, 32'h7fc0_0000);
    run(FPU_MUL, 32'h7f80_0000, 32'h0000_0000, r, lat); check("inf*0", r, 32'h7fc0_0000);
    run(FPU_MUL, 32'h7f00_0000, 32'h7f00_0000, r, lat); check("overflow", r, 32'h7f80_0000);
    run(FPU_MUL, 32'h0080_0000, 32'h0080_0000, r, lat); check("underflow", r, 32'h0000_0000);
    run(FPU_ADD, 32'h0000_0000, 32'hc040_0000, r, lat); check("0+x", r, 32'hc040_0000);
    run(FPU_DIV, 32'h3f80_0000, 32'h0000_0000, r, lat); check("1/0", r, 32'h7f80_0000);
    run(FPU_DIV, 32'h0000_0000, 32'h0000_0000, r, lat); check("0/0", r, 32'h7fc0_0000);
    run(FPU_DIV, 32'h4040_0000, 32'h7f80_0000, r, lat); check("3/inf", r, 32'h0000_0000);
    run(FPU_DIV, 32'h3f80_0000, 32'h4040_0000, r, lat); check("1/3", r, 32'h3eaa_aaab);
    run(FPU_ADD, 32'h3f80_0000, 32'h3380_0000, r, lat); check("1+2^-24 tie", r, 32'h3f80_0000);
    run(FPU_ADD, 32'h3f80_0001, 32'h3380_0000, r, lat); check("tie to even up", r, 32'h3f80_0002);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
