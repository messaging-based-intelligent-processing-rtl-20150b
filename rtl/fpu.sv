// fpu: the floating-point unit of a SiteO (IEEE 754 single precision).
//
// Performs a op b for op in {add, subtract, multiply, divide} with
// round-to-nearest-even. Add, subtract and multiply are combinational: when
// start_i is high with one of them, done_o is high in the same cycle and
// result_o holds the answer, so a SiteO can write it back at that clock edge.
// Divide is a restoring divider that produces one quotient bit per cycle: a
// start with FPU_DIV latches the operands, busy_o stays high for DIV_CYCLES
// cycles and done_o then pulses for one cycle with the quotient on result_o.
// start_i must stay low while busy_o is high.
//
// The m-IPU SiteO computes 32-bit IEEE 754 addition, subtraction,
// multiplication and division; how the FPU is built is this design's choice.
// Simplifications: subnormal inputs are read as zero and results below the
// normal range are flushed to a signed zero; every NaN result is the quiet NaN
// 0x7fc00000; no exception flags are kept.
module fpu
  import mipu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start_i,
  input  fpu_op_e     op_i,
  input  logic [31:0] a_i,
  input  logic [31:0] b_i,
  output logic        busy_o,
  output logic        done_o,
  output logic [31:0] result_o
);

  localparam logic [31:0] QNAN = 32'h7fc0_0000;
  localparam int DIV_CYCLES = 25;  // 24 mantissa bits plus one guard bit

  // ---------------------------------------------------------------- helpers
  function automatic logic is_nan(logic [31:0] x);
    return (x[30:23] == 8'hff) && (x[22:0] != 0);
  endfunction
  function automatic logic is_inf(logic [31:0] x);
    return (x[30:23] == 8'hff) && (x[22:0] == 0);
  endfunction
  function automatic logic is_zero(logic [31:0] x);  // subnormals count as zero
    return (x[30:23] == 8'h00);
  endfunction

  // Pack sign, biased exponent (may be out of range) and a 24-bit mantissa
  // with guard and sticky, rounding to nearest even.
  function automatic logic [31:0] round_pack(logic s, int e, logic [23:0] m, logic g, logic st);
    logic [24:0] mr;
    int          er;
    mr = {1'b0, m} + {24'd0, (g && (st || m[0]))};
    er = e;
    if (mr[24]) begin
      mr = mr >> 1;
      er = er + 1;
    end
    if (er >= 255) return {s, 8'hff, 23'd0};
    if (er <= 0)   return {s, 31'd0};
    return {s, er[7:0], mr[22:0]};
  endfunction

  // ---------------------------------------------------------------- add/sub
  function automatic logic [31:0] fadd(logic [31:0] a, logic [31:0] b_in, logic sub);
    logic [31:0] b, x, y;
    logic [26:0] mx, my, sh;
    logic [27:0] sum;
    int          ex, d, lz;
    logic        st;
    b = {b_in[31] ^ sub, b_in[30:0]};
    if (is_nan(a) || is_nan(b)) return QNAN;
    if (is_inf(a) && is_inf(b)) return (a[31] == b[31]) ? a : QNAN;
    if (is_inf(a)) return a;
    if (is_inf(b)) return b;
    if (is_zero(a) && is_zero(b)) return {a[31] & b[31], 31'd0};
    if (is_zero(a)) return b;
    if (is_zero(b)) return a;
    // order by magnitude: x is the larger
    if (a[30:0] >= b[30:0]) begin x = a; y = b; end
    else begin x = b; y = a; end
    ex = int'(x[30:23]);
    d  = ex - int'(y[30:23]);
    mx = {1'b1, x[22:0], 3'b000};
    my = {1'b1, y[22:0], 3'b000};
    if (d >= 27) begin
      sh = 27'd1;  // only a sticky bit remains
    end else begin
      sh = my >> d;
      st = |(my & ~({27{1'b1}} << d));  // bits shifted out
      sh[0] = sh[0] | st;
    end
    if (x[31] == y[31]) begin
      sum = {1'b0, mx} + {1'b0, sh};
      if (sum[27]) begin
        sum = {1'b0, sum[27:2], sum[1] | sum[0]};
        ex  = ex + 1;
      end
    end else begin
      sum = {1'b0, mx} - {1'b0, sh};
      if (sum == 0) return 32'h0000_0000;
      lz = 0;
      for (int i = 0; i < 27; i++) if (sum[i]) lz = 26 - i;  // highest set bit wins
      sum = sum << lz;
      ex  = ex - lz;
    end
    return round_pack(x[31], ex, sum[26:3], sum[2], sum[1] | sum[0]);
  endfunction

  // ---------------------------------------------------------------- multiply
  function automatic logic [31:0] fmul(logic [31:0] a, logic [31:0] b);
    logic        s;
    logic [47:0] p;
    int          e;
    s = a[31] ^ b[31];
    if (is_nan(a) || is_nan(b)) return QNAN;
    if ((is_inf(a) && is_zero(b)) || (is_zero(a) && is_inf(b))) return QNAN;
    if (is_inf(a) || is_inf(b)) return {s, 8'hff, 23'd0};
    if (is_zero(a) || is_zero(b)) return {s, 31'd0};
    p = {24'd0, 1'b1, a[22:0]} * {24'd0, 1'b1, b[22:0]};
    e = int'(a[30:23]) + int'(b[30:23]) - 127;
    if (p[47]) return round_pack(s, e + 1, p[47:24], p[23], |p[22:0]);
    return round_pack(s, e, p[46:23], p[22], |p[21:0]);
  endfunction

  // ---------------------------------------------------------------- divider
  typedef enum logic [1:0] {D_IDLE, D_RUN, D_DONE} dstate_e;
  dstate_e     dstate;
  logic [4:0]  dcount;
  logic [24:0] rem;      // partial remainder, < 2 * divisor
  logic [23:0] dvsr;
  logic [24:0] quo;
  logic        dsign;
  int          dexp;
  logic [31:0] dres;
  logic        dspecial;  // result decided by the special-case rules

  logic        div_start;
  assign div_start = start_i && (op_i == FPU_DIV) && (dstate == D_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dstate <= D_IDLE;
      dcount <= '0;
      rem    <= '0;
      dvsr   <= '0;
      quo    <= '0;
      dsign  <= 1'b0;
      dexp   <= 0;
      dres   <= '0;
      dspecial <= 1'b0;
    end else begin
      case (dstate)
        D_IDLE: if (div_start) begin
          dsign    <= a_i[31] ^ b_i[31];
          dspecial <= 1'b1;
          if (is_nan(a_i) || is_nan(b_i) || (is_inf(a_i) && is_inf(b_i)) ||
              (is_zero(a_i) && is_zero(b_i))) begin
            dres <= QNAN; dstate <= D_DONE;
          end else if (is_inf(a_i) || is_zero(b_i)) begin
            dres <= {a_i[31] ^ b_i[31], 8'hff, 23'd0}; dstate <= D_DONE;
          end else if (is_zero(a_i) || is_inf(b_i)) begin
            dres <= {a_i[31] ^ b_i[31], 31'd0}; dstate <= D_DONE;
          end else begin
            // normalise so that the dividend mantissa is >= the divisor's
            if (a_i[22:0] >= b_i[22:0]) begin
              rem  <= {1'b0, 1'b1, a_i[22:0]};
              dexp <= int'(a_i[30:23]) - int'(b_i[30:23]) + 127;
            end else begin
              rem  <= {1'b1, a_i[22:0], 1'b0};
              dexp <= int'(a_i[30:23]) - int'(b_i[30:23]) + 126;
            end
            dspecial <= 1'b0;
            dvsr   <= {1'b1, b_i[22:0]};
            quo    <= '0;
            dcount <= 5'(DIV_CYCLES - 1);
            dstate <= D_RUN;
          end
        end
        D_RUN: begin
          if (rem >= {1'b0, dvsr}) begin
            quo <= {quo[23:0], 1'b1};
            rem <= (rem - {1'b0, dvsr}) << 1;
          end else begin
            quo <= {quo[23:0], 1'b0};
            rem <= rem << 1;
          end
          if (dcount == 0) dstate <= D_DONE;
          else dcount <= dcount - 1'b1;
        end
        D_DONE: begin
          dstate <= D_IDLE;
        end
        default: dstate <= D_IDLE;
      endcase
    end
  end

  // Quotient bits: quo[24:1] mantissa, quo[0] guard, remainder != 0 sticky.
  logic [31:0] comb_res, div_res;
  assign div_res = dspecial ? dres : round_pack(dsign, dexp, quo[24:1], quo[0], rem != 0);
  always_comb begin
    if (op_i == FPU_MUL) comb_res = fmul(a_i, b_i);
    else                 comb_res = fadd(a_i, b_i, op_i == FPU_SUB);
  end

  assign result_o = (dstate == D_DONE) ? div_res : comb_res;
  assign busy_o   = (dstate != D_IDLE);
  assign done_o = (start_i && op_i != FPU_DIV && dstate == D_IDLE) || (dstate == D_DONE);

endmodule
